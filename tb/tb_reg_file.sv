// tb_reg_file: self-checking test of the register area.
// Checks reset values (identification, windows from the address switches,
// timing), byte-enable writes from the VME port, full writes from the IBUS
// port, the read-only words, write-1-to-clear status, the DMA start pulse
// and busy read-back, the capability entries and the RAM part against a
// reference model kept in the testbench.
module tb_reg_file;
  import vmebr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic a_we = 0, b_we = 0;
  logic [7:0] a_idx = 0, b_idx = 0;
  logic [3:0] a_be = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [3:0] status_set = 0;
  logic dma_busy = 0, iack_stat_we = 0;
  logic [31:0] iack_stat = 0;
  logic [31:0] ctrl, status, vwin, iwin, i2vwin, timing, dma_vaddr, dma_iaddr, dma_len, dma_ctrl, irq_cfg, irq_id;
  cap_t caps [16];
  logic dma_start, sysreset_cmd;
  int checks = 0, failures = 0;
  logic [31:0] model [256];
  bit          known [256];   // model word has been written
  int starts = 0;

  reg_file dut (.clk, .rst_n, .hw_addr(16'hC42A), .a_we, .a_idx, .a_be, .a_wdata, .a_rdata,
                .b_we, .b_idx, .b_wdata, .b_rdata, .status_set, .dma_busy, .iack_stat_we, .iack_stat,
                .ctrl, .status, .vwin, .iwin, .i2vwin, .timing, .dma_vaddr, .dma_iaddr, .dma_len, .dma_ctrl,
                .irq_cfg, .irq_id, .caps, .dma_start, .sysreset_cmd);
  always #5 clk = ~clk;
  always @(posedge clk) if (dma_start) starts++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic vwr(input logic [7:0] idx, input logic [31:0] d, input logic [3:0] be);
    a_we <= 1; a_idx <= idx; a_wdata <= d; a_be <= be; @(posedge clk); a_we <= 0; @(posedge clk);
  endtask
  task automatic iwr(input logic [7:0] idx, input logic [31:0] d);
    b_we <= 1; b_idx <= idx; b_wdata <= d; @(posedge clk); b_we <= 0; @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    a_idx = R_ID; #1; check(a_rdata == BRIDGE_ID, "ID register");
    check(vwin[31:24] == 8'hC4 && vwin[23:16] == 8'h2A, "windows from switches");
    check(timing[3:0] == 4'd3 && timing[7:4] == 4'd2, "timing reset value");
    vwr(R_ID, 32'h0, 4'hF); a_idx = R_ID; #1; check(a_rdata == BRIDGE_ID, "ID is read-only");
    // RAM and capability words through both ports with a reference model
    for (int i = 0; i < 256; i++) begin model[i] = '0; known[i] = 1'b0; end
    for (int n = 0; n < 300; n++) begin
      logic [7:0] idx; logic [31:0] d; logic [3:0] be;
      idx = 8'($urandom_range(16, 255)); d = $urandom; be = 4'($urandom_range(1, 15));
      if (n % 2 == 0) begin
        iwr(idx, d); model[idx] = d; known[idx] = 1'b1;
      end else if (known[idx]) begin
        vwr(idx, d, be);
        for (int b = 0; b < 4; b++) if (be[b]) model[idx][8*b +: 8] = d[8*b +: 8];
      end else begin
        vwr(idx, d, 4'hF); model[idx] = d; known[idx] = 1'b1;
      end
      b_idx = idx; #1;
      check(b_rdata == model[idx], $sformatf("word %0d read %h expected %h", idx, b_rdata, model[idx]));
      if (idx >= 16 && idx < 32) check(32'(caps[idx - 16]) == model[idx], "capability entry output");
    end
    // status: set by hardware, cleared by writing 1
    @(posedge clk); status_set <= 4'b1010; @(posedge clk); status_set <= 0; @(posedge clk);
    check(status[3:0] == 4'b1010, "status bits set");
    vwr(R_STATUS, 32'h8, 4'h1);
    check(status[3:0] == 4'b0010, "write 1 clears only that bit");
    // DMA start pulse and busy read-back
    iwr(R_DMA_CTRL, 32'h0000_0403);
    @(posedge clk); #1;
    check(starts == 1, "DMA start pulse");
    dma_busy = 1; a_idx = R_DMA_CTRL; #1;
    check(a_rdata[0] == 1'b1 && a_rdata[10:1] == 10'h201, "DMA control read-back with busy");
    dma_busy = 0;
    // interrupt status word stored by hardware only
    iack_stat_we <= 1; iack_stat <= 32'h0000_05A7; @(posedge clk); iack_stat_we <= 0; @(posedge clk);
    vwr(R_IACK_STAT, 32'hFFFF_FFFF, 4'hF);
    a_idx = R_IACK_STAT; #1; check(a_rdata == 32'h0000_05A7, "IACK status word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
