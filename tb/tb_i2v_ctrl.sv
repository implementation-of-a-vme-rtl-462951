// tb_i2v_ctrl: self-checking test of the IBUS-to-VME controller.
// The controller gets a real bridge_fifo, a behavioural VME master (moves
// words between the FIFO and a 1024-word VME memory at VME 0, BERR* from
// VME address 1000h up) and a testbench stand-in for the IBUS slave: it
// raises s_start, writes bursts of 16 words into the FIFO, each started
// when burst_ok is high, or
// takes words from the FIFO (or fill words), then raises s_end.
// Tests: a 20-word write through a BLT entry (two VME block writes, 16 and
// 4 words, the second one only after the first is out), an 8-word write
// through an MBLT entry (D64 block), a single write through a plain entry,
// a 20-word read (read-ahead of 16, then 16 more, stopped at the end) and a
// read that meets BERR* (completed with fill words, err raised).
module tb_i2v_ctrl;
  import vmebr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic own = 0, need, s_start = 0, s_end = 0, s_rnw = 0, s_wr = 0, burst_ok, f_clear;
  logic [31:0] s_vaddr = 0;
  cap_t s_cap = '0;
  logic v_start, v_rnw, v_blk, v_stop, v_busy, v_done = 0, v_berr = 0, err, fill;
  logic [31:0] v_addr;
  logic [5:0] v_am;
  dwidth_e v_dw;
  logic [15:0] v_count;
  logic f_push, f_pop, f_empty, f_full;
  logic [31:0] f_wdata, f_rdata, f_cdata;
  logic [4:0] f_count;
  logic t_push = 0, t_pop = 0, v_push = 0, v_pop = 0;
  logic [31:0] t_wdata = 0, v_wdata = 0;

  i2v_ctrl dut (.clk, .rst_n, .own, .need, .s_start, .s_end, .s_rnw, .s_wr, .s_vaddr, .s_cap, .burst_ok, .f_clear,
                .f_count, .v_start, .v_rnw, .v_addr, .v_am, .v_dw, .v_blk, .v_count, .v_stop, .v_busy, .v_done,
                .v_berr, .err, .fill);
  assign f_push  = t_push || v_push;
  assign f_wdata = v_push ? v_wdata : t_wdata;
  assign f_pop   = (t_pop && !fill) || v_pop;
  bridge_fifo #(.DEPTH(16), .WIDTH(32)) u_fifo (.clk, .rst_n, .clear(f_clear), .push(f_push), .wdata(f_wdata),
                .pop(f_pop), .rdata(f_rdata), .cidx(4'd0), .cdata(f_cdata), .count(f_count), .empty(f_empty),
                .full(f_full));
  always @(posedge clk) own <= need;

  // behavioural VME master
  logic [31:0] vmem [1024];
  int v_left = 0, n_vw = 0, n_vr = 0;
  int counts [$];
  logic [31:0] va;
  logic vr, vact = 0, vbad, stop_q = 0;
  dwidth_e last_dw;
  logic last_blk;
  assign v_busy = vact;
  always @(posedge clk) begin
    v_done <= 0; v_push <= 0; v_pop <= 0;
    if (v_stop) stop_q <= 1;
    if (v_start && rst_n) begin
      vact <= 1; v_left <= int'(v_count); va <= v_addr; vr <= v_rnw; vbad <= v_addr >= 32'h1000; stop_q <= 0;
      last_dw <= v_dw; last_blk <= v_blk; counts.push_back(int'(v_count));
      if (v_rnw) n_vr++; else n_vw++;
    end else if (vact) begin
      if (v_left == 0 || vbad || (vr && (stop_q || v_stop))) begin vact <= 0; v_done <= 1; v_berr <= vbad; end
      else if (vr) begin
        if (f_count < 5'd15) begin v_push <= 1; v_wdata <= vmem[va[11:2]]; va <= va + 4; v_left <= v_left - 1; end
      end else if (!f_empty && !v_pop) begin v_pop <= 1; vmem[va[11:2]] <= f_rdata; va <= va + 4; v_left <= v_left - 1; end
    end
  end

  task automatic ib_write(input logic [31:0] va0, input cap_t c, input int n, input logic [31:0] base);
    int i = 0, t = 0;
    @(posedge clk); s_start <= 1; s_rnw <= 0; s_vaddr <= va0; s_cap <= c;
    @(posedge clk); s_start <= 0;
    while (i < n && t < 3000) begin
      @(posedge clk); t++;
      t_push <= 0; s_wr <= 0;
      // a burst of up to 16 words starts only on burst_ok (the slave's ACK)
      if (i % 16 != 0 ? !t_push || f_count < 5'd16 : (burst_ok && !t_push)) begin
        t_push <= 1; s_wr <= 1; t_wdata <= base + i; s_vaddr <= va0 + 32'(4 * i); i++;
      end
    end
    @(posedge clk); t_push <= 0; s_wr <= 0;
    @(posedge clk); s_end <= 1; @(posedge clk); s_end <= 0;
    t = 0; while (need && t < 3000) begin @(posedge clk); t++; end
    check(t < 3000 && i == n, "IBUS write finished");
  endtask
  task automatic ib_read(input logic [31:0] va0, input cap_t c, input int n, output logic [31:0] got [32]);
    int i = 0, t = 0;
    @(posedge clk); s_start <= 1; s_rnw <= 1; s_vaddr <= va0; s_cap <= c;
    @(posedge clk); s_start <= 0;
    while (i < n && t < 3000) begin
      @(posedge clk); t++;
      t_pop <= 0;
      if (own && (!f_empty || fill) && !t_pop) begin t_pop <= 1; got[i] = fill ? 32'hFFFF_FFFF : f_rdata; i++; end
    end
    @(posedge clk); t_pop <= 0;
    @(posedge clk); s_end <= 1; @(posedge clk); s_end <= 0;
    t = 0; while (need && t < 3000) begin @(posedge clk); t++; end
    check(t < 3000 && i == n, "IBUS read finished");
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cap_t c_blt, c_mblt, c_single;
    logic [31:0] got [32];
    int w;
    for (int i = 0; i < 1024; i++) vmem[i] = 32'h9000_0000 + i;
    c_blt    = '{vbase: 12'h000, am: 6'h0B, dw: DW_D32, blt: 1'b1, mblt: 1'b0, rsvd: '0};
    c_mblt   = '{vbase: 12'h000, am: 6'h08, dw: DW_D64, blt: 1'b1, mblt: 1'b1, rsvd: '0};
    c_single = '{vbase: 12'h000, am: 6'h09, dw: DW_D32, blt: 1'b0, mblt: 1'b0, rsvd: '0};
    repeat (3) @(posedge clk); rst_n = 1;
    // 20-word BLT write at VME 100h
    counts = {};
    ib_write(32'h100, c_blt, 20, 32'hA000_0000);
    w = 0; for (int i = 0; i < 20; i++) if (vmem[64 + i] != 32'hA000_0000 + i) w++;
    check(w == 0, $sformatf("BLT write data: %0d wrong", w));
    check(counts.size() == 2 && counts[0] == 16 && counts[1] == 4 && last_blk && last_dw == DW_D32,
          $sformatf("two VME block writes of 16 and 4 (%0d)", counts.size()));
    // 8-word MBLT write at VME 400h
    ib_write(32'h400, c_mblt, 8, 32'hB000_0000);
    w = 0; for (int i = 0; i < 8; i++) if (vmem[256 + i] != 32'hB000_0000 + i) w++;
    check(w == 0 && last_dw == DW_D64 && last_blk, "MBLT write");
    // single write, plain entry
    ib_write(32'h800, c_single, 1, 32'hC000_0000);
    check(vmem[512] == 32'hC000_0000 && !last_blk, "single-cycle write");
    // 20-word read from VME 40h
    counts = {};
    ib_read(32'h40, c_blt, 20, got);
    w = 0; for (int i = 0; i < 20; i++) if (got[i] != 32'h9000_0010 + i) w++;
    check(w == 0, $sformatf("read data: %0d wrong", w));
    check(n_vr >= 2, "read ahead in two VME block reads");
    // read that meets BERR*
    fork
      ib_read(32'h2000, c_blt, 3, got);
      begin int t = 0; while (!err && t < 3000) begin @(posedge clk); t++; end check(t < 3000, "err on VME BERR*"); end
    join
    check(got[0] == 32'hFFFF_FFFF && got[2] == 32'hFFFF_FFFF, "read completed with fill words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
