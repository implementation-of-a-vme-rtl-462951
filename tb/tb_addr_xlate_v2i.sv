// tb_addr_xlate_v2i: self-checking test of the VME slave decoder.
// Checks A32 cycles into the IBUS window (all A32 data, program, BLT and
// MBLT codes), A24 cycles into the register window, CR/CSR cycles for the
// board's slot, misses, the module-enable gate and the IBUS address formula.
module tb_addr_xlate_v2i;
  import vmebr_pkg::*;
  logic [31:0] vme_addr, ibus_addr;
  logic [5:0]  am;
  logic        data_en;
  target_e     tgt;
  logic [7:0]  reg_idx;
  logic clk = 0;
  int checks = 0, failures = 0;
  localparam logic [5:0] A32_AMS [8] = '{6'h08, 6'h09, 6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E, 6'h0F};
  localparam logic [5:0] A24_AMS [8] = '{6'h38, 6'h39, 6'h3A, 6'h3B, 6'h3C, 6'h3D, 6'h3E, 6'h3F};

  addr_xlate_v2i dut (.vme_addr, .am, .data_en, .a32_win(8'hC4), .a24_win(14'h2A7D), .csr_slot(5'd5),
                      .ibus_base(10'h155), .tgt, .ibus_addr, .reg_idx);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_en = 1;
    for (int n = 0; n < 200; n++) begin
      vme_addr = $urandom; vme_addr[31:24] = 8'hC4; am = A32_AMS[n % 8]; #1;
      check(tgt == TGT_IBUS, $sformatf("A32 AM %h into IBUS window", am));
      check(ibus_addr == {10'h155, vme_addr[23:2]}, "IBUS word address");
      vme_addr[31:24] = 8'hC5; #1;
      check(tgt == TGT_NONE, "A32 outside the window");
      vme_addr = $urandom; vme_addr[23:10] = 14'h2A7D; am = A24_AMS[n % 8]; #1;
      check(tgt == TGT_REG && reg_idx == vme_addr[9:2], "A24 register window");
      am = 6'h29; #1;
      check(tgt == TGT_NONE, "A16 not answered");
      vme_addr = $urandom; vme_addr[23:19] = 5'd5; am = 6'h2F; #1;
      check(tgt == TGT_CSR, "CR/CSR slot 5");
      vme_addr[23:19] = 5'd6; #1;
      check(tgt == TGT_NONE, "CR/CSR other slot");
      @(posedge clk);
    end
    data_en = 0; vme_addr = 32'hC400_0000; am = 6'h09; #1;
    check(tgt == TGT_NONE, "disabled module ignores A32");
    vme_addr = 32'h0028_0000; am = 6'h2F; #1;
    check(tgt == TGT_CSR, "disabled module still answers CR/CSR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
