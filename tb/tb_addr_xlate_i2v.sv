// tb_addr_xlate_i2v: self-checking test of the IBUS-to-VME decoder.
// Loads 16 random capability entries, then checks random IBUS addresses
// inside and outside the VME window and the register region against the
// translation rule: VME address = entry base (bits 31:20) followed by the
// word offset in the 256-kword region times four.
module tb_addr_xlate_i2v;
  import vmebr_pkg::*;
  logic [31:0] ibus_addr, mask, vme_addr;
  logic [31:22] vme_win;
  logic [31:18] reg_region;
  cap_t caps [16];
  cap_t cap;
  logic hit_reg, hit_vme;
  int checks = 0, failures = 0;
  logic clk = 0;

  addr_xlate_i2v dut (.ibus_addr, .vme_win, .reg_region, .caps, .hit_reg, .hit_vme, .mask, .vme_addr, .cap);
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
    vme_win = 10'h2A5; reg_region = 14'h0123;
    for (int i = 0; i < 16; i++) caps[i] = cap_t'($urandom);
    for (int n = 0; n < 400; n++) begin
      int kind;
      logic [31:0] exp_v;
      kind = n % 3;
      ibus_addr = $urandom;
      if (kind == 0) ibus_addr[31:22] = vme_win;
      if (kind == 1) ibus_addr[31:18] = reg_region;
      #1;
      if (kind == 0) begin
        exp_v = {caps[ibus_addr[21:18]].vbase, ibus_addr[17:0], 2'b00};
        check(hit_vme && !hit_reg, "VME window hit");
        check(vme_addr == exp_v, $sformatf("VME address %h expected %h", vme_addr, exp_v));
        check(cap == caps[ibus_addr[21:18]], "capability entry selected");
        check(mask == 32'h003F_FFFF, "VME window wraps at 4 Mwords");
      end else if (kind == 1) begin
        check(hit_reg && !hit_vme, "register region hit");
        check(mask == 32'h0000_00FF, "register area wraps at 256 words");
      end else begin
        check(hit_vme == (ibus_addr[31:22] == vme_win) && hit_reg == (!hit_vme && ibus_addr[31:18] == reg_region),
              "random address decode");
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
