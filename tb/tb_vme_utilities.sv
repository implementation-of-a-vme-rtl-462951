// tb_vme_utilities: self-checking test of the VME utility functions.
// Two instances share a modelled backplane: A in slot 1 (system controller)
// and B further down the bus grant daisy chain (BG3OUT* of A feeds BG3IN*
// of B); both request on level 3. The reset length is cut to 50 cycles.
// Checks: SYSRESET* low for exactly 50 cycles after reset and after the
// software command, and never driven by B; B gets the bus through A's
// arbiter and A's chain; A waits while B holds BBSY* and gets the bus
// after; a request from a third board on level 1 is granted on BG1OUT* of
// B (passed through both); the IACK chain starts from IACK* in slot 1 and
// from IACKIN* elsewhere.
module tb_vme_utilities;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic req_a = 0, req_b = 0, gnt_a, gnt_b, cmd = 0, sysr_a, sysr_b, ieff_a, ieff_b;
  logic [3:0] br_a, br_b, bgout_a, bgout_b, br, ext_br = 4'hF;
  logic bbsy_a, bbsy_b, bbsy, ext_bbsy = 1, iack_n = 1, iackin_n = 1;
  assign br   = br_a & br_b & ext_br;
  assign bbsy = bbsy_a & bbsy_b & ext_bbsy;

  vme_utilities #(.BR_LEVEL(3), .SYSRESET_CYCLES(50)) u_a (
    .clk, .rst_n, .sysctrl(1'b1), .bus_req(req_a), .bus_gnt(gnt_a), .br_n_i(br), .br_n_o(br_a),
    .bgin_n(4'hF), .bgout_n(bgout_a), .bbsy_n_i(bbsy), .bbsy_n_o(bbsy_a), .sysreset_cmd(cmd),
    .sysreset_n_o(sysr_a), .iack_n, .iackin_n(1'b1), .iackin_eff_n(ieff_a));
  vme_utilities #(.BR_LEVEL(3), .SYSRESET_CYCLES(50)) u_b (
    .clk, .rst_n, .sysctrl(1'b0), .bus_req(req_b), .bus_gnt(gnt_b), .br_n_i(br), .br_n_o(br_b),
    .bgin_n(bgout_a), .bgout_n(bgout_b), .bbsy_n_i(bbsy), .bbsy_n_o(bbsy_b), .sysreset_cmd(cmd),
    .sysreset_n_o(sysr_b), .iack_n, .iackin_n, .iackin_eff_n(ieff_b));

  int low_a = 0, low_b = 0, both = 0;
  always @(posedge clk) begin
    if (!sysr_a && rst_n) low_a++;
    if (!sysr_b && rst_n) low_b++;
    if (gnt_a && gnt_b) both++;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (80) @(posedge clk);
    check(low_a >= 49 && low_a <= 51 && low_b == 0, $sformatf("SYSRESET* after reset: %0d cycles (B %0d)", low_a, low_b));
    @(posedge clk); cmd <= 1; @(posedge clk); cmd <= 0;
    repeat (80) @(posedge clk);
    check(low_a >= 99 && low_a <= 102, $sformatf("SYSRESET* after command: %0d cycles in all", low_a));
    // B requests: the grant comes through A's chain
    req_b = 1;
    t = 0; while (gnt_b !== 1'b1 && t < 200) begin @(posedge clk); t++; end
    check(t < 200, "B granted");
    check(!bbsy && bgout_b[3], "B holds BBSY* and keeps the grant");
    // A requests while B holds the bus
    req_a = 1; repeat (30) @(posedge clk);
    check(!gnt_a, "A waits while B owns the bus");
    req_b = 0;
    t = 0; while (gnt_a !== 1'b1 && t < 200) begin @(posedge clk); t++; end
    check(t < 200, "A granted after B released");
    req_a = 0; repeat (10) @(posedge clk);
    check(bbsy, "BBSY* released");
    // a third board on level 1 below B
    ext_br[1] = 0;
    t = 0; while (bgout_b[1] !== 1'b0 && t < 200) begin @(posedge clk); t++; end
    check(t < 200, "level-1 grant passed down the chain");
    ext_bbsy = 0; ext_br[1] = 1; repeat (10) @(posedge clk);
    check(bgout_b[1], "grant removed once BBSY* is taken");
    ext_bbsy = 1; repeat (10) @(posedge clk);
    check(both == 0, "never two owners");
    // IACK chain start
    iack_n = 0; #1;
    check(!ieff_a && ieff_b, "slot 1 starts the chain from IACK*");
    iackin_n = 0; #1;
    check(!ieff_b, "other slots use IACKIN*");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
