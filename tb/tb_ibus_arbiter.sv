// tb_ibus_arbiter: self-checking test of the IBUS bus controller.
// Three masters request in random patterns; the test checks that at most
// one grant is active, that a grant is only given to a requester, that a
// grant is held while its request stays up, and that waiting requesters are
// served round-robin (none waits for more than two other tenures).
module tb_ibus_arbiter;
  logic clk = 0, rst_n = 0, ce = 1;
  logic [2:0] req, gnt, gnt_d;
  int checks = 0, failures = 0;
  int wait_tenures [3];
  int served [3];

  ibus_arbiter #(.N_MASTERS(3)) dut (.clk, .rst_n, .ce, .req, .gnt);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hold [3];
  logic [2:0] req_prev;
  initial begin
    req = 0; gnt_d = 0; req_prev = 0;
    foreach (hold[i]) begin hold[i] = 0; wait_tenures[i] = 0; served[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(posedge clk); #1;
      check($onehot0(gnt), "one grant at most");
      check((gnt & ~req_prev) == 0, "grant only to a requester");
      for (int i = 0; i < 3; i++)
        if (gnt_d[i] && req_prev[i]) check(gnt[i], "grant held while requested");
      // a granted master keeps the bus for a while, then releases
      for (int i = 0; i < 3; i++) begin
        if (gnt[i]) begin
          if (!gnt_d[i]) begin
            served[i]++;
            check(wait_tenures[i] <= 2, $sformatf("master %0d waited %0d tenures", i, wait_tenures[i]));
            wait_tenures[i] = 0;
            for (int k = 0; k < 3; k++) if (k != i && req[k]) wait_tenures[k]++;
            hold[i] = 1 + $urandom_range(0, 6);
          end else if (hold[i] > 0) hold[i]--;
          if (hold[i] == 0) req[i] = 0;
        end else if (!req[i] && $urandom_range(0, 3) == 0) req[i] = 1;
      end
      gnt_d = gnt;
      req_prev = req;
    end
    for (int i = 0; i < 3; i++) check(served[i] > 50, $sformatf("master %0d served %0d times", i, served[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
