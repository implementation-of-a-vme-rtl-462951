// tb_vme_master: self-checking test of the VME64 master.
// A behavioural VME slave (1024-word memory, big-endian byte lanes, BLT and
// MBLT, an interrupter that returns A0h+level in IACK cycles, and BERR* for
// addresses Bxxxxxxxh) answers the master. Checks D32, D16 and D8 single
// cycles, BLT and MBLT writes and reads, an IACK cycle, a bus error, the
// address setup time before AS* (t_setup) and the count of AS* cycles.
module tb_vme_master;
  import vmebr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, rnw = 0, iack = 0, blk = 0, stop = 0, busy, done, berr;
  logic [31:0] addr = 0;
  logic [5:0] am_cmd = 0;
  dwidth_e dw = DW_D32;
  logic [15:0] count = 0;
  logic src_valid, src_pop, snk_push, bus_req;
  logic [31:0] src_data, snk_data;
  logic [31:1] a_o; logic lword_n_o, a_oe;
  logic [5:0] am_o; logic as_n, write_n, iack_n; logic [1:0] ds_n;
  logic [31:0] d_o; logic d_oe;
  logic [31:0] s_d = 0; logic [31:1] s_a = 0; logic s_lw = 1;
  logic dtack_n = 1, berr_n = 1;
  logic [31:0] mem [1024];
  logic [31:0] srcq [$];
  logic [31:0] got [$];
  int checks = 0, failures = 0, as_falls = 0, setup_viol = 0;

  vme_master dut (.clk, .rst_n, .start, .rnw, .iack, .addr, .am_cmd, .dw, .blk, .count, .stop,
                  .t_setup(4'd3), .t_idle(4'd1), .busy, .done, .berr, .src_valid, .src_data, .src_pop,
                  .snk_space(5'd16), .snk_push, .snk_data, .bus_req, .bus_gnt(bus_req),
                  .a_o, .lword_n_o, .a_oe, .a_i(s_a), .lword_n_i(s_lw), .am_o, .as_n, .ds_n, .write_n, .iack_n,
                  .d_o, .d_oe, .d_i(s_d), .dtack_n, .berr_n);

  assign src_valid = srcq.size() != 0;
  assign src_data  = src_valid ? srcq[0] : 32'h0;
  always #5 clk = ~clk;

  // behavioural slave
  logic [31:0] sa; logic [5:0] sam; logic slw, siack, mblt_adr; int wait_c = 0; logic as_d = 1;
  logic [31:0] a_seen; int a_age = 0;
  always @(posedge clk) begin
    if (src_pop) void'(srcq.pop_front());
    if (snk_push) got.push_back(snk_data);
    if (a_o != a_seen[31:1]) begin a_seen <= {a_o, 1'b0}; a_age <= 0; end else a_age <= a_age + 1;
    as_d <= as_n;
    if (as_d && !as_n && rst_n) begin
      as_falls++;
      if (a_age < 3) setup_viol++;
      sa <= {a_o, 1'b0}; sam <= am_o; slw <= lword_n_o; siack <= iack_n; mblt_adr <= (am_o == 6'h08);
    end
    if (ds_n == 2'b11) begin dtack_n <= 1; berr_n <= 1; wait_c <= 0; end
    else if (dtack_n && berr_n) begin
      wait_c <= wait_c + 1;
      if (wait_c == 2) begin
        logic [9:0] w;
        w = sa[11:2];
        if (!siack) begin s_d <= 32'hA0 + sa[3:1]; dtack_n <= 0; end
        else if (sa[31:28] == 4'hB) berr_n <= 0;
        else if (mblt_adr) begin mblt_adr <= 0; dtack_n <= 0; end
        else if (sam == 6'h08) begin
          if (!write_n) begin mem[w] <= {a_o, lword_n_o}; mem[w + 1] <= d_o; end
          else begin {s_a, s_lw} <= mem[w]; s_d <= mem[w + 1]; end
          sa <= sa + 8; dtack_n <= 0;
        end else begin
          // lanes from DS1*, DS0*, A1, LWORD*
          if (!slw) begin
            if (!write_n) mem[w] <= d_o; else s_d <= mem[w];
          end else if (ds_n == 2'b00) begin
            if (!write_n) begin if (sa[1]) mem[w][15:0] <= d_o[15:0]; else mem[w][31:16] <= d_o[15:0]; end
            else s_d <= {16'h0, sa[1] ? mem[w][15:0] : mem[w][31:16]};
          end else begin
            int bi; bi = {sa[1], ds_n == 2'b10};        // byte index 0..3
            if (!write_n) mem[w][31 - 8*bi -: 8] <= ds_n == 2'b10 ? d_o[7:0] : d_o[15:8];
            else s_d <= {16'h0, mem[w][31 - 8*bi -: 8], mem[w][31 - 8*bi -: 8]};
          end
          if (sam == 6'h0B) sa <= sa + (!slw ? 4 : (ds_n == 2'b00 ? 2 : 1));
          dtack_n <= 0;
        end
      end
    end
  end
  // non-block cycles re-broadcast their address, so sa follows AS*
  always @(negedge as_n) sa = {a_o, 1'b0};

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic r, input logic [31:0] a, input logic [5:0] m, input dwidth_e w,
                     input logic b, input int n, input logic ia);
    @(posedge clk); start <= 1; rnw <= r; addr <= a; am_cmd <= m; dw <= w; blk <= b; count <= 16'(n); iack <= ia;
    @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f0;
    for (int i = 0; i < 1024; i++) mem[i] = 32'h7000_0000 + i;
    repeat (3) @(posedge clk); rst_n = 1;
    srcq.push_back(32'h1234_5678);
    run(0, 32'h0000_0040, 6'h09, DW_D32, 0, 1, 0);
    check(mem[16] == 32'h1234_5678 && !berr, "D32 write");
    f0 = as_falls;
    srcq.push_back(32'hAABB_CCDD);
    run(0, 32'h0000_0044, 6'h39, DW_D16, 0, 1, 0);
    check(mem[17] == 32'hAABB_CCDD, $sformatf("D16 write as two cycles: %h", mem[17]));
    check(as_falls - f0 == 2, "two AS* cycles for a D16 word");
    f0 = as_falls;
    srcq.push_back(32'h0102_0304);
    run(0, 32'h0000_0048, 6'h29, DW_D8, 0, 1, 0);
    check(mem[18] == 32'h0102_0304, $sformatf("D8 write as four cycles: %h", mem[18]));
    check(as_falls - f0 == 4, "four AS* cycles for a D8 word");
    got.delete();
    run(1, 32'h0000_0044, 6'h39, DW_D8, 0, 2, 0);
    check(got.size() == 2 && got[0] == 32'hAABB_CCDD && got[1] == 32'h0102_0304, "D8 reads assemble words");
    // BLT D32: 6 words, one AS*
    for (int i = 0; i < 6; i++) srcq.push_back(32'hB170_0000 + i);
    f0 = as_falls;
    run(0, 32'h0000_0100, 6'h0B, DW_D32, 1, 6, 0);
    check(as_falls - f0 == 1, "BLT keeps AS* low");
    for (int i = 0; i < 6; i++) check(mem[64 + i] == 32'hB170_0000 + i, $sformatf("BLT word %0d", i));
    got.delete();
    run(1, 32'h0000_0100, 6'h0B, DW_D32, 1, 6, 0);
    for (int i = 0; i < 6; i++) check(got.size() == 6 && got[i] == 32'hB170_0000 + i, $sformatf("BLT read %0d", i));
    // MBLT: 8 words in 4 beats
    for (int i = 0; i < 8; i++) srcq.push_back(32'h3B17_0000 + i);
    run(0, 32'h0000_0200, 6'h08, DW_D64, 1, 8, 0);
    for (int i = 0; i < 8; i++) check(mem[128 + i] == 32'h3B17_0000 + i, $sformatf("MBLT word %0d", i));
    got.delete();
    run(1, 32'h0000_0200, 6'h08, DW_D64, 1, 8, 0);
    for (int i = 0; i < 8; i++) check(got.size() == 8 && got[i] == 32'h3B17_0000 + i, $sformatf("MBLT read %0d", i));
    // IACK level 5
    got.delete();
    run(1, 32'h0000_000A, 6'h00, DW_D8, 0, 1, 1);
    check(got.size() == 1 && got[0] == 32'hA5, "IACK status/ID of level 5");
    // bus error
    run(1, 32'hB000_0000, 6'h09, DW_D32, 0, 1, 0);
    check(berr, "BERR ends the request");
    check(setup_viol == 0, "address set up 3 cycles before AS*");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
