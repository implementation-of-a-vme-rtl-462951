// tb_ibus_slave: self-checking test of the IBUS slave engine, driven by the
// IBUS master engine. The local side is a 64-word memory whose read data
// arrive with random gaps (l_ravail) and which is not always ready for a
// burst (l_burst_ok). Checks data, circular wrap at the end of the range,
// one l_start and one l_end per transfer, that ACK waits for l_burst_ok,
// and that an address outside the range is not acknowledged.
module tb_ibus_slave;
  logic clk = 0, rst_n = 0, ce = 1;
  logic start = 0, rnw = 0, busy, done, err;
  logic [31:0] addr = 0;
  logic [15:0] len = 0;
  logic src_valid, src_pop, snk_push, breq;
  logic [31:0] src_data, snk_data;
  logic [31:0] m_ad_o, s_ad_o, ad;
  logic m_ad_oe, s_ad_oe, frame, rnw_b, m_valid, s_valid, ack;
  logic [31:0] l_addr, l_waddr, l_wdata;
  logic l_rnw, l_start, l_end, l_wr, l_rd, ravail, bok;
  logic [31:0] mem [64];
  int checks = 0, failures = 0;
  logic [31:0] srcq [$];
  logic [31:0] got [$];
  int starts = 0, ends = 0, ack_while_busy = 0;

  ibus_master mst (.clk, .rst_n, .ce, .start, .rnw, .addr, .len, .busy, .done, .err,
                   .src_valid, .src_data, .src_pop, .snk_push, .snk_data, .breq, .bgnt(breq),
                   .ad_o(m_ad_o), .ad_oe(m_ad_oe), .ad_i(ad), .frame_o(frame), .rnw_o(rnw_b),
                   .valid_o(m_valid), .valid_i(m_valid | s_valid), .ack_i(ack));
  ibus_slave dut (.clk, .rst_n, .ce, .ad_i(ad), .ad_o(s_ad_o), .ad_oe(s_ad_oe), .frame_i(frame), .rnw_i(rnw_b),
                  .valid_i(m_valid), .valid_o(s_valid), .ack_o(ack),
                  .l_addr, .l_rnw, .l_hit(l_addr[31:6] == 26'h0ABCDE0 >> 0), .l_mask(32'h3F), .l_burst_ok(bok),
                  .l_start, .l_end, .l_wr, .l_waddr, .l_wdata, .l_rd, .l_ravail(ravail), .l_rdata(mem[l_addr[5:0]]));

  assign ad        = m_ad_oe ? m_ad_o : s_ad_o;
  assign src_valid = srcq.size() != 0;
  assign src_data  = src_valid ? srcq[0] : 32'h0;

  always #5 clk = ~clk;
  logic ack_d = 0;
  always @(posedge clk) begin
    if (src_pop) void'(srcq.pop_front());
    if (snk_push) got.push_back(snk_data);
    if (l_wr) mem[l_waddr[5:0]] <= l_wdata;
    if (l_start && rst_n) starts++;
    if (l_end && rst_n) ends++;
    if (ack && !ack_d && !bok_d && rst_n) ack_while_busy++;
    ack_d <= ack;
    ravail <= ($urandom_range(0, 3) != 0);
  end
  logic bok_d = 0;
  always @(posedge clk) bok_d <= bok;

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic r, input logic [31:0] a, input int n);
    @(posedge clk); start <= 1; rnw <= r; addr <= a; len <= 16'(n);
    @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
  endtask

  // local side not ready for a while at the start of each burst
  int bcnt = 0;
  always @(posedge clk) begin
    bcnt <= (ack) ? 0 : bcnt + 1;
  end
  assign bok = bcnt > 3;

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) mem[i] = 32'h5A5A_0000 + i;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 36; i++) srcq.push_back(32'h7700_0000 + i * 3);
    run(0, 32'h2AF3_7830, 36);          // offset 30h: wraps after 16 words
    check(!err, "write acknowledged");
    for (int i = 0; i < 36; i++)
      check(mem[6'(6'h30 + i)] == 32'h7700_0000 + i * 3 || i < 36 - 64, $sformatf("word %0d at %0d", i, 6'(6'h30 + i)));
    check(starts == 1 && ends == 1, "one start and one end pulse");
    check(ack_while_busy == 0, "ACK only when the local side is ready");
    run(1, 32'h2AF3_783C, 24);
    check(got.size() == 24, "24 words read");
    for (int i = 0; i < 24 && i < got.size(); i++)
      check(got[i] == mem[6'(6'h3C + i)], $sformatf("read word %0d", i));
    run(1, 32'h2AF3_7900, 2);
    check(err && starts == 2, "address outside the range not answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
