// tb_ibus_master: self-checking test of the IBUS master engine, run against
// the IBUS slave engine with a 256-word memory behind it.
// Writes 40 words (three bursts) and reads them back, and checks the data,
// the cycle counts of the protocol (4-cycle addressing phase, 2-cycle
// handshake between 16-word bursts, 2 idle cycles after FRAME falls) and
// the error exit when no slave answers. The IBUS clock enable is held high.
module tb_ibus_master;
  logic clk = 0, rst_n = 0, ce = 1;
  logic start = 0, rnw = 0, busy, done, err;
  logic [31:0] addr = 0;
  logic [15:0] len = 0;
  logic src_valid, src_pop, snk_push, breq;
  logic [31:0] src_data, snk_data;
  logic [31:0] m_ad_o, s_ad_o, ad;
  logic m_ad_oe, s_ad_oe, frame, rnw_b, m_valid, s_valid, ack;
  logic [31:0] l_addr, l_waddr, l_wdata;
  logic l_rnw, l_start, l_end, l_wr, l_rd, hit_en = 1;
  logic [31:0] mem [256];
  int checks = 0, failures = 0;
  logic [31:0] srcq [$];
  logic [31:0] got [$];
  int cyc = 0, frame_rise = -1, first_valid = -1, fell = -1, restart = -1;
  int vcyc [$];

  ibus_master dut (.clk, .rst_n, .ce, .start, .rnw, .addr, .len, .busy, .done, .err,
                   .src_valid, .src_data, .src_pop, .snk_push, .snk_data, .breq, .bgnt(breq),
                   .ad_o(m_ad_o), .ad_oe(m_ad_oe), .ad_i(ad), .frame_o(frame), .rnw_o(rnw_b),
                   .valid_o(m_valid), .valid_i(m_valid | s_valid), .ack_i(ack));
  ibus_slave slv (.clk, .rst_n, .ce, .ad_i(ad), .ad_o(s_ad_o), .ad_oe(s_ad_oe), .frame_i(frame), .rnw_i(rnw_b),
                  .valid_i(m_valid), .valid_o(s_valid), .ack_o(ack),
                  .l_addr, .l_rnw, .l_hit(hit_en && l_addr[31:8] == 24'h000123), .l_mask(32'hFF), .l_burst_ok(1'b1),
                  .l_start, .l_end, .l_wr, .l_waddr, .l_wdata, .l_rd, .l_ravail(1'b1), .l_rdata(mem[l_addr[7:0]]));

  assign ad        = m_ad_oe ? m_ad_o : s_ad_o;
  assign src_valid = srcq.size() != 0;
  assign src_data  = src_valid ? srcq[0] : 32'h0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (src_pop) void'(srcq.pop_front());
    if (snk_push) got.push_back(snk_data);
    if (l_wr) mem[l_waddr[7:0]] <= l_wdata;
    if (frame && frame_rise < 0) frame_rise = cyc;
    if ((m_valid || s_valid) && frame) vcyc.push_back(cyc);
    if (!frame && frame_rise >= 0 && fell < 0) fell = cyc;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic r, input logic [31:0] a, input int n);
    frame_rise = -1; fell = -1; vcyc.delete();
    @(posedge clk); start <= 1; rnw <= r; addr <= a; len <= 16'(n);
    @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = 32'hDEAD_0000 + i;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) srcq.push_back(32'hC0DE_0000 ^ (i * 32'h0101_0101));
    run(0, 32'h0001_2310, 40);
    check(!err, "write finished without error");
    for (int i = 0; i < 40; i++)
      check(mem[8'h10 + i] == (32'hC0DE_0000 ^ (i * 32'h0101_0101)), $sformatf("written word %0d", i));
    check(vcyc.size() == 40, $sformatf("40 data cycles, saw %0d", vcyc.size()));
    check(vcyc[0] - frame_rise == 4, $sformatf("addressing phase %0d cycles", vcyc[0] - frame_rise));
    check(vcyc[15] - vcyc[0] == 15, "first burst back to back");
    check(vcyc[16] - vcyc[15] == 3, $sformatf("inter-burst handshake %0d idle cycles", vcyc[16] - vcyc[15] - 1));
    check(vcyc[32] - vcyc[31] == 3, "second handshake");
    check(fell - vcyc[39] == 1, "FRAME falls after the last word");
    // read back, wrapping round the end of the 256-word range
    run(1, 32'h0001_23F8, 20);
    check(got.size() == 20, $sformatf("20 words read, got %0d", got.size()));
    for (int i = 0; i < 20 && i < got.size(); i++)
      check(got[i] == mem[8'(8'hF8 + i)], $sformatf("read word %0d = %h", i, got[i]));
    check(vcyc[16] - vcyc[15] == 3, "read inter-burst handshake");
    // nobody answers
    hit_en = 0;
    run(1, 32'h0009_0000, 4);
    check(err, "error when no slave acknowledges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
