// tb_dma_ctrl: self-checking test of the DMA controller.
// The controller gets a real bridge_fifo and two behavioural bus masters
// that move words between the FIFO and a VME memory (1024 words at VME 0)
// or an IBUS memory (1024 words); the FIFO data path is wired from dir_q
// as in the bridge top. VME addresses from 1000h and IBUS word addresses
// from 380h answer with an error. Ownership follows 'need' one cycle later.
// Tests: 40 words VME to IBUS (chunks 16+16+8), 21 words IBUS to VME, a
// zero-length request, and an error on each side, checking memories,
// chunk counts, done/err and that the AM/width/block settings are passed on.
module tb_dma_ctrl;
  import vmebr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic start = 0, dir = 0, blk = 0, busy, done, err, need, own = 0, dir_q, f_clear;
  logic [31:0] vaddr = 0, iaddr = 0;
  logic [15:0] len = 0;
  logic [5:0] am = 0;
  dwidth_e dw = DW_D32;
  logic v_start, v_rnw, v_blk, v_done = 0, v_berr = 0, m_start, m_rnw, m_done = 0, m_err = 0;
  logic [31:0] v_addr, m_addr;
  logic [5:0] v_am;
  dwidth_e v_dw;
  logic [15:0] v_count, m_len;

  dma_ctrl dut (.clk, .rst_n, .start, .vaddr, .iaddr, .len, .dir, .am, .dw, .blk, .busy, .done, .err, .need, .own,
                .dir_q, .f_clear, .v_start, .v_rnw, .v_addr, .v_am, .v_dw, .v_blk, .v_count, .v_done, .v_berr,
                .m_start, .m_rnw, .m_addr, .m_len, .m_done, .m_err);

  logic f_push, f_pop, f_empty, f_full;
  logic [31:0] f_wdata, f_rdata, f_cdata;
  logic [4:0] f_count;
  logic v_push = 0, v_pop = 0, m_push = 0, m_pop = 0;
  logic [31:0] v_pdata = 0, m_pdata = 0;
  assign f_push  = dir_q ? m_push : v_push;
  assign f_wdata = dir_q ? m_pdata : v_pdata;
  assign f_pop   = dir_q ? v_pop : m_pop;
  bridge_fifo #(.DEPTH(16), .WIDTH(32)) u_fifo (.clk, .rst_n, .clear(f_clear), .push(f_push), .wdata(f_wdata),
                .pop(f_pop), .rdata(f_rdata), .cidx(4'd0), .cdata(f_cdata), .count(f_count), .empty(f_empty),
                .full(f_full));

  always @(posedge clk) own <= need;

  logic [31:0] vmem [1024];
  logic [31:0] imem [1024];
  int v_left = 0, m_left = 0, v_xfers = 0, m_xfers = 0;
  logic [31:0] va, ia;
  logic vr, mr, v_act = 0, m_act = 0, vbad, mbad;
  logic [5:0] seen_am;
  logic seen_blk;
  always @(posedge clk) begin
    v_done <= 0; m_done <= 0; v_push <= 0; v_pop <= 0; m_push <= 0; m_pop <= 0;
    if (v_start && rst_n) begin
      v_act <= 1; v_left <= int'(v_count); va <= v_addr; vr <= v_rnw; vbad <= v_addr >= 32'h1000;
      seen_am <= v_am; seen_blk <= v_blk; v_xfers++;
    end else if (v_act) begin
      if (v_left == 0 || vbad) begin v_act <= 0; v_done <= 1; v_berr <= vbad; end
      else if (vr) begin v_push <= 1; v_pdata <= vmem[va[11:2]]; va <= va + 4; v_left <= v_left - 1; end
      else if (!f_empty && !v_pop) begin v_pop <= 1; vmem[va[11:2]] <= f_rdata; va <= va + 4; v_left <= v_left - 1; end
    end
    if (m_start && rst_n) begin
      m_act <= 1; m_left <= int'(m_len); ia <= m_addr; mr <= m_rnw; mbad <= m_addr >= 32'h380; m_xfers++;
    end else if (m_act) begin
      if (m_left == 0 || mbad) begin m_act <= 0; m_done <= 1; m_err <= mbad; end
      else if (mr) begin m_push <= 1; m_pdata <= imem[ia[9:0]]; ia <= ia + 1; m_left <= m_left - 1; end
      else if (!f_empty && !m_pop) begin m_pop <= 1; imem[ia[9:0]] <= f_rdata; ia <= ia + 1; m_left <= m_left - 1; end
    end
  end

  task automatic run(input logic d, input logic [31:0] v, input logic [31:0] i, input int n,
                     output logic e, output int cycles);
    @(posedge clk); start <= 1; dir <= d; vaddr <= v; iaddr <= i; len <= 16'(n);
    @(posedge clk); start <= 0;
    cycles = 0;
    while (!done && cycles < 5000) begin @(posedge clk); cycles++; end
    check(cycles < 5000, "DMA finished");
    e = err;
    @(posedge clk);
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e; int c, w, vx, mx;
    for (int i = 0; i < 1024; i++) begin vmem[i] = 32'hA000_0000 + i; imem[i] = 32'h1000_0000 + i; end
    repeat (3) @(posedge clk); rst_n = 1;
    am = 6'h0B; blk = 1; dw = DW_D32;
    // VME -> IBUS, 40 words from VME 100h to IBUS 200h
    vx = v_xfers; mx = m_xfers;
    run(0, 32'h100, 32'h200, 40, e, c);
    w = 0; for (int i = 0; i < 40; i++) if (imem[512 + i] != 32'hA000_0040 + i) w++;
    check(!e && w == 0, $sformatf("VME-to-IBUS data: %0d wrong", w));
    check(v_xfers - vx == 3 && m_xfers - mx == 3, "three chunks on each side");
    check(seen_am == 6'h0B && seen_blk, "AM code and block mode passed to the VME master");
    check(!busy && !need, "idle after done");
    // IBUS -> VME, 21 words from IBUS 10h to VME 800h
    am = 6'h09; blk = 0;
    run(1, 32'h800, 32'h10, 21, e, c);
    w = 0; for (int i = 0; i < 21; i++) if (vmem[512 + i] != 32'h1000_0010 + i) w++;
    check(!e && w == 0, $sformatf("IBUS-to-VME data: %0d wrong", w));
    check(seen_am == 6'h09 && !seen_blk, "single-cycle settings passed on");
    // zero length
    vx = v_xfers;
    run(0, 32'h0, 32'h0, 0, e, c);
    check(!e && v_xfers == vx, "zero-length DMA moves nothing");
    // errors
    run(0, 32'h1000, 32'h0, 4, e, c);
    check(e, "VME bus error ends the DMA with err");
    run(1, 32'h0, 32'h378, 20, e, c);
    check(e, "IBUS error ends the DMA with err");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
