// tb_vme_ibus_bridge: end-to-end test of the bridge with default parameters.
//
// The bridge sits in slot 1 (system controller). Around it:
//   VME side   a behavioural VME master (tasks below) that takes the bus
//              through BR3*/BG3* arbitration like any other board; a VME
//              memory board with an interrupter (vme_mem_model) at A32
//              4000_0000h.
//   IBUS side  an outside IBUS master (an ibus_master instance fed from a
//              testbench queue, requester 1 of the bridge's bus
//              controller) and an IBUS memory (an ibus_slave instance with
//              a 4096-word array) at IBUS word addresses 0..FFFh.
// Bus lines are joined here as the board's transceivers would: wired-AND
// for open-collector VME lines, enable-selected drivers elsewhere. ibus_ce
// is high on every second clock edge (IBUS at half the bridge clock).
//
// Each mechanism of the bridge is counted while it happens (mostly from
// strobes inside the bridge) and the run ends by counting a failure for any
// mechanism that never happened: register access from IBUS, A24 and CR/CSR;
// posted VME writes with flushes on a full burst and on cycle end; line
// reads with cache hits; narrow writes by read-merge-write; IBUS-to-VME
// writes (BLT and MBLT) and reads with fetch-ahead; IBUS bursts beyond 16
// words with the inter-burst handshake; DMA in both directions; both
// interrupt directions and IACK daisy-chain passing; VME arbitration;
// SYSRESET* after power-up; IBUS no-acknowledge turned into BERR*. Data are
// checked against the two memories. Last, BLT blocks of 8, 64 and 256 bytes
// and MBLT blocks of 32, 256 and 1024 bytes are written and read back
// through the slave and their mean rates printed (a rate the test master's
// own strobe timing dominates, so it is shown, not checked). The test and its expected values are
// this design's own.
module tb_vme_ibus_bridge;
  import vmebr_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0;
  always #5 clk = ~clk;
  always @(posedge clk) ce <= ~ce;

  int checks = 0, failures = 0;
  int mech [string];

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- bridge ----------------
  logic [31:0] ib_ad, d_ad_o, d_d_o, vd, x_ad_o, s_ad_o;
  logic d_ad_oe, d_frame_o, d_rnw_o, d_mst_oe, d_valid_o, d_valid_oe, d_ack_o, d_ack_oe, ext_breq, ext_bgnt;
  logic ib_frame, ib_rnw, ib_valid, ib_ack;
  logic [1:0] irq_in = 0, irq_ack;
  logic ibus_irq_o, board_reset;
  logic d_as_n, d_write_n, d_iack_n, d_ctl_oe, d_lw_o, d_a_oe, d_d_oe, d_dtack, d_berr, d_iackout, d_bbsy, sysreset_n;
  logic [1:0] d_ds_n;
  logic [5:0] d_am;
  logic [31:1] d_a_o, va;
  logic [7:1] d_irq, virq;
  logic [3:0] d_br, d_bgout;
  logic v_as, v_write, v_iack, v_lw, v_dtack, v_berr, v_bbsy;
  logic [1:0] v_ds;
  logic [5:0] v_am;
  logic [3:0] v_br;

  // behavioural VME master drive
  logic b_as = 1, b_write = 1, b_iack = 1, b_lw = 1, b_bbsy = 1;
  logic [1:0] b_ds = 2'b11;
  logic [5:0] b_am = 0;
  logic [31:1] b_a = 0;
  logic [31:0] b_d = 0;
  logic [3:0] b_br = 4'hF;

  vme_ibus_bridge dut (
    .clk, .ibus_ce(ce), .rst_n, .hw_addr(16'h8020), .hw_slot(5'd3), .sysctrl(1'b1), .board_reset_o(board_reset),
    .ibus_ad_i(ib_ad), .ibus_ad_o(d_ad_o), .ibus_ad_oe(d_ad_oe), .ibus_frame_i(ib_frame), .ibus_frame_o(d_frame_o),
    .ibus_rnw_i(ib_rnw), .ibus_rnw_o(d_rnw_o), .ibus_mst_oe(d_mst_oe), .ibus_valid_i(ib_valid),
    .ibus_valid_o(d_valid_o), .ibus_valid_oe(d_valid_oe), .ibus_ack_i(ib_ack), .ibus_ack_o(d_ack_o),
    .ibus_ack_oe(d_ack_oe), .ibus_ext_breq(ext_breq), .ibus_ext_bgnt(ext_bgnt),
    .ibus_irq_i(irq_in), .ibus_irq_ack(irq_ack), .ibus_irq_o,
    .vme_as_n_i(v_as), .vme_ds_n_i(v_ds), .vme_write_n_i(v_write), .vme_iack_n_i(v_iack), .vme_am_i(v_am),
    .vme_as_n_o(d_as_n), .vme_ds_n_o(d_ds_n), .vme_write_n_o(d_write_n), .vme_iack_n_o(d_iack_n), .vme_am_o(d_am),
    .vme_ctl_oe(d_ctl_oe), .vme_a_i(va), .vme_lword_n_i(v_lw), .vme_a_o(d_a_o), .vme_lword_n_o(d_lw_o),
    .vme_a_oe(d_a_oe), .vme_d_i(vd), .vme_d_o(d_d_o), .vme_d_oe(d_d_oe), .vme_dtack_n_i(v_dtack),
    .vme_dtack_n_o(d_dtack), .vme_berr_n_i(v_berr), .vme_berr_n_o(d_berr), .vme_irq_n_i(virq),
    .vme_irq_n_o(d_irq), .vme_iackin_n(1'b1), .vme_iackout_n(d_iackout), .vme_br_n_i(v_br), .vme_br_n_o(d_br),
    .vme_bgin_n(4'hF), .vme_bgout_n(d_bgout), .vme_bbsy_n_i(v_bbsy), .vme_bbsy_n_o(d_bbsy),
    .vme_sysreset_n_o(sysreset_n)
  );

  // ---------------- VME memory board ----------------
  logic [31:0] m_d_o;
  logic [31:1] m_a_o;
  logic m_d_oe, m_lw_o, m_a_oe, m_dtack;
  logic [2:0] m_irq_level = 0;
  logic [7:1] m_irq;
  int m_iacks;
  vme_mem_model #(.BASE(32'h4000_0000), .WORDS(4096)) u_mem (
    .clk, .as_n(v_as), .ds_n(v_ds), .write_n(v_write), .iack_n(v_iack), .am(v_am), .a_in(va), .lword_n_in(v_lw),
    .d_in(vd), .d_o(m_d_o), .d_oe(m_d_oe), .a_o(m_a_o), .lword_n_o(m_lw_o), .a_oe(m_a_oe), .dtack_n(m_dtack),
    .irq_level(m_irq_level), .irq_n(m_irq), .iackin_n(d_iackout), .iacks_answered(m_iacks)
  );

  // VME backplane
  assign v_as    = (d_ctl_oe ? d_as_n : 1'b1) & b_as;
  assign v_ds    = (d_ctl_oe ? d_ds_n : 2'b11) & b_ds;
  assign v_write = (d_ctl_oe ? d_write_n : 1'b1) & b_write;
  assign v_iack  = (d_ctl_oe ? d_iack_n : 1'b1) & b_iack;
  assign v_am    = d_ctl_oe ? d_am : b_am;
  assign va      = d_a_oe ? d_a_o : m_a_oe ? m_a_o : b_a;
  assign v_lw    = d_a_oe ? d_lw_o : m_a_oe ? m_lw_o : b_lw;
  assign vd      = d_d_oe ? d_d_o : m_d_oe ? m_d_o : b_d;
  assign v_dtack = d_dtack & m_dtack;
  assign v_berr  = d_berr;
  assign virq    = d_irq & m_irq;
  assign v_br    = d_br & b_br;
  assign v_bbsy  = d_bbsy & b_bbsy;

  // ---------------- IBUS memory ----------------
  logic [31:0] xmem [4096];
  logic [31:0] s_l_addr, s_l_waddr, s_l_wdata;
  logic s_ad_oe, s_valid_o, s_ack_o, s_l_rnw, s_l_start, s_l_end, s_l_wr, s_l_rd;
  ibus_slave u_xs (
    .clk, .rst_n, .ce, .ad_i(ib_ad), .ad_o(s_ad_o), .ad_oe(s_ad_oe), .frame_i(ib_frame), .rnw_i(ib_rnw),
    .valid_i(ib_valid), .valid_o(s_valid_o), .ack_o(s_ack_o),
    .l_addr(s_l_addr), .l_rnw(s_l_rnw), .l_hit(s_l_addr[31:12] == 20'h0), .l_mask(32'hFFF), .l_burst_ok(1'b1),
    .l_start(s_l_start), .l_end(s_l_end), .l_wr(s_l_wr), .l_waddr(s_l_waddr), .l_wdata(s_l_wdata),
    .l_rd(s_l_rd), .l_ravail(1'b1), .l_rdata(xmem[s_l_addr[11:0]])
  );
  always @(posedge clk) if (s_l_wr) xmem[s_l_waddr[11:0]] <= s_l_wdata;

  // ---------------- outside IBUS master ----------------
  logic x_start = 0, x_rnw = 0, x_busy, x_done, x_err, x_ad_oe, x_frame_o, x_rnw_o, x_valid_o, x_pop, x_push;
  logic [31:0] x_addr = 0, x_snk;
  logic [15:0] x_len = 0;
  logic [31:0] x_src [64];
  logic [31:0] x_got [64];
  int x_si = 0, x_gi = 0;
  ibus_master u_xm (
    .clk, .rst_n, .ce, .start(x_start), .rnw(x_rnw), .addr(x_addr), .len(x_len), .busy(x_busy), .done(x_done),
    .err(x_err), .src_valid(x_si < 64), .src_data(x_src[x_si[5:0]]), .src_pop(x_pop),
    .snk_push(x_push), .snk_data(x_snk), .breq(ext_breq), .bgnt(ext_bgnt),
    .ad_o(x_ad_o), .ad_oe(x_ad_oe), .ad_i(ib_ad), .frame_o(x_frame_o), .rnw_o(x_rnw_o),
    .valid_o(x_valid_o), .valid_i(ib_valid), .ack_i(ib_ack)
  );
  always @(posedge clk) begin
    if (x_pop) x_si <= x_si + 1;
    if (x_push) begin x_got[x_gi[5:0]] <= x_snk; x_gi <= x_gi + 1; end
  end

  // IBUS lines
  assign ib_ad    = d_ad_oe ? d_ad_o : x_ad_oe ? x_ad_o : s_ad_oe ? s_ad_o : 32'h0;
  assign ib_frame = (d_mst_oe & d_frame_o) | x_frame_o;
  assign ib_rnw   = d_mst_oe ? d_rnw_o : x_rnw_o;
  assign ib_valid = (d_valid_oe & d_valid_o) | x_valid_o | s_valid_o;
  assign ib_ack   = (d_ack_oe & d_ack_o) | s_ack_o;

  // ---------------- mechanism monitors ----------------
  logic ack_q = 0, bg3_q = 1, gnt_q = 0, iackout_q = 1, sysr_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.own == dut.OWN_V2I && dut.im_start && !dut.im_rnw && dut.f_count == 5'd16) mech["v2i flush on full burst"]++;
    if (dut.own == dut.OWN_V2I && dut.im_start && !dut.im_rnw && dut.f_count < 5'd16) mech["v2i flush of part burst"]++;
    if (dut.own == dut.OWN_V2I && dut.im_start && !dut.im_rnw) mech["v2i posted write"]++;
    if (dut.own == dut.OWN_V2I && dut.im_start && dut.im_rnw && dut.im_len == 16'd16) mech["v2i line fetch"]++;
    if (dut.own == dut.OWN_V2I && dut.im_start && dut.im_rnw && dut.vs_acc_we) mech["v2i narrow write merge"]++;
    if (dut.vs_acc_req && dut.vs_acc_tgt == TGT_IBUS && !dut.vs_acc_we && dut.v2i_ack && !dut.im_busy) mech["v2i read answered"]++;
    if (dut.vm_start && dut.own == dut.OWN_I2V && !dut.vm_rnw && dut.vm_blk && am_is_blt(dut.vm_am)) mech["i2v BLT write"]++;
    if (dut.vm_start && dut.own == dut.OWN_I2V && !dut.vm_rnw && dut.vm_blk && am_is_mblt(dut.vm_am)) mech["i2v MBLT write"]++;
    if (dut.vm_start && dut.own == dut.OWN_I2V && dut.vm_rnw) mech["i2v read fetch"]++;
    if (dut.vm_start && dut.own == dut.OWN_DMA && dut.vm_rnw) mech["dma VME read"]++;
    if (dut.vm_start && dut.own == dut.OWN_DMA && !dut.vm_rnw) mech["dma VME write"]++;
    if (dut.vm_start && dut.own == dut.OWN_IRQ) mech["irq handler IACK"]++;
    if (dut.rb_we) mech["register write from IBUS"]++;
    if (dut.ra_we) mech["register write from VME"]++;
    if (dut.csr_we) mech["CSR write"]++;
    if (ce) begin
      ack_q <= ib_ack;
      if (ack_q && !ib_ack && ib_frame) mech["IBUS inter-burst handshake"]++;
    end
    bg3_q <= d_bgout[3];
    if (bg3_q && !d_bgout[3]) mech["VME grant to other board"]++;
    gnt_q <= dut.vm_bus_gnt;
    if (!gnt_q && dut.vm_bus_gnt) mech["VME bus won by bridge"]++;
    iackout_q <= d_iackout;
    if (iackout_q && !d_iackout) mech["IACK chain passed"]++;
    if (!sysreset_n && !sysr_seen) begin sysr_seen <= 1; mech["SYSRESET driven"]++; end
    if (|irq_ack) mech["IBUS interrupt acknowledged"]++;
  end

  // ---------------- IBUS master tasks ----------------
  task automatic ib_run(input logic r, input logic [31:0] a, input int n);
    int t;
    x_si = 0; x_gi = 0;
    @(posedge clk); x_start <= 1; x_rnw <= r; x_addr <= a; x_len <= 16'(n);
    @(posedge clk); x_start <= 0;
    @(posedge clk); #1;
    t = 0;
    while (x_busy && t < 20000) begin @(posedge clk); #1; t++; end
    check(t < 20000, "outside IBUS master finished");
  endtask
  task automatic ib_wr(input logic [31:0] a, input logic [31:0] d);
    x_src[0] = d; x_src[1:63] = '{default: 0}; x_si = 0;
    ib_run(0, a, 1);
  endtask
  task automatic ib_rd(input logic [31:0] a, output logic [31:0] d);
    ib_run(1, a, 1); d = x_got[0];
  endtask

  localparam logic [31:0] IREG = 32'hFFBC_0000;   // bridge registers on IBUS
  localparam logic [31:0] IWIN = 32'hFFC0_0000;   // VME window on IBUS

  // ---------------- VME master tasks ----------------
  task automatic vacq();
    int t;
    b_br[3] = 0; t = 0;
    while (d_bgout[3] && t < 5000) begin @(posedge clk); t++; end
    check(t < 5000, "VME grant to the test master");
    while (!v_bbsy || !v_as) @(posedge clk);
    b_bbsy = 0; b_br[3] = 1; #20;
  endtask
  task automatic vrel();
    b_bbsy = 1; #40;
  endtask
  task automatic addr_phase(input logic [5:0] m, input logic [31:0] a, input logic lw_n, input logic iack = 1);
    b_am = m; b_a = a[31:1]; b_lw = lw_n; b_iack = iack; #40; b_as = 0;
  endtask
  task automatic end_cycle();
    b_as = 1; b_iack = 1; b_write = 1; #60;
  endtask
  task automatic strobe(input logic [1:0] dsn, input logic wr, input logic [31:0] wd, input logic [31:0] wa,
                        output logic [31:0] rd, output logic [31:0] ra, output int resp);
    b_write = !wr; b_d = wd; if (wa != 0) {b_a, b_lw} = wa; #40; b_ds = dsn;
    resp = 0;
    for (int t = 0; t < 2000 && resp == 0; t++) begin
      #10; if (!v_dtack) resp = 1; else if (!v_berr) resp = 2;
    end
    #10; rd = vd; ra = {va, v_lw};
    b_ds = 2'b11; b_d = 0;
    for (int t = 0; t < 200 && (!v_dtack || !v_berr); t++) #10;
    #20;
  endtask
  task automatic v_single(input logic [5:0] m, input logic [31:0] a, input logic [1:0] dsn, input logic lw,
                          input logic wr, input logic [31:0] wd, output logic [31:0] rd, output int resp);
    logic [31:0] ra;
    vacq(); addr_phase(m, a, lw); strobe(dsn, wr, wd, 0, rd, ra, resp); end_cycle(); vrel();
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (1000000) @(posedge clk);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test ----------------
  initial begin
    logic [31:0] rd, ra, w;
    int resp, t;
    string names [$];
    int wl_bytes [6];
    wl_bytes = '{8, 64, 256, 32, 256, 1024};
    for (int i = 0; i < 4096; i++) xmem[i] = 32'h5000_0000 + i;
    for (int i = 0; i < 64; i++) begin x_src[i] = 0; x_got[i] = 0; end
    repeat (4) @(posedge clk); rst_n = 1;
    repeat (10) @(posedge clk);

    // --- registers from IBUS: capability entries and a read back ---
    ib_rd(IREG + R_ID, rd);
    check(rd == BRIDGE_ID, $sformatf("ID over IBUS: %h", rd));
    // entry 0: VME 400xxxxx, A32 BLT, D32; entry 1: same base, MBLT; entry 2: outside any board
    for (int i = 0; i < 3; i++) x_src[i] = 0;
    x_src[0] = {12'h400, 6'h0B, 2'(DW_D32), 1'b1, 1'b0, 10'h0};
    x_src[1] = {12'h400, 6'h08, 2'(DW_D64), 1'b1, 1'b1, 10'h0};
    x_src[2] = {12'h7F0, 6'h09, 2'(DW_D32), 1'b0, 1'b0, 10'h0};
    ib_run(0, IREG + R_CAP0, 3);
    ib_run(1, IREG + R_CAP0, 3);
    check(x_got[0] == x_src[0] && x_got[1] == x_src[1] && x_got[2] == x_src[2], "capability entries written and read as a burst");

    // --- registers from VME: A24 window and CR/CSR ---
    v_single(AM_A24_DATA_U, 32'h0020_0000, 2'b00, 0, 0, 0, rd, resp);
    check(resp == 1 && rd == BRIDGE_ID, $sformatf("ID over VME A24: %h", rd));
    v_single(AM_A24_DATA_U, 32'h0020_0000 + 4 * R_IRQ_ID, 2'b00, 0, 1, 32'h0000_A55C, rd, resp);
    v_single(AM_A24_DATA_U, 32'h0020_0000 + 4 * R_IRQ_ID, 2'b00, 0, 0, 0, rd, resp);
    check(rd == 32'h0000_A55C, $sformatf("IRQ_ID written over VME: %h", rd));
    v_single(AM_CRCSR, 32'h0018_001F, 2'b10, 1, 0, 0, rd, resp);
    check(resp == 1 && rd[7:0] == 8'h43, $sformatf("CR 'C': %h", rd[7:0]));
    v_single(AM_CRCSR, 32'h0018_0023, 2'b10, 1, 0, 0, rd, resp);
    check(resp == 1 && rd[7:0] == 8'h52, $sformatf("CR 'R': %h", rd[7:0]));
    v_single(AM_CRCSR, 32'h0018_0000 + 32'h7FFFF, 2'b10, 1, 0, 0, rd, resp);
    check(rd[7:3] == 5'h03, $sformatf("CSR BAR: %h", rd[7:0]));
    v_single(AM_CRCSR, 32'h0018_0000 + 32'h7FFFB, 2'b10, 1, 1, 32'h40, rd, resp);   // set SYSFAIL enable
    v_single(AM_CRCSR, 32'h0018_0000 + 32'h7FFFB, 2'b10, 1, 0, 0, rd, resp);
    check(rd[6] && rd[4], $sformatf("CSR bit set: %h", rd[7:0]));
    v_single(AM_CRCSR, 32'h0018_0000 + 32'h7FFF7, 2'b10, 1, 1, 32'h40, rd, resp);   // clear it again

    // --- VME to IBUS: single posted writes and a read back ---
    v_single(AM_A32_DATA_U, 32'h8000_0100, 2'b00, 0, 1, 32'hDEAD_0040, rd, resp);
    v_single(AM_A32_DATA_U, 32'h8000_0104, 2'b00, 0, 1, 32'hDEAD_0041, rd, resp);
    check(resp == 1, "posted write acknowledged");
    v_single(AM_A32_DATA_U, 32'h8000_0104, 2'b00, 0, 0, 0, rd, resp);
    check(resp == 1 && rd == 32'hDEAD_0041, $sformatf("read after posted write: %h", rd));
    check(xmem[64] == 32'hDEAD_0040 && xmem[65] == 32'hDEAD_0041, "posted writes reached IBUS memory");

    // --- VME BLT write of 20 words: one full burst plus a flush at cycle end ---
    vacq(); addr_phase(AM_A32_BLT_U, 32'h8000_0200, 0);
    for (int i = 0; i < 20; i++) strobe(2'b00, 1, 32'hB100_0000 + i, 0, rd, ra, resp);
    end_cycle(); vrel();
    repeat (200) @(posedge clk);
    w = 0; for (int i = 0; i < 20; i++) if (xmem[128 + i] != 32'hB100_0000 + i) w++;
    check(w == 0, $sformatf("BLT write: %0d wrong words in IBUS memory", w));

    // --- VME BLT read of 24 words: line fetches and hits ---
    vacq(); addr_phase(AM_A32_BLT_U, 32'h8000_0400, 0);
    w = 0;
    for (int i = 0; i < 24; i++) begin
      strobe(2'b00, 0, 0, 0, rd, ra, resp);
      if (rd != 32'h5000_0100 + i) w++;
    end
    end_cycle(); vrel();
    check(w == 0, $sformatf("BLT read: %0d wrong words", w));

    // --- VME MBLT write and read (4 beats) ---
    vacq(); addr_phase(AM_A32_MBLT_U, 32'h8000_0600, 0);
    strobe(2'b00, 1, 0, 0, rd, ra, resp);
    for (int i = 0; i < 4; i++) strobe(2'b00, 1, 32'hC200_0001 + 2 * i, 32'hC200_0000 + 2 * i, rd, ra, resp);
    end_cycle(); vrel();
    repeat (100) @(posedge clk);
    w = 0; for (int i = 0; i < 8; i++) if (xmem[384 + i] != 32'hC200_0000 + i) w++;
    check(w == 0, $sformatf("MBLT write: %0d wrong words", w));
    vacq(); addr_phase(AM_A32_MBLT_U, 32'h8000_0600, 0);
    strobe(2'b00, 0, 0, 0, rd, ra, resp);
    w = 0;
    for (int i = 0; i < 4; i++) begin
      strobe(2'b00, 0, 0, 0, rd, ra, resp);
      if (ra != 32'hC200_0000 + 2 * i || rd != 32'hC200_0001 + 2 * i) w++;
    end
    end_cycle(); vrel();
    check(w == 0, $sformatf("MBLT read: %0d wrong beats", w));

    // --- narrow writes: D8 and D16 merge into IBUS words ---
    v_single(AM_A32_DATA_U, 32'h8000_0801, 2'b10, 1, 1, 32'h0000_00A1, rd, resp);   // byte 1
    v_single(AM_A32_DATA_U, 32'h8000_0802, 2'b00, 1, 1, 32'h0000_B2B3, rd, resp);   // bytes 2-3
    repeat (100) @(posedge clk);
    check(xmem[512] == 32'h50A1_B2B3, $sformatf("narrow writes merged: %h", xmem[512]));

    // --- IBUS no-acknowledge gives BERR* ---
    v_single(AM_A32_DATA_U, 32'h8010_0000, 2'b00, 0, 0, 0, rd, resp);
    check(resp == 2, "read with no IBUS slave ends in BERR*");
    ib_rd(IREG + R_STATUS, rd);
    check(rd[0], "IBUS error status bit");
    ib_wr(IREG + R_STATUS, 32'h1);

    // --- IBUS to VME: 20-word write through entry 0 (BLT), 20-word read ---
    for (int i = 0; i < 20; i++) x_src[i] = 32'hD300_0000 + i;
    ib_run(0, IWIN + 32'h10, 20);
    repeat (400) @(posedge clk);
    w = 0; for (int i = 0; i < 20; i++) if (u_mem.mem[16 + i] != 32'hD300_0000 + i) w++;
    check(w == 0 && !x_err, $sformatf("IBUS-to-VME BLT write: %0d wrong words", w));
    ib_run(1, IWIN + 32'h10, 20);
    w = 0; for (int i = 0; i < 20; i++) if (x_got[i] != 32'hD300_0000 + i) w++;
    check(w == 0 && x_gi == 20 && !x_err, $sformatf("IBUS-to-VME read: %0d wrong words, %0d words", w, x_gi));
    // entry 1 (MBLT): 8 words at VME 4000_0080
    for (int i = 0; i < 8; i++) x_src[i] = 32'hE400_0000 + i;
    ib_run(0, IWIN + 32'h4_0020, 8);
    repeat (300) @(posedge clk);
    w = 0; for (int i = 0; i < 8; i++) if (u_mem.mem[32 + i] != 32'hE400_0000 + i) w++;
    check(w == 0, $sformatf("IBUS-to-VME MBLT write: %0d wrong words", w));
    // entry 2: no board there, BERR* on VME; the IBUS read still ends
    ib_run(1, IWIN + 32'h8_0000, 1);
    ib_rd(IREG + R_STATUS, rd);
    check(rd[1], "VME bus error status bit");
    ib_wr(IREG + R_STATUS, 32'h2);

    // --- DMA VME -> IBUS, 40 words, BLT ---
    ib_wr(IREG + R_DMA_VADDR, 32'h4000_0000);
    ib_wr(IREG + R_DMA_IADDR, 32'h0000_0A00);
    ib_wr(IREG + R_DMA_LEN, 32'd40);
    ib_wr(IREG + R_DMA_CTRL, {21'h0, 1'b1, 2'(DW_D32), AM_A32_BLT_U, 1'b0, 1'b1});
    t = 0;
    do begin ib_rd(IREG + R_STATUS, rd); t++; end while (!rd[2] && t < 200);
    check(rd[2], "DMA VME-to-IBUS done");
    ib_wr(IREG + R_STATUS, 32'h4);
    w = 0; for (int i = 0; i < 40; i++) if (xmem[2560 + i] != u_mem.mem[i]) w++;
    check(w == 0, $sformatf("DMA VME-to-IBUS: %0d wrong words", w));
    // --- DMA IBUS -> VME, 24 words, MBLT ---
    ib_wr(IREG + R_DMA_VADDR, 32'h4000_2000);
    ib_wr(IREG + R_DMA_IADDR, 32'h0000_0100);
    ib_wr(IREG + R_DMA_LEN, 32'd24);
    ib_wr(IREG + R_DMA_CTRL, {21'h0, 1'b1, 2'(DW_D64), AM_A32_MBLT_U, 1'b1, 1'b1});
    t = 0;
    do begin ib_rd(IREG + R_STATUS, rd); t++; end while (!rd[2] && t < 200);
    check(rd[2], "DMA IBUS-to-VME done");
    ib_wr(IREG + R_STATUS, 32'h4);
    w = 0; for (int i = 0; i < 24; i++) if (u_mem.mem[2048 + i] != xmem[256 + i]) w++;
    check(w == 0, $sformatf("DMA IBUS-to-VME: %0d wrong words", w));

    // --- interrupts IBUS -> VME: request A on level 3, ID 5Ch ---
    ib_wr(IREG + R_IRQ_CFG, 32'h0000_0103);
    irq_in[0] = 1;
    t = 0; while (virq[3] && t < 1000) begin @(posedge clk); t++; end
    check(!virq[3], "IBUS request A drives IRQ3*");
    // an IACK cycle for level 5 passes down the chain (nobody answers)
    vacq(); addr_phase(6'h00, 32'h0000_000A, 1, 0);
    strobe(2'b10, 0, 0, 0, rd, ra, resp);
    end_cycle(); vrel();
    check(resp == 0, "IACK for another level is not answered by the bridge");
    vacq(); addr_phase(6'h00, 32'h0000_0006, 1, 0);
    strobe(2'b10, 0, 0, 0, rd, ra, resp);
    end_cycle(); vrel();
    check(resp == 1 && rd[7:0] == 8'h5C, $sformatf("IACK level 3 status/ID: %h", rd[7:0]));
    repeat (20) @(posedge clk);
    check(virq[3], "IRQ3* released after acknowledge");
    irq_in[0] = 0;

    // --- interrupts VME -> IBUS: handler for level 6 ---
    ib_wr(IREG + R_IRQ_CFG, 32'h0040_0000);
    m_irq_level = 6;
    t = 0; while (!ibus_irq_o && t < 5000) begin @(posedge clk); t++; end
    check(ibus_irq_o && m_iacks == 1, "VME level 6 acknowledged by the bridge and signalled on IBUS");
    ib_rd(IREG + R_IACK_STAT, rd);
    check(rd[10:8] == 3'd6 && rd[7:0] == 8'hC6, $sformatf("captured status/ID: %h", rd));
    ib_wr(IREG + R_STATUS, 32'h8);
    m_irq_level = 0;
    repeat (20) @(posedge clk);
    check(!ibus_irq_o, "IBUS interrupt cleared");

    // --- block lengths evaluated for the slave: BLT 8, 64, 256 bytes and
    //     MBLT 32, 256, 1024 bytes, written then read back through the A32
    //     window; the mean rate includes the address phase ---
    foreach (wl_bytes[k]) begin
      int nw; logic mb; realtime t0, t1;
      nw = wl_bytes[k] / 4; mb = (k >= 3);
      vacq(); t0 = $realtime;
      addr_phase(mb ? AM_A32_MBLT_U : AM_A32_BLT_U, 32'h8000_2000, 0);
      if (mb) begin
        strobe(2'b00, 1, 0, 0, rd, ra, resp);
        for (int i = 0; i < nw; i += 2)
          strobe(2'b00, 1, 32'hE000_0001 + 32'(k << 16) + 32'(i), 32'hE000_0000 + 32'(k << 16) + 32'(i), rd, ra, resp);
      end else
        for (int i = 0; i < nw; i++) strobe(2'b00, 1, 32'hE000_0000 + 32'(k << 16) + 32'(i), 0, rd, ra, resp);
      end_cycle(); t1 = $realtime; vrel();
      $display("workload %s write %0d bytes: %0.1f Mbyte/s", mb ? "MBLT" : "BLT", wl_bytes[k], real'(wl_bytes[k]) * 1000.0 / (t1 - t0));
      repeat (300) @(posedge clk);
      w = 0; for (int i = 0; i < nw; i++) if (xmem[2048 + i] != 32'hE000_0000 + 32'(k << 16) + 32'(i)) w++;
      check(w == 0, $sformatf("%0d-byte %s write: %0d wrong words", wl_bytes[k], mb ? "MBLT" : "BLT", w));
      vacq(); t0 = $realtime;
      addr_phase(mb ? AM_A32_MBLT_U : AM_A32_BLT_U, 32'h8000_2000, 0);
      w = 0;
      if (mb) begin
        strobe(2'b00, 0, 0, 0, rd, ra, resp);
        for (int i = 0; i < nw; i += 2) begin
          strobe(2'b00, 0, 0, 0, rd, ra, resp);
          if (ra != 32'hE000_0000 + 32'(k << 16) + 32'(i) || rd != 32'hE000_0001 + 32'(k << 16) + 32'(i)) w++;
        end
      end else
        for (int i = 0; i < nw; i++) begin
          strobe(2'b00, 0, 0, 0, rd, ra, resp);
          if (rd != 32'hE000_0000 + 32'(k << 16) + 32'(i)) w++;
        end
      end_cycle(); t1 = $realtime; vrel();
      $display("workload %s read %0d bytes: %0.1f Mbyte/s", mb ? "MBLT" : "BLT", wl_bytes[k], real'(wl_bytes[k]) * 1000.0 / (t1 - t0));
      check(w == 0, $sformatf("%0d-byte %s read: %0d wrong words", wl_bytes[k], mb ? "MBLT" : "BLT", w));
      mech["evaluated block length"]++;
    end

    // --- mechanisms ---
    names = '{"evaluated block length", "v2i flush on full burst", "v2i flush of part burst", "v2i posted write", "v2i line fetch",
              "v2i narrow write merge", "v2i read answered", "i2v BLT write", "i2v MBLT write", "i2v read fetch",
              "dma VME read", "dma VME write", "irq handler IACK", "register write from IBUS",
              "register write from VME", "CSR write", "IBUS inter-burst handshake", "VME grant to other board",
              "VME bus won by bridge", "IACK chain passed", "SYSRESET driven", "IBUS interrupt acknowledged"};
    foreach (names[i]) begin
      $display("mechanism %-28s %0d", names[i], mech.exists(names[i]) ? mech[names[i]] : 0);
      check(mech.exists(names[i]) && mech[names[i]] > 0, {"mechanism never happened: ", names[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
