// vme_ibus_bridge: VME64 master/slave to IBUS master/slave bridge.
//
// The bridge joins a VME64 backplane to IBUS, a simple synchronous burst
// bus inside the board. Its parts:
//   vme_slave + v2i_engine   VME masters reach IBUS through an A32 window
//                            (posted writes, line reads, narrow writes by
//                            read-merge-write), the registers through an
//                            A24 window and through CR/CSR space (crcsr).
//   ibus_slave + i2v_ctrl    IBUS masters reach VME through a 16 Mbyte
//                            window of 16 capability entries
//                            (addr_xlate_i2v) and the registers through
//                            their own IBUS region.
//   bridge_fifo              one 16-word buffer shared by all transfers,
//                            as FIFO and as cache line.
//   vme_master, ibus_master  the bus masters the paths above (and the DMA
//                            and interrupt handler) use.
//   dma_ctrl                 block moves in either direction.
//   irq_manager              IBUS requests to two VME levels and back.
//   vme_utilities            arbitration, SYSRESET*, IACK chain start.
//   ibus_arbiter             the IBUS bus controller (bridge's master is
//                            requester 0, one outside master requester 1).
//   reg_file                 the 1 kbyte register area.
// The FIFO and the two masters are lent to one client at a time: the
// interrupt handler first, then VME-to-IBUS, IBUS-to-VME and the DMA; a
// client keeps them until its 'need' falls.
//
// Clocking: everything runs on clk, the fast clock at twice the IBUS rate.
// ibus_ce is high on every second clk edge, the ones that coincide with
// IBUS clock edges; IBUS-facing logic advances only on those. This is the
// single-clock variant the document names as one of two options (its board
// used two edge-aligned clocks instead).
//
// Bus pins are split into input, output and enable (or, for open-collector
// VME lines, an output that is 0 when the line is pulled low); the board's
// transceivers join them.
module vme_ibus_bridge (
  input  logic        clk,
  input  logic        ibus_ce,
  input  logic        rst_n,
  input  logic [15:0] hw_addr,        // address switches: A32 window [15:8], A24 window bits 23:16 [7:0]
  input  logic [4:0]  hw_slot,        // address switches: CR/CSR slot
  input  logic        sysctrl,        // slot-1 jumper
  output logic        board_reset_o,  // CR/CSR reset bit
  // IBUS
  input  logic [31:0] ibus_ad_i,
  output logic [31:0] ibus_ad_o,
  output logic        ibus_ad_oe,
  input  logic        ibus_frame_i,
  output logic        ibus_frame_o,
  input  logic        ibus_rnw_i,
  output logic        ibus_rnw_o,
  output logic        ibus_mst_oe,    // bridge master drives FRAME and RNW
  input  logic        ibus_valid_i,
  output logic        ibus_valid_o,
  output logic        ibus_valid_oe,
  input  logic        ibus_ack_i,
  output logic        ibus_ack_o,
  output logic        ibus_ack_oe,
  input  logic        ibus_ext_breq,
  output logic        ibus_ext_bgnt,
  input  logic [1:0]  ibus_irq_i,
  output logic [1:0]  ibus_irq_ack,
  output logic        ibus_irq_o,
  // VME
  input  logic        vme_as_n_i,
  input  logic [1:0]  vme_ds_n_i,
  input  logic        vme_write_n_i,
  input  logic        vme_iack_n_i,
  input  logic [5:0]  vme_am_i,
  output logic        vme_as_n_o,
  output logic [1:0]  vme_ds_n_o,
  output logic        vme_write_n_o,
  output logic        vme_iack_n_o,
  output logic [5:0]  vme_am_o,
  output logic        vme_ctl_oe,
  input  logic [31:1] vme_a_i,
  input  logic        vme_lword_n_i,
  output logic [31:1] vme_a_o,
  output logic        vme_lword_n_o,
  output logic        vme_a_oe,
  input  logic [31:0] vme_d_i,
  output logic [31:0] vme_d_o,
  output logic        vme_d_oe,
  input  logic        vme_dtack_n_i,
  output logic        vme_dtack_n_o,
  input  logic        vme_berr_n_i,
  output logic        vme_berr_n_o,
  input  logic [7:1]  vme_irq_n_i,
  output logic [7:1]  vme_irq_n_o,
  input  logic        vme_iackin_n,
  output logic        vme_iackout_n,
  input  logic [3:0]  vme_br_n_i,
  output logic [3:0]  vme_br_n_o,
  input  logic [3:0]  vme_bgin_n,
  output logic [3:0]  vme_bgout_n,
  input  logic        vme_bbsy_n_i,
  output logic        vme_bbsy_n_o,
  output logic        vme_sysreset_n_o
);
  import vmebr_pkg::*;

  typedef enum logic [2:0] {OWN_NONE, OWN_IRQ, OWN_V2I, OWN_I2V, OWN_DMA} owner_e;

  // ---------------- registers ----------------
  logic [31:0] r_ctrl, r_status, r_vwin, r_iwin, r_i2vwin, r_timing, r_dvaddr, r_diaddr, r_dlen, r_dctrl, r_irqcfg, r_irqid;
  cap_t        caps [16];
  logic        dma_start, sysreset_cmd;
  logic        ra_we, rb_we;
  logic [7:0]  ra_idx;
  logic [31:0] ra_rdata, rb_rdata;
  logic [3:0]  status_set;
  logic        iack_stat_we;
  logic [31:0] iack_stat;

  // ---------------- FIFO ----------------
  logic        f_clear, f_push, f_pop, f_empty, f_full;
  logic [31:0] f_wdata, f_rdata, f_cdata;
  logic [3:0]  f_cidx;
  logic [4:0]  f_count;

  // ---------------- VME slave ----------------
  logic [31:0] vs_d_o, vs_cur_addr, vs_acc_addr, vs_acc_wdata, vs_acc_rdata;
  logic [31:1] vs_a_o;
  logic        vs_d_oe, vs_a_oe, vs_lword_n_o, vs_dtack_n, vs_berr_n;
  logic [5:0]  vs_cur_am;
  target_e     vs_dec_tgt, vs_acc_tgt, vs_acc_tgt_unused;
  logic        vs_acc_req, vs_acc_we, vs_acc_ack, vs_acc_err, vs_blk_mode, vs_blk_end;
  logic [3:0]  vs_acc_be;
  logic [31:0] vs_dec_ibus_unused, vs_acc_iaddr;
  logic [7:0]  vs_dec_idx_unused, vs_acc_idx;
  logic        loc_ack;
  logic [31:0] loc_rdata;

  // ---------------- CR/CSR ----------------
  logic [7:0]  csr_rdata;
  logic        csr_user, csr_we, module_en, sysfail_en_unused;
  logic [4:0]  csr_slot;

  // ---------------- engines ----------------
  logic        v2i_ack, v2i_err, v2i_need, v2i_wr_err;
  logic [31:0] v2i_rdata;
  logic        v2i_f_clear, v2i_f_push, v2i_f_pop;
  logic [31:0] v2i_f_wdata;
  logic [3:0]  v2i_f_cidx;
  logic        v2i_m_start, v2i_m_rnw, v2i_m_src_valid;
  logic [31:0] v2i_m_addr, v2i_m_src_data;
  logic [15:0] v2i_m_len;

  logic        i2v_need, i2v_burst_ok, i2v_f_clear, i2v_err, i2v_fill;
  logic        i2v_v_start, i2v_v_rnw, i2v_v_blk, i2v_v_stop;
  logic [31:0] i2v_v_addr;
  logic [5:0]  i2v_v_am;
  dwidth_e     i2v_v_dw;
  logic [15:0] i2v_v_count;

  logic        dma_busy, dma_done, dma_err, dma_need, dma_dir, dma_f_clear;
  logic        dma_v_start, dma_v_rnw, dma_v_blk, dma_m_start, dma_m_rnw;
  logic [31:0] dma_v_addr, dma_m_addr;
  logic [5:0]  dma_v_am;
  dwidth_e     dma_v_dw;
  logic [15:0] dma_v_count, dma_m_len;

  logic        irq_need, irq_v_start, irq_stat_set;
  logic [31:0] irq_v_addr;
  logic [7:0]  irq_d_o;
  logic        irq_d_oe, irq_dtack_n;
  logic        iackin_eff_n;

  // ---------------- masters ----------------
  logic        im_start, im_rnw, im_busy, im_done, im_err, im_src_valid, im_src_pop, im_snk_push;
  logic [31:0] im_addr, im_src_data, im_snk_data;
  logic [15:0] im_len;
  logic        im_breq, im_bgnt;
  logic [31:0] im_ad_o;
  logic        im_ad_oe, im_valid_o;

  logic        vm_start, vm_rnw, vm_iack, vm_blk, vm_stop, vm_busy, vm_done, vm_berr;
  logic [31:0] vm_addr, vm_snk_data, vm_src_data, vm_d_o;
  logic [5:0]  vm_am;
  dwidth_e     vm_dw;
  logic [15:0] vm_count;
  logic        vm_src_valid, vm_src_pop, vm_snk_push, vm_bus_req, vm_bus_gnt;
  logic [31:1] vm_a_o;
  logic        vm_lword_n_o, vm_a_oe, vm_d_oe;

  // ---------------- IBUS slave ----------------
  logic [31:0] is_l_addr, is_l_waddr, is_l_wdata, is_l_rdata, is_ad_o, is_mask, is_vaddr;
  logic        is_l_rnw, is_l_hit, is_l_burst_ok, is_l_start, is_l_end, is_l_wr, is_l_rd, is_l_ravail;
  logic        is_ad_oe, is_valid_o, is_ack_o, hit_reg, hit_vme, tgt_vme_q;
  cap_t        is_cap;

  owner_e      own;

  // ======================================================================
  reg_file u_regs (
    .clk, .rst_n, .hw_addr,
    .a_we(ra_we), .a_idx(ra_idx), .a_be(vs_acc_be), .a_wdata(vs_acc_wdata), .a_rdata(ra_rdata),
    .b_we(rb_we), .b_idx(is_l_addr[7:0]), .b_wdata(is_l_wdata), .b_rdata(rb_rdata),
    .status_set, .dma_busy, .iack_stat_we, .iack_stat,
    .ctrl(r_ctrl), .status(r_status), .vwin(r_vwin), .iwin(r_iwin), .i2vwin(r_i2vwin), .timing(r_timing),
    .dma_vaddr(r_dvaddr), .dma_iaddr(r_diaddr), .dma_len(r_dlen), .dma_ctrl(r_dctrl),
    .irq_cfg(r_irqcfg), .irq_id(r_irqid), .caps, .dma_start, .sysreset_cmd
  );

  bridge_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(32)) u_fifo (
    .clk, .rst_n, .clear(f_clear), .push(f_push), .wdata(f_wdata), .pop(f_pop), .rdata(f_rdata),
    .cidx(f_cidx), .cdata(f_cdata), .count(f_count), .empty(f_empty), .full(f_full)
  );

  // ---------------- VME slave side ----------------
  vme_slave u_vs (
    .clk, .rst_n, .en(r_ctrl[0]),
    .as_n(vme_as_n_i), .ds_n(vme_ds_n_i), .write_n(vme_write_n_i), .lword_n_i(vme_lword_n_i),
    .iack_n(vme_iack_n_i), .am(vme_am_i), .a_i(vme_a_i), .d_i(vme_d_i),
    .d_o(vs_d_o), .d_oe(vs_d_oe), .a_o(vs_a_o), .lword_n_o(vs_lword_n_o), .a_oe(vs_a_oe),
    .dtack_n(vs_dtack_n), .berr_n(vs_berr_n),
    .cur_addr(vs_cur_addr), .cur_am(vs_cur_am), .dec_tgt(vs_dec_tgt),
    .acc_req(vs_acc_req), .acc_tgt(vs_acc_tgt), .acc_we(vs_acc_we), .acc_addr(vs_acc_addr),
    .acc_be(vs_acc_be), .acc_wdata(vs_acc_wdata), .acc_ack(vs_acc_ack), .acc_err(vs_acc_err),
    .acc_rdata(vs_acc_rdata), .blk_mode(vs_blk_mode), .blk_end(vs_blk_end)
  );

  addr_xlate_v2i u_dec (
    .vme_addr(vs_cur_addr), .am(vs_cur_am), .data_en(module_en),
    .a32_win(r_vwin[31:24]), .a24_win(r_vwin[23:10]), .csr_slot, .ibus_base(r_iwin[31:22]),
    .tgt(vs_dec_tgt), .ibus_addr(vs_dec_ibus_unused), .reg_idx(vs_dec_idx_unused)
  );

  addr_xlate_v2i u_acc_xlate (
    .vme_addr(vs_acc_addr), .am(vs_cur_am), .data_en(module_en),
    .a32_win(r_vwin[31:24]), .a24_win(r_vwin[23:10]), .csr_slot, .ibus_base(r_iwin[31:22]),
    .tgt(vs_acc_tgt_unused), .ibus_addr(vs_acc_iaddr), .reg_idx(vs_acc_idx)
  );

  crcsr u_crcsr (
    .clk, .rst_n, .hw_slot, .offs({vs_acc_addr[18:2], 2'b11}), .we(csr_we), .wdata(vs_acc_wdata[7:0]),
    .rdata(csr_rdata), .user(csr_user), .slot(csr_slot), .berr_set(!vs_berr_n),
    .module_en, .sysfail_en(sysfail_en_unused), .board_reset(board_reset_o)
  );

  // registers and CR/CSR answer in one cycle
  logic loc_sel;
  assign loc_sel = vs_acc_req && !loc_ack && (vs_acc_tgt == TGT_REG || vs_acc_tgt == TGT_CSR);
  assign ra_we   = loc_sel && vs_acc_we && (vs_acc_tgt == TGT_REG || csr_user);
  assign ra_idx  = vs_acc_idx;
  assign csr_we  = loc_sel && vs_acc_we && vs_acc_tgt == TGT_CSR && !csr_user;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin loc_ack <= 1'b0; loc_rdata <= '0; end
    else begin
      loc_ack   <= loc_sel;
      loc_rdata <= (vs_acc_tgt == TGT_CSR && !csr_user) ? {24'h0, csr_rdata} : ra_rdata;
    end
  end

  assign vs_acc_ack   = loc_ack || v2i_ack;
  assign vs_acc_err   = v2i_err;
  assign vs_acc_rdata = loc_ack ? loc_rdata : v2i_rdata;

  v2i_engine u_v2i (
    .clk, .rst_n, .own(own == OWN_V2I), .need(v2i_need),
    .acc_req(vs_acc_req && vs_acc_tgt == TGT_IBUS), .acc_we(vs_acc_we), .acc_iaddr(vs_acc_iaddr),
    .acc_be(vs_acc_be), .acc_wdata(vs_acc_wdata), .blk_mode(vs_blk_mode), .blk_end(vs_blk_end),
    .acc_ack(v2i_ack), .acc_err(v2i_err), .acc_rdata(v2i_rdata), .wr_err(v2i_wr_err),
    .f_clear(v2i_f_clear), .f_push(v2i_f_push), .f_wdata(v2i_f_wdata), .f_pop(v2i_f_pop),
    .f_rdata, .f_cidx(v2i_f_cidx), .f_cdata, .f_count,
    .m_start(v2i_m_start), .m_rnw(v2i_m_rnw), .m_addr(v2i_m_addr), .m_len(v2i_m_len),
    .m_done(im_done && own == OWN_V2I), .m_err(im_err),
    .m_src_valid(v2i_m_src_valid), .m_src_data(v2i_m_src_data), .m_src_pop(im_src_pop && own == OWN_V2I),
    .m_snk_push(im_snk_push && own == OWN_V2I), .m_snk_data(im_snk_data)
  );

  // ---------------- IBUS slave side ----------------
  addr_xlate_i2v u_i2v_xlate (
    .ibus_addr(is_l_addr), .vme_win(r_i2vwin[31:22]), .reg_region(r_i2vwin[13:0]), .caps,
    .hit_reg, .hit_vme, .mask(is_mask), .vme_addr(is_vaddr), .cap(is_cap)
  );

  assign is_l_hit      = hit_reg || hit_vme;
  assign is_l_burst_ok = hit_vme ? i2v_burst_ok : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tgt_vme_q <= 1'b0;
    else if (is_l_start) tgt_vme_q <= hit_vme;
  end

  ibus_slave u_is (
    .clk, .rst_n, .ce(ibus_ce),
    .ad_i(ibus_ad_i), .ad_o(is_ad_o), .ad_oe(is_ad_oe), .frame_i(ibus_frame_i), .rnw_i(ibus_rnw_i),
    .valid_i(ibus_valid_i), .valid_o(is_valid_o), .ack_o(is_ack_o),
    .l_addr(is_l_addr), .l_rnw(is_l_rnw), .l_hit(is_l_hit), .l_mask(is_mask), .l_burst_ok(is_l_burst_ok),
    .l_start(is_l_start), .l_end(is_l_end), .l_wr(is_l_wr), .l_waddr(is_l_waddr), .l_wdata(is_l_wdata),
    .l_rd(is_l_rd), .l_ravail(is_l_ravail), .l_rdata(is_l_rdata)
  );

  assign rb_we       = is_l_wr && !tgt_vme_q;
  assign is_l_rdata  = tgt_vme_q ? (i2v_fill ? '1 : f_rdata) : rb_rdata;
  assign is_l_ravail = tgt_vme_q ? (own == OWN_I2V && (!f_empty || i2v_fill)) : 1'b1;

  i2v_ctrl u_i2v (
    .clk, .rst_n, .own(own == OWN_I2V), .need(i2v_need),
    .s_start(is_l_start && hit_vme), .s_end(is_l_end && tgt_vme_q), .s_rnw(is_l_rnw),
    .s_wr(is_l_wr && tgt_vme_q), .s_vaddr(is_vaddr), .s_cap(is_cap), .burst_ok(i2v_burst_ok),
    .f_clear(i2v_f_clear), .f_count,
    .v_start(i2v_v_start), .v_rnw(i2v_v_rnw), .v_addr(i2v_v_addr), .v_am(i2v_v_am), .v_dw(i2v_v_dw),
    .v_blk(i2v_v_blk), .v_count(i2v_v_count), .v_stop(i2v_v_stop),
    .v_busy(vm_busy), .v_done(vm_done && own == OWN_I2V), .v_berr(vm_berr), .err(i2v_err), .fill(i2v_fill)
  );

  // ---------------- DMA and interrupts ----------------
  dma_ctrl u_dma (
    .clk, .rst_n, .start(dma_start), .vaddr(r_dvaddr), .iaddr(r_diaddr), .len(r_dlen[15:0]),
    .dir(r_dctrl[1]), .am(r_dctrl[7:2]), .dw(dwidth_e'(r_dctrl[9:8])), .blk(r_dctrl[10]),
    .busy(dma_busy), .done(dma_done), .err(dma_err), .need(dma_need), .own(own == OWN_DMA),
    .dir_q(dma_dir), .f_clear(dma_f_clear),
    .v_start(dma_v_start), .v_rnw(dma_v_rnw), .v_addr(dma_v_addr), .v_am(dma_v_am), .v_dw(dma_v_dw),
    .v_blk(dma_v_blk), .v_count(dma_v_count), .v_done(vm_done && own == OWN_DMA), .v_berr(vm_berr),
    .m_start(dma_m_start), .m_rnw(dma_m_rnw), .m_addr(dma_m_addr), .m_len(dma_m_len),
    .m_done(im_done && own == OWN_DMA), .m_err(im_err)
  );

  irq_manager u_irq (
    .clk, .rst_n, .ibus_irq(ibus_irq_i), .ibus_ack(ibus_irq_ack),
    .lvl_a(r_irqcfg[2:0]), .lvl_b(r_irqcfg[6:4]), .en_a(r_irqcfg[8]), .en_b(r_irqcfg[9]),
    .id_a(r_irqid[7:0]), .id_b(r_irqid[15:8]), .handler_mask(r_irqcfg[23:17]),
    .irq_n_o(vme_irq_n_o), .as_n(vme_as_n_i), .ds_n(vme_ds_n_i), .iack_n(vme_iack_n_i), .a_i(vme_a_i[3:1]),
    .iackin_n(iackin_eff_n), .iackout_n(vme_iackout_n), .d_o(irq_d_o), .d_oe(irq_d_oe), .dtack_n(irq_dtack_n),
    .irq_n_i(vme_irq_n_i), .stat_full(r_status[3]), .need(irq_need), .own(own == OWN_IRQ),
    .v_start(irq_v_start), .v_addr(irq_v_addr), .v_done(vm_done && own == OWN_IRQ), .v_berr(vm_berr),
    .v_push(vm_snk_push && own == OWN_IRQ), .v_data(vm_snk_data),
    .stat_we(iack_stat_we), .stat_data(iack_stat), .stat_set(irq_stat_set)
  );

  assign status_set = {irq_stat_set, dma_done, vm_done && vm_berr, v2i_wr_err || (im_done && im_err)};
  assign ibus_irq_o = r_status[3];

  // ---------------- ownership of FIFO and masters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) own <= OWN_NONE;
    else unique case (own)
      OWN_NONE: if (irq_need) own <= OWN_IRQ;
                else if (v2i_need) own <= OWN_V2I;
                else if (i2v_need) own <= OWN_I2V;
                else if (dma_need) own <= OWN_DMA;
      OWN_IRQ: if (!irq_need) own <= OWN_NONE;
      OWN_V2I: if (!v2i_need) own <= OWN_NONE;
      OWN_I2V: if (!i2v_need) own <= OWN_NONE;
      OWN_DMA: if (!dma_need) own <= OWN_NONE;
      default: own <= OWN_NONE;
    endcase
  end

  always_comb begin
    f_clear = 1'b0; f_push = 1'b0; f_wdata = '0; f_pop = 1'b0; f_cidx = '0;
    unique case (own)
      OWN_V2I: begin
        f_clear = v2i_f_clear; f_push = v2i_f_push; f_wdata = v2i_f_wdata; f_pop = v2i_f_pop; f_cidx = v2i_f_cidx;
      end
      OWN_I2V: begin
        f_clear = i2v_f_clear;
        f_push  = (is_l_wr && tgt_vme_q) || vm_snk_push;
        f_wdata = vm_snk_push ? vm_snk_data : is_l_wdata;
        f_pop   = (is_l_rd && tgt_vme_q && !i2v_fill) || vm_src_pop;
      end
      OWN_DMA: begin
        f_clear = dma_f_clear;
        f_push  = dma_dir ? im_snk_push : vm_snk_push;
        f_wdata = dma_dir ? im_snk_data : vm_snk_data;
        f_pop   = dma_dir ? vm_src_pop : im_src_pop;
      end
      default: ;
    endcase
  end

  // IBUS master client
  always_comb begin
    im_start = 1'b0; im_rnw = 1'b0; im_addr = '0; im_len = '0; im_src_valid = 1'b0; im_src_data = f_rdata;
    if (own == OWN_V2I) begin
      im_start = v2i_m_start; im_rnw = v2i_m_rnw; im_addr = v2i_m_addr; im_len = v2i_m_len;
      im_src_valid = v2i_m_src_valid; im_src_data = v2i_m_src_data;
    end else if (own == OWN_DMA) begin
      im_start = dma_m_start; im_rnw = dma_m_rnw; im_addr = dma_m_addr; im_len = dma_m_len;
      im_src_valid = !f_empty;
    end
  end

  // VME master client
  always_comb begin
    vm_start = 1'b0; vm_rnw = 1'b1; vm_iack = 1'b0; vm_addr = '0; vm_am = '0; vm_dw = DW_D32;
    vm_blk = 1'b0; vm_count = '0; vm_stop = 1'b0;
    unique case (own)
      OWN_IRQ: begin vm_start = irq_v_start; vm_iack = 1'b1; vm_addr = irq_v_addr; vm_count = 16'd1; end
      OWN_I2V: begin
        vm_start = i2v_v_start; vm_rnw = i2v_v_rnw; vm_addr = i2v_v_addr; vm_am = i2v_v_am; vm_dw = i2v_v_dw;
        vm_blk = i2v_v_blk; vm_count = i2v_v_count; vm_stop = i2v_v_stop;
      end
      OWN_DMA: begin
        vm_start = dma_v_start; vm_rnw = dma_v_rnw; vm_addr = dma_v_addr; vm_am = dma_v_am; vm_dw = dma_v_dw;
        vm_blk = dma_v_blk; vm_count = dma_v_count;
      end
      default: ;
    endcase
  end
  assign vm_src_valid = !f_empty;
  assign vm_src_data  = f_rdata;

  ibus_master u_im (
    .clk, .rst_n, .ce(ibus_ce),
    .start(im_start), .rnw(im_rnw), .addr(im_addr), .len(im_len), .busy(im_busy), .done(im_done), .err(im_err),
    .src_valid(im_src_valid), .src_data(im_src_data), .src_pop(im_src_pop),
    .snk_push(im_snk_push), .snk_data(im_snk_data),
    .breq(im_breq), .bgnt(im_bgnt),
    .ad_o(im_ad_o), .ad_oe(im_ad_oe), .ad_i(ibus_ad_i), .frame_o(ibus_frame_o), .rnw_o(ibus_rnw_o),
    .valid_o(im_valid_o), .valid_i(ibus_valid_i), .ack_i(ibus_ack_i)
  );

  ibus_arbiter #(.N_MASTERS(2)) u_iarb (
    .clk, .rst_n, .ce(ibus_ce), .req({ibus_ext_breq, im_breq}), .gnt({ibus_ext_bgnt, im_bgnt})
  );

  vme_master u_vm (
    .clk, .rst_n,
    .start(vm_start), .rnw(vm_rnw), .iack(vm_iack), .addr(vm_addr), .am_cmd(vm_am), .dw(vm_dw), .blk(vm_blk),
    .count(vm_count), .stop(vm_stop), .t_setup(r_timing[3:0]), .t_idle(r_timing[7:4]),
    .busy(vm_busy), .done(vm_done), .berr(vm_berr),
    .src_valid(vm_src_valid), .src_data(vm_src_data), .src_pop(vm_src_pop),
    .snk_space(5'(FIFO_DEPTH) - f_count), .snk_push(vm_snk_push), .snk_data(vm_snk_data),
    .bus_req(vm_bus_req), .bus_gnt(vm_bus_gnt),
    .a_o(vm_a_o), .lword_n_o(vm_lword_n_o), .a_oe(vm_a_oe), .a_i(vme_a_i), .lword_n_i(vme_lword_n_i),
    .am_o(vme_am_o), .as_n(vme_as_n_o), .ds_n(vme_ds_n_o), .write_n(vme_write_n_o), .iack_n(vme_iack_n_o),
    .d_o(vm_d_o), .d_oe(vm_d_oe), .d_i(vme_d_i), .dtack_n(vme_dtack_n_i), .berr_n(vme_berr_n_i)
  );

  vme_utilities u_util (
    .clk, .rst_n, .sysctrl, .bus_req(vm_bus_req), .bus_gnt(vm_bus_gnt),
    .br_n_i(vme_br_n_i), .br_n_o(vme_br_n_o), .bgin_n(vme_bgin_n), .bgout_n(vme_bgout_n),
    .bbsy_n_i(vme_bbsy_n_i), .bbsy_n_o(vme_bbsy_n_o), .sysreset_cmd, .sysreset_n_o(vme_sysreset_n_o),
    .iack_n(vme_iack_n_i), .iackin_n(vme_iackin_n), .iackin_eff_n
  );

  // ---------------- pins ----------------
  assign ibus_ad_o     = im_ad_oe ? im_ad_o : is_ad_o;
  assign ibus_ad_oe    = im_ad_oe || is_ad_oe;
  assign ibus_mst_oe   = im_bgnt && im_busy;
  assign ibus_valid_o  = im_valid_o || is_valid_o;
  assign ibus_valid_oe = (ibus_mst_oe && !ibus_rnw_o) || is_ad_oe;
  assign ibus_ack_o    = is_ack_o;
  assign ibus_ack_oe   = is_ack_o;

  assign vme_ctl_oe    = vm_bus_gnt;
  assign vme_a_o       = vs_a_oe ? vs_a_o : vm_a_o;
  assign vme_lword_n_o = vs_a_oe ? vs_lword_n_o : vm_lword_n_o;
  assign vme_a_oe      = vs_a_oe || vm_a_oe;
  assign vme_d_o       = vs_d_oe ? vs_d_o : irq_d_oe ? {24'h0, irq_d_o} : vm_d_o;
  assign vme_d_oe      = vs_d_oe || irq_d_oe || vm_d_oe;
  assign vme_dtack_n_o = vs_dtack_n && irq_dtack_n;
  assign vme_berr_n_o  = vs_berr_n;
endmodule
