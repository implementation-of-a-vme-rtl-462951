// irq_manager: interrupt translation between IBUS and VME.
//
// IBUS to VME (interrupter). Two IBUS interrupt requests, A and B, can be
// active at a time. Each is mapped to one of the seven VME levels chosen in
// the interrupt configuration register and can be disabled there. A rising
// IBUS request makes the request pending and pulls the chosen IRQ* line low.
// The interrupter answers an IACK cycle (IACK* low, AS* and a data strobe
// low, IACKIN* low) whose level on A3..A1 matches a pending request: it
// drives that request's status/ID byte on D7..D0 and DTACK*, drops the
// request (release on acknowledge) and pulses ibus_ack. An IACK cycle for
// any other level is passed down the daisy chain on IACKOUT* until AS*
// rises. Request A wins when both sit on the same level.
//
// VME to IBUS (handler). VME interrupt levels enabled in the handler mask
// are served, highest level first, when the previous status word has been
// collected (stat_full low): the VME master runs an IACK cycle for that
// level, and the status/ID byte and level are stored (stat_we) and flagged
// (stat_set), which the bridge shows to IBUS as its interrupt output.
//
// Two IBUS requests on selectable levels, the stored status words and the
// handler for enabled VME levels are the document's; D8(O) status/ID, edge
// triggering on the IBUS side and release on acknowledge are this design's
// own. VME inputs pass a two-flop synchroniser.
module irq_manager (
  input  logic        clk,
  input  logic        rst_n,
  // IBUS requests
  input  logic [1:0]  ibus_irq,
  output logic [1:0]  ibus_ack,
  // configuration
  input  logic [2:0]  lvl_a,
  input  logic [2:0]  lvl_b,
  input  logic        en_a,
  input  logic        en_b,
  input  logic [7:0]  id_a,
  input  logic [7:0]  id_b,
  input  logic [7:1]  handler_mask,
  // VME interrupter
  output logic [7:1]  irq_n_o,
  input  logic        as_n,
  input  logic [1:0]  ds_n,
  input  logic        iack_n,
  input  logic [3:1]  a_i,
  input  logic        iackin_n,
  output logic        iackout_n,
  output logic [7:0]  d_o,
  output logic        d_oe,
  output logic        dtack_n,
  // VME handler
  input  logic [7:1]  irq_n_i,
  input  logic        stat_full,
  output logic        need,
  input  logic        own,
  output logic        v_start,
  output logic [31:0] v_addr,
  input  logic        v_done,
  input  logic        v_berr,
  input  logic        v_push,
  input  logic [31:0] v_data,
  output logic        stat_we,
  output logic [31:0] stat_data,
  output logic        stat_set
);
  typedef enum logic [1:0] {R_IDLE, R_RESP, R_PASS, R_WAS} rstate_e;
  typedef enum logic [1:0] {H_IDLE, H_START, H_WAIT} hstate_e;

  rstate_e    rst_q;
  hstate_e    hst;
  logic [1:0] pend, irq_d;
  logic [1:0] as_y, iack_y, iackin_y, ds0_y, ds1_y;
  logic       as_s, iack_s, iackin_s, ds_s;
  logic [7:1] vme_irq_s, vme_irq_y;
  logic [2:0] hlvl;
  logic [7:0] hdata;
  logic       hany;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_y <= '0; iack_y <= '0; iackin_y <= '0; ds0_y <= '0; ds1_y <= '0; vme_irq_y <= '0; vme_irq_s <= '0;
    end else begin
      as_y <= {as_y[0], !as_n}; iack_y <= {iack_y[0], !iack_n}; iackin_y <= {iackin_y[0], !iackin_n};
      ds0_y <= {ds0_y[0], !ds_n[0]}; ds1_y <= {ds1_y[0], !ds_n[1]};
      vme_irq_y <= ~irq_n_i; vme_irq_s <= vme_irq_y;
    end
  end
  assign as_s = as_y[1]; assign iack_s = iack_y[1]; assign iackin_s = iackin_y[1];
  assign ds_s = ds0_y[1] || ds1_y[1];

  // requests on the VME IRQ lines
  always_comb begin
    irq_n_o = '1;
    if (pend[0] && lvl_a != 3'd0) irq_n_o[lvl_a] = 1'b0;
    if (pend[1] && lvl_b != 3'd0) irq_n_o[lvl_b] = 1'b0;
  end

  // highest enabled VME level that is requesting
  always_comb begin
    hany = 1'b0; hlvl = 3'd0;
    for (int l = 1; l <= 7; l++)
      if (vme_irq_s[l] && handler_mask[l]) begin hany = 1'b1; hlvl = 3'(l); end
  end

  assign need = (hst != H_IDLE) || (hany && !stat_full);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst_q <= R_IDLE; pend <= '0; irq_d <= '0; ibus_ack <= '0; iackout_n <= 1'b1;
      d_o <= '0; d_oe <= 1'b0; dtack_n <= 1'b1;
      hst <= H_IDLE; v_start <= 1'b0; v_addr <= '0; hdata <= '0;
      stat_we <= 1'b0; stat_data <= '0; stat_set <= 1'b0;
    end else begin
      ibus_ack <= '0; v_start <= 1'b0; stat_we <= 1'b0; stat_set <= 1'b0;
      irq_d <= ibus_irq;
      if (ibus_irq[0] && !irq_d[0] && en_a) pend[0] <= 1'b1;
      if (ibus_irq[1] && !irq_d[1] && en_b) pend[1] <= 1'b1;
      if (!en_a) pend[0] <= 1'b0;
      if (!en_b) pend[1] <= 1'b0;

      // interrupter side
      unique case (rst_q)
        R_IDLE: if (as_s && ds_s && iack_s && iackin_s) begin
          if (pend[0] && a_i == lvl_a) begin
            d_o <= id_a; d_oe <= 1'b1; dtack_n <= 1'b0; pend[0] <= 1'b0; ibus_ack[0] <= 1'b1; rst_q <= R_RESP;
          end else if (pend[1] && a_i == lvl_b) begin
            d_o <= id_b; d_oe <= 1'b1; dtack_n <= 1'b0; pend[1] <= 1'b0; ibus_ack[1] <= 1'b1; rst_q <= R_RESP;
          end else begin
            iackout_n <= 1'b0; rst_q <= R_PASS;
          end
        end
        R_RESP: if (!ds_s) begin d_oe <= 1'b0; dtack_n <= 1'b1; rst_q <= R_WAS; end
        R_PASS: if (!as_s) begin iackout_n <= 1'b1; rst_q <= R_IDLE; end
        R_WAS:  if (!as_s) rst_q <= R_IDLE;
        default: rst_q <= R_IDLE;
      endcase

      // handler side
      unique case (hst)
        H_IDLE: if (hany && !stat_full && !stat_set && own) begin
          v_addr <= {28'h0, hlvl, 1'b0}; hst <= H_START;
        end
        H_START: begin v_start <= 1'b1; hst <= H_WAIT; end
        H_WAIT: begin
          if (v_push) hdata <= v_data[7:0];
          if (v_done) begin
            if (!v_berr) begin
              stat_we <= 1'b1; stat_set <= 1'b1;
              stat_data <= {21'h0, v_addr[3:1], v_push ? v_data[7:0] : hdata};
            end
            hst <= H_IDLE;
          end
        end
        default: hst <= H_IDLE;
      endcase
    end
  end
endmodule
