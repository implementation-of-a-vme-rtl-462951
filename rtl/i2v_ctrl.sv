// i2v_ctrl: carries IBUS transfers into the VME window over to the VME master.
//
// When the IBUS slave accepts a transfer whose address lies in the VME
// window, this controller asks the bridge for the FIFO and the VME master
// ('need'/'own') and then:
//   write  IBUS words are collected in the FIFO. When 16 words are in (a
//          whole burst) or the IBUS master ends the transfer, the VME master
//          writes them out, starting at the VME address of the first of
//          them, as one block transfer when the addressed VME slave accepts
//          block transfers, as single cycles otherwise. Only then does the
//          IBUS slave accept the next burst (burst_ok).
//   read   the VME master reads 16 words ahead, starting at the VME address
//          of the IBUS address, into the FIFO; the IBUS slave hands them out
//          as they arrive. When the VME master is done and IBUS still wants
//          data, the next 16 words are read. When IBUS ends the transfer the
//          VME master is stopped at its next word boundary and words read
//          ahead are dropped. IBUS has no error signal: when the VME read
//          ends in BERR*, the IBUS read is completed with all-ones words
//          ('fill') and err is reported.
// The VME address, AM code, data width and block capability come from the
// capability entry selected by the IBUS address (addr_xlate_i2v). MBLT is
// used for writes of an even number of words when the entry allows it.
//
// The address and cycle translation by capability entry is the document's;
// read-ahead by one burst and the flush points are this design's own.
module i2v_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        own,
  output logic        need,
  // IBUS slave, VME-window transfers only
  input  logic        s_start,
  input  logic        s_end,
  input  logic        s_rnw,
  input  logic        s_wr,
  input  logic [31:0] s_vaddr,        // VME address of the current IBUS word
  input  vmebr_pkg::cap_t s_cap,      // its capability entry
  output logic        burst_ok,
  // bridge FIFO
  output logic        f_clear,
  input  logic [4:0]  f_count,
  // VME master client
  output logic        v_start,
  output logic        v_rnw,
  output logic [31:0] v_addr,
  output logic [5:0]  v_am,
  output vmebr_pkg::dwidth_e v_dw,
  output logic        v_blk,
  output logic [15:0] v_count,
  output logic        v_stop,
  input  logic        v_busy,
  input  logic        v_done,
  input  logic        v_berr,
  output logic        err,
  output logic        fill      // hand out all-ones words instead of FIFO data
);
  import vmebr_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_WCOLL, S_WOUT, S_RD, S_RWAIT, S_DRAIN, S_FILL} state_e;

  state_e      st;
  logic        active;
  logic [31:0] first_va;
  cap_t        cap_q;
  logic        first;

  assign need     = active || st != S_IDLE;
  assign burst_ok = own && ((st == S_WCOLL && f_count == 0 && !v_busy) || st == S_RD || st == S_RWAIT || st == S_DRAIN || st == S_FILL);
  assign fill     = (st == S_FILL);

  function automatic dwidth_e word_dw(input cap_t c, input logic mblt_ok);
    if (c.dw == DW_D64 && !mblt_ok) return DW_D32;
    return c.dw;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; active <= 1'b0; first_va <= '0; cap_q <= '0; first <= 1'b0;
      f_clear <= 1'b0; v_start <= 1'b0; v_rnw <= 1'b0; v_addr <= '0; v_am <= '0; v_dw <= DW_D32;
      v_blk <= 1'b0; v_count <= '0; v_stop <= 1'b0; err <= 1'b0;
    end else begin
      f_clear <= 1'b0; v_start <= 1'b0; err <= 1'b0;
      if (s_start) active <= 1'b1;
      if (s_end)   active <= 1'b0;
      unique case (st)
        S_IDLE: if (own && active) begin
          f_clear <= 1'b1; v_stop <= 1'b0; first <= 1'b1;
          st <= s_rnw ? S_RD : S_WCOLL;
        end
        S_WCOLL: begin
          if (s_wr && first) begin first_va <= s_vaddr; cap_q <= s_cap; first <= 1'b0; end
          if ((f_count == 5'd16) || (!active && f_count != 0)) begin
            v_start <= 1'b1; v_rnw <= 1'b0; v_addr <= first_va; v_am <= cap_q.am;
            v_dw    <= word_dw(cap_q, !f_count[0] && cap_q.mblt);
            v_blk   <= cap_q.blt || (cap_q.mblt && !f_count[0] && cap_q.dw == DW_D64);
            v_count <= 16'(f_count);
            st <= S_WOUT;
          end else if (!active) st <= S_IDLE;
        end
        S_WOUT: if (v_done) begin
          if (v_berr) err <= 1'b1;
          f_clear <= 1'b1; first <= 1'b1;
          st <= active ? S_WCOLL : S_IDLE;
        end
        S_RD: begin
          v_start <= 1'b1; v_rnw <= 1'b1; v_addr <= s_vaddr; v_am <= s_cap.am;
          v_dw <= word_dw(s_cap, s_cap.mblt); v_blk <= s_cap.blt || s_cap.mblt; v_count <= 16'd16;
          first_va <= s_vaddr + 32'd64;
          st <= S_RWAIT;
        end
        S_RWAIT: begin
          if (s_end) v_stop <= 1'b1;
          if (v_done) begin
            if (v_berr) err <= 1'b1;
            if (v_berr && active && !s_end) begin
              f_clear <= 1'b1; v_stop <= 1'b0; st <= S_FILL;
            end else if (active && !v_stop && !s_end) begin
              st <= S_DRAIN;
            end else begin
              f_clear <= 1'b1; v_stop <= 1'b0; st <= S_IDLE;
            end
          end
        end
        // wait for IBUS to take the words read ahead, then read 16 more
        S_DRAIN: begin
          if (!active) begin f_clear <= 1'b1; st <= S_IDLE; end
          else if (f_count == 0) begin
            v_start <= 1'b1; v_rnw <= 1'b1; v_addr <= first_va; v_count <= 16'd16;
            first_va <= first_va + 32'd64;
            st <= S_RWAIT;
          end
        end
        S_FILL: if (!active) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
