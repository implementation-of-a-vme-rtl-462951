// v2i_engine: carries VME slave accesses in the A32 window over to IBUS.
//
// IBUS moves only whole 32-bit words in bursts, while a VME master may
// write or read single bytes, half words, words or blocks. This engine turns
// one into the other, using the bridge FIFO in two ways:
//   write buffer  full-word writes are posted: the word is pushed into the
//                 FIFO and the VME cycle is acknowledged at once. The buffer
//                 is written to IBUS as one burst when it holds 16 words,
//                 when a write is not contiguous with it, before any other
//                 kind of access, and when the VME cycle ends (AS* rises).
//   cache line    a read fetches a line into the emptied FIFO (16 aligned
//                 words in block mode, the single word otherwise) and is
//                 answered from it through the FIFO's random port; further
//                 reads that fall inside the line are answered without
//                 IBUS. The line is dropped when the VME cycle ends or on
//                 any write.
// A write of fewer than 4 bytes (D8, D16, unaligned) is done as read,
// merge and write back of the word: the word is read over IBUS, the new
// bytes are put into it and the result is written back before the VME cycle
// is acknowledged.
//
// 'need' asks the bridge for the FIFO and the IBUS master; the engine works
// only while 'own' is set and holds its request until the FIFO is empty and
// no line is cached. IBUS errors (no slave answered) end the access with
// acc_err, or set wr_err for a posted write.
//
// Posting, the cache use of the FIFO and the store-and-resend of narrow
// writes are the document's; the flush rules are this design's own.
module v2i_engine (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        own,
  output logic        need,
  // access from the VME slave (already translated to an IBUS word address)
  input  logic        acc_req,
  input  logic        acc_we,
  input  logic [31:0] acc_iaddr,
  input  logic [3:0]  acc_be,
  input  logic [31:0] acc_wdata,
  input  logic        blk_mode,
  input  logic        blk_end,
  output logic        acc_ack,
  output logic        acc_err,
  output logic [31:0] acc_rdata,
  output logic        wr_err,
  // bridge FIFO
  output logic        f_clear,
  output logic        f_push,
  output logic [31:0] f_wdata,
  output logic        f_pop,
  input  logic [31:0] f_rdata,
  output logic [3:0]  f_cidx,
  input  logic [31:0] f_cdata,
  input  logic [4:0]  f_count,
  // IBUS master client
  output logic        m_start,
  output logic        m_rnw,
  output logic [31:0] m_addr,
  output logic [15:0] m_len,
  input  logic        m_done,
  input  logic        m_err,
  output logic        m_src_valid,
  output logic [31:0] m_src_data,
  input  logic        m_src_pop,
  input  logic        m_snk_push,
  input  logic [31:0] m_snk_data
);
  typedef enum logic [2:0] {S_IDLE, S_FLUSH, S_FETCH, S_RMW_RD, S_RMW_WR, S_WAIT} state_e;
  typedef enum logic [1:0] {SRC_FIFO, SRC_HOLD} src_e;

  state_e      st, after;
  src_e        src;
  logic [31:0] wbase;          // IBUS address of the first buffered word
  logic        cache_v;
  logic [31:0] cbase;
  logic [4:0]  clen;
  logic [31:0] hold;
  logic        hold_v;
  logic        snk_fifo;
  logic        cache_hit;
  logic [31:0] coff;
  logic        end_pend;

  assign coff      = acc_iaddr - cbase;
  assign cache_hit = cache_v && coff < 32'(clen);
  assign need      = acc_req || f_count != 0 || cache_v || st != S_IDLE || end_pend;

  assign f_cidx      = coff[3:0];
  assign f_pop       = (src == SRC_FIFO) && m_src_pop;
  assign f_push      = (snk_fifo && m_snk_push) || (st == S_IDLE && own && acc_req && acc_we && acc_be == 4'hF
                        && !cache_v && !f_clear && (f_count == 0 || (acc_iaddr == wbase + 32'(f_count) && f_count != 5'd16)) && !acc_ack);
  assign f_wdata     = (snk_fifo && m_snk_push) ? m_snk_data : acc_wdata;
  assign m_src_valid = (src == SRC_FIFO) ? (f_count != 0) : hold_v;
  assign m_src_data  = (src == SRC_FIFO) ? f_rdata : hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; after <= S_IDLE; src <= SRC_FIFO; wbase <= '0; cache_v <= 1'b0; cbase <= '0;
      clen <= '0; hold <= '0; hold_v <= 1'b0; snk_fifo <= 1'b0; end_pend <= 1'b0;
      acc_ack <= 1'b0; acc_err <= 1'b0; acc_rdata <= '0; wr_err <= 1'b0; f_clear <= 1'b0;
      m_start <= 1'b0; m_rnw <= 1'b0; m_addr <= '0; m_len <= '0;
    end else begin
      acc_ack <= 1'b0; acc_err <= 1'b0; wr_err <= 1'b0; f_clear <= 1'b0; m_start <= 1'b0;
      if (blk_end) end_pend <= 1'b1;
      if (m_src_pop && src == SRC_HOLD) hold_v <= 1'b0;
      unique case (st)
        S_IDLE: if (own && !f_clear) begin   // wait a cycle after a clear
          if (acc_req && !acc_ack) begin
            if (acc_we && acc_be == 4'hF) begin
              if (cache_v) begin cache_v <= 1'b0; f_clear <= 1'b1; end
              else if (f_push) begin
                if (f_count == 0) wbase <= acc_iaddr;
                acc_ack <= 1'b1;
                if (f_count == 5'd15) begin after <= S_IDLE; st <= S_FLUSH; end
              end else begin after <= S_IDLE; st <= S_FLUSH; end
            end else if (acc_we) begin
              if (cache_v) begin cache_v <= 1'b0; f_clear <= 1'b1; end
              else if (f_count != 0) begin after <= S_IDLE; st <= S_FLUSH; end
              else begin
                m_start <= 1'b1; m_rnw <= 1'b1; m_addr <= acc_iaddr; m_len <= 16'd1;
                st <= S_RMW_RD;
              end
            end else begin
              if (cache_hit) begin
                acc_ack <= 1'b1; acc_rdata <= f_cdata;
              end else if (f_count != 0 && !cache_v) begin
                after <= S_IDLE; st <= S_FLUSH;
              end else begin
                f_clear <= 1'b1; cache_v <= 1'b0;
                cbase <= blk_mode ? {acc_iaddr[31:4], 4'h0} : acc_iaddr;
                clen  <= blk_mode ? 5'd16 : 5'd1;
                m_start <= 1'b1; m_rnw <= 1'b1;
                m_addr <= blk_mode ? {acc_iaddr[31:4], 4'h0} : acc_iaddr;
                m_len  <= blk_mode ? 16'd16 : 16'd1;
                snk_fifo <= 1'b1; st <= S_FETCH;
              end
            end
          end else if (end_pend) begin
            end_pend <= blk_end;
            if (cache_v) begin cache_v <= 1'b0; f_clear <= 1'b1; end
            if (f_count != 0 && !cache_v) begin after <= S_IDLE; st <= S_FLUSH; end
          end
        end
        S_FLUSH: begin
          src <= SRC_FIFO;
          m_start <= 1'b1; m_rnw <= 1'b0; m_addr <= wbase; m_len <= 16'(f_count);
          st <= S_WAIT;
        end
        S_WAIT: if (m_done) begin
          if (m_err) wr_err <= 1'b1;
          f_clear <= 1'b1;
          st <= after;
        end
        S_FETCH: if (m_done) begin
          snk_fifo <= 1'b0;
          if (m_err) begin acc_ack <= 1'b1; acc_err <= 1'b1; f_clear <= 1'b1; end
          else cache_v <= 1'b1;     // the pending read now hits the line
          st <= S_IDLE;
        end
        S_RMW_RD: begin
          if (m_snk_push) begin
            for (int i = 0; i < 4; i++)
              hold[8*i +: 8] <= acc_be[i] ? acc_wdata[8*i +: 8] : m_snk_data[8*i +: 8];
          end
          if (m_done) begin
            if (m_err) begin acc_ack <= 1'b1; acc_err <= 1'b1; st <= S_IDLE; end
            else begin
              hold_v <= 1'b1; src <= SRC_HOLD;
              m_start <= 1'b1; m_rnw <= 1'b0; m_addr <= acc_iaddr; m_len <= 16'd1;
              st <= S_RMW_WR;
            end
          end
        end
        S_RMW_WR: if (m_done) begin
          acc_ack <= 1'b1; acc_err <= m_err; src <= SRC_FIFO; hold_v <= 1'b0;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
