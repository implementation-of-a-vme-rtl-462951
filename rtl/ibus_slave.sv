// ibus_slave: IBUS slave protocol engine of the bridge.
//
// It watches FRAME. In the cycle after FRAME rises it holds the address and
// asks the local decoder whether the address is its own (l_hit) and how far
// the slave's range reaches (l_mask, a mask of the word-address bits that
// may change inside the range). On a hit it raises ACK in the next cycle
// (later if the local side is not yet ready for a burst), lets one
// turnaround cycle pass and then moves words:
//   write: each cycle with VALID=1 delivers one word to the local side
//          (l_wr, l_waddr, l_wdata); the local side must take it.
//   read:  each cycle in which the local side has a word (l_ravail) the
//          engine pops it (l_rd) and drives it with VALID=1 in the next cycle.
// After 16 words ACK drops for at least the two cycles after the 16th word
// is on the bus; it rises again for the next burst when the local side says
// it can take or give a whole burst (l_burst_ok). The word address advances circularly: when
// it passes the end of the slave's range it continues at the range's start.
// When FRAME falls the engine pulses l_end and returns to idle.
//
// The circular addressing, 16-word bursts and 4-cycle addressing phase
// follow the bus description; the control-line details are this design's
// own (see ibus_master.sv). State advances only on clock edges with ce=1;
// the strobes l_start, l_wr, l_rd and l_end are one fast-clock cycle long.
module ibus_slave (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  // IBUS
  input  logic [31:0] ad_i,
  output logic [31:0] ad_o,
  output logic        ad_oe,
  input  logic        frame_i,
  input  logic        rnw_i,
  input  logic        valid_i,
  output logic        valid_o,
  output logic        ack_o,
  // local decoder
  output logic [31:0] l_addr,   // current word address
  output logic        l_rnw,
  input  logic        l_hit,
  input  logic [31:0] l_mask,
  input  logic        l_burst_ok,
  // local data
  output logic        l_start,
  output logic        l_end,
  output logic        l_wr,
  output logic [31:0] l_waddr,
  output logic [31:0] l_wdata,
  output logic        l_rd,
  input  logic        l_ravail,
  input  logic [31:0] l_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_DEC, S_ACK, S_TURN, S_DATA, S_GAP0, S_GAP, S_WAIT_FR_LOW} state_e;

  state_e      st;
  logic [31:0] mask_q;
  logic [4:0]  nb;
  logic        rd_now;
  logic [31:0] next_addr;

  localparam logic [4:0] BURST_N = 5'(vmebr_pkg::BURST_WORDS);

  assign next_addr = (l_addr & ~mask_q) | ((l_addr + 32'd1) & mask_q);
  assign rd_now    = l_rnw && st == S_DATA && frame_i && nb != BURST_N && l_ravail;

  assign l_wr    = ce && !l_rnw && st == S_DATA && frame_i && valid_i;
  assign l_waddr = l_addr;
  assign l_wdata = ad_i;
  assign l_rd    = ce && rd_now;
  assign ad_oe   = l_rnw && (st == S_DATA || st == S_GAP0 || st == S_GAP) && frame_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; l_addr <= '0; l_rnw <= 1'b0; mask_q <= '0; nb <= '0;
      ack_o <= 1'b0; valid_o <= 1'b0; ad_o <= '0; l_start <= 1'b0; l_end <= 1'b0;
    end else begin
      l_start <= 1'b0;
      l_end   <= 1'b0;
      if (ce) begin
        valid_o <= 1'b0;
        unique case (st)
          S_IDLE: if (frame_i) begin
            l_addr <= ad_i; l_rnw <= rnw_i; st <= S_DEC;
          end
          S_DEC: begin
            if (l_hit) begin
              mask_q <= l_mask; l_start <= 1'b1; nb <= '0;
              if (l_burst_ok) begin ack_o <= 1'b1; st <= S_TURN; end
              else st <= S_ACK;
            end else st <= S_WAIT_FR_LOW;
          end
          S_ACK: if (l_burst_ok) begin ack_o <= 1'b1; st <= S_TURN; nb <= '0; end
          S_TURN: st <= S_DATA;
          S_DATA: begin
            if (l_wr || rd_now) begin
              l_addr <= next_addr;
              nb     <= nb + 1'b1;
              if (nb == BURST_N - 1) begin ack_o <= 1'b0; st <= l_rnw ? S_GAP0 : S_GAP; end
            end
            if (rd_now) begin ad_o <= l_rdata; valid_o <= 1'b1; end
          end
          S_GAP0: st <= S_GAP;
          S_GAP: if (l_burst_ok) begin ack_o <= 1'b1; nb <= '0; st <= S_DATA; end
          S_WAIT_FR_LOW: ;
          default: st <= S_IDLE;
        endcase
        if (!frame_i && st != S_IDLE) begin
          st <= S_IDLE; ack_o <= 1'b0; valid_o <= 1'b0;
          if (st != S_WAIT_FR_LOW && st != S_DEC) l_end <= 1'b1;
        end
      end
    end
  end
endmodule
