// ibus_master: IBUS master protocol engine of the bridge.
//
// A local client starts a transfer of 'len' 32-bit words at IBUS word
// address 'addr', reading (rnw=1) or writing. The engine requests the bus
// from the IBUS bus controller, and once granted runs the IBUS sequence:
//
//   addressing  cycle 0: FRAME=1 and the address on AD; the slave decodes in
//               cycle 1 and raises ACK in cycle 2; cycle 3 turns the bus
//               round; the first word may move in cycle 4 (4 cycles minimum).
//   data        every cycle in which the sender (master on writes, slave on
//               reads) raises VALID carries one word. A burst ends after 16
//               words.
//   handshake   after the 16th word the slave drops ACK for one cycle and
//               raises it again when it can take or give the next burst:
//               2 cycles, so the peak rate is 16/18 = 89 % of 4 bytes per
//               cycle.
//   release     the master drops FRAME when its words are done (possibly in
//               the middle of a burst) and leaves the bus idle for at least
//               2 cycles before its next FRAME.
//
// These cycle counts follow the bus description; the assignment of the four
// control lines (FRAME, RNW, ACK, VALID) and the request/grant pair are this
// design's own choice. A slave that does not raise ACK within ACK_TIMEOUT
// cycles ends the transfer with err. On reads the client must be able to sink
// every word (no flow control inside a burst); on writes the engine inserts
// idle cycles while the client's source is empty.
//
// All state advances only on clock edges where ce=1 (ce marks the IBUS clock
// edges within the faster bridge clock); the one-cycle strobes src_pop and
// snk_push are qualified with ce.
module ibus_master #(
  parameter int unsigned ACK_TIMEOUT = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  // client side
  input  logic        start,
  input  logic        rnw,
  input  logic [31:0] addr,
  input  logic [15:0] len,
  output logic        busy,
  output logic        done,     // one-cycle pulse at the end of a transfer
  output logic        err,      // with done: no ACK from any slave
  input  logic        src_valid,
  input  logic [31:0] src_data,
  output logic        src_pop,
  output logic        snk_push,
  output logic [31:0] snk_data,
  // bus controller
  output logic        breq,
  input  logic        bgnt,
  // IBUS
  output logic [31:0] ad_o,
  output logic        ad_oe,
  input  logic [31:0] ad_i,
  output logic        frame_o,
  output logic        rnw_o,
  output logic        valid_o,
  input  logic        valid_i,
  input  logic        ack_i
);
  typedef enum logic [3:0] {
    S_IDLE, S_REQ, S_ADDR, S_WACK, S_TURN, S_DATA, S_BW0, S_BWAIT, S_LAST, S_REL1, S_REL2
  } state_e;

  localparam logic [4:0] BURST_N = 5'(vmebr_pkg::BURST_WORDS);

  state_e      st;
  logic        rnw_q;
  logic [15:0] left;     // words still to move
  logic [4:0]  nb;       // words moved in this burst
  logic [7:0]  tmo;
  logic        can_send;      // a word can be put on the bus in the next cycle

  assign busy     = (st != S_IDLE);
  assign breq     = (st != S_IDLE) && (st != S_REL1) && (st != S_REL2);
  assign can_send = !rnw_q && src_valid && left != 0 && (nb != BURST_N || st == S_BWAIT);

  assign src_pop  = ce && can_send && (st == S_TURN || st == S_DATA || (st == S_BWAIT && ack_i));
  assign snk_push = ce && rnw_q && st == S_DATA && valid_i && frame_o;
  assign snk_data = ad_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; rnw_q <= 1'b0; left <= '0; nb <= '0; tmo <= '0;
      ad_o <= '0; ad_oe <= 1'b0; frame_o <= 1'b0; rnw_o <= 1'b0; valid_o <= 1'b0;
      done <= 1'b0; err <= 1'b0;
    end else begin
      done <= 1'b0;
      // a start is taken on any clk edge, so one-cycle strobes from clients
      // on the fast clock are not lost between IBUS edges
      if (st == S_IDLE && start) begin
        st <= S_REQ; rnw_q <= rnw; left <= len; ad_o <= addr; err <= 1'b0;
      end
      if (ce) begin
        valid_o <= 1'b0;
        unique case (st)
          S_IDLE: ;
          S_REQ: if (bgnt) begin
            st <= S_ADDR; frame_o <= 1'b1; rnw_o <= rnw_q; ad_oe <= 1'b1; tmo <= '0;
          end
          S_ADDR: begin st <= S_WACK; ad_oe <= 1'b0; end
          S_WACK: begin
            tmo <= tmo + 1'b1;
            if (ack_i) begin st <= S_TURN; nb <= '0; end
            else if (tmo == 8'(ACK_TIMEOUT)) begin err <= 1'b1; st <= S_LAST; end
          end
          S_TURN, S_DATA: begin
            if (st == S_TURN) begin st <= S_DATA; ad_oe <= !rnw_q; end
            if (rnw_q) begin
              if (st == S_DATA && valid_i) begin
                left <= left - 1'b1;
                nb   <= nb + 1'b1;
                if (left == 1) st <= S_LAST;
                else if (nb == BURST_N - 1) st <= S_BWAIT;
              end
            end else if (can_send) begin
              ad_o <= src_data; valid_o <= 1'b1;
              left <= left - 1'b1;
              nb   <= nb + 1'b1;
              if (left == 1) st <= S_LAST;
              else if (nb == BURST_N - 1) st <= S_BW0;
            end
            if (left == 0) st <= S_LAST;
          end
          S_BW0: st <= S_BWAIT;           // 16th word is on the bus; ACK still high
          S_BWAIT: if (ack_i) begin       // next burst granted by the slave
            nb <= '0;
            st <= S_DATA;
            if (can_send) begin
              ad_o <= src_data; valid_o <= 1'b1;
              left <= left - 1'b1; nb <= 5'd1;
              if (left == 1) st <= S_LAST;
            end
          end
          S_LAST: begin
            frame_o <= 1'b0; ad_oe <= 1'b0; st <= S_REL1;
          end
          S_REL1: st <= S_REL2;
          S_REL2: begin st <= S_IDLE; done <= 1'b1; end
          default: st <= S_IDLE;
        endcase
      end
    end
  end
endmodule
