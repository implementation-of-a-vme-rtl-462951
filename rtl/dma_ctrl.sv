// dma_ctrl: DMA between VME and IBUS.
//
// Software writes the VME start address, the IBUS start address (word
// address), the length in 32-bit words and the control word (direction,
// AM code, data width, block mode) and sets the start bit. The controller
// then asks the bridge for the FIFO and both masters and moves the block in
// chunks of up to 16 words (one IBUS burst, the FIFO's size):
//   dir=0 (VME to IBUS): the VME master reads a chunk into the FIFO, then
//                        the IBUS master writes it out.
//   dir=1 (IBUS to VME): the IBUS master reads a chunk into the FIFO, then
//                        the VME master writes it out.
// The data path between the masters and the FIFO is wired by the bridge
// top from 'dir'; this block only sequences the transfers. Both addresses
// advance by the chunk after each one. A bus error on either side stops the
// DMA; 'done' pulses at the end with 'err' telling whether it failed.
//
// The start addresses, length and the reuse of the cycle-translation rules
// are the document's; chunking by 16 words and the register fields are this
// design's own. With MBLT (D64) the length must be even.
module dma_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] vaddr,
  input  logic [31:0] iaddr,
  input  logic [15:0] len,
  input  logic        dir,
  input  logic [5:0]  am,
  input  vmebr_pkg::dwidth_e dw,
  input  logic        blk,
  output logic        busy,
  output logic        done,
  output logic        err,
  output logic        need,
  input  logic        own,
  output logic        dir_q,
  output logic        f_clear,
  // VME master client
  output logic        v_start,
  output logic        v_rnw,
  output logic [31:0] v_addr,
  output logic [5:0]  v_am,
  output vmebr_pkg::dwidth_e v_dw,
  output logic        v_blk,
  output logic [15:0] v_count,
  input  logic        v_done,
  input  logic        v_berr,
  // IBUS master client
  output logic        m_start,
  output logic        m_rnw,
  output logic [31:0] m_addr,
  output logic [15:0] m_len,
  input  logic        m_done,
  input  logic        m_err
);
  import vmebr_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_OWN, S_FIRST, S_W1, S_SECOND, S_W2, S_END} state_e;

  state_e      st;
  logic [31:0] va, ia;
  logic [15:0] left, chunk;

  assign busy  = (st != S_IDLE);
  assign need  = busy;
  assign chunk = (left > 16'd16) ? 16'd16 : left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; va <= '0; ia <= '0; left <= '0; done <= 1'b0; err <= 1'b0; dir_q <= 1'b0;
      f_clear <= 1'b0; v_start <= 1'b0; v_rnw <= 1'b0; v_addr <= '0; v_am <= '0; v_dw <= DW_D32;
      v_blk <= 1'b0; v_count <= '0; m_start <= 1'b0; m_rnw <= 1'b0; m_addr <= '0; m_len <= '0;
    end else begin
      done <= 1'b0; f_clear <= 1'b0; v_start <= 1'b0; m_start <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          va <= vaddr; ia <= iaddr; left <= len; dir_q <= dir; err <= 1'b0;
          v_am <= am; v_dw <= dw; v_blk <= blk;
          st <= S_OWN;
        end
        S_OWN: if (own) begin
          f_clear <= 1'b1;
          st <= (left == 0) ? S_END : S_FIRST;
        end
        S_FIRST: begin          // fill the FIFO from the source side
          if (!dir_q) begin v_start <= 1'b1; v_rnw <= 1'b1; v_addr <= va; v_count <= chunk; end
          else begin m_start <= 1'b1; m_rnw <= 1'b1; m_addr <= ia; m_len <= chunk; end
          st <= S_W1;
        end
        S_W1: if (dir_q ? m_done : v_done) begin
          if (dir_q ? m_err : v_berr) begin err <= 1'b1; st <= S_END; end
          else st <= S_SECOND;
        end
        S_SECOND: begin         // empty it to the destination side
          if (!dir_q) begin m_start <= 1'b1; m_rnw <= 1'b0; m_addr <= ia; m_len <= chunk; end
          else begin v_start <= 1'b1; v_rnw <= 1'b0; v_addr <= va; v_count <= chunk; end
          st <= S_W2;
        end
        S_W2: if (dir_q ? v_done : m_done) begin
          if (dir_q ? v_berr : m_err) begin err <= 1'b1; st <= S_END; end
          else begin
            va   <= va + 32'({chunk[13:0], 2'b00});
            ia   <= ia + 32'(chunk);
            left <= left - chunk;
            st   <= (left == chunk) ? S_END : S_FIRST;
          end
          f_clear <= 1'b1;
        end
        S_END: begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
