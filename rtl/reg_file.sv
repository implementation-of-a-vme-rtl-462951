// reg_file: the bridge's 1 kbyte register area.
//
// 256 words of 32 bits, written with byte resolution through two ports:
// port A serves the VME slave (A24 window and the user part of CR/CSR) and
// port B the IBUS slave. A write on port A wins when both ports write the
// same word in one cycle. Reads are combinational.
//
// Words 0..31 are the bridge's own registers, kept in flip-flops because
// the rest of the bridge reads them all the time (see vmebr_pkg for the
// map): identification, control, status (write 1 to clear), the VME and
// IBUS windows, VME master timing, DMA, interrupt configuration and the
// 16 IBUS-to-VME capability entries. Words 32..255 are free for the board's
// own use and are held in a RAM array.
//
// At reset the VME A32 and A24 windows take their values from the board's
// address switches (hw_addr), as the document allows; the other reset
// values and the whole map are this design's own. A write of 1 to bit 0 of
// DMA_CTRL starts the DMA (dma_start pulse); reading that bit gives the DMA
// busy flag. Bit 2 of CTRL pulses sysreset_cmd and reads as 0.
module reg_file #(
  parameter logic [31:22] RESET_I2V_WIN  = 10'h3FF,     // IBUS words FFC00000h.. reach VME
  parameter logic [31:18] RESET_REG_REGN = 14'h3FEF,    // IBUS words FFBC0000h.. are registers
  parameter logic [3:0]   RESET_T_SETUP  = 4'd3,
  parameter logic [3:0]   RESET_T_IDLE   = 4'd2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] hw_addr,     // switches: [15:8] A32 window, [7:0] A24 window bits 23:16
  // port A (VME)
  input  logic        a_we,
  input  logic [7:0]  a_idx,
  input  logic [3:0]  a_be,
  input  logic [31:0] a_wdata,
  output logic [31:0] a_rdata,
  // port B (IBUS)
  input  logic        b_we,
  input  logic [7:0]  b_idx,
  input  logic [31:0] b_wdata,
  output logic [31:0] b_rdata,
  // status inputs (pulses set STATUS bits)
  input  logic [3:0]  status_set,
  input  logic        dma_busy,
  input  logic        iack_stat_we,
  input  logic [31:0] iack_stat,
  // configuration outputs
  output logic [31:0] ctrl,
  output logic [31:0] status,
  output logic [31:0] vwin,
  output logic [31:0] iwin,
  output logic [31:0] i2vwin,
  output logic [31:0] timing,
  output logic [31:0] dma_vaddr,
  output logic [31:0] dma_iaddr,
  output logic [31:0] dma_len,
  output logic [31:0] dma_ctrl,
  output logic [31:0] irq_cfg,
  output logic [31:0] irq_id,
  output vmebr_pkg::cap_t caps [16],
  output logic        dma_start,
  output logic        sysreset_cmd
);
  import vmebr_pkg::*;

  logic [31:0] hard [N_HARD_REGS];
  logic [31:0] ram  [256 - N_HARD_REGS];

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw, input logic [3:0] be);
    for (int i = 0; i < 4; i++) if (be[i]) old[8*i +: 8] = nw[8*i +: 8];
    return old;
  endfunction

  function automatic logic [31:0] rd(input logic [7:0] idx, input logic [31:0] h [N_HARD_REGS],
                                     input logic [31:0] r, input logic busy);
    if (idx >= 8'(N_HARD_REGS)) return r;
    if (idx == R_ID)       return BRIDGE_ID;
    if (idx == R_DMA_CTRL) return {h[5'(R_DMA_CTRL)][31:1], busy};
    return h[idx[4:0]];
  endfunction

  assign a_rdata = rd(a_idx, hard, ram[8'(a_idx - 8'(N_HARD_REGS))], dma_busy);
  assign b_rdata = rd(b_idx, hard, ram[8'(b_idx - 8'(N_HARD_REGS))], dma_busy);

  // RAM part
  always_ff @(posedge clk) begin
    if (b_we && b_idx >= 8'(N_HARD_REGS) && !(a_we && a_idx == b_idx))
      ram[8'(b_idx - 8'(N_HARD_REGS))] <= b_wdata;
    if (a_we && a_idx >= 8'(N_HARD_REGS))
      ram[8'(a_idx - 8'(N_HARD_REGS))] <= merge(ram[8'(a_idx - 8'(N_HARD_REGS))], a_wdata, a_be);
  end

  // flip-flop part
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_HARD_REGS); i++) hard[i] <= '0;
      hard[5'(R_CTRL)]   <= 32'h0000_0001;                              // VME slave enabled
      hard[5'(R_VWIN)]   <= {hw_addr[15:8], hw_addr[7:0], 6'h00, 10'h000};
      hard[5'(R_I2VWIN)] <= {RESET_I2V_WIN, 8'h00, RESET_REG_REGN};
      hard[5'(R_TIMING)] <= {24'h0, RESET_T_IDLE, RESET_T_SETUP};
      hard[5'(R_DMA_CTRL)] <= {21'h0, 1'b0, DW_D32, AM_A32_DATA_U, 2'b00};
      dma_start    <= 1'b0;
      sysreset_cmd <= 1'b0;
    end else begin
      dma_start    <= 1'b0;
      sysreset_cmd <= 1'b0;
      if (b_we && b_idx < 8'(N_HARD_REGS) && !(a_we && a_idx == b_idx)) begin
        if (b_idx == R_STATUS) hard[5'(R_STATUS)] <= hard[5'(R_STATUS)] & ~b_wdata;
        else if (b_idx != R_ID && b_idx != R_IACK_STAT) hard[b_idx[4:0]] <= b_wdata;
        if (b_idx == R_DMA_CTRL && b_wdata[0]) dma_start <= 1'b1;
        if (b_idx == R_CTRL && b_wdata[2]) sysreset_cmd <= 1'b1;
      end
      if (a_we && a_idx < 8'(N_HARD_REGS)) begin
        if (a_idx == R_STATUS) hard[5'(R_STATUS)] <= hard[5'(R_STATUS)] & ~(a_wdata & {{8{a_be[3]}}, {8{a_be[2]}}, {8{a_be[1]}}, {8{a_be[0]}}});
        else if (a_idx != R_ID && a_idx != R_IACK_STAT) hard[a_idx[4:0]] <= merge(hard[a_idx[4:0]], a_wdata, a_be);
        if (a_idx == R_DMA_CTRL && a_be[0] && a_wdata[0]) dma_start <= 1'b1;
        if (a_idx == R_CTRL && a_be[0] && a_wdata[2]) sysreset_cmd <= 1'b1;
      end
      hard[5'(R_STATUS)][3:0] <= (hard[5'(R_STATUS)][3:0] & ~((a_we && a_idx == R_STATUS) ? a_wdata[3:0] & {4{a_be[0]}} : (b_we && b_idx == R_STATUS) ? b_wdata[3:0] : 4'h0)) | status_set;
      hard[5'(R_DMA_CTRL)][0] <= 1'b0;
      hard[5'(R_CTRL)][2]     <= 1'b0;
      if (iack_stat_we) hard[5'(R_IACK_STAT)] <= iack_stat;
    end
  end

  assign ctrl      = hard[5'(R_CTRL)];
  assign status    = hard[5'(R_STATUS)];
  assign vwin      = hard[5'(R_VWIN)];
  assign iwin      = hard[5'(R_IWIN)];
  assign i2vwin    = hard[5'(R_I2VWIN)];
  assign timing    = hard[5'(R_TIMING)];
  assign dma_vaddr = hard[5'(R_DMA_VADDR)];
  assign dma_iaddr = hard[5'(R_DMA_IADDR)];
  assign dma_len   = hard[5'(R_DMA_LEN)];
  assign dma_ctrl  = hard[5'(R_DMA_CTRL)];
  assign irq_cfg   = hard[5'(R_IRQ_CFG)];
  assign irq_id    = hard[5'(R_IRQ_ID)];
  always_comb for (int i = 0; i < 16; i++) caps[i] = cap_t'(hard[int'(R_CAP0) + i]);
endmodule
