// vmebr_pkg: types and constants shared by the VME-to-IBUS bridge.
//
// IBUS is the bridge's synchronous internal bus: 32 multiplexed address/data
// lines and four transfer control lines (FRAME, RNW, ACK, VALID). A transfer
// is an addressing phase of at least 4 IBUS cycles, then bursts of up to 16
// words separated by a 2-cycle ACK handshake, then a release of at least
// 2 idle cycles. The exact cycle-level meaning of the four control lines is
// this design's own choice and is described in ibus_master.sv and
// ibus_slave.sv.
//
// The register map (word offsets into the 1 kbyte register area) and the
// packing of the 16 IBUS-to-VME capability entries are also this design's
// own choices.
package vmebr_pkg;

  localparam int unsigned BURST_WORDS = 16;  // 64-byte IBUS burst
  localparam int unsigned FIFO_DEPTH  = 16;  // 16 words of 32 bits

  // VME data width of an access or of a slave's capability
  typedef enum logic [1:0] {
    DW_D8  = 2'd0,
    DW_D16 = 2'd1,
    DW_D32 = 2'd2,
    DW_D64 = 2'd3
  } dwidth_e;

  // Which internal resource a VME slave access goes to
  typedef enum logic [1:0] {
    TGT_NONE = 2'd0,
    TGT_REG  = 2'd1,
    TGT_CSR  = 2'd2,
    TGT_IBUS = 2'd3
  } target_e;

  // One IBUS-to-VME translation entry (one capability register, 32 bits).
  //   [31:20] VME address bits 31:20 of the 1 Mbyte target block
  //   [19:14] address modifier used for single cycles
  //   [13:12] widest data width the VME slave accepts
  //   [11]    the slave accepts BLT
  //   [10]    the slave accepts MBLT
  typedef struct packed {
    logic [11:0] vbase;
    logic [5:0]  am;
    dwidth_e     dw;
    logic        blt;
    logic        mblt;
    logic [9:0]  rsvd;
  } cap_t;

  // Register word offsets (byte offset = 4 * word offset)
  localparam logic [7:0] R_ID        = 8'd0;   // read-only identification
  localparam logic [7:0] R_CTRL      = 8'd1;   // enables and commands
  localparam logic [7:0] R_STATUS    = 8'd2;   // status, write 1 to clear
  localparam logic [7:0] R_VWIN      = 8'd3;   // VME A32 slave window [31:24], A24 register window [23:10]
  localparam logic [7:0] R_IWIN      = 8'd4;   // IBUS target base for the VME A32 window
  localparam logic [7:0] R_I2VWIN    = 8'd5;   // IBUS window [31:22] mapped onto VME; IBUS register region [31:18]
  localparam logic [7:0] R_TIMING    = 8'd6;   // VME master delays in fast-clock cycles
  localparam logic [7:0] R_DMA_VADDR = 8'd8;
  localparam logic [7:0] R_DMA_IADDR = 8'd9;
  localparam logic [7:0] R_DMA_LEN   = 8'd10;  // length in 32-bit words
  localparam logic [7:0] R_DMA_CTRL  = 8'd11;
  localparam logic [7:0] R_IRQ_CFG   = 8'd12;
  localparam logic [7:0] R_IRQ_ID    = 8'd13;  // status/ID bytes given in IACK cycles
  localparam logic [7:0] R_IACK_STAT = 8'd14;  // status/ID read by the VME master
  localparam logic [7:0] R_CAP0      = 8'd16;  // 16 capability entries, words 16..31
  localparam int unsigned N_HARD_REGS = 32;    // words 0..31 are flip-flops

  localparam logic [31:0] BRIDGE_ID = 32'h5642_0001;

  // VME64 address modifiers used here
  localparam logic [5:0] AM_A32_MBLT_U = 6'h08;
  localparam logic [5:0] AM_A32_DATA_U = 6'h09;
  localparam logic [5:0] AM_A32_PROG_U = 6'h0A;
  localparam logic [5:0] AM_A32_BLT_U  = 6'h0B;
  localparam logic [5:0] AM_A32_MBLT_S = 6'h0C;
  localparam logic [5:0] AM_A32_DATA_S = 6'h0D;
  localparam logic [5:0] AM_A32_PROG_S = 6'h0E;
  localparam logic [5:0] AM_A32_BLT_S  = 6'h0F;
  localparam logic [5:0] AM_A16_U      = 6'h29;
  localparam logic [5:0] AM_A16_S      = 6'h2D;
  localparam logic [5:0] AM_CRCSR      = 6'h2F;
  localparam logic [5:0] AM_A24_MBLT_U = 6'h38;
  localparam logic [5:0] AM_A24_DATA_U = 6'h39;
  localparam logic [5:0] AM_A24_PROG_U = 6'h3A;
  localparam logic [5:0] AM_A24_BLT_U  = 6'h3B;
  localparam logic [5:0] AM_A24_MBLT_S = 6'h3C;
  localparam logic [5:0] AM_A24_DATA_S = 6'h3D;
  localparam logic [5:0] AM_A24_PROG_S = 6'h3E;
  localparam logic [5:0] AM_A24_BLT_S  = 6'h3F;

  function automatic logic am_is_a32(input logic [5:0] am);
    return am[5:4] == 2'b00 && am[3];
  endfunction
  function automatic logic am_is_a24(input logic [5:0] am);
    return am[5:3] == 3'b111;
  endfunction
  function automatic logic am_is_blt(input logic [5:0] am);
    return am[1:0] == 2'b11 && (am_is_a32(am) || am_is_a24(am));
  endfunction
  function automatic logic am_is_mblt(input logic [5:0] am);
    return am[1:0] == 2'b00 && (am_is_a32(am) || am_is_a24(am));
  endfunction

endpackage
