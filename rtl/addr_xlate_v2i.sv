// addr_xlate_v2i: VME slave address decoder and VME-to-IBUS translation.
//
// Three windows are recognised on the VME bus:
//   A32 data, program, BLT or MBLT cycles whose address bits 31:24 equal
//       a32_win reach IBUS: a 16 Mbyte window whose 4 Mwords are mapped onto
//       the IBUS words starting at ibus_base (bits 31:22).
//   A24 cycles whose address bits 23:10 equal a24_win reach the 1 kbyte
//       register area.
//   CR/CSR cycles (AM 2Fh) whose address bits 23:19 equal csr_slot reach the
//       configuration ROM and control/status registers.
// The A32 and A24 windows answer only while data_en (the CR/CSR module
// enable) is set. Their reset values come from the board's address switches
// (see reg_file.sv), and software may move them.
//
// The split into an A32 IBUS window, an A24 register window and the CR/CSR
// space is the document's; window sizes and bit positions are this design's
// own. Purely combinational.
module addr_xlate_v2i (
  input  logic [31:0]         vme_addr,    // VME byte address
  input  logic [5:0]          am,
  input  logic                data_en,
  input  logic [31:24]        a32_win,
  input  logic [23:10]        a24_win,
  input  logic [23:19]        csr_slot,
  input  logic [31:22]        ibus_base,
  output vmebr_pkg::target_e  tgt,
  output logic [31:0]         ibus_addr,   // IBUS word address
  output logic [7:0]          reg_idx      // register word index
);
  import vmebr_pkg::*;

  always_comb begin
    tgt = TGT_NONE;
    if (am == AM_CRCSR && vme_addr[23:19] == csr_slot)                  tgt = TGT_CSR;
    else if (data_en && am_is_a32(am) && vme_addr[31:24] == a32_win)    tgt = TGT_IBUS;
    else if (data_en && am_is_a24(am) && vme_addr[23:10] == a24_win)    tgt = TGT_REG;
  end

  assign ibus_addr = {ibus_base, vme_addr[23:2]};
  assign reg_idx   = vme_addr[9:2];
endmodule
