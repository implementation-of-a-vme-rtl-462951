// addr_xlate_i2v: decoder and IBUS-to-VME address translation.
//
// The bridge occupies two kinds of IBUS space. Its registers are one
// 256-kword region (IBUS word address bits 31:18 equal reg_region), of which
// the 256 words of the register area repeat circularly. The VME window is a
// block of 16 such regions (4 Mwords, bits 31:22 equal vme_win), which can
// be moved anywhere in the IBUS space. Each of the 16 regions has a
// capability entry (vmebr_pkg::cap_t) holding the VME address bits 31:20 of
// a 1 Mbyte VME block and what the VME slave there accepts: AM code, widest
// data width, BLT and MBLT. The VME byte address is then the entry's base
// followed by the 18-bit word offset inside the region times 4. Several
// entries may point at the same VME slave.
//
// The 16 entries of 1 Mbyte (16 Mbytes in all), the movable window and the
// per-slave capabilities are the document's; the bit positions are this
// design's own. Purely combinational.
module addr_xlate_i2v (
  input  logic [31:0]          ibus_addr,   // IBUS word address
  input  logic [31:22]         vme_win,
  input  logic [31:18]         reg_region,
  input  vmebr_pkg::cap_t      caps [16],
  output logic                 hit_reg,
  output logic                 hit_vme,
  output logic [31:0]          mask,        // word-address bits that wrap in the hit range
  output logic [31:0]          vme_addr,    // VME byte address
  output vmebr_pkg::cap_t      cap
);
  logic [3:0] idx;

  assign idx      = ibus_addr[21:18];
  assign cap      = caps[idx];
  assign hit_vme  = (ibus_addr[31:22] == vme_win);
  assign hit_reg  = !hit_vme && (ibus_addr[31:18] == reg_region);
  assign mask     = hit_vme ? 32'h003F_FFFF : 32'h0000_00FF;
  assign vme_addr = {cap.vbase, ibus_addr[17:0], 2'b00};
endmodule
