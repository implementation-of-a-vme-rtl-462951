// crcsr: VME64 Configuration ROM / Control and Status Register space.
//
// The CR/CSR space of the board is 512 kbytes of A24 space reached with
// address modifier 2Fh; its slot (address bits 23:19) comes from the base
// address register, which the address switches load at reset. Only every
// fourth byte (offset 3 mod 4) is used, read and written as D8(O).
//
// Configuration ROM (offsets 03h..7Fh) holds the fields VME64 makes
// mandatory: checksum (03h), ROM length (07h..0Fh), CR and CSR data access
// widths (13h, 17h), CR/CSR space specification (1Bh), the letters "CR"
// (1Fh, 23h), manufacturer ID (27h..2Fh), board ID (33h..3Fh) and revision
// (43h..4Fh). The checksum is the two's complement of the 8-bit sum of the
// bytes 07h..7Fh, computed here from the other fields. Control and status
// registers at the top of the space: base address register (7FFFFh), bit
// set (7FFFBh) and bit clear (7FFF7h) with reset (bit 7), SYSFAIL enable
// (bit 6), module failed (bit 5), module enable (bit 4) and BERR flag
// (bit 3). Offsets 7F000h..7F3FFh reach the 1 kbyte register area of the
// bridge; this module only reports such an access as 'user' and the caller
// routes it.
//
// That the bridge's registers also appear in CR/CSR space and that all
// mandatory fields exist is the document's; the field values, the user-area
// offset and the module-enable reset value (set) are this design's own.
// Reads are combinational; writes take effect at the clock edge.
module crcsr #(
  parameter logic [23:0] MANUF_ID = 24'h00_0000,
  parameter logic [31:0] BOARD_ID = 32'h5642_0001,
  parameter logic [31:0] REV_ID   = 32'h0000_0001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  hw_slot,        // address switches
  input  logic [18:0] offs,           // byte offset inside the 512 kbyte space
  input  logic        we,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output logic        user,           // offset falls in the register-area window
  output logic [4:0]  slot,           // current CR/CSR base (address bits 23:19)
  input  logic        berr_set,
  output logic        module_en,
  output logic        sysfail_en,
  output logic        board_reset
);
  logic [7:0] bits;                   // CSR bit set/clear register contents

  // ROM contents for byte offsets 0..7Fh (only 3 mod 4 are meaningful)
  function automatic logic [7:0] rom_byte(input logic [6:0] o);
    case (o)
      7'h07: return 8'h00;                // ROM length (bytes) = 80h
      7'h0B: return 8'h00;
      7'h0F: return 8'h80;
      7'h13: return 8'h81;                // CR data access width: D8(O), every 4th byte
      7'h17: return 8'h81;                // CSR data access width
      7'h1B: return 8'h01;                // CR/CSR space specification: VME64
      7'h1F: return 8'h43;                // 'C'
      7'h23: return 8'h52;                // 'R'
      7'h27: return MANUF_ID[23:16];
      7'h2B: return MANUF_ID[15:8];
      7'h2F: return MANUF_ID[7:0];
      7'h33: return BOARD_ID[31:24];
      7'h37: return BOARD_ID[23:16];
      7'h3B: return BOARD_ID[15:8];
      7'h3F: return BOARD_ID[7:0];
      7'h43: return REV_ID[31:24];
      7'h47: return REV_ID[23:16];
      7'h4B: return REV_ID[15:8];
      7'h4F: return REV_ID[7:0];
      default: return 8'h00;
    endcase
  endfunction

  function automatic logic [7:0] checksum();
    logic [7:0] sum;
    sum = 8'h00;
    for (int o = 7; o < 128; o += 4) sum = sum + rom_byte(7'(o));
    return 8'(-sum);
  endfunction

  localparam logic [7:0] CHECKSUM = checksum();

  assign user        = (offs[18:10] == 9'h1FC);
  assign module_en   = bits[4];
  assign sysfail_en  = bits[6];
  assign board_reset = bits[7];

  always_comb begin
    rdata = 8'h00;
    if (offs[1:0] == 2'b11) begin
      if (offs == 19'h7FFFF)                 rdata = {slot, 3'b000};
      else if (offs == 19'h7FFFB || offs == 19'h7FFF7) rdata = bits;
      else if (offs == 19'h00003)            rdata = CHECKSUM;
      else if (offs[18:7] == '0)             rdata = rom_byte(offs[6:0]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot <= hw_slot;
      bits <= 8'h10;                      // module enabled
    end else begin
      if (we && offs == 19'h7FFFF) slot <= wdata[7:3];
      if (we && offs == 19'h7FFFB) bits <= bits | (wdata & 8'hF8);
      if (we && offs == 19'h7FFF7) bits <= bits & ~(wdata & 8'hF8);
      if (berr_set) bits[3] <= 1'b1;
    end
  end
endmodule
