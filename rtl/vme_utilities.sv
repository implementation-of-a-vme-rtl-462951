// vme_utilities: VME bus arbitration, system reset and interrupt chain.
//
// Every board needs part of this and the board in slot 1 (the system
// controller, 'sysctrl' set) needs all of it:
//   requester   (every board) the VME master's bus_req pulls BR*[BR_LEVEL];
//               when the grant arrives on BGIN*[BR_LEVEL] and the bus is
//               free (BBSY* high) the requester takes the bus: it pulls
//               BBSY*, lets BR* go and answers bus_gnt. BBSY* is released
//               when the master drops bus_req. A grant that arrives while
//               the board does not request it, and grants on the other three
//               levels, pass on to BGOUT*; a grant already being passed on
//               is not taken back when the board starts requesting.
//   arbiter     (slot 1 only) when the bus is free and a BR* line is low it
//               grants the highest requesting level (3 first) on its BGOUT*
//               daisy chain start, holds the grant until BBSY* falls and
//               then waits for BBSY* to rise before the next grant. Slot 1's
//               own requester sees the arbiter's grant directly.
//   sysreset    (slot 1 only) SYSRESET* is driven low for SYSRESET_CYCLES
//               after local reset and after a software reset command.
//   IACK chain  (slot 1 only) slot 1 has no IACKIN* neighbour: the
//               interrupt chain starts from IACK* itself.
// Outside slot 1 these functions stay idle, as the document describes.
//
// The list of functions is the document's; priority arbitration and the
// four-level request/grant wiring follow VME64; BR_LEVEL and the reset
// length default to this design's own values (200 ms at 64 MHz for reset).
// Bus lines pass two-flop synchronisers.
module vme_utilities #(
  parameter int unsigned BR_LEVEL        = 3,
  parameter int unsigned SYSRESET_CYCLES = 12_800_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sysctrl,
  // requester
  input  logic        bus_req,
  output logic        bus_gnt,
  // VME arbitration lines
  input  logic [3:0]  br_n_i,
  output logic [3:0]  br_n_o,
  input  logic [3:0]  bgin_n,
  output logic [3:0]  bgout_n,
  input  logic        bbsy_n_i,
  output logic        bbsy_n_o,
  // system reset
  input  logic        sysreset_cmd,
  output logic        sysreset_n_o,
  // interrupt acknowledge chain
  input  logic        iack_n,
  input  logic        iackin_n,
  output logic        iackin_eff_n
);
  typedef enum logic [1:0] {A_IDLE, A_GRANT, A_BUSY} astate_e;

  astate_e     ast;
  logic [3:0]  arb_bg;           // active-high grants from the slot-1 arbiter
  logic [3:0]  br_y0, br_s, bg_y0, bg_s;
  logic [1:0]  bbsy_y;
  logic        bbsy_s;
  logic [3:0]  bgin_eff;         // active-high grant seen by this board
  logic        owner;
  logic        passing;          // a grant is being passed on: do not take it midway
  logic [$clog2(SYSRESET_CYCLES+1)-1:0] rcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin br_y0 <= '0; br_s <= '0; bg_y0 <= '0; bg_s <= '0; bbsy_y <= '0; end
    else begin
      br_y0 <= ~br_n_i;  br_s <= br_y0;
      bg_y0 <= ~bgin_n;  bg_s <= bg_y0;
      bbsy_y <= {bbsy_y[0], !bbsy_n_i};
    end
  end
  assign bbsy_s   = bbsy_y[1];
  assign bgin_eff = sysctrl ? arb_bg : bg_s;

  // requester and daisy chain
  always_comb begin
    bgout_n = ~bgin_eff;
    if ((bus_req || owner) && !passing) bgout_n[BR_LEVEL] = 1'b1;   // a grant we want stops here
  end
  assign br_n_o   = ~(4'(bus_req && !owner) << BR_LEVEL);
  assign bbsy_n_o = !owner;
  assign bus_gnt  = owner;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin owner <= 1'b0; passing <= 1'b0; end
    else begin
      if (!bgin_eff[BR_LEVEL]) passing <= 1'b0;
      else if (!bus_req && !owner) passing <= 1'b1;
      if (!bus_req) owner <= 1'b0;
      else if (!owner && !passing && bgin_eff[BR_LEVEL] && !bbsy_s) owner <= 1'b1;
    end
  end

  // slot-1 priority arbiter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin ast <= A_IDLE; arb_bg <= '0; end
    else if (!sysctrl) begin ast <= A_IDLE; arb_bg <= '0; end
    else begin
      unique case (ast)
        A_IDLE: if (!bbsy_s && br_s != 4'b0000) begin
          if      (br_s[3]) arb_bg <= 4'b1000;
          else if (br_s[2]) arb_bg <= 4'b0100;
          else if (br_s[1]) arb_bg <= 4'b0010;
          else              arb_bg <= 4'b0001;
          ast <= A_GRANT;
        end
        A_GRANT: if (bbsy_s || owner) begin arb_bg <= '0; ast <= A_BUSY; end
        A_BUSY:  if (!bbsy_s && !owner) ast <= A_IDLE;
        default: ast <= A_IDLE;
      endcase
    end
  end

  // system reset generator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rcnt <= ($bits(rcnt))'(SYSRESET_CYCLES);
    else if (sysreset_cmd) rcnt <= ($bits(rcnt))'(SYSRESET_CYCLES);
    else if (rcnt != 0) rcnt <= rcnt - 1'b1;
  end
  assign sysreset_n_o = !(sysctrl && rcnt != 0);

  assign iackin_eff_n = sysctrl ? iack_n : iackin_n;
endmodule
