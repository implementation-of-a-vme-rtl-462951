// ibus_arbiter: IBUS bus controller.
//
// Decides which of N_MASTERS masters owns IBUS, so that two masters never
// drive the bus at once. Requests are served round-robin: after a master
// releases the bus, the search for the next owner starts at the master after
// it. A grant is held as long as its master keeps its request up; the master
// drops the request only after it has released FRAME and its 2-cycle release
// time has passed (see ibus_master.sv), so a new owner never overlaps the old.
// One idle IBUS cycle separates two grants.
//
// The bus controller's task is given by the bus description; round-robin
// order and the request/grant wires are this design's own choice. State
// advances on clock edges with ce=1.
module ibus_arbiter #(
  parameter int unsigned N_MASTERS = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,
  input  logic [N_MASTERS-1:0] req,
  output logic [N_MASTERS-1:0] gnt
);
  localparam int unsigned IW = (N_MASTERS > 1) ? $clog2(N_MASTERS) : 1;

  logic [IW-1:0] last;
  logic [IW-1:0] pick;
  logic          found;

  always_comb begin
    found = 1'b0;
    pick  = last;
    for (int unsigned k = 1; k <= N_MASTERS; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % N_MASTERS;
      if (!found && req[idx]) begin
        found = 1'b1;
        pick  = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt  <= '0;
      last <= IW'(N_MASTERS - 1);
    end else if (ce) begin
      if (gnt != '0) begin
        if ((gnt & req) == '0) gnt <= '0;   // owner released the bus
      end else if (found) begin
        gnt       <= '0;
        gnt[pick] <= 1'b1;
        last      <= pick;
      end
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
