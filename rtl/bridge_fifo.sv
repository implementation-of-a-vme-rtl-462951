// bridge_fifo: the bridge's 16 x 32-bit data buffer.
//
// One RAM of DEPTH words serves both transfer directions. As a FIFO it is
// written by the side that produces data (push) and read by the side that
// consumes it (pop); the read side is show-ahead: rdata is the oldest word
// while empty is low. The same RAM also serves as a cache line: after a
// clear, pushed words land at indices 0, 1, 2 ... so a fetched 16-word line
// can then be read at any index through the random port (cidx -> cdata).
// This double use follows the bridge's description of the buffer; the clear
// command and the random port are this design's way of providing it.
//
// Timing: push, pop and clear act on the rising clock edge; rdata, cdata,
// count, empty and full are combinational from the registered state.
// clear wins over push and pop in the same cycle.
module bridge_fifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rdata,
  input  logic [$clog2(DEPTH)-1:0] cidx,
  output logic [WIDTH-1:0]         cdata,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     empty,
  output logic                     full
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == DEPTH[AW:0]);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rp];
  assign cdata   = mem[cidx];

  always_ff @(posedge clk) begin
    if (do_push && !clear) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else if (clear) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  // A producer must not push into a full buffer, nor a consumer pop an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full || clear);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty || clear);
endmodule
