// vme_mem_model: behavioural VME64 slave board used by the bridge's
// end-to-end testbench. It holds WORDS 32-bit words at A32 address BASE and
// answers D32, D16, D8, BLT (AM 0Bh/0Fh) and MBLT (AM 08h/0Ch) cycles with
// big-endian byte lanes, two clock cycles after a data strobe. It also
// models an interrupter: while irq_level is not 0 it pulls that IRQ* line
// and answers an IACK cycle for that level (when its IACKIN* is low) with
// the status/ID byte C0h+level, then drops the request. Testbench use only.
module vme_mem_model #(
  parameter logic [31:0] BASE  = 32'h4000_0000,
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  logic        as_n,
  input  logic [1:0]  ds_n,
  input  logic        write_n,
  input  logic        iack_n,
  input  logic [5:0]  am,
  input  logic [31:1] a_in,
  input  logic        lword_n_in,
  input  logic [31:0] d_in,
  output logic [31:0] d_o,
  output logic        d_oe,
  output logic [31:1] a_o,
  output logic        lword_n_o,
  output logic        a_oe,
  output logic        dtack_n,
  input  logic [2:0]  irq_level,
  output logic [7:1]  irq_n,
  input  logic        iackin_n,
  output int          iacks_answered
);
  logic [31:0] mem [WORDS];
  logic [31:0] sa;
  logic [5:0]  sam;
  logic        slw, siack, sel, mblt_adr, as_d = 1'b1, irq_taken = 1'b0;
  logic [2:0]  lvl_q = 3'd0;
  int          wait_c = 0;

  initial begin
    d_o = 0; d_oe = 0; a_o = 0; lword_n_o = 1; a_oe = 0; dtack_n = 1; iacks_answered = 0;
    for (int i = 0; i < int'(WORDS); i++) mem[i] = 32'h6000_0000 + i;
  end

  always_comb begin
    irq_n = '1;
    if (irq_level != 0 && !irq_taken) irq_n[irq_level] = 1'b0;
  end

  always @(posedge clk) begin
    as_d <= as_n;
    if (irq_level != lvl_q) begin lvl_q <= irq_level; irq_taken <= 1'b0; end
    if (as_d && !as_n) begin
      sa <= {a_in, 1'b0}; sam <= am; slw <= lword_n_in; siack <= iack_n; mblt_adr <= (am == 6'h08 || am == 6'h0C);
      sel <= !iack_n || ({a_in, 1'b0} - BASE) < 32'(WORDS * 4);
    end
    if (ds_n == 2'b11 || as_n) begin
      dtack_n <= 1'b1; d_oe <= 1'b0; a_oe <= 1'b0; wait_c <= 0;
    end else if (dtack_n && sel && !as_d) begin
      if (wait_c < 2) wait_c <= wait_c + 1;   // an IACK waits here for IACKIN*
      if (wait_c == 2) begin
        logic [31:0] w;
        w = (sa - BASE) >> 2;
        if (!siack) begin
          if (!iackin_n && sa[3:1] == irq_level && !irq_taken) begin
            d_o <= {24'h0, 8'hC0 + 8'(irq_level)}; d_oe <= 1'b1; dtack_n <= 1'b0; irq_taken <= 1'b1;
            iacks_answered <= iacks_answered + 1;
          end
        end else if (mblt_adr) begin
          mblt_adr <= 1'b0; dtack_n <= 1'b0;
        end else if (sam == 6'h08 || sam == 6'h0C) begin
          if (!write_n) begin mem[w] <= {a_in, lword_n_in}; mem[w + 1] <= d_in; end
          else begin {a_o, lword_n_o} <= mem[w]; d_o <= mem[w + 1]; d_oe <= 1'b1; a_oe <= 1'b1; end
          sa <= sa + 8; dtack_n <= 1'b0;
        end else begin
          if (!slw) begin
            if (!write_n) mem[w] <= d_in; else d_o <= mem[w];
          end else if (ds_n == 2'b00) begin
            if (!write_n) begin if (sa[1]) mem[w][15:0] <= d_in[15:0]; else mem[w][31:16] <= d_in[15:0]; end
            else d_o <= {16'h0, sa[1] ? mem[w][15:0] : mem[w][31:16]};
          end else begin
            int bi;
            bi = {sa[1], ds_n == 2'b10};
            if (!write_n) mem[w][31 - 8*bi -: 8] <= (ds_n == 2'b10) ? d_in[7:0] : d_in[15:8];
            else d_o <= {16'h0, mem[w][31 - 8*bi -: 8], mem[w][31 - 8*bi -: 8]};
          end
          d_oe <= write_n;
          if (sam == 6'h0B || sam == 6'h0F) sa <= sa + (!slw ? 32'd4 : (ds_n == 2'b00 ? 32'd2 : 32'd1));
          dtack_n <= 1'b0;
        end
      end
    end
  end
endmodule
