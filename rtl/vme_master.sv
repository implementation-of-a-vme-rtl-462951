// vme_master: VME64 master interface of the bridge.
//
// A client asks for 'count' 32-bit words at VME byte address 'addr' with
// address modifier 'am', VME data width 'dw' and, when 'blk' is set, block
// transfer (BLT for D8/D16/D32, MBLT for D64). A16, A24 and A32 cycles are
// made by the AM code and the address given. Words narrower than the data
// width are split: a D16 word takes two strobes (A1=0 then A1=1), a D8 word
// four (bytes 0..3, DS1* for even and DS0* for odd bytes); an MBLT beat
// carries two words, the first on A31..A1/LWORD*, the second on D31..D0.
// An IACK cycle (iack=1) reads one D8(O) status/ID byte from the interrupter
// at level addr[3:1]. Unaligned and read-modify-write cycles are not made.
//
// Sequence of one cycle: after the VME bus is granted (bus_req/bus_gnt to
// the arbitration logic) address, AM, LWORD* and WRITE* are driven;
// t_setup fast-clock cycles later AS* falls; write data are driven, and
// t_setup cycles later the data strobes fall; DTACK* or BERR* (each through
// a two-flop synchroniser) ends the strobe, read data are taken, the strobes
// rise and the master waits for DTACK* to rise and t_idle more cycles.
// In block mode AS* stays low between beats; the address is re-broadcast
// when a BLT crosses a 256-byte or an MBLT a 2-kbyte boundary. An MBLT cycle
// starts with the address-only strobe. BERR* ends the whole request with
// berr set; so does a strobe that sees neither DTACK* nor BERR* for
// DTACK_TIMEOUT cycles (a local bus timer, this design's own addition).
// 'stop' ends a read request at the next word boundary.
//
// The delays are counted in cycles of the fast clock (twice the IBUS
// clock), so each step of t_setup/t_idle is half an IBUS period, which is
// how the document keeps the VME minimum times; their default values and
// the client interface are this design's own choices.
module vme_master #(
  parameter int unsigned DTACK_TIMEOUT = 1024   // cycles without DTACK*/BERR* taken as BERR*
) (
  input  logic        clk,
  input  logic        rst_n,
  // client
  input  logic        start,
  input  logic        rnw,
  input  logic        iack,
  input  logic [31:0] addr,
  input  logic [5:0]  am_cmd,
  input  vmebr_pkg::dwidth_e dw,
  input  logic        blk,
  input  logic [15:0] count,
  input  logic        stop,
  input  logic [3:0]  t_setup,
  input  logic [3:0]  t_idle,
  output logic        busy,
  output logic        done,
  output logic        berr,
  input  logic        src_valid,
  input  logic [31:0] src_data,
  output logic        src_pop,
  input  logic [4:0]  snk_space,
  output logic        snk_push,
  output logic [31:0] snk_data,
  // bus ownership
  output logic        bus_req,
  input  logic        bus_gnt,
  // VME bus
  output logic [31:1] a_o,
  output logic        lword_n_o,
  output logic        a_oe,
  input  logic [31:1] a_i,
  input  logic        lword_n_i,
  output logic [5:0]  am_o,
  output logic        as_n,
  output logic [1:0]  ds_n,
  output logic        write_n,
  output logic        iack_n,
  output logic [31:0] d_o,
  output logic        d_oe,
  input  logic [31:0] d_i,
  input  logic        dtack_n,
  input  logic        berr_n
);
  import vmebr_pkg::*;

  typedef enum logic [3:0] {
    S_IDLE, S_REQ, S_LOAD, S_LOAD2, S_ADDR, S_AS, S_MADR, S_MADR_REL, S_DSET, S_DS, S_DREL, S_IDLEWAIT, S_END
  } state_e;

  state_e      st;
  logic [1:0]  dt_sync, be_sync;
  logic        dt_s, be_s;
  logic [31:0] cur;          // byte address of the next strobe
  logic [15:0] left;         // words still to move
  logic [1:0]  sub;          // strobe index within the word (D8/D16)
  logic [31:0] w0, w1;       // word(s) of the current beat
  logic [3:0]  tcnt;
  logic [10:0] wcnt;
  logic        tmo_hit;
  assign tmo_hit = (wcnt == 11'(DTACK_TIMEOUT));
  logic        rnw_q, iack_q, blk_q, as_live, stop_q;
  logic [5:0]  am_q;
  dwidth_e     dw_q;
  logic        last_sub;
  logic [1:0]  nsub;
  logic [31:0] step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin dt_sync <= '0; be_sync <= '0; end
    else begin
      dt_sync <= {dt_sync[0], !dtack_n};
      be_sync <= {be_sync[0], !berr_n};
    end
  end
  assign dt_s = dt_sync[1];
  assign be_s = be_sync[1];

  assign busy    = (st != S_IDLE);
  assign nsub    = (dw_q == DW_D8) ? 2'd3 : (dw_q == DW_D16) ? 2'd1 : 2'd0;
  assign last_sub = iack_q || (sub == nsub);
  assign step    = (dw_q == DW_D64) ? 32'd8 : (dw_q == DW_D32) ? 32'd4 : (dw_q == DW_D16) ? 32'd2 : 32'd1;

  // boundary at which a block transfer must re-broadcast its address
  function automatic logic crosses(input logic [31:0] a, input dwidth_e w);
    return (w == DW_D64) ? (a[10:0] == 11'd0) : (a[7:0] == 8'd0);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cur <= '0; left <= '0; sub <= '0; w0 <= '0; w1 <= '0; tcnt <= '0; wcnt <= '0;
      rnw_q <= 1'b1; iack_q <= 1'b0; blk_q <= 1'b0; as_live <= 1'b0; stop_q <= 1'b0; am_q <= '0;
      dw_q <= DW_D32; done <= 1'b0; berr <= 1'b0; src_pop <= 1'b0; snk_push <= 1'b0; snk_data <= '0;
      bus_req <= 1'b0; a_o <= '0; lword_n_o <= 1'b1; a_oe <= 1'b0; am_o <= '0; as_n <= 1'b1;
      ds_n <= 2'b11; write_n <= 1'b1; iack_n <= 1'b1; d_o <= '0; d_oe <= 1'b0;
    end else begin
      done     <= 1'b0;
      src_pop  <= 1'b0;
      snk_push <= 1'b0;
      if (stop) stop_q <= 1'b1;
      wcnt <= (st == S_MADR || st == S_DS) ? wcnt + 1'b1 : '0;
      unique case (st)
        S_IDLE: if (start) begin
          cur <= iack ? {28'h0, addr[3:1], 1'b0} : addr;
          left <= iack ? 16'd1 : count; rnw_q <= rnw || iack; iack_q <= iack;
          blk_q <= blk && !iack; am_q <= am_cmd; dw_q <= iack ? DW_D8 : dw; berr <= 1'b0;
          stop_q <= 1'b0; as_live <= 1'b0; sub <= '0;
          bus_req <= 1'b1; st <= S_REQ;
        end
        S_REQ: if (bus_gnt) st <= S_LOAD;
        // fetch the word(s) of the next beat, or check room for read data
        S_LOAD: begin
          if (left == 0 || (rnw_q && stop_q)) st <= S_END;
          else if (!rnw_q) begin
            if (src_valid && !src_pop) begin
              w0 <= src_data; src_pop <= 1'b1;
              st <= (dw_q == DW_D64) ? S_LOAD2 : (as_live ? S_DSET : S_ADDR);
            end
          end else if (snk_space >= ((dw_q == DW_D64) ? 5'd2 : 5'd1)) begin
            st <= as_live ? S_DSET : S_ADDR;
          end
          tcnt <= '0;
        end
        S_LOAD2: if (!rnw_q && src_valid && !src_pop) begin
          w1 <= src_data; src_pop <= 1'b1; st <= as_live ? S_DSET : S_ADDR;
        end
        S_ADDR: begin
          a_o <= cur[31:1]; a_oe <= 1'b1; am_o <= am_q; write_n <= rnw_q; iack_n <= !iack_q;
          lword_n_o <= !(dw_q == DW_D32 || dw_q == DW_D64);
          tcnt <= '0; st <= S_AS;
        end
        S_AS: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt >= t_setup) begin
            as_n <= 1'b0; as_live <= 1'b1; tcnt <= '0;
            st <= (dw_q == DW_D64) ? S_MADR : S_DSET;
          end
        end
        // MBLT address-only handshake
        S_MADR: begin
          ds_n <= 2'b00;
          if (be_s || tmo_hit) begin berr <= 1'b1; ds_n <= 2'b11; st <= S_END; end
          else if (dt_s) begin ds_n <= 2'b11; st <= S_MADR_REL; end
        end
        S_MADR_REL: if (!dt_s) begin
          a_oe <= rnw_q ? 1'b0 : 1'b1; tcnt <= '0; st <= S_DSET;
        end
        // drive write data, wait the data setup time
        S_DSET: begin
          if (!rnw_q) begin
            d_oe <= 1'b1;
            unique case (dw_q)
              DW_D64: begin {a_o, lword_n_o} <= w0; a_oe <= 1'b1; d_o <= w1; end
              DW_D32: d_o <= w0;
              DW_D16: d_o <= {16'h0, sub[0] ? w0[15:0] : w0[31:16]};
              default: d_o <= {16'h0, w0[31 - 8*sub -: 8], w0[31 - 8*sub -: 8]};
            endcase
          end
          tcnt <= tcnt + 1'b1;
          if (tcnt >= t_setup) begin
            if (iack_q)                                   ds_n <= 2'b10;
            else if (dw_q == DW_D8)                       ds_n <= sub[0] ? 2'b10 : 2'b01;
            else                                          ds_n <= 2'b00;
            st <= S_DS;
          end
        end
        S_DS: begin
          if (be_s || tmo_hit) begin berr <= 1'b1; ds_n <= 2'b11; d_oe <= 1'b0; st <= S_END; end
          else if (dt_s) begin
            ds_n <= 2'b11;
            if (rnw_q) begin
              unique case (dw_q)
                DW_D64: begin w0 <= {a_i, lword_n_i}; w1 <= d_i; end
                DW_D32: w0 <= d_i;
                DW_D16: w0 <= sub[0] ? {w0[31:16], d_i[15:0]} : {d_i[15:0], w0[15:0]};
                default: w0[31 - 8*sub -: 8] <= iack_q ? d_i[7:0] : (sub[0] ? d_i[7:0] : d_i[15:8]);
              endcase
            end
            st <= S_DREL;
          end
        end
        S_DREL: if (!dt_s) begin
          d_oe <= 1'b0; tcnt <= '0;
          if (dw_q == DW_D64 && rnw_q) a_oe <= 1'b0;
          cur <= cur + step;
          if (!blk_q || crosses(cur + step, dw_q)) begin
            as_n <= 1'b1; as_live <= 1'b0; a_oe <= 1'b0;
          end
          st <= S_IDLEWAIT;
        end
        S_IDLEWAIT: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt >= t_idle) begin
            if (last_sub) begin
              sub <= '0;
              if (rnw_q) begin
                snk_push <= 1'b1;
                snk_data <= iack_q ? {24'h0, w0[31:24]} : w0;
              end
              left <= left - ((dw_q == DW_D64) ? 16'd2 : 16'd1);
              st <= (rnw_q && dw_q == DW_D64) ? S_LOAD2 : S_LOAD;
            end else begin
              sub <= sub + 1'b1;
              st <= as_live ? S_DSET : S_ADDR;
              tcnt <= '0;
            end
          end
        end
        S_END: begin
          as_n <= 1'b1; ds_n <= 2'b11; a_oe <= 1'b0; d_oe <= 1'b0; iack_n <= 1'b1;
          as_live <= 1'b0; bus_req <= 1'b0; done <= 1'b1; st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
      // second word of an MBLT read beat goes out one cycle after the first
      if (st == S_LOAD2 && rnw_q) begin
        snk_push <= 1'b1; snk_data <= w1; st <= S_LOAD;
      end
    end
  end
endmodule
