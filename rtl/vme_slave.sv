// vme_slave: VME64 slave interface of the bridge.
//
// It answers single, block (BLT), multiplexed block (MBLT, D64), unaligned
// (UAT) and read-modify-write cycles for D8(EO), D16, D32 and D64 data.
// AS* and DS1*/DS0* are asynchronous: they pass through two flip-flops of
// the fast bridge clock, and address, AM, LWORD* and data are sampled only
// after the synchronised strobe is seen, which the VME setup times make safe.
//
// On AS* falling the address, AM code, LWORD* and IACK* are captured; the
// next cycle asks the decoder (addr_xlate_v2i) which internal target the
// address hits (registers, CR/CSR or the IBUS window). IACK cycles are left
// to the interrupt manager. Each data strobe then becomes one 32-bit local
// access (acc_*), two for an MBLT beat (upper word first, at the lower
// address). The byte enables and the lane placement come from DS1*, DS0*,
// A1 and LWORD* as VME64 defines them; internal words are big-endian, so
// VME byte 0 is bits 31:24. When the access is acknowledged the slave drives
// read data and pulls DTACK* low (BERR* on an error or an illegal lane
// combination), and it releases both once the master lifts its data strobes.
// In BLT and MBLT the address then advances by the transfer size; in other
// cycles it stays, so a read-modify-write cycle (two strobes under one AS*)
// reaches the same location twice. The first strobe of an MBLT cycle only
// acknowledges the address, as VME64 prescribes. blk_end pulses when AS*
// rises after a cycle the slave took part in.
//
// The supported cycle types follow the document; the local access interface
// and the two-flop synchroniser are this design's own choices.
module vme_slave (
  input  logic        clk,        // fast (2x IBUS) clock
  input  logic        rst_n,
  input  logic        en,
  // VME bus (active-low strobes)
  input  logic        as_n,
  input  logic [1:0]  ds_n,       // {DS1*, DS0*}
  input  logic        write_n,
  input  logic        lword_n_i,
  input  logic        iack_n,
  input  logic [5:0]  am,
  input  logic [31:1] a_i,
  input  logic [31:0] d_i,
  output logic [31:0] d_o,
  output logic        d_oe,
  output logic [31:1] a_o,        // upper half of D64 on MBLT reads
  output logic        lword_n_o,
  output logic        a_oe,
  output logic        dtack_n,
  output logic        berr_n,
  // decoder
  output logic [31:0] cur_addr,
  output logic [5:0]  cur_am,
  input  vmebr_pkg::target_e dec_tgt,
  // local access
  output logic        acc_req,
  output vmebr_pkg::target_e acc_tgt,
  output logic        acc_we,
  output logic [31:0] acc_addr,
  output logic [3:0]  acc_be,
  output logic [31:0] acc_wdata,
  input  logic        acc_ack,
  input  logic        acc_err,
  input  logic [31:0] acc_rdata,
  output logic        blk_mode,
  output logic        blk_end
);
  import vmebr_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_DEC, S_WDS, S_ACC, S_ACC2, S_DTACK, S_WAS} state_e;

  state_e      st;
  logic [1:0]  as_sync, ds0_sync, ds1_sync;
  logic        as_s;
  logic [1:0]  ds_s;                 // synchronised, active high {DS1, DS0}
  logic        lw;                   // LWORD active
  logic        mblt, blt, mblt_addr_done;
  logic        we_q;
  logic [31:0] lo_q;                 // MBLT lower word of a write
  logic [3:0]  be;
  logic        lanes_ok;
  logic [31:0] wword;
  target_e     tgt_q;
  logic [5:0]  am_q;
  logic        beat;                 // the current strobe moved data

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sync <= '0; ds0_sync <= '0; ds1_sync <= '0;
    end else begin
      as_sync  <= {as_sync[0], !as_n};
      ds0_sync <= {ds0_sync[0], !ds_n[0]};
      ds1_sync <= {ds1_sync[0], !ds_n[1]};
    end
  end
  assign as_s = as_sync[1];
  assign ds_s = {ds1_sync[1], ds0_sync[1]};

  // byte lanes for the current strobe pattern
  always_comb begin
    lanes_ok = 1'b1;
    be       = 4'b0000;
    unique case ({ds_s, cur_addr[1], lw})
      4'b10_0_0: be = 4'b1000;
      4'b01_0_0: be = 4'b0100;
      4'b10_1_0: be = 4'b0010;
      4'b01_1_0: be = 4'b0001;
      4'b11_0_0: be = 4'b1100;
      4'b11_1_0: be = 4'b0011;
      4'b11_0_1: be = 4'b1111;
      4'b10_0_1: be = 4'b1110;   // UAT bytes 0-2
      4'b01_0_1: be = 4'b0111;   // UAT bytes 1-3
      4'b11_1_1: be = 4'b0110;   // UAT bytes 1-2
      default:   lanes_ok = 1'b0;
    endcase
    if (lw)               wword = d_i;
    else if (cur_addr[1]) wword = {16'h0, d_i[15:0]};
    else                  wword = {d_i[15:0], 16'h0};
  end

  assign cur_am   = am_q;
  assign blk_mode = blt || mblt;
  assign acc_req  = (st == S_ACC || st == S_ACC2);
  assign acc_tgt  = tgt_q;
  assign acc_we   = we_q;
  assign acc_addr = {cur_addr[31:3], (mblt ? (st == S_ACC2) : cur_addr[2]), 2'b00};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cur_addr <= '0; am_q <= '0; lw <= 1'b0; mblt <= 1'b0; blt <= 1'b0;
      mblt_addr_done <= 1'b0; beat <= 1'b0; we_q <= 1'b0; lo_q <= '0; tgt_q <= TGT_NONE;
      acc_be <= '0; acc_wdata <= '0; d_o <= '0; d_oe <= 1'b0; a_o <= '0; lword_n_o <= 1'b1;
      a_oe <= 1'b0; dtack_n <= 1'b1; berr_n <= 1'b1; blk_end <= 1'b0;
    end else begin
      blk_end <= 1'b0;
      unique case (st)
        S_IDLE: if (as_s && en) begin
          cur_addr <= {a_i, 1'b0};
          am_q     <= am;
          lw       <= !lword_n_i;
          mblt_addr_done <= 1'b0;
          st       <= iack_n ? S_DEC : S_WAS;
        end
        S_DEC: begin
          tgt_q <= dec_tgt;
          blt   <= am_is_blt(am_q);
          mblt  <= am_is_mblt(am_q);
          st    <= (dec_tgt == TGT_NONE) ? S_WAS : S_WDS;
        end
        S_WDS: begin
          if (!as_s) begin
            st <= S_IDLE; blk_end <= 1'b1;
          end else if (ds_s != 2'b00) begin
            we_q <= !write_n;
            if (mblt && !mblt_addr_done) begin
              mblt_addr_done <= 1'b1;          // address-only handshake
              beat <= 1'b0; dtack_n <= 1'b0; st <= S_DTACK;
            end else if (mblt) begin
              acc_be <= 4'hF; acc_wdata <= {a_i, lword_n_i}; lo_q <= d_i;
              beat <= 1'b1; st <= S_ACC;
            end else if (!lanes_ok) begin
              berr_n <= 1'b0; st <= S_DTACK;
            end else begin
              acc_be <= be; acc_wdata <= wword; beat <= 1'b1; st <= S_ACC;
            end
          end
        end
        S_ACC: if (acc_ack) begin
          if (acc_err) begin
            berr_n <= 1'b0; st <= S_DTACK;
          end else if (mblt) begin
            // upper word done, now the lower word at address + 4
            {a_o, lword_n_o} <= acc_rdata;
            acc_wdata <= lo_q;
            st <= S_ACC2;
          end else begin
            if (lw)               d_o <= acc_rdata;
            else if (cur_addr[1]) d_o <= {16'h0, acc_rdata[15:0]};
            else                  d_o <= {16'h0, acc_rdata[31:16]};
            d_oe <= !we_q; dtack_n <= 1'b0; st <= S_DTACK;
          end
        end
        S_ACC2: if (acc_ack) begin
          if (acc_err) berr_n <= 1'b0;
          else begin
            d_o <= acc_rdata; d_oe <= !we_q; a_oe <= !we_q; dtack_n <= 1'b0;
          end
          st <= S_DTACK;
        end
        S_DTACK: if (ds_s == 2'b00) begin
          dtack_n <= 1'b1; berr_n <= 1'b1; d_oe <= 1'b0; a_oe <= 1'b0;
          if (berr_n == 1'b0) st <= S_WAS;
          else begin
            st <= S_WDS;
            if (mblt && beat)
              cur_addr <= cur_addr + 32'd8;
            else if (blt)
              cur_addr <= cur_addr + (lw ? 32'd4 : (acc_be == 4'b1100 || acc_be == 4'b0011) ? 32'd2 : 32'd1);
          end
        end
        S_WAS: if (!as_s) begin st <= S_IDLE; blk_end <= (tgt_q != TGT_NONE); tgt_q <= TGT_NONE; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
