// tb_vme_slave: self-checking test of the VME64 slave.
// A behavioural VME master in the testbench runs D32, D16, D8 (even and
// odd), unaligned (bytes 1-3), BLT, MBLT and read-modify-write cycles, a
// cycle outside the decoded window, an illegal strobe pattern and an access
// the local side refuses. A 1024-word memory behind the local access port,
// with byte enables, is the reference. Checks data, byte lanes, DTACK* and
// BERR*, and that an MBLT beat carries the upper word on the address lines.
module tb_vme_slave;
  import vmebr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic as_n = 1, write_n = 1, lword_n = 1, iack_n = 1;
  logic [1:0] ds_n = 2'b11;
  logic [5:0] am = 0;
  logic [31:1] a_i = 0, a_o;
  logic [31:0] d_i = 0, d_o, cur_addr, acc_addr, acc_wdata, acc_rdata;
  logic d_oe, lword_n_o, a_oe, dtack_n, berr_n;
  logic [5:0] cur_am;
  target_e dec_tgt, acc_tgt;
  logic acc_req, acc_we, acc_ack, acc_err, blk_mode, blk_end;
  logic [3:0] acc_be;
  logic [31:0] mem [1024];
  int checks = 0, failures = 0, blk_ends = 0;

  vme_slave dut (.clk, .rst_n, .en(1'b1), .as_n, .ds_n, .write_n, .lword_n_i(lword_n), .iack_n, .am, .a_i, .d_i,
                 .d_o, .d_oe, .a_o, .lword_n_o, .a_oe, .dtack_n, .berr_n, .cur_addr, .cur_am, .dec_tgt,
                 .acc_req, .acc_tgt, .acc_we, .acc_addr, .acc_be, .acc_wdata, .acc_ack, .acc_err, .acc_rdata,
                 .blk_mode, .blk_end);

  assign dec_tgt = (cur_addr[31:24] == 8'h80 && am_is_a32(cur_am)) ? TGT_IBUS : TGT_NONE;

  always #5 clk = ~clk;

  // local memory: answers two cycles after a request; words 1000..1023 refuse
  int lat = 0;
  always @(posedge clk) begin
    acc_ack <= 0; acc_err <= 0;
    if (blk_end) blk_ends++;
    if (acc_req && !acc_ack) begin
      lat <= lat + 1;
      if (lat == 2) begin
        lat <= 0; acc_ack <= 1;
        acc_err <= acc_addr[11:2] >= 10'd1000;
        if (acc_we) begin
          for (int b = 0; b < 4; b++) if (acc_be[b]) mem[acc_addr[11:2]][8*b +: 8] <= acc_wdata[8*b +: 8];
        end else acc_rdata <= mem[acc_addr[11:2]];
      end
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic addr_phase(input logic [5:0] m, input logic [31:0] a, input logic lw_n);
    am = m; a_i = a[31:1]; lword_n = lw_n; #40; as_n = 0;
  endtask
  task automatic end_cycle();
    as_n = 1; #60;
  endtask
  // one data strobe; returns read data, whether DTACK or BERR came, or neither
  task automatic strobe(input logic [1:0] dsn, input logic wr, input logic [31:0] wd, input logic [31:0] wa,
                        output logic [31:0] rd, output logic [31:0] ra, output int resp);
    write_n = !wr; d_i = wd; if (wa != 0) {a_i, lword_n} = wa; #40; ds_n = dsn;
    resp = 0;
    for (int t = 0; t < 60 && resp == 0; t++) begin
      #10; if (!dtack_n) resp = 1; else if (!berr_n) resp = 2;
    end
    rd = d_o; ra = {a_o, lword_n_o};
    ds_n = 2'b11;
    for (int t = 0; t < 60 && (!dtack_n || !berr_n); t++) #10;
    #20;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd, ra; int resp;
    for (int i = 0; i < 1024; i++) mem[i] = 32'h1000_0000 + i;
    repeat (3) @(posedge clk); rst_n = 1; #20;
    // D32 write then read
    addr_phase(6'h09, 32'h8000_0010, 0); strobe(2'b00, 1, 32'hCAFE_F00D, 0, rd, ra, resp); end_cycle();
    check(resp == 1 && mem[4] == 32'hCAFE_F00D, "D32 write");
    addr_phase(6'h09, 32'h8000_0010, 0); strobe(2'b00, 0, 0, 0, rd, ra, resp); end_cycle();
    check(resp == 1 && rd == 32'hCAFE_F00D, "D32 read");
    // D16 at A1=1 goes to bytes 2-3
    addr_phase(6'h09, 32'h8000_0012, 1); strobe(2'b00, 1, 32'h0000_BEEF, 0, rd, ra, resp); end_cycle();
    check(mem[4] == 32'hCAFE_BEEF, $sformatf("D16 write bytes 2-3: %h", mem[4]));
    // D8: byte 0 with DS1, byte 3 with DS0
    addr_phase(6'h09, 32'h8000_0014, 1); strobe(2'b01, 1, 32'h0000_1100, 0, rd, ra, resp); end_cycle();
    addr_phase(6'h09, 32'h8000_0016, 1); strobe(2'b10, 1, 32'h0000_0044, 0, rd, ra, resp); end_cycle();
    check(mem[5] == 32'h1100_0044 + 32'h0000_0000 + (32'h1000_0005 & 32'h00FF_FF00), $sformatf("D8 writes: %h", mem[5]));
    addr_phase(6'h09, 32'h8000_0014, 1); strobe(2'b10, 0, 0, 0, rd, ra, resp); end_cycle();
    check(rd[7:0] == 8'h00, $sformatf("D8 odd read byte 1: %h", rd[7:0]));
    // UAT bytes 1-3 (A1=0, LWORD*=0, DS1* high, DS0* low)
    addr_phase(6'h09, 32'h8000_0018, 0); strobe(2'b10, 1, 32'h00AB_CDEF, 0, rd, ra, resp); end_cycle();
    check(mem[6] == 32'h10AB_CDEF, $sformatf("UAT bytes 1-3: %h", mem[6]));
    // BLT D32: four words, then read them back
    addr_phase(6'h0B, 32'h8000_0100, 0);
    for (int i = 0; i < 4; i++) strobe(2'b00, 1, 32'hB000_0000 + i, 0, rd, ra, resp);
    end_cycle();
    for (int i = 0; i < 4; i++) check(mem[64 + i] == 32'hB000_0000 + i, $sformatf("BLT word %0d", i));
    addr_phase(6'h0B, 32'h8000_0104, 0);
    for (int i = 1; i < 4; i++) begin
      strobe(2'b00, 0, 0, 0, rd, ra, resp);
      check(rd == 32'hB000_0000 + i, $sformatf("BLT read %0d", i));
    end
    end_cycle();
    // MBLT: address-only strobe, then two 64-bit beats
    addr_phase(6'h08, 32'h8000_0200, 0);
    strobe(2'b00, 1, 0, 0, rd, ra, resp);
    check(resp == 1, "MBLT address acknowledged");
    strobe(2'b00, 1, 32'h2222_2222, 32'h1111_1110, rd, ra, resp);
    strobe(2'b00, 1, 32'h4444_4444, 32'h3333_3330, rd, ra, resp);
    end_cycle();
    check(mem[128] == 32'h1111_1110 && mem[129] == 32'h2222_2222 && mem[130] == 32'h3333_3330 && mem[131] == 32'h4444_4444,
          "MBLT write: upper word on address lines at the lower address");
    addr_phase(6'h08, 32'h8000_0200, 0);
    strobe(2'b00, 0, 0, 0, rd, ra, resp);
    strobe(2'b00, 0, 0, 0, rd, ra, resp);
    check(ra == 32'h1111_1110 && rd == 32'h2222_2222, "MBLT read beat 1");
    strobe(2'b00, 0, 0, 0, rd, ra, resp);
    check(ra == 32'h3333_3330 && rd == 32'h4444_4444, "MBLT read beat 2");
    end_cycle();
    // read-modify-write: read then write under one AS*
    addr_phase(6'h09, 32'h8000_0020, 0);
    strobe(2'b00, 0, 0, 0, rd, ra, resp);
    strobe(2'b00, 1, rd | 32'h8000_0000, 0, rd, ra, resp);
    end_cycle();
    check(mem[8] == (32'h1000_0008 | 32'h8000_0000), "RMW cycle on one location");
    // not our address: no answer
    addr_phase(6'h09, 32'h9000_0000, 0); strobe(2'b00, 0, 0, 0, rd, ra, resp); end_cycle();
    check(resp == 0, "outside the window: no DTACK");
    // illegal strobe pattern: DS1 only with A1=1 and LWORD*=0
    addr_phase(6'h09, 32'h8000_0022, 0); strobe(2'b01, 0, 0, 0, rd, ra, resp); end_cycle();
    check(resp == 2, "illegal lanes give BERR");
    // local error
    addr_phase(6'h09, 32'h8000_0FA0, 0); strobe(2'b00, 0, 0, 0, rd, ra, resp); end_cycle();
    check(resp == 2, "refused access gives BERR");
    check(blk_ends >= 14, $sformatf("end of cycle reported (%0d)", blk_ends));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
