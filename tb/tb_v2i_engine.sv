// tb_v2i_engine: self-checking test of the VME-to-IBUS engine.
// The engine gets a real bridge_fifo and a behavioural IBUS master: on
// m_start it reads or writes a 1024-word memory one word per cycle, pops
// and pushes like the real master, and ends with m_done; word addresses
// from 3F0h up answer with m_err. Ownership is granted one cycle after
// 'need'. The test plays the VME slave side: single writes (posted, flushed
// when a read comes), a 20-word block write (flush on a full burst and at
// block end), block reads (one 16-word line fetch, then hits), a byte write
// (read-merge-write) and reads and writes that fail on IBUS. It checks the
// memory, the read data, the number of IBUS transfers and the errors.
module tb_v2i_engine;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic own = 0, need, acc_req = 0, acc_we = 0, blk_mode = 0, blk_end = 0;
  logic [31:0] acc_iaddr = 0, acc_wdata = 0, acc_rdata;
  logic [3:0]  acc_be = 4'hF;
  logic acc_ack, acc_err, wr_err;
  logic f_clear, f_push, f_pop, f_empty, f_full;
  logic [31:0] f_wdata, f_rdata, f_cdata;
  logic [3:0] f_cidx;
  logic [4:0] f_count;
  logic m_start, m_rnw, m_done = 0, m_err = 0, m_src_valid, m_src_pop = 0, m_snk_push = 0;
  logic [31:0] m_addr, m_src_data, m_snk_data = 0;
  logic [15:0] m_len;

  v2i_engine dut (.clk, .rst_n, .own, .need, .acc_req, .acc_we, .acc_iaddr, .acc_be, .acc_wdata, .blk_mode, .blk_end,
                  .acc_ack, .acc_err, .acc_rdata, .wr_err, .f_clear, .f_push, .f_wdata, .f_pop, .f_rdata, .f_cidx,
                  .f_cdata, .f_count, .m_start, .m_rnw, .m_addr, .m_len, .m_done, .m_err, .m_src_valid,
                  .m_src_data, .m_src_pop, .m_snk_push, .m_snk_data);
  bridge_fifo #(.DEPTH(16), .WIDTH(32)) u_fifo (.clk, .rst_n, .clear(f_clear), .push(f_push), .wdata(f_wdata),
                  .pop(f_pop), .rdata(f_rdata), .cidx(f_cidx), .cdata(f_cdata), .count(f_count), .empty(f_empty),
                  .full(f_full));

  always @(posedge clk) own <= need;

  // behavioural IBUS master
  logic [31:0] mem [1024];
  int m_busy = 0, m_left = 0, n_wr = 0, n_rd = 0, n_wr_words = 0;
  logic [31:0] m_a;
  logic m_r;
  always @(posedge clk) begin
    m_done <= 0; m_src_pop <= 0; m_snk_push <= 0;
    if (m_start && rst_n) begin
      m_busy <= 1; m_left <= int'(m_len); m_a <= m_addr; m_r <= m_rnw; m_err <= 0;
      if (m_rnw) n_rd++; else begin n_wr++; n_wr_words += int'(m_len); end
    end else if (m_busy != 0) begin
      if (m_left == 0) begin
        m_busy <= 0; m_done <= 1; m_err <= (m_a[9:0] >= 10'h3F0);
      end else if (m_r) begin
        m_snk_push <= 1; m_snk_data <= mem[m_a[9:0]]; m_a <= m_a + 1; m_left <= m_left - 1;
      end else if (m_src_valid && !m_src_pop) begin
        m_src_pop <= 1; mem[m_a[9:0]] <= m_src_data; m_a <= m_a + 1; m_left <= m_left - 1;
      end
    end
  end

  task automatic access(input logic we, input logic [31:0] a, input logic [3:0] be, input logic [31:0] wd,
                        output logic [31:0] rd, output logic err);
    int t;
    @(posedge clk); acc_req <= 1; acc_we <= we; acc_iaddr <= a; acc_be <= be; acc_wdata <= wd;
    t = 0;
    do begin @(posedge clk); t++; end while (!acc_ack && t < 500);
    check(t < 500, "access acknowledged");
    rd = acc_rdata; err = acc_err;
    acc_req <= 0;
    @(posedge clk);
  endtask
  task automatic end_of_cycle();
    @(posedge clk); blk_end <= 1; @(posedge clk); blk_end <= 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd; logic err; int w, r0;
    for (int i = 0; i < 1024; i++) mem[i] = 32'h7000_0000 + i;
    repeat (3) @(posedge clk); rst_n = 1;
    // two posted single writes: acknowledged before IBUS sees them
    access(1, 32'h10, 4'hF, 32'hAAAA_0010, rd, err);
    check(n_wr == 0, "first write posted, not yet on IBUS");
    end_of_cycle();
    repeat (30) @(posedge clk);
    check(n_wr == 1 && mem[16] == 32'hAAAA_0010, "posted write flushed at cycle end");
    // block write of 20 words: one 16-word burst, then 4 at block end
    blk_mode <= 1;
    w = n_wr;
    for (int i = 0; i < 20; i++) access(1, 32'h40 + i, 4'hF, 32'hB000_0000 + i, rd, err);
    end_of_cycle(); blk_mode <= 0;
    repeat (60) @(posedge clk);
    check(n_wr - w == 2, $sformatf("20-word block write in %0d IBUS writes", n_wr - w));
    r0 = 0; for (int i = 0; i < 20; i++) if (mem[64 + i] != 32'hB000_0000 + i) r0++;
    check(r0 == 0, "block write data in memory");
    // block read of 20 words from 0x85: fetch line 0x80, hits, fetch line 0x90, hits
    blk_mode <= 1; r0 = n_rd;
    for (int i = 0; i < 20; i++) begin
      access(0, 32'h85 + i, 4'hF, 0, rd, err);
      check(rd == 32'h7000_0085 + i && !err, $sformatf("block read word %0d: %h", i, rd));
    end
    end_of_cycle(); blk_mode <= 0;
    check(n_rd - r0 == 2, $sformatf("20-word block read in %0d line fetches", n_rd - r0));
    // write then read of the same word: read sees the new value (flush first)
    access(1, 32'h200, 4'hF, 32'hC0DE_0200, rd, err);
    access(0, 32'h200, 4'hF, 0, rd, err);
    check(rd == 32'hC0DE_0200, "read after write returns new data");
    end_of_cycle();
    // byte write: read-merge-write of byte lane 1
    r0 = n_rd; w = n_wr;
    access(1, 32'h300, 4'b0010, 32'h0000_5A00, rd, err);
    end_of_cycle();
    check(mem[768] == ((32'h7000_0300 & 32'hFFFF_00FF) | 32'h0000_5A00) && n_rd - r0 == 1 && n_wr - w == 1,
          $sformatf("byte write merged: %h", mem[768]));
    // IBUS error on a read gives acc_err; on a posted write, wr_err
    access(0, 32'h3F8, 4'hF, 0, rd, err);
    check(err, "read error reported to VME");
    end_of_cycle();
    fork
      begin access(1, 32'h3F9, 4'hF, 1, rd, err); end_of_cycle(); end
      begin int t = 0; while (!wr_err && t < 200) begin @(posedge clk); t++; end check(t < 200, "posted write error reported"); end
    join
    repeat (20) @(posedge clk);
    check(!need, "engine idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
