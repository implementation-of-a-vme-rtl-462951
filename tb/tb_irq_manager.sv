// tb_irq_manager: self-checking test of the interrupt manager.
// Interrupter side: the testbench plays a VME interrupt handler. IBUS
// request A on level 2 and B on level 5 must pull IRQ2* and IRQ5*; IACK
// cycles for levels 2 and 5 must return the status/ID bytes with DTACK*,
// release the lines and acknowledge on IBUS; an IACK cycle for level 4 must
// pass on IACKOUT* without DTACK*; a disabled request must stay off.
// Handler side: VME IRQ3* and IRQ6* are pulled with both levels enabled in
// the mask; the testbench plays the VME master (answering v_start with a
// status byte) and the status register (stat_full). Level 6 must be served
// first, level 3 only after the status is collected, and the stored words
// must carry level and byte.
module tb_irq_manager;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [1:0] ibus_irq = 0, ibus_ack;
  logic [2:0] lvl_a = 3'd2, lvl_b = 3'd5;
  logic en_a = 1, en_b = 1;
  logic [7:1] handler_mask = 0, irq_n_o, irq_n_i = 7'h7F;
  logic as_n = 1, iack_n = 1, iackin_n = 1, iackout_n, d_oe, dtack_n;
  logic [1:0] ds_n = 2'b11;
  logic [3:1] a_i = 0;
  logic [7:0] d_o;
  logic stat_full = 0, need, own = 0, v_start, v_done = 0, v_berr = 0, v_push = 0, stat_we, stat_set;
  logic [31:0] v_addr, v_data = 0, stat_data;
  int acks [2] = '{0, 0};

  irq_manager dut (.clk, .rst_n, .ibus_irq, .ibus_ack, .lvl_a, .lvl_b, .en_a, .en_b, .id_a(8'hA2), .id_b(8'hB5),
                   .handler_mask, .irq_n_o, .as_n, .ds_n, .iack_n, .a_i, .iackin_n, .iackout_n, .d_o, .d_oe,
                   .dtack_n, .irq_n_i, .stat_full, .need, .own, .v_start, .v_addr, .v_done, .v_berr, .v_push,
                   .v_data, .stat_we, .stat_data, .stat_set);

  always @(posedge clk) begin
    own <= need;
    for (int i = 0; i < 2; i++) if (ibus_ack[i] && rst_n) acks[i]++;
  end

  // VME master model for the handler: answers an IACK with C0h + level
  int iack_runs = 0;
  logic [2:0] last_lvl;
  always @(posedge clk) begin
    v_push <= 0; v_done <= 0;
    if (v_start && rst_n) begin
      iack_runs++; last_lvl <= v_addr[3:1];
      repeat (5) @(posedge clk);
      v_push <= 1; v_data <= {24'h0, 8'hC0 + {5'h0, v_addr[3:1]}};
      @(posedge clk); v_push <= 0; v_done <= 1;
    end
  end

  task automatic iack_cycle(input logic [2:0] lvl, output logic [7:0] id, output int resp);
    a_i = lvl; iack_n = 0; #30; as_n = 0; iackin_n = 0; #30; ds_n = 2'b10;
    resp = 0;
    for (int t = 0; t < 30 && resp == 0; t++) begin
      #10; if (!dtack_n) resp = 1; else if (!iackout_n) resp = 2;
    end
    id = d_o;
    ds_n = 2'b11; #40; as_n = 1; iackin_n = 1; iack_n = 1; #60;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] id; int resp, t;
    repeat (3) @(posedge clk); rst_n = 1;
    // interrupter
    ibus_irq = 2'b11; repeat (3) @(posedge clk);
    check(irq_n_o == 7'b110_1101, $sformatf("IRQ2* and IRQ5* pulled: %b", irq_n_o));
    iack_cycle(3'd4, id, resp);
    check(resp == 2, "IACK for level 4 passed down the chain");
    iack_cycle(3'd5, id, resp);
    check(resp == 1 && id == 8'hB5, $sformatf("level 5 status/ID %h", id));
    check(irq_n_o == 7'b111_1101 && acks[1] == 1, "IRQ5* released, request B acknowledged");
    iack_cycle(3'd2, id, resp);
    check(resp == 1 && id == 8'hA2 && irq_n_o == 7'h7F && acks[0] == 1, "level 2 answered and released");
    // a new edge is needed for a new request; a disabled request stays off
    ibus_irq = 2'b00; en_a = 0; repeat (3) @(posedge clk);
    ibus_irq = 2'b01; repeat (3) @(posedge clk);
    check(irq_n_o == 7'h7F, "disabled request A does not interrupt");
    ibus_irq = 0; en_a = 1;
    // handler: levels 3 and 6
    handler_mask = 7'b010_0100;
    irq_n_i = 7'b101_1011;
    t = 0; while (!stat_we && t < 100) begin @(posedge clk); t++; end
    check(stat_we && stat_data == {21'h0, 3'd6, 8'hC6}, $sformatf("level 6 first: %h", stat_data));
    @(posedge clk); stat_full = 1; irq_n_i[6] = 1;
    repeat (40) @(posedge clk);
    check(iack_runs == 1, "no IACK while the status is not collected");
    stat_full = 0;
    t = 0; while (!stat_we && t < 100) begin @(posedge clk); t++; end
    check(stat_we && stat_data == {21'h0, 3'd3, 8'hC3} && stat_set, $sformatf("level 3 next: %h", stat_data));
    @(posedge clk); stat_full = 1; irq_n_i = 7'h7F;
    repeat (20) @(posedge clk);
    check(iack_runs == 2 && !need, "two IACK cycles in all, handler idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
