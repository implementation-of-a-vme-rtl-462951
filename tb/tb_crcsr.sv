// tb_crcsr: self-checking test of the CR/CSR space.
// Checks that the ROM checksum makes the bytes 03h..7Fh sum to zero, the
// "CR" signature and specification ID, the board ID, the base address
// register (reset from the switches, rewritable), bit set/clear of the
// module-enable and reset bits, the BERR flag and the user window flag.
module tb_crcsr;
  logic clk = 0, rst_n = 0;
  logic [18:0] offs = 0;
  logic we = 0;
  logic [7:0] wdata = 0, rdata;
  logic user, module_en, sysfail_en, board_reset, berr_set = 0;
  logic [4:0] slot;
  int checks = 0, failures = 0;

  crcsr #(.BOARD_ID(32'h1234_5678)) dut (.clk, .rst_n, .hw_slot(5'd9), .offs, .we, .wdata, .rdata, .user, .slot,
              .berr_set, .module_en, .sysfail_en, .board_reset);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input logic [18:0] o, input logic [7:0] d);
    offs <= o; wdata <= d; we <= 1; @(posedge clk); we <= 0; @(posedge clk);
  endtask
  // the ROM and registers read combinationally: a second instance with
  // its own offset input lets the checks read any byte without waiting
  logic [18:0] offs2;
  logic [7:0]  rdata2;
  logic        user2, en2, sf2, rst2;
  logic [4:0]  slot2;
  crcsr #(.BOARD_ID(32'h1234_5678)) ref2 (.clk, .rst_n, .hw_slot(5'd9), .offs(offs2), .we(1'b0), .wdata(8'h0),
              .rdata(rdata2), .user(user2), .slot(slot2), .berr_set(1'b0), .module_en(en2), .sysfail_en(sf2),
              .board_reset(rst2));
  task automatic rdt(input logic [18:0] o, output logic [7:0] r);
    offs = o; #1; r = rdata;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sum, b0, b1, b2, b3;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    sum = 0;
    for (int o = 3; o < 128; o += 4) begin rdt(19'(o), b0); sum += b0; end
    check(sum == 8'h00, $sformatf("checksum: sum of CR bytes is %h", sum));
    rdt(19'h1F, b0); rdt(19'h23, b1);
    check(b0 == "C" && b1 == "R", "CR signature");
    rdt(19'h1B, b0); check(b0 == 8'h01, "space specification ID");
    rdt(19'h33, b0); rdt(19'h37, b1); rdt(19'h3B, b2); rdt(19'h3F, b3);
    check({b0, b1, b2, b3} == 32'h1234_5678, "board ID");
    rdt(19'h02, b0); check(b0 == 8'h00, "only every 4th byte used");
    rdt(19'h7FFFF, b0); check(b0 == {5'd9, 3'b000} && slot == 5'd9, "BAR from switches");
    wr(19'h7FFFF, {5'd17, 3'b000});
    rdt(19'h7FFFF, b0); check(slot == 5'd17 && b0 == 8'h88, "BAR rewritten");
    check(module_en, "module enabled after reset");
    wr(19'h7FFF7, 8'h10);
    check(!module_en, "bit clear disables module");
    wr(19'h7FFFB, 8'h90);
    check(module_en && board_reset, "bit set enables module and reset");
    wr(19'h7FFF7, 8'h80);
    check(!board_reset && module_en, "bit clear releases reset");
    @(posedge clk); berr_set <= 1; @(posedge clk); berr_set <= 0; @(posedge clk);
    rdt(19'h7FFFB, b0); check(b0[3], "BERR flag");
    rdt(19'h7FFF7, b1); check(b0 == b1, "set and clear registers read the same bits");
    offs2 = 19'h3; #1; rdt(19'h3, b0); check(rdata2 == b0, "checksum is a constant of the ROM");
    offs = 19'h7F004; #1; check(user, "user window flag");
    offs = 19'h7E004; #1; check(!user, "outside user window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
