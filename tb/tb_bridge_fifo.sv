// tb_bridge_fifo: self-checking test of the 16-word bridge buffer.
// Fills it completely, checks full/count, drains it in order, checks the
// cache-line use (clear, push 16 words, random reads by index) and a
// simultaneous push and pop.
module tb_bridge_fifo;
  logic clk = 0, rst_n = 0;
  logic clear, push, pop;
  logic [31:0] wdata, rdata, cdata;
  logic [3:0]  cidx;
  logic [4:0]  count;
  logic empty, full;
  int checks = 0, failures = 0;

  bridge_fifo dut (.clk, .rst_n, .clear, .push, .wdata, .pop, .rdata, .cidx, .cdata, .count, .empty, .full);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; push = 0; pop = 0; wdata = 0; cidx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(empty && count == 0, "empty after reset");
    for (int i = 0; i < 16; i++) begin
      push <= 1; wdata <= 32'hA000_0000 + i; @(posedge clk);
    end
    push <= 0; @(posedge clk);
    check(full && count == 16, "full after 16 pushes");
    for (int i = 0; i < 16; i++) begin
      check(rdata == 32'hA000_0000 + i, $sformatf("fifo order word %0d got %h", i, rdata));
      pop <= 1; @(posedge clk); pop <= 0; @(posedge clk);
    end
    check(empty, "empty after drain");
    // cache-line use
    clear <= 1; @(posedge clk); clear <= 0;
    for (int i = 0; i < 16; i++) begin
      push <= 1; wdata <= 32'h0BAD_0000 ^ (i * 32'h1111); @(posedge clk);
    end
    push <= 0;
    for (int k = 0; k < 16; k++) begin
      int j;
      j = (k * 7 + 3) % 16;
      cidx <= 4'(j); @(posedge clk); #1;
      check(cdata == (32'h0BAD_0000 ^ (j * 32'h1111)), $sformatf("cache index %0d", j));
    end
    // push and pop together keep the count
    clear <= 1; @(posedge clk); clear <= 0;
    push <= 1; wdata <= 32'h1; @(posedge clk);
    push <= 1; pop <= 1; wdata <= 32'h2; @(posedge clk);
    push <= 0; pop <= 0; @(posedge clk);
    check(count == 1 && rdata == 32'h2, "push+pop keeps one word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
