// tb_sum_of_products: random and extreme operands, one set per cycle;
// checks that y equals the low 16 bits of a0*b0 + a1*b1 after the clock
// edge that took the inputs and not before it (one-cycle latency), that the
// sum wraps around, and that reset clears the output.
module tb_sum_of_products;
  logic clk = 1'b0;
  logic rst_n;
  logic signed [15:0] a0, b0, a1, b1, y;
  int checks = 0, failures = 0, wraps = 0;

  sum_of_products dut (.clk, .rst_n, .a0, .b0, .a1, .b1, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint full;
    int e, prev;
    rst_n = 1'b0; a0 = 16'sd5; b0 = 16'sd7; a1 = 16'sd1; b1 = 16'sd1;
    @(negedge clk); @(negedge clk);
    checks++;
    if (y !== 16'sd0) failures++;
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      if (n % 3 == 0) begin
        a0 = 16'($urandom_range(30) - 15); b0 = 16'($urandom_range(30) - 15);
        a1 = 16'($urandom_range(30) - 15); b1 = 16'($urandom_range(30) - 15);
      end else if (n % 100 == 1) begin
        a0 = -16'sd32768; b0 = -16'sd32768; a1 = -16'sd32768; b1 = -16'sd32768;
      end else begin
        a0 = 16'($urandom); b0 = 16'($urandom); a1 = 16'($urandom); b1 = 16'($urandom);
      end
      full = longint'(a0) * b0 + longint'(a1) * b1;
      e = int'(signed'(16'(full)));
      if (full > 32767 || full < -32768) wraps++;
      // one-cycle latency: new inputs do not reach y before the clock edge
      #1;
      if (n > 0) begin
        checks++;
        if (int'(y) != prev) failures++;
      end
      prev = e;
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (int'(y) != e) begin
        failures++;
        if (failures < 10) $display("n=%0d y=%0d expected %0d", n, y, e);
      end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
