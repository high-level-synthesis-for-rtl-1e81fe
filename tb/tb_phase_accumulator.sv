// tb_phase_accumulator: drives random and extreme step values into the
// phase accumulator and checks every cycle that the registered phase equals
// the running sum of the steps modulo 2^13 (one-cycle latency), including
// wrap-around and reset to zero.
module tb_phase_accumulator;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [12:0] step, phase;
  int checks = 0, failures = 0, wraps = 0;
  int unsigned model;

  phase_accumulator dut (.clk, .rst_n, .step, .phase);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    step  = 13'd77;
    @(negedge clk); @(negedge clk);
    if (phase !== 13'd0) failures++;
    checks++;
    rst_n = 1'b1;
    model = 0;
    for (int t = 0; t < 2000; t++) begin
      case (t % 500)
        0:       step = 13'd0;
        1:       step = 13'd1;
        2:       step = 13'h1fff;       // -1: runs backwards
        3:       step = 13'd4096;       // half a turn
        default: step = 13'($urandom);
      endcase
      @(posedge clk);
      if (model + step >= 8192) wraps++;
      model = (model + step) % 8192;
      @(negedge clk);
      checks++;
      if (phase !== 13'(model)) begin
        failures++;
        if (failures < 10) $display("t=%0d phase=%0d expected=%0d", t, phase, model);
      end
    end
    // reset in the middle returns to zero
    rst_n = 1'b0;
    @(negedge clk);
    checks++;
    if (phase !== 13'd0) failures++;
    checks++;
    if (wraps < 10) failures++;
    $display("wrap-arounds seen: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
