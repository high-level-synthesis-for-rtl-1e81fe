// tb_static_counters: drives random call strobes into both forms of the
// counters, the separate registers (default) and the shared register, and
// compares var1/var2 after every clock edge with a call count kept here. It
// checks the one-cycle timing (a call is visible after its edge and not
// before), that the outputs hold without a call, that reset returns them to
// 0, and, with a narrow 8-bit copy, that they wrap around.
module tb_static_counters;
  logic clk = 1'b0;
  logic rst_n, call;
  logic [31:0] s1, s2, h1, h2;
  logic [7:0]  n1, n2;
  int checks = 0, failures = 0, calls = 0, wraps = 0;

  static_counters                         dut_sep (.clk, .rst_n, .call, .var1(s1), .var2(s2));
  static_counters #(.SHARED(1'b1))        dut_shr (.clk, .rst_n, .call, .var1(h1), .var2(h2));
  static_counters #(.W(8))                dut_nar (.clk, .rst_n, .call, .var1(n1), .var2(n2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s = %0d, expected %0d (after %0d calls)", what, got, exp, calls);
    end
  endtask

  initial begin
    rst_n = 1'b0; call = 1'b1;
    @(negedge clk); @(negedge clk);
    expect_eq("reset var1", s1, 0); expect_eq("reset var2", s2, 0);
    expect_eq("reset shared var2", h2, 0);
    rst_n = 1'b1;
    // the first call: separate registers give 1 and 1, the shared one 1 and 2
    call = 1'b1;
    #1;
    expect_eq("var1 before edge", s1, 0);
    @(negedge clk);
    calls = 1;
    expect_eq("first var1", s1, 1); expect_eq("first var2", s2, 1);
    expect_eq("first shared var1", h1, 1); expect_eq("first shared var2", h2, 2);
    for (int n = 0; n < 10000; n++) begin
      call = ($urandom_range(3) != 0);
      #1;
      // nothing changes before the clock edge
      expect_eq("var1 before edge", s1, 32'(calls));
      @(negedge clk);
      if (call) begin
        calls++;
        if (calls % 256 == 0) wraps++;
      end
      expect_eq("var1", s1, 32'(calls));
      expect_eq("var2", s2, 32'(calls));
      expect_eq("shared var1", h1, 32'(2 * calls - 1));
      expect_eq("shared var2", h2, 32'(2 * calls));
      expect_eq("8-bit var1", n1, calls % 256);
      expect_eq("8-bit var2", n2, calls % 256);
    end
    $display("calls %0d, 8-bit wraps %0d", calls, wraps);
    // reset in the middle of a run
    rst_n = 1'b0; call = 1'b1;
    @(negedge clk);
    calls = 0;
    expect_eq("var1 after reset", s1, 0); expect_eq("shared var1 after reset", h1, 0);
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
