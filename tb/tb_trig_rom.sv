// tb_trig_rom: reads every entry of a sine table and a cosine table with a
// new address each cycle and checks each value against the mathematical
// table entry trunc(f((k + 0.5) * pi / 4096) * 1024), one cycle after the
// address.
module tb_trig_rom;
  import tb_ref_pkg::*;
  logic        clk = 1'b0;
  logic [9:0]  addr;
  logic [15:0] s_data, c_data;
  int checks = 0, failures = 0;

  trig_rom #(.IS_SINE(1'b1)) u_s (.clk, .addr, .data(s_data));
  trig_rom #(.IS_SINE(1'b0)) u_c (.clk, .addr, .data(c_data));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int es, ec;
    real a;
    @(negedge clk);
    for (int n = 0; n < 1024; n++) begin
      int k;
      k = (n * 37 + 5) % 1024;   // visits every address, in scrambled order
      addr = 10'(k);
      a  = (real'(k) + 0.5) * PI / 4096.0;
      es = q10($sin(a));
      ec = q10($cos(a));
      #1;
      // synchronous read: nothing changes before the clock edge
      if (n > 0 && int'(s_data) == es && int'(c_data) == ec && es != ec) begin
        failures++;
        $display("k=%0d read without a clock edge", k);
      end
      @(negedge clk);
      checks += 2;
      if (int'(s_data) != es || int'(c_data) != ec) begin
        failures++;
        if (failures < 10) $display("k=%0d sin=%0d/%0d cos=%0d/%0d", k, s_data, es, c_data, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
