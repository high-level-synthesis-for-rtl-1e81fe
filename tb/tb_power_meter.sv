// tb_power_meter: random I/Q with valid toggling, bursts of full-scale
// inputs (to drive the sum of squares into saturation) and quiet stretches.
// Every cycle it checks pwr_out and valid_out, one clock edge after the
// input, against the average of the last eight instantaneous powers
// computed directly from the inputs (invalid inputs count as zero). Counts
// saturations and zeroed invalid inputs.
module tb_power_meter;
  import tb_ref_pkg::*;
  import fx_pkg::iq_t;
  logic clk = 1'b0;
  logic rst_n, valid_in, valid_out;
  iq_t  iq_in;
  logic signed [15:0] pwr_out;
  int checks = 0, failures = 0, sats = 0, zeroed = 0;
  int hist [8];

  power_meter dut (.clk, .rst_n, .valid_in, .iq_in, .valid_out, .pwr_out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t x;
    int sum, e;
    rst_n = 1'b0; valid_in = 1'b0; iq_in = '0;
    @(negedge clk); @(negedge clk);
    checks++;
    if (pwr_out !== 16'sd0 || valid_out !== 1'b0) failures++;
    rst_n = 1'b1;
    foreach (hist[k]) hist[k] = 0;
    for (int n = 0; n < 4000; n++) begin
      case ((n / 200) % 4)
        0: begin x.i = rnd(4000);  x.q = rnd(4000);  end     // |x| < 5.5: no saturation
        1: begin x.i = rnd(32767); x.q = rnd(32767); end     // mostly saturated
        2: begin x.i = rnd(6000);  x.q = rnd(6000);  end
        default: begin x.i = (n % 2) ? 32767 : -32768; x.q = -32768; end
      endcase
      valid_in = ($urandom_range(4) != 0);
      iq_in.i = 16'(x.i);
      iq_in.q = 16'(x.q);
      for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = valid_in ? ref_pinst(x) : 0;
      if (valid_in && pinst_saturates(x)) sats++;
      if (!valid_in && ref_pinst(x) != 0) zeroed++;
      @(posedge clk);
      @(negedge clk);
      sum = 0;
      foreach (hist[k]) sum += hist[k];
      e = sum >>> 3;
      checks += 2;
      if (valid_out !== valid_in) failures++;
      if (int'(pwr_out) != e) begin
        failures++;
        if (failures < 10) $display("n=%0d pwr=%0d expected %0d", n, pwr_out, e);
      end
    end
    checks += 2;
    if (sats == 0) failures++;
    if (zeroed == 0) failures++;
    $display("saturated: %0d  zeroed invalid inputs: %0d", sats, zeroed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
