// tb_sincos_generator: sweeps every one of the 8192 phases (in a scrambled
// order, one new phase per cycle) and checks cos and sin two cycles later
// against cos/sin of the full angle (p + 0.5) * 2*pi / 8192 in Q6.10. Counts
// that all eight segments were visited.
module tb_sincos_generator;
  import tb_ref_pkg::*;
  logic    clk = 1'b0;
  logic    rst_n;
  logic [12:0] phase;
  logic signed [15:0] cos_out, sin_out;
  int checks = 0, failures = 0;
  int seg_seen [8];
  int exp_c [$], exp_s [$];

  sincos_generator dut (.clk, .rst_n, .phase, .cos_out, .sin_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t e;
    int p, lat_c, lat_s;
    rst_n = 1'b0;
    phase = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 8192 + 1; n++) begin
      p = (n * 2731 + 11) % 8192;
      phase = 13'(p);
      @(posedge clk);
      @(negedge clk);
      if (n < 8192) begin
        e = ref_osc(p);
        exp_c.push_back(e.i);
        exp_s.push_back(e.q);
        seg_seen[p / 1024]++;
      end
      // after the second clock edge: result of the phase presented one
      // iteration earlier
      if (n >= 1 && n <= 8192) begin
        lat_c = exp_c.pop_front();
        lat_s = exp_s.pop_front();
        checks++;
        if (int'(cos_out) != lat_c || int'(sin_out) != lat_s) begin
          failures++;
          if (failures < 10) $display("n=%0d cos=%0d/%0d sin=%0d/%0d", n, cos_out, lat_c, sin_out, lat_s);
        end
      end
    end
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (seg_seen[s] != 1024) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
