// tb_comp_block: one frequency translator with its power meter. Random
// complex samples with valid gaps and occasional full-scale values go in at
// one per cycle under a fixed step; every cycle the testbench checks
// iq_out/valid_freq (6 cycles after the input) and pwr_out/valid_pwr (one
// cycle after that, averaging the last eight translator outputs) against the
// mathematical reference.
module tb_comp_block;
  import tb_ref_pkg::*;
  import fx_pkg::*;

  localparam int S = 3000;

  logic    clk = 1'b0;
  logic    rst_n, valid_in, valid_freq, valid_pwr;
  phase_t  step;
  iq_t     iq_in, iq_out;
  sample_t pwr_out;
  int checks = 0, failures = 0, n_sat = 0, n_psat = 0;
  cplx_t   y [S];      // translator output for input s
  bit      v [S];
  iq_t     stim [S];

  comp_block dut (.clk, .rst_n, .step, .valid_in, .iq_in, .valid_freq, .iq_out,
                  .valid_pwr, .pwr_out);

  always #5 clk = ~clk;

  function automatic int gp(int m);   // gated power of the output visible after edge m
    int e;
    e = m - 5;
    if (e < 0 || e >= S) return 0;
    return v[e] ? ref_pinst(y[e]) : 0;
  endfunction

  initial begin
    repeat (S + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t x;
    int sum, e;
    step = 13'd61;
    for (int s = 0; s < S; s++) begin
      x.i = rnd((s % 40 < 4) ? 32767 : 5000);
      x.q = rnd((s % 40 < 4) ? 32767 : 5000);
      v[s] = ($urandom_range(4) != 0);
      y[s] = ref_cmul(x, ref_osc(int'(step) * (s + 1) % NPH));
      if (cmul_saturates(x, ref_osc(int'(step) * (s + 1) % NPH))) n_sat++;
      if (v[s] && pinst_saturates(y[s])) n_psat++;
      stim[s].i = 16'(x.i);
      stim[s].q = 16'(x.q);
    end
    rst_n = 1'b0; valid_in = 1'b0; iq_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < S + 8; n++) begin
      valid_in = (n < S) ? v[n] : 1'b0;
      iq_in    = (n < S) ? stim[n] : '0;
      @(posedge clk);
      @(negedge clk);
      e = n - 5;
      if (e >= 0 && e < S) begin
        checks += 2;
        if (valid_freq !== v[e]) failures++;
        if (int'(iq_out.i) != y[e].i || int'(iq_out.q) != y[e].q) begin
          failures++;
          if (failures < 10) $display("n=%0d out=(%0d,%0d) expected (%0d,%0d)", n, iq_out.i, iq_out.q, y[e].i, y[e].q);
        end
      end
      sum = 0;
      for (int j = 1; j <= 8; j++) sum += gp(n - j);
      checks += 2;
      if (valid_pwr !== ((n - 6 >= 0 && n - 6 < S) ? v[n-6] : 1'b0)) failures++;
      if (int'(pwr_out) != (sum >>> 3)) begin
        failures++;
        if (failures < 10) $display("n=%0d pwr=%0d expected %0d", n, pwr_out, sum >>> 3);
      end
    end
    checks += 2;
    if (n_sat == 0) failures++;
    if (n_psat == 0) failures++;
    $display("multiplier saturations=%0d power saturations=%0d", n_sat, n_psat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
