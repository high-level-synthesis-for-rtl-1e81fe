// tb_large_system: end-to-end test of the 100-block chain at its default
// size, in the role of the controller that sets all steps and reads all
// power outputs.
//
// Each block gets a constant step drawn from an approximately normal
// distribution around 50 (sd 10, about 2.4 MHz at 400 MHz). The input is a
// 5 MHz complex tone (1/80 of a turn per sample) in three phases: a
// moderate-amplitude stretch, a clipped full-scale stretch that drives the complex
// multipliers and power meters into saturation, and a stretch with valid
// gaps. Every cycle the testbench checks the chain output (I, Q, valid) and
// all 100 power outputs with their valid bits against a reference computed
// from the mathematics; it also checks the 600-cycle input-to-output latency
// and counts how often each mechanism occurred.
module tb_large_system;
  import tb_ref_pkg::*;
  import fx_pkg::*;

  localparam int N = 100;          // blocks, the design's default
  localparam int S = 1200;         // samples driven
  localparam int T = S + 6 * N + 8; // cycles simulated after reset

  logic    clk = 1'b0;
  logic    rst_n, valid_in, valid_out;
  phase_t  step [N];
  iq_t     iq_in, iq_out;
  logic    valid_pwr [N];
  sample_t pwr_out [N];

  large_system dut (.clk, .rst_n, .step, .valid_in, .iq_in, .valid_out, .iq_out,
                    .valid_pwr, .pwr_out);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cmul_sat = 0, n_pwr_sat = 0, n_zeroed = 0, n_wrap = 0, n_gap = 0;
  int seg_seen [8];

  // x[k][e]: sample that entered block 0 at edge e, as seen at block k's input
  cplx_t x [N+1][S];
  bit    v [S];

  function automatic int phase_of(int k, int c);   // block k after edge c
    return int'((longint'(step[k]) * (c + 1)) % NPH);
  endfunction

  function automatic int gated_pinst(int k, int m);  // block k's output visible after edge m
    int e;
    e = m - 5 - 6 * k;
    if (m < 0 || e < 0 || e >= S) return 0;
    return v[e] ? ref_pinst(x[k+1][e]) : 0;
  endfunction

  function automatic bit valid_vis(int k, int m);
    int e;
    e = m - 5 - 6 * k;
    if (m < 0 || e < 0 || e >= S) return 1'b0;
    return v[e];
  endfunction

  initial begin
    repeat (T + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_in, first_out, sum, e, ph;
    real ang, amp;
    cplx_t o;
    // controller: choose the steps (sum of 12 uniforms ~ normal)
    for (int k = 0; k < N; k++) begin
      real g;
      g = 0.0;
      for (int j = 0; j < 12; j++) g += real'($urandom_range(1000000)) / 1000000.0;
      step[k] = phase_t'($rtoi(50.0 + 10.0 * (g - 6.0) + 0.5));
    end
    // stimulus and reference
    for (int s = 0; s < S; s++) begin
      ang = 2.0 * PI * real'(s) / 80.0;
      // the full-scale stretch is clipped to the sample range, so its
      // corners reach |x| of about 45000 and rotate out of range
      amp = (s < 500) ? 4000.0 : (s < 800) ? 45000.0 : 3000.0;
      x[0][s].i = sat(longint'($rtoi(amp * $cos(ang))));
      x[0][s].q = sat(longint'($rtoi(amp * $sin(ang))));
      v[s] = (s < 800) ? 1'b1 : ($urandom_range(3) != 0);
      if (!v[s]) n_gap++;
      for (int k = 0; k < N; k++) begin
        ph = phase_of(k, s + 6 * k);
        seg_seen[ph / 1024]++;
        if (cmul_saturates(x[k][s], ref_osc(ph))) n_cmul_sat++;
        x[k+1][s] = ref_cmul(x[k][s], ref_osc(ph));
        if (v[s] && pinst_saturates(x[k+1][s])) n_pwr_sat++;
        if (!v[s] && ref_pinst(x[k+1][s]) != 0) n_zeroed++;
      end
    end
    for (int k = 0; k < N; k++)
      if (longint'(step[k]) * (S + 6 * k) >= NPH) n_wrap++;

    rst_n = 1'b0; valid_in = 1'b0; iq_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    first_in = -1; first_out = -1;
    for (int n = 0; n < T; n++) begin
      if (n < S) begin
        iq_in.i = 16'(x[0][n].i);
        iq_in.q = 16'(x[0][n].q);
        valid_in = v[n];
        if (first_in < 0 && v[n]) first_in = n;
      end else begin
        valid_in = 1'b0;
        iq_in = '0;
      end
      @(posedge clk);
      @(negedge clk);
      // chain output
      e = n - 5 - 6 * (N - 1);
      if (e >= 0 && e < S) begin
        o = x[N][e];
        checks += 2;
        if (valid_out !== v[e]) failures++;
        if (int'(iq_out.i) != o.i || int'(iq_out.q) != o.q) begin
          failures++;
          if (failures < 10) $display("n=%0d out=(%0d,%0d) expected (%0d,%0d)", n, iq_out.i, iq_out.q, o.i, o.q);
        end
      end else if (e < 0) begin
        checks++;
        if (valid_out !== 1'b0) failures++;
      end
      if (first_out < 0 && valid_out) first_out = n;
      // every block's power reading
      for (int k = 0; k < N; k++) begin
        sum = 0;
        for (int j = 1; j <= 8; j++) sum += gated_pinst(k, n - j);
        checks += 2;
        if (valid_pwr[k] !== valid_vis(k, n - 1)) failures++;
        if (int'(pwr_out[k]) != (sum >>> 3)) begin
          failures++;
          if (failures < 10) $display("n=%0d block %0d pwr=%0d expected %0d", n, k, pwr_out[k], sum >>> 3);
        end
      end
    end
    // latency: first valid input to first valid output, 6 cycles per block
    checks++;
    if (first_out - first_in != 6 * N - 1) begin
      failures++;
      $display("latency %0d cycles, expected %0d", first_out - first_in + 1, 6 * N);
    end
    $display("latency: %0d cycles", first_out - first_in + 1);
    $display("mechanisms: multiplier saturations=%0d power saturations=%0d invalid gaps=%0d zeroed invalid inputs=%0d blocks whose phase wrapped=%0d",
             n_cmul_sat, n_pwr_sat, n_gap, n_zeroed, n_wrap);
    checks += 5;
    if (n_cmul_sat == 0) failures++;
    if (n_pwr_sat == 0) failures++;
    if (n_gap == 0) failures++;
    if (n_zeroed == 0) failures++;
    if (n_wrap == 0) failures++;
    for (int sgm = 0; sgm < 8; sgm++) begin
      checks++;
      if (seg_seen[sgm] == 0) begin failures++; $display("segment %0d never used", sgm); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
