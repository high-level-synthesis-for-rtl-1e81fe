// tb_workload_large_system: the evaluation workload of the chained design,
// one million input samples through the default 100-block chain.
//
// The input is a complex tone whose frequency is drawn once from a normal
// distribution around 5 MHz (sd 100 kHz) at a 400 MHz clock; each block's
// step is drawn from a normal distribution around 50 (sd 10). The reference
// model streams along with the simulation: for every block it keeps the last
// sixteen expected outputs in a ring, so memory does not grow with the
// number of samples. Every cycle it checks the chain output and all 100
// power readings.
module tb_workload_large_system;
  import tb_ref_pkg::*;
  import fx_pkg::*;

  localparam int    N      = 100;         // blocks, the design's default
  localparam int    S      = 1000000;     // samples
  localparam int    R      = 16;          // ring depth per block
  localparam real   F_CLK  = 400.0e6;

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
  cplx_t y  [N][R];   // expected output of block k visible after edge m, slot m % R
  bit    yv [N][R];
  int    g  [N][R];   // its gated instantaneous power
  real   f_in;

  function automatic real gauss();   // sum of 12 uniforms, mean 0, sd 1
    real acc;
    acc = 0.0;
    for (int j = 0; j < 12; j++) acc += real'($urandom_range(1000000)) / 1000000.0;
    return acc - 6.0;
  endfunction

  function automatic cplx_t stim(int s);
    real a;
    cplx_t r;
    a = 2.0 * PI * f_in * real'(s) / F_CLK;
    r.i = $rtoi(4000.0 * $cos(a));
    r.q = $rtoi(4000.0 * $sin(a));
    return r;
  endfunction

  initial begin
    repeat (S + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t a, o;
    bit    av;
    int    e, sum, slot, ph;
    f_in = 5.0e6 + 100.0e3 * gauss();
    for (int k = 0; k < N; k++) step[k] = phase_t'($rtoi(50.0 + 10.0 * gauss() + 0.5));
    foreach (y[k, r]) begin y[k][r] = '{0, 0}; yv[k][r] = 1'b0; g[k][r] = 0; end
    $display("input tone %0.1f kHz, first steps %0d %0d %0d", f_in / 1.0e3, step[0], step[1], step[2]);

    rst_n = 1'b0; valid_in = 1'b0; iq_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < S; n++) begin
      o = stim(n);
      iq_in.i = 16'(o.i);
      iq_in.q = 16'(o.q);
      valid_in = 1'b1;
      @(posedge clk);
      @(negedge clk);
      // reference: outputs visible after edge n
      e = n - 5;                  // edge at which block k sampled its input
      slot = n % R;
      for (int k = 0; k < N; k++) begin
        if (e < 0) begin
          a = '{0, 0}; av = 1'b0;
        end else if (k == 0) begin
          a = stim(e); av = 1'b1;
        end else begin
          a  = y[k-1][(n - 6) % R];
          av = yv[k-1][(n - 6) % R];
        end
        ph = (e < 0) ? 0 : int'((longint'(step[k]) * (e + 1)) % NPH);
        y[k][slot]  = (e < 0) ? '{0, 0} : ref_cmul(a, ref_osc(ph));
        yv[k][slot] = av;
        g[k][slot]  = av ? ref_pinst(y[k][slot]) : 0;
      end
      checks += 2;
      if (valid_out !== yv[N-1][slot]) failures++;
      if (int'(iq_out.i) != y[N-1][slot].i || int'(iq_out.q) != y[N-1][slot].q) begin
        failures++;
        if (failures < 10) $display("n=%0d out=(%0d,%0d) expected (%0d,%0d)", n, iq_out.i, iq_out.q,
                                    y[N-1][slot].i, y[N-1][slot].q);
      end
      for (int k = 0; k < N; k++) begin
        sum = 0;
        for (int j = 1; j <= 8; j++) sum += g[k][(n - j + R) % R];
        checks += 2;
        if (valid_pwr[k] !== yv[k][(n - 1 + R) % R]) failures++;
        if (int'(pwr_out[k]) != (sum >>> 3)) begin
          failures++;
          if (failures < 10) $display("n=%0d block %0d pwr=%0d expected %0d", n, k, pwr_out[k], sum >>> 3);
        end
      end
    end
    $display("last block output power: %0d (Q6.10)", pwr_out[N-1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
