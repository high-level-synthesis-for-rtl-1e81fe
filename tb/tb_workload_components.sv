// tb_workload_components: the single-component evaluation workload, one
// million input samples through a lone frequency translator and, side by
// side, a lone power meter.
//
// The translator gets a complex tone near 5 MHz (frequency drawn from a
// normal distribution, sd 100 kHz, at a 400 MHz clock) and a step drawn
// around 50 (sd 10); the power meter gets random I/Q with valid gaps. Both
// are checked every cycle against a streaming reference (a six-deep queue
// for the translator, an eight-entry window for the meter).
module tb_workload_components;
  import tb_ref_pkg::*;
  import fx_pkg::*;

  localparam int  S     = 1000000;
  localparam real F_CLK = 400.0e6;

  logic    clk = 1'b0;
  logic    rst_n;
  phase_t  step;
  logic    ft_vin, ft_vout, pm_vin, pm_vout;
  iq_t     ft_in, ft_out, pm_in;
  sample_t pm_out;

  freq_translator u_ft (.clk, .rst_n, .step, .valid_in(ft_vin), .iq_in(ft_in),
                        .valid_out(ft_vout), .iq_out(ft_out));
  power_meter     u_pm (.clk, .rst_n, .valid_in(pm_vin), .iq_in(pm_in),
                        .valid_out(pm_vout), .pwr_out(pm_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic real gauss();
    real acc;
    acc = 0.0;
    for (int j = 0; j < 12; j++) acc += real'($urandom_range(1000000)) / 1000000.0;
    return acc - 6.0;
  endfunction

  initial begin
    repeat (S + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real   f_in, ang;
    cplx_t x, e, px;
    cplx_t ft_q [$];
    int    win [8];
    int    sum;
    int unsigned ph;
    f_in = 5.0e6 + 100.0e3 * gauss();
    step = phase_t'($rtoi(50.0 + 10.0 * gauss() + 0.5));
    foreach (win[k]) win[k] = 0;
    rst_n = 1'b0; ft_vin = 1'b0; pm_vin = 1'b0; ft_in = '0; pm_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ph = 0;
    for (int n = 0; n < S; n++) begin
      ang = 2.0 * PI * f_in * real'(n) / F_CLK;
      x.i = $rtoi(6000.0 * $cos(ang));
      x.q = $rtoi(6000.0 * $sin(ang));
      ft_in.i = 16'(x.i);
      ft_in.q = 16'(x.q);
      ft_vin  = 1'b1;
      ph = (ph + step) % NPH;
      ft_q.push_back(ref_cmul(x, ref_osc(int'(ph))));

      px.i = rnd(9000);
      px.q = rnd(9000);
      pm_in.i = 16'(px.i);
      pm_in.q = 16'(px.q);
      pm_vin  = ($urandom_range(7) != 0);
      for (int k = 7; k > 0; k--) win[k] = win[k-1];
      win[0] = pm_vin ? ref_pinst(px) : 0;

      @(posedge clk);
      @(negedge clk);
      if (n >= 5) begin
        e = ft_q.pop_front();
        checks += 2;
        if (ft_vout !== 1'b1) failures++;
        if (int'(ft_out.i) != e.i || int'(ft_out.q) != e.q) begin
          failures++;
          if (failures < 10) $display("n=%0d ft=(%0d,%0d) expected (%0d,%0d)", n, ft_out.i, ft_out.q, e.i, e.q);
        end
      end
      sum = 0;
      foreach (win[k]) sum += win[k];
      checks += 2;
      if (pm_vout !== pm_vin) failures++;
      if (int'(pm_out) != (sum >>> 3)) begin
        failures++;
        if (failures < 10) $display("n=%0d pwr=%0d expected %0d", n, pm_out, sum >>> 3);
      end
    end
    $display("tone %0.1f kHz, step %0d", f_in / 1.0e3, step);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
