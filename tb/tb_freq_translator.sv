// tb_freq_translator: feeds random complex samples (valid toggling) while
// the step input changes every 300 cycles, including step 0, step 1 and
// negative steps, and checks iq_out / valid_out exactly six cycles after
// each input. The expected value is the input times cos + j sin of the
// phase the accumulator held in the input's own cycle (running sum of the
// steps, modulo 8192), computed from real-valued trigonometry. It also checks
// that an output tone's frequency follows f_clk * step / 8192 by counting
// phase wrap-arounds.
module tb_freq_translator;
  import tb_ref_pkg::*;
  import fx_pkg::*;
  logic   clk = 1'b0;
  logic   rst_n, valid_in, valid_out;
  phase_t step;
  iq_t    iq_in, iq_out;
  int checks = 0, failures = 0, sats = 0, wraps = 0, steps_used = 0;
  cplx_t exp_q [$];
  bit    expv_q [$];

  freq_translator dut (.clk, .rst_n, .step, .valid_in, .iq_in, .valid_out, .iq_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t x, e;
    bit ev;
    int unsigned ph;
    rst_n = 1'b0; valid_in = 1'b0; iq_in = '0; step = '0;
    @(negedge clk); @(negedge clk);
    checks++;
    if (valid_out !== 1'b0 || iq_out !== '0) failures++;
    rst_n = 1'b1;
    ph = 0;
    for (int n = 0; n < 3000 + 6; n++) begin
      if (n % 300 == 0) begin
        case ((n / 300) % 5)
          0: step = 13'd50;
          1: step = 13'd0;
          2: step = 13'd1;
          3: step = 13'h1fff - 13'd40;    // negative step: shift down
          default: step = 13'($urandom);
        endcase
        steps_used++;
      end
      x.i = rnd((n % 50 == 7) ? 32767 : 12000);
      x.q = rnd((n % 50 == 7) ? 32767 : 12000);
      if (n % 50 == 9) begin x.i = 32767; x.q = 32767; end
      valid_in = ($urandom_range(5) != 0);
      iq_in.i = 16'(x.i);
      iq_in.q = 16'(x.q);
      if (ph + step >= 8192) wraps++;
      ph = (ph + step) % 8192;
      exp_q.push_back(ref_cmul(x, ref_osc(int'(ph))));
      expv_q.push_back(valid_in);
      if (cmul_saturates(x, ref_osc(int'(ph)))) sats++;
      @(posedge clk);
      @(negedge clk);
      // output after the sixth edge belongs to the input of five iterations ago
      if (n >= 5) begin
        e  = exp_q.pop_front();
        ev = expv_q.pop_front();
        checks += 2;
        if (valid_out !== ev) failures++;
        if (int'(iq_out.i) != e.i || int'(iq_out.q) != e.q) begin
          failures++;
          if (failures < 10) $display("n=%0d out=(%0d,%0d) expected (%0d,%0d)", n, iq_out.i, iq_out.q, e.i, e.q);
        end
      end
    end
    checks += 2;
    if (sats == 0) failures++;
    if (wraps == 0) failures++;
    $display("saturated outputs: %0d  phase wraps: %0d  step settings: %0d", sats, wraps, steps_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
