// tb_complex_multiplier: random, unit-circle and full-scale operands, one
// pair per cycle, with valid toggling. Checks the product (truncated and
// saturated to Q6.10) and valid_out exactly three cycles later against the
// four-multiplication formula, and counts saturated results.
module tb_complex_multiplier;
  import tb_ref_pkg::*;
  import fx_pkg::iq_t;
  logic clk = 1'b0;
  logic rst_n, valid_in, valid_out;
  iq_t  a, b, p;
  int checks = 0, failures = 0, sats = 0;
  cplx_t exp_q [$];
  bit    expv_q [$];
  bit    sat_q [$];

  complex_multiplier dut (.clk, .rst_n, .valid_in, .a, .b, .valid_out, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t ca, cb, e;
    bit ev, es;
    rst_n = 1'b0; valid_in = 1'b0; a = '0; b = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000 + 3; n++) begin
      case (n % 4)
        0: begin ca.i = rnd(32768); ca.q = rnd(32768); cb.i = rnd(32768); cb.q = rnd(32768); end
        1: begin ca.i = rnd(8000);  ca.q = rnd(8000);  cb = ref_osc(int'($urandom_range(8191))); end
        2: begin ca.i = (n % 8 == 2) ? -32768 : 32767; ca.q = ca.i; cb.i = 724; cb.q = 724; end
        default: begin ca.i = rnd(32768); ca.q = rnd(32768); cb = ref_osc(int'($urandom_range(8191))); end
      endcase
      if (ca.i > 32767) ca.i = 32767;
      if (ca.q > 32767) ca.q = 32767;
      if (cb.i > 32767) cb.i = 32767;
      if (cb.q > 32767) cb.q = 32767;
      a.i = 16'(ca.i); a.q = 16'(ca.q); b.i = 16'(cb.i); b.q = 16'(cb.q);
      valid_in = ($urandom_range(3) != 0);
      exp_q.push_back(ref_cmul(ca, cb));
      expv_q.push_back(valid_in);
      sat_q.push_back(cmul_saturates(ca, cb));
      @(posedge clk);
      @(negedge clk);
      if (n >= 2) begin
        e  = exp_q.pop_front();
        ev = expv_q.pop_front();
        es = sat_q.pop_front();
        checks += 2;
        if (valid_out !== ev) failures++;
        if (int'(p.i) != e.i || int'(p.q) != e.q) begin
          failures++;
          if (failures < 10) $display("n=%0d p=(%0d,%0d) expected (%0d,%0d)", n, p.i, p.q, e.i, e.q);
        end
        if (es) sats++;
      end
    end
    checks++;
    if (sats == 0) failures++;
    $display("saturated products: %0d", sats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
