// freq_translator: shifts a complex baseband signal up in frequency by
// multiplying it with the output of a numerically controlled oscillator.
//
//   iq_out(t + 6) = iq_in(t) * (cos + j sin)((phase(t) + 0.5) * 2*pi / 2^13)
//   phase(t)      = phase(t-1) + step(t)   (13 bits, wraps around)
//
// The oscillator is the phase accumulator (1 cycle) followed by the sine and
// cosine generator (2 cycles); the input sample waits in a three-stage delay
// line so it meets the oscillator sample of its own cycle at the complex
// multiplier (3 cycles). Total latency is 6 cycles at one sample per cycle.
// The accumulator advances every cycle whether or not the input is valid, so
// the oscillator frequency is f_clk * step / 2^13; valid_in only travels
// alongside the data and comes out as valid_out (Valid_FREQ).
//
// Structure, formats and the 6-cycle latency follow the document; the
// delay-line placement and reset values are this design's choices.
module freq_translator
  import fx_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t step,
  input  logic   valid_in,
  input  iq_t    iq_in,
  output logic   valid_out,
  output iq_t    iq_out
);

  localparam int OSC_LAT = 3;  // accumulator (1) + sine/cosine generator (2)

  phase_t  phase;
  sample_t cos_s, sin_s;

  phase_accumulator u_acc (.clk, .rst_n, .step, .phase);

  sincos_generator u_sincos (
    .clk, .rst_n, .phase, .cos_out(cos_s), .sin_out(sin_s)
  );

  iq_t  iq_dly [OSC_LAT];
  logic v_dly  [OSC_LAT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < OSC_LAT; n++) begin
        iq_dly[n] <= '0;
        v_dly[n]  <= 1'b0;
      end
    end else begin
      iq_dly[0] <= iq_in;
      v_dly[0]  <= valid_in;
      for (int n = 1; n < OSC_LAT; n++) begin
        iq_dly[n] <= iq_dly[n-1];
        v_dly[n]  <= v_dly[n-1];
      end
    end
  end

  iq_t osc;
  assign osc = '{i: cos_s, q: sin_s};

  complex_multiplier u_cmul (
    .clk, .rst_n,
    .valid_in (v_dly[OSC_LAT-1]),
    .a        (iq_dly[OSC_LAT-1]),
    .b        (osc),
    .valid_out,
    .p        (iq_out)
  );

endmodule
