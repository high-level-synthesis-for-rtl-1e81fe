// comp_block: one frequency translator followed by one power meter.
//
// The translator shifts iq_in by the oscillator frequency set with step and
// presents the result on iq_out with valid_freq (6 cycles after the input).
// The power meter watches that output and reports the eight-sample rolling
// average power on pwr_out with valid_pwr one cycle later (7 cycles after the
// input). This is the unit that is chained to build the large system.
//
// The pairing and the port set follow the document.
module comp_block
  import fx_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  phase_t  step,
  input  logic    valid_in,
  input  iq_t     iq_in,
  output logic    valid_freq,
  output iq_t     iq_out,
  output logic    valid_pwr,
  output sample_t pwr_out
);

  freq_translator u_ft (
    .clk, .rst_n, .step,
    .valid_in, .iq_in,
    .valid_out (valid_freq),
    .iq_out
  );

  power_meter u_pm (
    .clk, .rst_n,
    .valid_in  (valid_freq),
    .iq_in     (iq_out),
    .valid_out (valid_pwr),
    .pwr_out
  );

endmodule
