// study_top: the two independent circuits of this design side by side.
//
//  * the frequency translator chain (large_system): N_DEVICES frequency
//    translators, each followed by a power meter, connected in series;
//  * the sum-of-products example (sum_of_products): y = a0*b0 + a1*b1 with
//    registered products;
//  * the call-counter example (static_counters): two sub-function registers
//    that each count the calls of the top function.
//
// The three share only the clock and reset; every port of each is brought out
// unchanged, so the timing of each is that of its own module (see there).
module study_top
  import fx_pkg::*;
#(
  parameter int N_DEVICES = 100
) (
  input  logic    clk,
  input  logic    rst_n,
  // frequency translator chain
  input  phase_t  step      [N_DEVICES],
  input  logic    valid_in,
  input  iq_t     iq_in,
  output logic    valid_out,
  output iq_t     iq_out,
  output logic    valid_pwr [N_DEVICES],
  output sample_t pwr_out   [N_DEVICES],
  // sum-of-products example
  input  logic signed [15:0] sop_a0,
  input  logic signed [15:0] sop_b0,
  input  logic signed [15:0] sop_a1,
  input  logic signed [15:0] sop_b1,
  output logic signed [15:0] sop_y,
  // call-counter example
  input  logic        cnt_call,
  output logic [31:0] cnt_var1,
  output logic [31:0] cnt_var2
);

  large_system #(.N_DEVICES(N_DEVICES)) u_chain (
    .clk, .rst_n, .step, .valid_in, .iq_in, .valid_out, .iq_out,
    .valid_pwr, .pwr_out
  );

  sum_of_products #(.W(16)) u_sop (
    .clk, .rst_n,
    .a0 (sop_a0), .b0 (sop_b0), .a1 (sop_a1), .b1 (sop_b1),
    .y  (sop_y)
  );

  static_counters #(.W(32), .SHARED(1'b0)) u_cnt (
    .clk, .rst_n, .call (cnt_call), .var1 (cnt_var1), .var2 (cnt_var2)
  );

endmodule
