// power_meter: rolling average of the instantaneous power of a complex
// Q6.10 signal over the last eight samples.
//
//   p_inst(t) = sat((I^2 + Q^2) >> 10)          (Q6.10, saturates at 32767)
//   pwr_out   = (p_inst(t) + p_inst(t-1) + ... + p_inst(t-7)) >> 3
//
// Samples whose valid bit is low enter as zero, so the average never picks
// up undefined data. The two squares are registered (the one-cycle
// latency); their sum is truncated to Q6.10 and saturated. The seven older
// values, held in a seven-entry shift register, are summed by a balanced
// adder tree, and the new value, which settles last in the cycle, is added
// at the very end so that it passes through a single adder. The sums are
// three bits wider than a sample, so only the sum of squares can overflow;
// the final division by eight is a 3-bit right shift.
// The shift register moves every cycle. valid_out is valid_in delayed by one
// cycle and marks pwr_out (Valid_PWR); the outputs of the first seven valid
// cycles after reset still average in the zeros the register was reset to.
//
// The formula, the 8-entry window, the shift-register structure, zeroing of
// invalid inputs, saturation, the one-cycle latency and adding the late value
// last follow the document; the reset values are this design's choice.
module power_meter
  import fx_pkg::*;
#(
  parameter int WINDOW = 8   // entries averaged, a power of two
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    valid_in,
  input  iq_t     iq_in,
  output logic    valid_out,
  output sample_t pwr_out
);

  localparam int SQ_W   = 2 * DATA_W;           // one square
  localparam int SHIFT  = $clog2(WINDOW);
  localparam int TREE_W = DATA_W + SHIFT;

  // inputs forced to zero when not valid
  sample_t i_g, q_g;
  assign i_g = valid_in ? iq_in.i : '0;
  assign q_g = valid_in ? iq_in.q : '0;

  // squares are non-negative: keep them unsigned
  logic [SQ_W-1:0] ii_q, qq_q;
  logic            valid_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ii_q    <= '0;
      qq_q    <= '0;
      valid_q <= 1'b0;
    end else begin
      ii_q    <= SQ_W'(unsigned'(SQ_W'(i_g) * SQ_W'(i_g)));
      qq_q    <= SQ_W'(unsigned'(SQ_W'(q_g) * SQ_W'(q_g)));
      valid_q <= valid_in;
    end
  end

  // instantaneous power, truncated to Q6.10 and saturated
  logic [SQ_W:0]     sq_sum;
  logic [SQ_W-FRAC_W:0] sq_scaled;
  logic [DATA_W-1:0] p_inst;
  assign sq_sum    = {1'b0, ii_q} + {1'b0, qq_q};
  assign sq_scaled = (SQ_W-FRAC_W+1)'(sq_sum >> FRAC_W);
  assign p_inst    = (sq_scaled > (SQ_W-FRAC_W+1)'(SAMPLE_MAX)) ? DATA_W'(SAMPLE_MAX)
                                                               : sq_scaled[DATA_W-1:0];

  // history of the previous WINDOW-1 values
  logic [DATA_W-1:0] hist [WINDOW-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < WINDOW - 1; n++) hist[n] <= '0;
    end else begin
      hist[0] <= p_inst;
      for (int n = 1; n < WINDOW - 1; n++) hist[n] <= hist[n-1];
    end
  end

  // balanced adder tree over the history (leaf 0 is an empty slot), then
  // the current value, which arrives last, added after the tree
  logic [TREE_W-1:0] tree [2*WINDOW-1];
  logic [TREE_W-1:0] total;
  always_comb begin
    tree[0] = '0;
    for (int n = 1; n < WINDOW; n++) tree[n] = TREE_W'(hist[n-1]);
    for (int n = WINDOW; n < 2 * WINDOW - 1; n++)
      tree[n] = tree[2*(n-WINDOW)] + tree[2*(n-WINDOW)+1];
    total = tree[2*WINDOW-2] + TREE_W'(p_inst);
  end

  assign pwr_out   = sample_t'(total >> SHIFT);
  assign valid_out = valid_q;

  // the average of non-negative values can never look negative
  always_ff @(posedge clk) begin
    if (rst_n) assert (!pwr_out[DATA_W-1]) else $error("power_meter: negative average");
  end

endmodule
