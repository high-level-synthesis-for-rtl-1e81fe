// complex_multiplier: p = a * b for Q6.10 complex samples with three real
// multiplications instead of four.
//
//   p.i = a.i*(b.i + b.q) - b.q*(a.i + a.q)
//   p.q = a.i*(b.i + b.q) + b.i*(a.q - a.i)
//
// (here .i is the real and .q the imaginary part). The common product
// a.i*(b.i + b.q) is shared by both outputs. The pipeline mirrors three
// DSP slices: stage 1 registers the pre-adder sums, stage 2 registers the
// three products, stage 3 forms the two post-adder results, drops the ten
// extra fractional bits (truncation) and saturates to 16 bits. Latency is
// three cycles, throughput one sample per cycle; valid_in is only carried
// along to valid_out and never stalls or gates the data path.
//
// The three-multiplication equations and the three-cycle latency follow the
// document; reset values and the valid side-band are this design's choices.
module complex_multiplier
  import fx_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic valid_in,
  input  iq_t  a,
  input  iq_t  b,
  output logic valid_out,
  output iq_t  p
);

  localparam int SUM_W  = DATA_W + 1;             // pre-adder result
  localparam int PROD_W = DATA_W + SUM_W;         // full product
  localparam int POST_W = PROD_W + 1;             // post-adder result

  // stage 1: pre-adders
  logic signed [DATA_W-1:0] ar_1, br_1, bi_1;
  logic signed [SUM_W-1:0]  bsum_1, asum_1, adiff_1;
  // stage 2: products
  logic signed [PROD_W-1:0] m_common_2, m_i_2, m_q_2;
  logic [2:0] valid_sr;
  // stage 3 inputs: post-adders
  logic signed [POST_W-1:0] post_i, post_q;
  assign post_i = POST_W'(m_common_2) - POST_W'(m_i_2);
  assign post_q = POST_W'(m_common_2) + POST_W'(m_q_2);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ar_1 <= '0; br_1 <= '0; bi_1 <= '0;
      bsum_1 <= '0; asum_1 <= '0; adiff_1 <= '0;
      m_common_2 <= '0; m_i_2 <= '0; m_q_2 <= '0;
      p <= '0;
      valid_sr <= '0;
    end else begin
      ar_1    <= a.i;
      br_1    <= b.i;
      bi_1    <= b.q;
      bsum_1  <= SUM_W'(b.i) + SUM_W'(b.q);
      asum_1  <= SUM_W'(a.i) + SUM_W'(a.q);
      adiff_1 <= SUM_W'(a.q) - SUM_W'(a.i);

      m_common_2 <= PROD_W'(ar_1) * PROD_W'(bsum_1);
      m_i_2      <= PROD_W'(bi_1) * PROD_W'(asum_1);
      m_q_2      <= PROD_W'(br_1) * PROD_W'(adiff_1);

      p.i <= saturate(48'(post_i >>> FRAC_W));
      p.q <= saturate(48'(post_q >>> FRAC_W));

      valid_sr <= {valid_sr[1:0], valid_in};
    end
  end

  assign valid_out = valid_sr[2];

endmodule
