// trig_rom: one eighth-of-a-turn sine or cosine table (SROM or CROM).
//
// The table holds 2^ADDR_W samples of sin or cos over [0, 45) degrees in
// Q6.10. Entry k holds f((k + 0.5) * (pi/4) / 2^ADDR_W), i.e. the sample sits
// half a step into its phase bin. With that offset, reading address
// (2^ADDR_W - 1 - k) gives exactly f(45 deg - angle(k)), which is what the
// sine/cosine generator needs to mirror the table into the odd segments.
// Values are truncated to FRAC_W fractional bits, the data path's rounding.
// The read is synchronous (one cycle), as in a block RAM.
//
// The contents are a constant computed at elaboration with integer
// arithmetic only: a Taylor series of sin or cos evaluated in 60-bit fixed
// point (angle theta = (2k + 1) * pi / 2^(ADDR_W + 3)), then truncated to
// FRAC_W bits. Sixteen terms leave an error far below 2^-40, so every entry
// equals trunc(f(theta) * 2^FRAC_W).
//
// Reading the table this way is the document's scheme; the half-step offset
// and the way the contents are generated are this design's choices.
module trig_rom #(
  parameter bit IS_SINE = 1'b1,           // 1: SROM (sine), 0: CROM (cosine)
  parameter int ADDR_W  = fx_pkg::ADDR_W,
  parameter int DATA_W  = fx_pkg::DATA_W,
  parameter int FRAC_W  = fx_pkg::FRAC_W
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data    // registered table value, unsigned in [0, 1]
);

  localparam int DEPTH = 1 << ADDR_W;
  localparam int FX    = 60;                              // working fraction bits
  localparam logic [127:0] PI_FX = 128'd3622009729038561421; // round(pi * 2^60)

  typedef logic [DATA_W-1:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t       t;
    logic [127:0] th, th2, term, acc, div;
    for (int k = 0; k < DEPTH; k++) begin
      th   = (128'(2 * k + 1) * PI_FX) >> (ADDR_W + 3);
      th2  = (th * th) >> FX;
      term = IS_SINE ? th : (128'd1 << FX);
      acc  = term;
      for (int n = 1; n <= 16; n++) begin
        // next Taylor term: multiply by theta^2 / ((2n-1+s)(2n+s)), s = IS_SINE
        div  = {96'd0, 32'((2 * n - 1 + int'(IS_SINE)) * (2 * n + int'(IS_SINE)))};
        term = ((term * th2) >> FX) / div;
        acc  = n[0] ? acc - term : acc + term;
      end
      t[k] = DATA_W'(acc >> (FX - FRAC_W));
    end
    return t;
  endfunction

  localparam table_t ROM = build_table();

  always_ff @(posedge clk) data <= ROM[addr];

endmodule
