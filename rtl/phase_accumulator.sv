// phase_accumulator: the phase register of the numerically controlled
// oscillator.
//
// Every clock cycle the 13-bit phase advances by the step input N and wraps
// around modulo 2^13, so the oscillator runs at f = f_clk * N / 2^13
// (about 48.8 kHz per unit of N at 400 MHz). The phase register is the only
// state; its value after the edge that sampled step(t) is
// phase(t) = phase(t-1) + step(t). Latency is one cycle.
//
// The document gives the circuit (an adder fed back through a register) and
// the 13-bit wrap-around format. The synchronous active-low reset to phase 0
// is this design's choice.
module phase_accumulator
#(
  parameter int PHASE_W = fx_pkg::PHASE_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] step,   // phase increment N per cycle
  output logic [PHASE_W-1:0] phase   // registered phase
);

  always_ff @(posedge clk) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + step;  // wraps around by width
  end

endmodule
