// static_counters: two call counters, one per sub-function.
//
// A small stand-alone example circuit, unrelated to the frequency translator
// chain. A top function calls two sub-functions once per call; each
// sub-function keeps a register that starts at 0, adds one to it and returns
// the new value. With a separate register per sub-function (SHARED = 0, the
// intended circuit) both outputs equal the number of calls so far: after the
// first call var1 = var2 = 1. With SHARED = 1 the two sub-functions update
// one common register, the first and then the second, so a call adds two to
// it and the outputs are 2n-1 and 2n after n calls: var2 = 2 after the first.
//
// Interface: `call` high on a rising edge is one call of the top function.
// var1 and var2 are registers; they show the values of a call from the clock
// edge that took it, and hold them until the next call. Widths are W bits
// (the 32-bit integers of the example) and wrap around on overflow. A
// synchronous active-low reset returns the registers to their start value 0.
//
// The function, the start value 0 and both the separate and the shared form
// follow the document; the call strobe, the reset and the wrap-around are this
// design's own choices.
module static_counters #(
  parameter int W      = 32,
  parameter bit SHARED = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         call,
  output logic [W-1:0] var1,
  output logic [W-1:0] var2
);

  if (SHARED) begin : g_shared
    // one register for both; var2 is the register itself
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        var1 <= '0;
        var2 <= '0;
      end else if (call) begin
        var1 <= var2 + W'(1);
        var2 <= var2 + W'(2);
      end
    end
  end else begin : g_separate
    // reg_1 and reg_2 are the outputs themselves
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        var1 <= '0;
        var2 <= '0;
      end else if (call) begin
        var1 <= var1 + W'(1);
        var2 <= var2 + W'(1);
      end
    end
  end

endmodule
