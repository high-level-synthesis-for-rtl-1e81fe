// large_system: N_DEVICES comp_blocks (frequency translator + power meter)
// connected in series.
//
// The complex output of each block feeds the next block's input, so the
// signal is shifted N_DEVICES times, each time by the frequency of that
// block's own step input. Every block's power reading comes out on its own
// port, so the signal power can be read after every stage. The first input
// and the last output are the system's complex ports.
//
// Timing: one sample per cycle; iq_out lags iq_in by 6 * N_DEVICES cycles
// and pwr_out[n] lags iq_in by 6 * (n + 1) + 1 cycles.
//
// The chain and its ports, and the default of 100 blocks, follow the
// document. The controller that sets the steps and reads the powers is not
// part of this module; a testbench plays that role.
module large_system
  import fx_pkg::*;
#(
  parameter int N_DEVICES = 100
) (
  input  logic    clk,
  input  logic    rst_n,
  input  phase_t  step      [N_DEVICES],
  input  logic    valid_in,
  input  iq_t     iq_in,
  output logic    valid_out,
  output iq_t     iq_out,
  output logic    valid_pwr [N_DEVICES],
  output sample_t pwr_out   [N_DEVICES]
);

  // link[n] is the input of block n; link[N_DEVICES] is the system output
  iq_t  link   [N_DEVICES+1];
  logic link_v [N_DEVICES+1];

  assign link[0]   = iq_in;
  assign link_v[0] = valid_in;

  for (genvar n = 0; n < N_DEVICES; n++) begin : g_dev
    comp_block u_blk (
      .clk, .rst_n,
      .step       (step[n]),
      .valid_in   (link_v[n]),
      .iq_in      (link[n]),
      .valid_freq (link_v[n+1]),
      .iq_out     (link[n+1]),
      .valid_pwr  (valid_pwr[n]),
      .pwr_out    (pwr_out[n])
    );
  end

  assign iq_out    = link[N_DEVICES];
  assign valid_out = link_v[N_DEVICES];

endmodule
