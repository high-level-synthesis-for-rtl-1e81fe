// sincos_generator: turns a 13-bit phase into cos and sin samples (Q6.10).
//
// The three phase MSBs name one of eight 45-degree segments; the ten LSBs
// k address two tables that only cover the first segment, SROM (sine) and
// CROM (cosine). In odd segments the angle inside the segment runs
// backwards, so the tables are read at the mirrored address k0 - k with
// k0 = 2^10 - 1 (the bitwise inverse of k). The segment then decides which
// table feeds which output and which output is negated:
//
//   segment | address | cos   | sin
//   --------+---------+-------+------
//      0    |  k      |  CROM |  SROM
//      1    |  k0-k   |  SROM |  CROM
//      2    |  k      | -SROM |  CROM
//      3    |  k0-k   | -CROM |  SROM
//      4    |  k      | -CROM | -SROM
//      5    |  k0-k   | -SROM | -CROM
//      6    |  k      |  SROM | -CROM
//      7    |  k0-k   |  CROM | -SROM
//
// Timing: two cycles. Cycle 1 is the synchronous table read, with the
// segment number registered alongside; cycle 2 is the registered swap and
// negate. The outputs therefore show cos/sin of (phase + 0.5) * 2*pi / 2^13
// two cycles after the phase is presented.
//
// The segment scheme, the table split and the two-cycle latency follow the
// document. Segment 4 uses -CROM for the cosine, which is what a full
// rotation requires (cos(180 + x) = -cos x).
module sincos_generator
  import fx_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  phase_t  phase,
  output sample_t cos_out,
  output sample_t sin_out
);

  logic [SEG_W-1:0]  seg;
  logic [ADDR_W-1:0] k, addr;
  logic [SEG_W-1:0]  seg_q;
  logic [DATA_W-1:0] srom_q, crom_q;

  assign {seg, k} = phase;
  // odd segments run through the table backwards
  assign addr = seg[0] ? ~k : k;

  trig_rom #(.IS_SINE(1'b1)) u_srom (.clk, .addr, .data(srom_q));
  trig_rom #(.IS_SINE(1'b0)) u_crom (.clk, .addr, .data(crom_q));

  always_ff @(posedge clk) begin
    if (!rst_n) seg_q <= '0;
    else        seg_q <= seg;
  end

  sample_t s, c, cos_d, sin_d;
  assign s = sample_t'(srom_q);
  assign c = sample_t'(crom_q);

  always_comb begin
    unique case (seg_q)
      3'd0: begin cos_d =  c; sin_d =  s; end
      3'd1: begin cos_d =  s; sin_d =  c; end
      3'd2: begin cos_d = -s; sin_d =  c; end
      3'd3: begin cos_d = -c; sin_d =  s; end
      3'd4: begin cos_d = -c; sin_d = -s; end
      3'd5: begin cos_d = -s; sin_d = -c; end
      3'd6: begin cos_d =  s; sin_d = -c; end
      3'd7: begin cos_d =  c; sin_d = -s; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cos_out <= '0;
      sin_out <= '0;
    end else begin
      cos_out <= cos_d;
      sin_out <= sin_d;
    end
  end

endmodule
