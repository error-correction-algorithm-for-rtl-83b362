// Digital back end of a 6-bit folding/interpolation ADC.
//
// Every comparator of the converter is followed by a D flip-flop clocked by
// ck. This module holds those flip-flops and the logic after them:
//   * the folding comparators give gf5, gf4, qf (= gf3), if and out_rng,
//     decided on the input at nT;
//   * the 2**(M+1) interpolation comparators give a circular thermometer
//     code decided on the input at nT+dt, dt being the analog delay from the
//     folding to the interpolation circuit;
//   * fi_interp_encoder turns the thermometer code into g3..g0 and ii;
//   * fi_msb_correct turns gf5, gf4, qf, if, ii into the corrected g5, g4.
// The output g is the Gray code of the input at nT+dt: exact as long as the
// input moves by less than 2**M LSBs in dt, forced to Gray 100..0 on
// overflow and 0 on underflow (out_rng = 0).
//
// Interface: cmp_* are the raw comparator decisions, sampled on the rising
// edge of ck; g = {g5, g4, g3, g2, g1, g0}. Timing: one conversion per clock;
// g is valid one clock after the comparators are sampled (it follows the
// flip-flops combinationally). rst_n, asynchronous and active low, clears the
// flip-flops, which makes g read 0.
// The latches, the coarse correction equations and the gating by out_rng
// follow the published error-correction scheme; the reset, the fine
// encoder's gates and the one-comparator-per-LSB layout of cmp_zc are this
// design's own.
module fi_adc_digital #(
  parameter int unsigned M = fi_adc_pkg::M_BITS
) (
  input  logic                ck,
  input  logic                rst_n,
  input  logic                cmp_g5,
  input  logic                cmp_g4,
  input  logic                cmp_q,
  input  logic                cmp_i,
  input  logic                cmp_out_rng,
  input  logic [2**(M+1)-1:0] cmp_zc,
  output logic [fi_adc_pkg::K_BITS+M-1:0] g
);

  // comparator latches (one D flip-flop per comparator)
  logic                gf5, gf4, qf, if_, out_rng;
  logic [2**(M+1)-1:0] zc;

  always_ff @(posedge ck or negedge rst_n) begin
    if (!rst_n) begin
      gf5     <= 1'b0;
      gf4     <= 1'b0;
      qf      <= 1'b0;
      if_     <= 1'b0;
      out_rng <= 1'b0;
      zc      <= '0;
    end else begin
      gf5     <= cmp_g5;
      gf4     <= cmp_g4;
      qf      <= cmp_q;
      if_     <= cmp_i;
      out_rng <= cmp_out_rng;
      zc      <= cmp_zc;
    end
  end

  logic [M:0] g_lo;
  logic       ii;
  logic       g5, g4;

  fi_interp_encoder #(.M(M)) u_fine (
    .zc      (zc),
    .out_rng (out_rng),
    .g_lo    (g_lo),
    .ii      (ii)
  );

  fi_msb_correct u_coarse (
    .gf5     (gf5),
    .gf4     (gf4),
    .qf      (qf),
    .if_     (if_),
    .ii      (ii),
    .out_rng (out_rng),
    .g5      (g5),
    .g4      (g4)
  );

  assign g = {g5, g4, g_lo};

endmodule
