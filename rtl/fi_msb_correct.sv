// Coarse-bit error correction of a 6-bit folding/interpolation ADC.
//
// The folding circuits sample the input at nT and give the Gray bits gf5,
// gf4, qf (= gf3) and the sign bit if of the I signal; the interpolation
// circuit samples slightly later, at nT+dt, and gives qi, ii and the fine
// bits. This block estimates the two top Gray bits of the later sample.
// When the two samples disagree on the sign of I (if != ii) the 3-bit coarse
// Gray code has moved by one step between the samples; a one-step move of a
// Gray code changes one bit, which is bit 4 when qf = 1 and bit 5 when
// qf = 0. Bit 3 is simply taken from qi by the fine encoder. The correction
// is right as long as the input moves by less than 2**M LSBs between nT and
// nT+dt.
//
//   g5 = (~qf & (if ^ ii) & out_rng) ^ gf5
//   g4 = ( qf & (if ^ ii) & out_rng) ^ gf4
//
// When out_rng is 0 (overflow or underflow) nothing is flipped: the folding
// circuits then already give (1,0) or (0,0) for the top two bits.
//
// Interface: single-bit inputs from the comparator latches, single-bit
// outputs. Timing: purely combinational, no clock.
// The equations are those of the published scheme; nothing here is a local
// choice.
module fi_msb_correct (
  input  logic gf5,
  input  logic gf4,
  input  logic qf,
  input  logic if_,
  input  logic ii,
  input  logic out_rng,
  output logic g5,
  output logic g4
);

  logic step;  // the coarse code moved by one Gray step between samples

  always_comb begin
    step = (if_ ^ ii) & out_rng;
    g5   = (~qf & step) ^ gf5;
    g4   = ( qf & step) ^ gf4;
  end

endmodule
