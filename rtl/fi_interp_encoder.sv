// Fine encoder of a folding/interpolation ADC ("interpolation encoder and
// error correction").
//
// The interpolation circuit turns the two folding signals Q and I, whose
// period spans 4 * 2**M LSBs of input, into NZ = 2**(M+1) phase-shifted
// sinusoids, one per LSB over half a period. A latched comparator senses the
// sign of each one, so within one period the NZ comparator bits form a
// circular thermometer (Johnson) code of 2*NZ states: zc[k] = 1 exactly when
// the position s in the period lies in s-1-k = 0 .. NZ-1 (mod 2*NZ).
// The encoder extends the ring with the complements t = {~zc, zc}, finds the
// one place j where t[j-1] = 1 and t[j] = 0 (the zero crossing), takes
// s = j and outputs the low M bits of the Gray code of s (these depend only
// on s modulo NZ, so the top bit of j is dropped). Bit M of the output
// is the sign of Q at the late sample, qi = zc[2**M - 1], and the sign of I
// at the late sample is ii = ~zc[NZ-1]; ii goes to the coarse correction.
// All of g3..g0 are forced to 0 when out_rng is 0, so that an overflow reads
// as Gray 100000 and an underflow as 000000.
//
// Interface: zc from the comparator latches, out_rng from the out-of-range
// comparator latch; outputs g_lo = {g3, g2, g1, g0} for M = 3 and ii. Timing: purely combinational.
// The published scheme gives this block's function (find the zero crossing,
// output Gray code, gate with out-rng) but not its gates. The one-comparator-
// per-LSB layout of zc and the choice of the lowest crossing when comparator
// bubbles give several are this design's own.
module fi_interp_encoder #(
  parameter int unsigned M = fi_adc_pkg::M_BITS
) (
  input  logic [2**(M+1)-1:0] zc,
  input  logic                out_rng,
  output logic [M:0]          g_lo,
  output logic                ii
);

  localparam int unsigned NZ = 2**(M+1);

  logic [2*NZ-1:0] ring;     // comparator bits and their complements
  logic [2*NZ-1:0] edge_at;  // one-hot zero-crossing position
  logic [M:0]      pos;      // crossing position s, modulo half a period
  logic [M-1:0]    fine;     // low M bits of the Gray code of s
  logic            qi;       // sign of Q at the late sample

  always_comb begin
    ring = {~zc, zc};
    for (int j = 0; j < 2*NZ; j++)
      edge_at[j] = ring[(j + 2*NZ - 1) % (2*NZ)] & ~ring[j];
    // lowest crossing wins if bubbles produce more than one
    pos = '0;
    for (int j = 2*NZ - 1; j >= 0; j--)
      if (edge_at[j]) pos = (M+1)'(j);
    fine = pos[M-1:0] ^ pos[M:1];
    qi   = zc[2**M - 1];
    ii   = ~zc[NZ-1];
    g_lo = {qi, fine} & {(M+1){out_rng}};
  end

endmodule
