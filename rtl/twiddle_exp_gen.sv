// twiddle_exp_gen: twiddle exponent of one twiddle position after common
// twiddle factor migration.
//
// For the sample at flow-graph position `idx` (LOG2N bits) that crosses
// twiddle position POS (between butterfly stages POS and POS+1), the
// exponent is the sum, modulo N = 2^LOG2N, of every min-common factor b_ij of
// the radix-2 DIF graph that the moving matrix MOVE places at POS
// (i + m_ij = POS). Factor b_ij contributes (idx[LOG2N-i] & idx[j-i+1]) << j.
// With an all-zero MOVE this is the plain radix-2 DIF twiddle.
//
// Outputs: `exponent` is the full normalised exponent; `quad` its two top
// bits (the multiple of W_N^(N/4) = -j); `addr` gathers, in order, the
// exponent bits that the matrix makes live below the quadrant bits, and is
// the address of this position's compact twiddle table. The table only
// covers exponents with no other bits set; an immediate assertion checks this
// for every index seen. Purely combinational. The exponent rule is the one of
// the migration scheme; the gathered-address table organisation is this
// design's choice.
module twiddle_exp_gen
  import tft_pkg::*;
#(
  parameter int unsigned LOG2N = 11,
  parameter int unsigned POS   = 2,
  parameter move_mat_t   MOVE  = move_even_r22_2048(),
  // derived, not meant to be overridden
  parameter bit_mask_t   LIVE  = live_mask(LOG2N, MOVE, POS),
  parameter int unsigned AW    = (popcount(LIVE) > 0) ? popcount(LIVE) : 1
) (
  input  logic [LOG2N-1:0] idx,
  output logic [LOG2N-1:0] exponent,
  output logic [1:0]       quad,
  output logic [AW-1:0]    addr
);
  always_comb begin
    exponent = '0;
    for (int i = 1; i < LOG2N; i++)
      for (int j = i - 1; j <= LOG2N - 2; j++)
        if (target(MOVE, i, j) == POS && (idx[LOG2N-i] & idx[j-i+1]))
          exponent = exponent + (LOG2N'(1) << j);
  end

  assign quad = exponent[LOG2N-1:LOG2N-2];

  always_comb begin
    int a;
    a    = 0;
    addr = '0;
    for (int b = 0; b < LOG2N - 2; b++)
      if (LIVE[b]) begin
        addr[a] = exponent[b];
        a++;
      end
  end

  always_comb
    assert ((exponent[LOG2N-3:0] & ~LIVE[LOG2N-3:0]) == '0)
      else $error("twiddle_exp_gen: exponent %0h outside table of position %0d", exponent, POS);
endmodule
