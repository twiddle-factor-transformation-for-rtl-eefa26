// twiddle_rom: compact twiddle factor table of one twiddle position.
//
// The table exploits the pi/2 symmetry of the twiddle factors: it holds only
// exponents below N/4, and of those only the ones built from the live
// exponent bits LIVE (the bits the moving matrix leaves at this position).
// Entry a holds W_N^e with e = the low bits of a deposited in order into the
// set bits of LIVE, so the table has 2^popcount(LIVE) entries. The quadrant
// (the multiple of -j) is applied outside the table.
//
// Values are cos(2 pi e/N) and -sin(2 pi e/N) rounded to TW-bit signed words
// with 2^(TW-2) standing for 1.0; they are computed at elaboration time.
// Timing: the address is registered, the word appears one clock after `en`.
// Storing a power-of-two table per pipeline position is the scheme of the
// document; the scaling and the registered read are this design's choices.
module twiddle_rom
  import tft_pkg::*;
#(
  parameter int unsigned LOG2N = 11,
  parameter int unsigned TW    = 16,
  parameter bit_mask_t   LIVE  = 16'h01F0,
  // derived, not meant to be overridden
  parameter int unsigned AW    = (popcount(LIVE) > 0) ? popcount(LIVE) : 1
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic [AW-1:0]        addr,
  output logic signed [TW-1:0] tw_re,
  output logic signed [TW-1:0] tw_im
);
  localparam int unsigned DEPTH = 1 << AW;

  logic signed [TW-1:0] rom_re [DEPTH];
  logic signed [TW-1:0] rom_im [DEPTH];

  for (genvar a = 0; a < DEPTH; a++) begin : g_entry
    localparam int E = scatter(a, LIVE);
    assign rom_re[a] = TW'(tw_cos(int'(LOG2N), E, int'(TW)));
    assign rom_im[a] = TW'(tw_msin(int'(LOG2N), E, int'(TW)));
  end

  always_ff @(posedge clk)
    if (en) begin
      tw_re <= rom_re[addr];
      tw_im <= rom_im[addr];
    end
endmodule
