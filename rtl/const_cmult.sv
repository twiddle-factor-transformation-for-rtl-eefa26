// const_cmult: constant complex multiplier, data times either 1 or the fixed
// twiddle factor W_N^EXP.
//
// Used at a pipeline position where, apart from multiples of -j, only one
// exponent bit is left after twiddle factor migration: the twiddle is then 1
// (sel=0) or the constant W_N^EXP (sel=1), so no table and no general
// multiplier are needed. The constant is rounded to a TW-bit fraction with
// 2^(TW-2) standing for 1.0 and the product is rounded back to W bits
// (round half up); with sel=0 the data passes unchanged. Multiplying by an
// elaboration-time constant lets synthesis reduce each product to shifts and
// adds. Registered: result one clock after `en`. That such positions use a
// constant multiplier follows the document; the rounding is this design's.
module const_cmult
  import tft_pkg::*;
#(
  parameter int unsigned W     = 28,
  parameter int unsigned TW    = 16,
  parameter int unsigned LOG2N = 11,
  parameter int unsigned EXP   = 1
) (
  input  logic                clk,
  input  logic                en,
  input  logic                sel,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  localparam int unsigned PW = W + TW + 1;
  localparam int unsigned SH = TW - 2;
  localparam logic signed [PW-1:0] C_RE = PW'(tw_cos(int'(LOG2N), int'(EXP), int'(TW)));
  localparam logic signed [PW-1:0] C_IM = PW'(tw_msin(int'(LOG2N), int'(EXP), int'(TW)));

  logic signed [PW-1:0] s_re, s_im;

  always_comb begin
    s_re = PW'(in_re) * C_RE - PW'(in_im) * C_IM + (PW'(1) <<< (SH - 1));
    s_im = PW'(in_re) * C_IM + PW'(in_im) * C_RE + (PW'(1) <<< (SH - 1));
  end

  always_ff @(posedge clk)
    if (en) begin
      out_re <= sel ? W'(s_re >>> SH) : in_re;
      out_im <= sel ? W'(s_im >>> SH) : in_im;
    end
endmodule
