// cmult: general complex multiplier, data times a twiddle factor.
//
// Computes (a_re + j a_im)(b_re + j b_im) with four real products, then
// rounds the result back to the data width W: the twiddle word b is a TW-bit
// signed fraction with 2^(TW-2) standing for 1.0, so the sum of products is
// shifted right by TW-2 after adding half an LSB (round half up).
// Registered: the result appears one clock after `en`. This is the
// "general complex multiplier" of a pipeline position that needs a twiddle
// table; the four-multiplier form and the rounding are this design's choices.
module cmult #(
  parameter int unsigned W  = 28,
  parameter int unsigned TW = 16
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic signed [W-1:0]  a_re,
  input  logic signed [W-1:0]  a_im,
  input  logic signed [TW-1:0] b_re,
  input  logic signed [TW-1:0] b_im,
  output logic signed [W-1:0]  p_re,
  output logic signed [W-1:0]  p_im
);
  localparam int unsigned PW = W + TW + 1;
  localparam int unsigned SH = TW - 2;

  logic signed [PW-1:0] s_re, s_im;

  always_comb begin
    s_re = PW'(a_re) * PW'(b_re) - PW'(a_im) * PW'(b_im) + (PW'(1) <<< (SH - 1));
    s_im = PW'(a_re) * PW'(b_im) + PW'(a_im) * PW'(b_re) + (PW'(1) <<< (SH - 1));
  end

  always_ff @(posedge clk)
    if (en) begin
      p_re <= W'(s_re >>> SH);
      p_im <= W'(s_im >>> SH);
    end
endmodule
