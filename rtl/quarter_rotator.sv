// quarter_rotator: multiplication by (-j)^quad, the "trivial" twiddle factors
// W_N^(q N/4).
//
// Multiplying by -j swaps the real and imaginary parts and negates the new
// imaginary part, so all four quadrants need only swaps and negations:
//   q=0: ( re,  im)   q=1: ( im, -re)   q=2: (-re, -im)   q=3: (-im,  re)
// Combinational. The caller keeps one guard bit so that negating the most
// negative value cannot occur. Replacing W_N^(N/4) by -j is what makes the
// odd positions of the radix-2^2 family multiplier-free; the implementation
// is this design's.
module quarter_rotator #(
  parameter int unsigned W = 28
) (
  input  logic [1:0]          quad,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  always_comb
    unique case (quad)
      2'd0: begin out_re =  in_re; out_im =  in_im; end
      2'd1: begin out_re =  in_im; out_im = -in_re; end
      2'd2: begin out_re = -in_re; out_im = -in_im; end
      2'd3: begin out_re = -in_im; out_im =  in_re; end
    endcase
endmodule
