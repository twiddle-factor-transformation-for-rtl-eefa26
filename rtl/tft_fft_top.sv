// tft_fft_top: 2^LOG2N-point pipelined FFT, single-path delay feedback (SDF),
// whose twiddle multipliers are placed by common twiddle factor migration.
//
// The pipeline is the radix-2 decimation-in-frequency SDF chain: LOG2N
// butterfly stages (sdf_stage) with feedback delays N/2, N/4, ..., 1, and a
// twiddle position (twiddle_stage) between consecutive stages. Which twiddle
// factors each position multiplies by is not the radix-2 set but the one the
// moving matrix MOVE leaves there after migrating common factors across the
// butterflies. The default MOVE is the evenly-distributed radix-2^2 matrix
// for N = 2048: positions 1,3,5,7,9 are trivial (-j only) and positions
// 2,4,6,8,10 use tables of 4, 64, 32, 32 and 32 words, 164 in all. Other
// matrices from tft_pkg give the radix-2, radix-2^2, modified radix-2^2 or
// DIT variants of the same pipeline with no other change; an illegal matrix
// (a factor moved beyond its span) stops elaboration.
//
// Interface: one complex input sample per cycle with `in_valid` high, frames
// of N samples back to back in natural order; a low `in_valid` stalls the
// pipeline (the sample stream is what advances it). Outputs come in
// bit-reversed order, `out_bin` naming the frequency bin of each. A frame
// leaves the pipeline only while the following N-1 samples are being
// pushed in, so the last frame is flushed with a further frame (for
// instance zeros). Arithmetic: inputs are DW-bit signed, the datapath is
// DW+LOG2N+1 bits so no butterfly can overflow, twiddles are TW-bit with
// 2^(TW-2) = 1.0, each multiplier rounds back to the datapath width. The
// output is the unscaled DFT sum. The SDF structure, the migration and the
// table sizes follow the document; widths, rounding, valid handling and the
// output order are this design's choices.
module tft_fft_top
  import tft_pkg::*;
#(
  parameter int unsigned LOG2N = 11,
  parameter int unsigned DW    = 16,
  parameter int unsigned TW    = 16,
  parameter move_mat_t   MOVE  = move_even_r22_2048(),
  // derived, not meant to be overridden
  parameter int unsigned OW    = DW + LOG2N + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_re,
  output logic signed [OW-1:0] out_im,
  output logic [LOG2N-1:0]     out_bin
);
  if (!move_ok(LOG2N, MOVE)) begin : g_bad_move
    $error("tft_fft_top: moving matrix is not legal for LOG2N=%0d", LOG2N);
  end

  // s_*[k]: stream entering butterfly stage k+1 (k = 0 is the input).
  logic                s_valid [LOG2N];
  logic signed [OW-1:0] s_re   [LOG2N];
  logic signed [OW-1:0] s_im   [LOG2N];

  assign s_valid[0] = in_valid;
  assign s_re[0]    = OW'(in_re);
  assign s_im[0]    = OW'(in_im);

  logic [LOG2N-1:0] last_idx;

  for (genvar k = 1; k <= LOG2N; k++) begin : g_stage
    logic                 b_valid;
    logic signed [OW-1:0] b_re, b_im;
    logic [LOG2N-1:0]     b_idx;

    sdf_stage #(.LOG2N(LOG2N), .STAGE(k), .W(OW)) u_bf (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (s_valid[k-1]),
      .in_re    (s_re[k-1]),
      .in_im    (s_im[k-1]),
      .out_valid(b_valid),
      .out_re   (b_re),
      .out_im   (b_im),
      .out_idx  (b_idx)
    );

    if (k < LOG2N) begin : g_tw
      twiddle_stage #(.LOG2N(LOG2N), .POS(k), .W(OW), .TW(TW), .MOVE(MOVE)) u_tw (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (b_valid),
        .in_re    (b_re),
        .in_im    (b_im),
        .in_idx   (b_idx),
        .out_valid(s_valid[k]),
        .out_re   (s_re[k]),
        .out_im   (s_im[k])
      );
    end else begin : g_out
      assign out_valid = b_valid;
      assign out_re    = b_re;
      assign out_im    = b_im;
      assign last_idx  = b_idx;
    end
  end

  // Flow-graph position p of the last column holds bin bitreverse(p).
  always_comb
    for (int b = 0; b < LOG2N; b++) out_bin[b] = last_idx[LOG2N-1-b];
endmodule
