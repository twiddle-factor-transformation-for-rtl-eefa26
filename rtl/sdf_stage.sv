// sdf_stage: one radix-2 decimation-in-frequency butterfly stage of a
// single-path delay feedback (SDF) pipeline, for stage STAGE of a 2^LOG2N
// point transform.
//
// The stage owns a feedback delay of D = 2^(LOG2N-STAGE) words. Input
// samples are counted modulo 2D. In the first half of each 2D block the
// input is parked in the delay while the delay's head (the difference a-b
// of the previous block) is sent out; in the second half the delay's head a
// and the input b form the butterfly, a+b is sent out and a-b goes back into
// the delay. The output stream is therefore the stage's flow-graph column in
// natural order, D samples behind the input, and `out_idx` gives the
// position p of each output sample in that column (bit LOG2N-STAGE of p set
// means a lower, "difference" output).
//
// Interface: one complex sample per `in_valid` cycle; gaps in `in_valid`
// simply stall the stage (nothing moves without a valid input). `out_valid`
// marks the registered output one clock after the accepting input; it stays
// low until the first butterfly sum, i.e. for the first D inputs after reset.
// Width W is kept constant: the caller provides the guard bits for the one
// bit of growth per stage. The stage structure follows the SDF pipeline of
// the twiddle migration scheme; the valid/stall handling, the index output
// and the constant width are this design's choices.
module sdf_stage #(
  parameter int unsigned LOG2N = 11,
  parameter int unsigned STAGE = 1,
  parameter int unsigned W     = 28
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic [LOG2N-1:0]    out_idx
);
  localparam int unsigned HB = LOG2N - STAGE;   // half-block bit of the count
  localparam int unsigned D  = 1 << HB;

  logic [LOG2N-1:0]    in_cnt;
  logic                seen;     // first butterfly sum has been produced
  logic                phase;    // 1: second half of the 2D block
  logic signed [W-1:0] a_re, a_im, fb_re, fb_im, y_re, y_im;

  assign phase = in_cnt[HB];

  sdf_delay #(.DEPTH(D), .W(2*W)) u_delay (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (in_valid),
    .din  ({fb_re, fb_im}),
    .dout ({a_re, a_im})
  );

  always_comb begin
    if (phase) begin
      y_re  = a_re + in_re;
      y_im  = a_im + in_im;
      fb_re = a_re - in_re;
      fb_im = a_im - in_im;
    end else begin
      y_re  = a_re;
      y_im  = a_im;
      fb_re = in_re;
      fb_im = in_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      in_cnt    <= '0;
      seen      <= 1'b0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid && (phase || seen);
      if (out_valid) out_idx <= out_idx + 1'b1;
      if (in_valid) begin
        in_cnt <= in_cnt + 1'b1;
        if (phase) seen <= 1'b1;
        out_re <= y_re;
        out_im <= y_im;
      end
    end
endmodule
