// twiddle_stage: twiddle multiplication at twiddle position POS of the
// pipeline, as left by common twiddle factor migration with moving matrix
// MOVE.
//
// The exponent of every sample is generated from its flow-graph position
// `in_idx` (twiddle_exp_gen). Its two top bits select a multiple of -j,
// applied first by swaps and negations (quarter_rotator); what remains
// depends on how many exponent bits the matrix leaves at this position:
//   none  -> trivial position: the rotation is all (radix-2^2 odd stages);
//   one   -> constant position: 1 or one fixed W_N^e (const_cmult);
//   more  -> general position: a compact table of 2^L words (twiddle_rom)
//            feeding a general complex multiplier (cmult).
// Which case a position falls into, and so the hardware it costs, is decided
// at elaboration from MOVE.
//
// Interface: streaming, one sample per `in_valid`, in flow-graph order with
// its position on `in_idx`; bubbles pass through. Latency: 1 clock for a
// trivial position, 2 clocks otherwise. The split into rotation, table and
// multiplier follows the scheme; the register placement is this design's.
module twiddle_stage
  import tft_pkg::*;
#(
  parameter int unsigned LOG2N = 11,
  parameter int unsigned POS   = 2,
  parameter int unsigned W     = 28,
  parameter int unsigned TW    = 16,
  parameter move_mat_t   MOVE  = move_even_r22_2048()
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  input  logic [LOG2N-1:0]    in_idx,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  localparam bit_mask_t   LIVE = live_mask(LOG2N, MOVE, POS);
  localparam tw_kind_e    KIND = pos_kind(LOG2N, MOVE, POS);
  localparam int unsigned AW   = (popcount(LIVE) > 0) ? popcount(LIVE) : 1;

  logic [1:0]          quad;
  logic [AW-1:0]       addr;
  logic signed [W-1:0] rot_re, rot_im;
  logic signed [W-1:0] r1_re, r1_im;
  logic                v1;

  twiddle_exp_gen #(.LOG2N(LOG2N), .POS(POS), .MOVE(MOVE)) u_exp (
    .idx     (in_idx),
    .exponent(),   // only quad and addr are needed here
    .quad    (quad),
    .addr    (addr)
  );

  quarter_rotator #(.W(W)) u_rot (
    .quad  (quad),
    .in_re (in_re),
    .in_im (in_im),
    .out_re(rot_re),
    .out_im(rot_im)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;

  always_ff @(posedge clk)
    if (in_valid) begin
      r1_re <= rot_re;
      r1_im <= rot_im;
    end

  if (KIND == TW_TRIVIAL) begin : g_trivial
    assign out_valid = v1;
    assign out_re    = r1_re;
    assign out_im    = r1_im;
  end else begin : g_mult
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= v1;

    if (KIND == TW_CONSTANT) begin : g_const
      logic sel1;
      always_ff @(posedge clk)
        if (in_valid) sel1 <= addr[0];

      const_cmult #(.W(W), .TW(TW), .LOG2N(LOG2N), .EXP(scatter(1, LIVE))) u_cm (
        .clk   (clk),
        .en    (v1),
        .sel   (sel1),
        .in_re (r1_re),
        .in_im (r1_im),
        .out_re(out_re),
        .out_im(out_im)
      );
    end else begin : g_general
      logic signed [TW-1:0] tw_re, tw_im;

      twiddle_rom #(.LOG2N(LOG2N), .TW(TW), .LIVE(LIVE)) u_rom (
        .clk  (clk),
        .en   (in_valid),
        .addr (addr),
        .tw_re(tw_re),
        .tw_im(tw_im)
      );

      cmult #(.W(W), .TW(TW)) u_gm (
        .clk (clk),
        .en  (v1),
        .a_re(r1_re),
        .a_im(r1_im),
        .b_re(tw_re),
        .b_im(tw_im),
        .p_re(out_re),
        .p_im(out_im)
      );
    end
  end
endmodule
