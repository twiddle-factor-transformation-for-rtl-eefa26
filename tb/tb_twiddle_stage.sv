// tb_twiddle_stage: the three kinds of twiddle position of a 2048-point
// pipeline, each fed a stream of random samples with consecutive flow-graph
// positions and random bubbles:
//   evenly-distributed radix-2^2, position 3: trivial (-j multiples only);
//   modified radix-2^2, position 1: constant multiplier;
//   evenly-distributed radix-2^2, position 4: 64-word table.
// Each output must equal the input times exp(-j 2 pi T/N), computed here in
// floating point, within one LSB plus the twiddle rounding; T is the sum of the bits of the radix-2
// exponents t_i(p) that the moving matrix sends to this position. Outputs
// must come out in order, one per input, after 1 (trivial) or 2 clocks.
module tb_twiddle_stage;
  import tft_pkg::*;
  localparam int unsigned LOG2N = 11, N = 1 << LOG2N, W = 28, TW = 16;
  localparam int NU = 3;
  localparam move_mat_t MATS [NU] = '{move_even_r22_2048(), move_mod_r22_2048(), move_even_r22_2048()};
  localparam int        POSS [NU] = '{3, 1, 4};
  localparam tw_kind_e  KINDS [NU] = '{TW_TRIVIAL, TW_CONSTANT, TW_GENERAL};
  localparam int        NS = 3000;
  localparam real       TWO_PI = 6.283185307179586;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0] in_re = '0, in_im = '0;
  logic [LOG2N-1:0] in_idx = '0;
  logic                o_valid [NU];
  logic signed [W-1:0] o_re [NU], o_im [NU];
  int checks = 0, failures = 0, stalls = 0;
  int xr [NS], xi [NS];
  int n_out [NU];
  longint cyc = 0, in_cyc [NS];
  int nonzero_quad = 0;

  for (genvar u = 0; u < NU; u++) begin : g_u
    twiddle_stage #(.LOG2N(LOG2N), .POS(POSS[u]), .W(W), .TW(TW), .MOVE(MATS[u])) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
      .in_idx(in_idx), .out_valid(o_valid[u]), .out_re(o_re[u]), .out_im(o_im[u]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // clock at which each input sample is taken
  int n_in = 0;
  always @(posedge clk)
    if (rst_n && in_valid) begin
      in_cyc[n_in] = cyc;
      n_in++;
    end

  // allowed error: one LSB of product rounding plus the twiddle's own
  // rounding to 2^-15, at most |x| 2^-15 per part of the product
  function automatic bit far(real a, real b, real tol);
    return (a - b > tol) || (b - a > tol);
  endfunction

  function automatic int ref_exp(move_mat_t m, int k, int p);
    int e = 0;
    for (int i = 1; i < LOG2N; i++) begin
      int t;
      t = (((p >> (LOG2N - i)) & 1) != 0) ? ((p % (1 << (LOG2N - i))) << (i - 1)) : 0;
      for (int j = 0; j < LOG2N; j++)
        if (((t >> j) & 1) != 0 && i + int'(m[i-1][j]) == k) e += 1 << j;
    end
    return e % N;
  endfunction

  for (genvar u = 0; u < NU; u++) begin : g_chk
    always @(posedge clk)
      if (rst_n && o_valid[u]) begin
        int s, e;
        real a, er, ei, tol;
        s  = n_out[u];
        e  = ref_exp(MATS[u], POSS[u], s % N);
        if (u == 0 && e >= N / 4) nonzero_quad++;
        a  = TWO_PI * e / N;
        er = xr[s] * $cos(a) + xi[s] * $sin(a);
        ei = xi[s] * $cos(a) - xr[s] * $sin(a);
        checks++;
        tol = 1.0 + (((xr[s] < 0) ? -xr[s] : xr[s]) + ((xi[s] < 0) ? -xi[s] : xi[s])) / 32768.0;
        if (far(real'(o_re[u]), er, tol) || far(real'(o_im[u]), ei, tol)) begin
          failures++;
          if (failures < 10)
            $display("unit %0d sample %0d exp %0d: (%0d,%0d) expected (%f,%f)", u, s, e, o_re[u], o_im[u], er, ei);
        end
        checks++;
        if (cyc - in_cyc[s] != ((KINDS[u] == TW_TRIVIAL) ? 1 : 2)) begin
          failures++;
          if (failures < 10) $display("unit %0d sample %0d: latency %0d", u, s, cyc - in_cyc[s]);
        end
        n_out[u]++;
      end
  end

  initial begin
    foreach (n_out[u]) n_out[u] = 0;
    for (int i = 0; i < NS; i++) begin
      xr[i] = int'($urandom % (1 << 24)) - (1 << 23);
      xi[i] = int'($urandom % (1 << 24)) - (1 << 23);
    end
    checks++;   // the chosen positions really are of the three kinds
    for (int u = 0; u < NU; u++) if (pos_kind(LOG2N, MATS[u], POSS[u]) != KINDS[u]) failures++;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < NS; i++) begin
      if ($urandom % 4 == 0) begin
        in_valid <= 1'b0;
        stalls++;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_re  <= W'(xr[i]);
      in_im  <= W'(xi[i]);
      in_idx <= LOG2N'(i);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    for (int u = 0; u < NU; u++) begin
      checks++;
      if (n_out[u] != NS) begin
        failures++;
        $display("unit %0d: %0d outputs", u, n_out[u]);
      end
    end
    checks++;
    if (stalls == 0 || nonzero_quad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 3) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
