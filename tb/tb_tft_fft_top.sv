// tb_tft_fft_top: end-to-end test of the twiddle-migrated SDF FFT at its
// default size (2048 points, evenly-distributed radix-2^2 moving matrix).
//
// Streams four frames: full-scale random data, a two-tone frame with a DC
// offset, random data with random input bubbles (stalls), and a zero frame
// that flushes the third frame out. Every output bin of the first three
// frames is compared with a double-precision DFT of the same integer input
// computed here; the fixed-point result must lie within a tolerance set by
// the rounding of the TW-bit twiddles (relative RMS error below 2^-11 and no
// bin off by more than 2^-9 of the output RMS). It also checks that every bin
// appears exactly once per frame, that the first output appears N-1 samples
// plus the pipeline registers after the first input, and counts the
// mechanisms exercised: stall cycles, -j rotations at a trivial position,
// table twiddles at a general position, back-to-back frames, flushing.
module tb_tft_fft_top;
  import tft_pkg::*;

  localparam int unsigned LOG2N  = 11;
  localparam int unsigned N      = 1 << LOG2N;
  localparam int unsigned DW     = 16;
  localparam int unsigned OW     = DW + LOG2N + 1;
  localparam int          FRAMES = 4;   // last one only flushes
  localparam real         TWO_PI = 6.283185307179586;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 in_valid = 1'b0;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic                 out_valid;
  logic signed [OW-1:0] out_re, out_im;
  logic [LOG2N-1:0]     out_bin;

  tft_fft_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [FRAMES][N], xi [FRAMES][N];
  longint yr [FRAMES][N], yi [FRAMES][N];
  bit     seen_bin [FRAMES][N];
  int     n_out = 0, stall_cycles = 0, dup_bins = 0;
  longint cyc = 0, first_in_cyc = -1, first_out_cyc = -1, in_count_at_first_out = 0;
  longint in_count = 0;
  real    cs [N], sn [N];

  always @(posedge clk) cyc <= cyc + 1;

  // Mechanism counters: a -j rotation at a trivial position (position 1)
  // and a table-driven multiplication at a general position (position 2).
  int n_rot = 0, n_table = 0;
  always @(posedge clk)
    if (rst_n) begin
      if (dut.g_stage[1].g_tw.u_tw.in_valid && dut.g_stage[1].g_tw.u_tw.quad != 2'd0) n_rot++;
      if (dut.g_stage[2].g_tw.u_tw.in_valid && dut.g_stage[2].g_tw.u_tw.addr != '0) n_table++;
    end

  // Output monitor
  always @(posedge clk)
    if (rst_n && out_valid) begin
      int f;
      f = n_out / N;
      if (first_out_cyc < 0) begin
        first_out_cyc = cyc;
        in_count_at_first_out = in_count;
      end
      if (f < FRAMES) begin
        if (seen_bin[f][out_bin]) dup_bins++;
        seen_bin[f][out_bin] = 1'b1;
        yr[f][out_bin] = longint'(out_re);
        yi[f][out_bin] = longint'(out_im);
      end
      n_out++;
    end

  task automatic push(int re, int im, bit gaps);
    if (gaps && ($urandom % 4 == 0)) begin
      int g = 1 + $urandom % 3;
      in_valid <= 1'b0;
      repeat (g) @(posedge clk);
      stall_cycles += g;
    end
    in_valid <= 1'b1;
    in_re    <= DW'(re);
    in_im    <= DW'(im);
    if (first_in_cyc < 0) first_in_cyc = cyc;
    @(posedge clk);
    in_count++;
  endtask

  function automatic int rnd_full();
    return int'($urandom % (1 << DW)) - (1 << (DW - 1));
  endfunction

  function automatic int pipe_regs();
    int r = 0;
    for (int k = 1; k < LOG2N; k++)
      r += (pos_kind(LOG2N, move_even_r22_2048(), k) == TW_TRIVIAL) ? 1 : 2;
    return r;
  endfunction

  task automatic check_frame(int f);
    real err2 = 0.0, sig2 = 0.0, max_err = 0.0;
    int missing = 0;
    for (int k = 0; k < N; k++) begin
      real rr = 0.0, ri = 0.0, er, ei, e;
      for (int n = 0; n < N; n++) begin
        int m = (k * n) % N;
        rr += xr[f][n] * cs[m] + xi[f][n] * sn[m];
        ri += xi[f][n] * cs[m] - xr[f][n] * sn[m];
      end
      if (!seen_bin[f][k]) missing++;
      er = real'(yr[f][k]) - rr;
      ei = real'(yi[f][k]) - ri;
      e  = er * er + ei * ei;
      err2 += e;
      sig2 += rr * rr + ri * ri;
      if ($sqrt(e) > max_err) max_err = $sqrt(e);
    end
    checks++;
    if (missing != 0) begin
      failures++;
      $display("frame %0d: %0d bins missing", f, missing);
    end
    checks++;
    if (err2 > sig2 / real'(1 << 22)) begin
      failures++;
      $display("frame %0d: relative RMS error too large (%g)", f, $sqrt(err2 / sig2));
    end
    checks++;
    if (max_err > $sqrt(sig2 / N) / 512.0) begin
      failures++;
      $display("frame %0d: max bin error %g vs output rms %g", f, max_err, $sqrt(sig2 / N));
    end
    $display("frame %0d: rel rms err %g, max err %g, out rms %g", f,
             $sqrt(err2 / sig2), max_err, $sqrt(sig2 / N));
  endtask

  initial begin
    for (int m = 0; m < N; m++) begin
      cs[m] = $cos(TWO_PI * m / N);
      sn[m] = $sin(TWO_PI * m / N);
    end
    for (int n = 0; n < N; n++) begin
      xr[0][n] = rnd_full();
      xi[0][n] = rnd_full();
      xr[1][n] = 300 + int'(12000.0 * $cos(TWO_PI * 37 * n / N) + 9000.0 * $sin(TWO_PI * 1500 * n / N));
      xi[1][n] = int'(-7000.0 * $sin(TWO_PI * 37 * n / N));
      xr[2][n] = rnd_full();
      xi[2][n] = rnd_full();
      xr[3][n] = 0;
      xi[3][n] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < FRAMES; f++)
      for (int n = 0; n < N; n++) push(xr[f][n], xi[f][n], f == 2);
    in_valid <= 1'b0;
    repeat (40) @(posedge clk);

    for (int f = 0; f < FRAMES - 1; f++) check_frame(f);

    // Latency: N-1 samples held in the feedback delays, plus one register
    // per butterfly and one (trivial position) or two clocks per twiddle
    // position; the first input is counted once it has been accepted.
    checks++;
    if (in_count_at_first_out != longint'(N - 1 + LOG2N + 1 + pipe_regs())) begin
      failures++;
      $display("latency: first output after %0d inputs", in_count_at_first_out);
    end
    checks++;
    if (first_out_cyc - first_in_cyc != longint'(N + LOG2N + pipe_regs())) begin
      failures++;
      $display("latency: first output %0d clocks after first input", first_out_cyc - first_in_cyc);
    end
    checks++;
    // the samples in the output registers drain after the input stops, the
    // ones in the feedback delays wait for more input
    if (n_out < (FRAMES - 1) * N || n_out > FRAMES * N - 1 || dup_bins != 0) begin
      failures++;
      $display("outputs %0d (expected %0d), duplicated bins %0d", n_out, (FRAMES - 1) * N, dup_bins);
    end
    // mechanisms
    checks += 3;
    if (stall_cycles == 0) begin failures++; $display("no stall exercised"); end
    if (n_rot == 0) begin failures++; $display("no -j rotation exercised"); end
    if (n_table == 0) begin failures++; $display("no table multiplication exercised"); end
    $display("mechanisms: stall cycles %0d, -j rotations at position 1 %0d, table twiddles at position 2 %0d, frames back to back %0d, flush frame 1",
             stall_cycles, n_rot, n_table, FRAMES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * N * 2 + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
