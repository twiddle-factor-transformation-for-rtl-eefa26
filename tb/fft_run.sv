// fft_run: test harness for one configuration of tft_fft_top. Streams one
// frame of full-scale random data with random input bubbles, then a zero
// frame that flushes it, and compares every bin of the first frame with a
// double-precision DFT computed here (relative RMS error below 2^-11, no bin
// off by more than 2^-9 of the output RMS, every bin exactly once). Reports
// its counts and raises `done`; used by tb_tft_variants.
module fft_run
  import tft_pkg::*;
#(
  parameter int unsigned LOG2N = 11,
  parameter move_mat_t   MOVE  = move_even_r22_2048(),
  parameter string       NAME  = "evenly-distributed radix-2^2"
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned N  = 1 << LOG2N;
  localparam int unsigned DW = 16;
  localparam int unsigned OW = DW + LOG2N + 1;
  localparam real TWO_PI = 6.283185307179586;

  logic                 in_valid = 1'b0;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic                 out_valid;
  logic signed [OW-1:0] out_re, out_im;
  logic [LOG2N-1:0]     out_bin;

  tft_fft_top #(.LOG2N(LOG2N), .MOVE(MOVE)) dut (.*);

  int xr [N], xi [N];
  longint yr [N], yi [N];
  bit seen [N];
  int n_out = 0, dups = 0;

  always @(posedge clk)
    if (rst_n && out_valid) begin
      if (n_out < N) begin
        if (seen[out_bin]) dups++;
        seen[out_bin] = 1'b1;
        yr[out_bin] = longint'(out_re);
        yi[out_bin] = longint'(out_im);
      end
      n_out++;
    end

  initial begin
    real cs [N], sn [N];
    real err2, sig2, max_err;
    int missing;
    checks = 0;
    failures = 0;
    done = 1'b0;
    for (int m = 0; m < N; m++) begin
      cs[m] = $cos(TWO_PI * m / N);
      sn[m] = $sin(TWO_PI * m / N);
      xr[m] = int'($urandom % (1 << DW)) - (1 << (DW - 1));
      xi[m] = int'($urandom % (1 << DW)) - (1 << (DW - 1));
    end
    @(posedge clk iff rst_n);
    for (int f = 0; f < 2; f++)
      for (int n = 0; n < N; n++) begin
        if ($urandom % 8 == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_re <= (f == 0) ? DW'(xr[n]) : '0;
        in_im <= (f == 0) ? DW'(xi[n]) : '0;
        @(posedge clk);
      end
    in_valid <= 1'b0;
    repeat (40) @(posedge clk);
    err2 = 0.0;
    sig2 = 0.0;
    max_err = 0.0;
    missing = 0;
    for (int k = 0; k < N; k++) begin
      real rr, ri, er, ei;
      rr = 0.0;
      ri = 0.0;
      for (int n = 0; n < N; n++) begin
        int m;
        m = (k * n) % N;
        rr += xr[n] * cs[m] + xi[n] * sn[m];
        ri += xi[n] * cs[m] - xr[n] * sn[m];
      end
      if (!seen[k]) missing++;
      er = real'(yr[k]) - rr;
      ei = real'(yi[k]) - ri;
      err2 += er * er + ei * ei;
      sig2 += rr * rr + ri * ri;
      if ($sqrt(er * er + ei * ei) > max_err) max_err = $sqrt(er * er + ei * ei);
    end
    checks += 3;
    if (missing != 0 || dups != 0) failures++;
    if (err2 > sig2 / real'(1 << 22)) failures++;
    if (max_err > $sqrt(sig2 / N) / 512.0) failures++;
    $display("%s, N=%0d: table entries %0d, general mult %0d, constant mult %0d; rel rms err %g, max err %g, missing %0d",
             NAME, N, total_entries(LOG2N, MOVE), count_kind(LOG2N, MOVE, TW_GENERAL),
             count_kind(LOG2N, MOVE, TW_CONSTANT), $sqrt(err2 / sig2), max_err, missing);
    done = 1'b1;
  end
endmodule
