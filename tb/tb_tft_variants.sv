// tb_tft_variants: the same SDF pipeline built with the other moving
// matrices of the twiddle migration scheme, each run on a random frame and
// checked against a DFT (see fft_run): modified radix-2^2 (2048 points, the
// configuration with constant multipliers), plain radix-2^2 (2048), radix-2
// DIF with no migration (2048), radix-2 DIT by full migration (1024, from the
// printed matrix), radix-2^2 at 8192 points and modified radix-2^2 at 8192
// points with its first four odd positions modified (rule-built matrices,
// 2728 and 1368 table words). It also checks that the rules rebuild the
// printed matrices, the 8192-point table costs, and counts that
// constant-multiplier positions were exercised.
module tb_tft_variants;
  import tft_pkg::*;
  localparam int NV = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic done [NV];
  int   c [NV], f [NV];
  int   checks, failures;
  always #5 clk = ~clk;

  fft_run #(.LOG2N(11), .MOVE(move_mod_r22_2048()), .NAME("modified radix-2^2"))
    u0 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  fft_run #(.LOG2N(11), .MOVE(move_r22_2048()), .NAME("radix-2^2"))
    u1 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  fft_run #(.LOG2N(11), .MOVE(move_radix2()), .NAME("radix-2 DIF"))
    u2 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));
  fft_run #(.LOG2N(10), .MOVE(move_dit_1024()), .NAME("radix-2 DIT"))
    u3 (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]));
  fft_run #(.LOG2N(13), .MOVE(move_radix22(13)), .NAME("radix-2^2"))
    u4 (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]));
  fft_run #(.LOG2N(13), .MOVE(move_mod_radix22(13, 4)), .NAME("modified radix-2^2"))
    u5 (.clk, .rst_n, .done(done[5]), .checks(c[5]), .failures(f[5]));

  // constant multiplications actually performed (modified radix-2^2,
  // position 1: W_2048^1)
  int n_const = 0;
  always @(posedge clk)
    if (u0.dut.g_stage[1].g_tw.u_tw.g_mult.g_const.u_cm.en &&
        u0.dut.g_stage[1].g_tw.u_tw.g_mult.g_const.u_cm.sel) n_const++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    checks = 0;
    failures = 0;
    for (int v = 0; v < NV; v++) begin
      checks += c[v];
      failures += f[v];
    end
    // the printed matrices agree with the rules that generate them
    checks += 3;
    if (move_r22_2048() != move_radix22(11)) failures++;
    if (move_dit_1024() != move_dit(10)) failures++;
    if (move_mod_r22_2048() != move_mod_radix22(11, 3)) failures++;
    // 8192-point costs of the comparison: radix-2^2 2728/5/1, modified 1368/5/5
    checks += 2;
    if (total_entries(13, move_radix22(13)) != 2728 || count_kind(13, move_radix22(13), TW_GENERAL) != 5 ||
        count_kind(13, move_radix22(13), TW_CONSTANT) != 1) failures++;
    if (total_entries(13, move_mod_radix22(13, 4)) != 1368 || count_kind(13, move_mod_radix22(13, 4), TW_GENERAL) != 5 ||
        count_kind(13, move_mod_radix22(13, 4), TW_CONSTANT) != 5) failures++;
    // mechanism: constant-multiplier positions were part of a checked run
    checks++;
    if (count_kind(11, move_mod_r22_2048(), TW_CONSTANT) == 0 || n_const == 0) failures++;
    $display("constant multiplications at position 1 of the modified scheme: %0d", n_const);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * 8192 * 2 + 20000) @(posedge clk);
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
