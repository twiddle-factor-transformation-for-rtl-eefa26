// tb_twiddle_exp_gen: checks the twiddle exponent after migration, for the
// 2048-point evenly-distributed radix-2^2, modified radix-2^2 and radix-2^2
// moving matrices, every twiddle position and every flow-graph position p.
//
// Reference: the radix-2 DIF exponent of position i, t_i(p) =
// p[n-i] * (p mod 2^(n-i)) * 2^(i-1), is computed arithmetically; each of
// its bits j is added, at weight 2^j, to the position i + m_ij the matrix
// sends it to. The generator must give that sum modulo N, its top two bits
// as `quad`, and an `addr` that scatters back to the rest. Independently of
// the matrix, the exponents of one p summed over all positions must equal
// the radix-2 sum (migration only moves factors). The test also checks the
// table cost of each matrix (entries, general and constant multipliers)
// against the figures quoted for N = 2048: 164/5/0, 344/4/4, 680/4/1, and
// radix-2 1020/8/1, and the max-common factor of every butterfly pair
// (bit-wise AND of its two input exponents).
module tb_twiddle_exp_gen;
  import tft_pkg::*;

  localparam int unsigned LOG2N = 11;
  localparam int unsigned N     = 1 << LOG2N;
  localparam int          NM    = 3;
  localparam move_mat_t   MATS [NM] = '{move_even_r22_2048(), move_mod_r22_2048(), move_r22_2048()};

  int checks = 0, failures = 0;
  logic [LOG2N-1:0] idx = '0;
  logic [LOG2N-1:0] exps  [NM][LOG2N];
  logic [1:0]       quads [NM][LOG2N];
  int               addrv [NM][LOG2N];

  for (genvar m = 0; m < NM; m++) begin : g_m
    for (genvar k = 1; k < LOG2N; k++) begin : g_k
      localparam int unsigned AW = (popcount(live_mask(LOG2N, MATS[m], k)) > 0) ?
                                   popcount(live_mask(LOG2N, MATS[m], k)) : 1;
      logic [AW-1:0] a;
      twiddle_exp_gen #(.LOG2N(LOG2N), .POS(k), .MOVE(MATS[m])) u (
        .idx(idx), .exponent(exps[m][k]), .quad(quads[m][k]), .addr(a));
      assign addrv[m][k] = int'(a);
    end
  end

  function automatic int r2_exp(int p, int i);
    if (((p >> (LOG2N - i)) & 1) == 0) return 0;
    return ((p % (1 << (LOG2N - i))) << (i - 1)) % N;
  endfunction

  task automatic expect_cost(int m, int te, int gm, int cm, string name);
    checks++;
    if (total_entries(LOG2N, MATS[m]) != te || count_kind(LOG2N, MATS[m], TW_GENERAL) != gm ||
        count_kind(LOG2N, MATS[m], TW_CONSTANT) != cm) begin
      failures++;
      $display("%s: entries %0d GM %0d CM %0d", name, total_entries(LOG2N, MATS[m]),
               count_kind(LOG2N, MATS[m], TW_GENERAL), count_kind(LOG2N, MATS[m], TW_CONSTANT));
    end
  endtask

  initial begin
    expect_cost(0, 164, 5, 0, "evenly-distributed radix-2^2");
    expect_cost(1, 344, 4, 4, "modified radix-2^2");
    expect_cost(2, 680, 4, 1, "radix-2^2");
    checks++;
    if (total_entries(LOG2N, move_radix2()) != 1020 || count_kind(LOG2N, move_radix2(), TW_GENERAL) != 8)
      failures++;
    for (int m = 0; m < NM; m++) begin
      checks++;
      if (!move_ok(LOG2N, MATS[m])) failures++;
    end
    checks++;   // a matrix moving a factor past its span must be refused
    begin
      move_mat_t bad;
      bad = move_r22_2048();
      bad[0][8] = 4'd2;
      if (move_ok(LOG2N, bad)) failures++;
    end

    // Boolean common factor: for every butterfly pair of stage i+1 (inputs
    // p and p + 2^(n-i-1)), the bit-wise AND of the two input exponents
    // t_i keeps every bit but n-2, so all of bits 0..n-3 may move one
    // position, as the radix-2^2 matrix does.
    for (int i = 1; i < LOG2N - 1; i++)
      for (int p = 0; p < N; p++)
        if (((p >> (LOG2N - i - 1)) & 1) == 0) begin
          int c;
          c = r2_exp(p, i) & r2_exp(p + (1 << (LOG2N - i - 1)), i);
          checks++;
          if (c != (r2_exp(p, i) & ~(1 << (LOG2N - 2)))) failures++;
        end

    for (int p = 0; p < N; p++) begin
      int ref_exp [LOG2N];
      int sum_new, sum_r2;
      idx = LOG2N'(p);
      #1;
      foreach (ref_exp[k]) ref_exp[k] = 0;
      for (int m = 0; m < NM; m++) begin
        foreach (ref_exp[k]) ref_exp[k] = 0;
        sum_r2 = 0;
        for (int i = 1; i < LOG2N; i++) begin
          int t;
          t = r2_exp(p, i);
          sum_r2 += t;
          for (int j = 0; j < LOG2N; j++)
            if ((t >> j) & 1) ref_exp[i + int'(MATS[m][i-1][j])] += (1 << j);
        end
        sum_new = 0;
        for (int k = 1; k < LOG2N; k++) begin
          int e;
          e = ref_exp[k] % N;
          sum_new += int'(exps[m][k]);
          checks++;
          if (int'(exps[m][k]) != e || int'(quads[m][k]) != (e >> (LOG2N - 2)) ||
              scatter(addrv[m][k], live_mask(LOG2N, MATS[m], k)) != e % (N / 4)) begin
            failures++;
            if (failures < 10)
              $display("mat %0d pos %0d p=%0d: exp %0d quad %0d addr %0d, expected exp %0d",
                       m, k, p, exps[m][k], quads[m][k], addrv[m][k], e);
          end
        end
        checks++;
        if ((sum_new % N) != (sum_r2 % N)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
