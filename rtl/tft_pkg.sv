// tft_pkg: shared types, constants and elaboration-time functions of the
// twiddle-migrated pipelined FFT.
//
// The FFT is a 2^n-point radix-2 decimation-in-frequency (DIF) flow graph. At
// "twiddle position" k (between butterfly stage k and stage k+1, 1 <= k < n) a
// radix-2 DIF FFT multiplies the sample at flow-graph position p by W_N^t with
// normalised exponent t = p[n-k] * (p mod 2^(n-k)) * 2^(k-1). Bit j of that
// exponent is the product p[n-k] & p[j-k+1] and is present for k-1 <= j <= n-2:
// this is the symbolic exponent matrix E (entry e_ij, row i = position i).
//
// Common twiddle factor migration moves the factor 2^(j * p[n-i] * p[j-i+1])
// ("min-common factor" b_ij) from position i to position i + m_ij, where
// M = [m_ij] is the moving matrix. A move by r positions is legal while the
// factor does not depend on the bits that the passed butterflies combine,
// which gives the moving span s_ij = n-2-j. After migration the exponent used
// at position k is the sum of the entries (i,j) with i + m_ij = k, each
// contributing (p[n-i] & p[j-i+1]) << j, taken modulo N.
//
// The moving matrix is stored as a packed array mat[i-1][j] of 4-bit entries,
// so that a row written as a hex literal reads digit by digit like the printed
// matrix: leftmost digit is column j = n-1, rightmost is j = 0.
//
// The four moving matrices below are the ones the derivation gives for
// 2048- and 1024-point transforms; the rule-based generators rebuild the
// radix-2, radix-2^2 and radix-2 DIT matrices for any size. Everything here is
// evaluated at elaboration time only.
package tft_pkg;

  localparam int MAX_LOG2N = 16;

  typedef logic [MAX_LOG2N-1:0][3:0]                  move_row_t;
  typedef logic [MAX_LOG2N-1:0][MAX_LOG2N-1:0][3:0]   move_mat_t;
  typedef logic [MAX_LOG2N-1:0]                       bit_mask_t;

  // How a twiddle position is built, after migration.
  typedef enum logic [1:0] {
    TW_TRIVIAL  = 2'd0,  // only multiples of W_N^(N/4) = -j: sign/swap logic
    TW_CONSTANT = 2'd1,  // one or a single other constant: constant multiplier
    TW_GENERAL  = 2'd2   // table of 2^L entries and a general multiplier
  } tw_kind_e;

  // ---------------------------------------------------------------- matrices
  // Radix-2 DIF: nothing moves.
  function automatic move_mat_t move_radix2();
    move_mat_t m = '0;
    return m;
  endfunction

  // Radix-2^2: the max-common factor of every odd position moves to the next
  // (even) position: m_ij = 1 for odd i and i-1 <= j <= n-3.
  function automatic move_mat_t move_radix22(int n);
    move_mat_t m = '0;
    for (int i = 1; i < n; i += 2)
      for (int j = i - 1; j <= n - 3; j++) m[i-1][j] = 4'd1;
    return m;
  endfunction

  // Radix-2 DIT: every min-common factor moves as far as its span allows.
  function automatic move_mat_t move_dit(int n);
    move_mat_t m = '0;
    for (int i = 1; i < n; i++)
      for (int j = i - 1; j <= n - 3; j++) m[i-1][j] = 4'(n - 2 - j);
    return m;
  endfunction

  // Radix-2^2 for N = 2048, eq. (9).
  function automatic move_mat_t move_r22_2048();
    move_mat_t m = '0;
    m[0] = 64'h00111111111;
    m[2] = 64'h00111111100;
    m[4] = 64'h00111110000;
    m[6] = 64'h00111000000;
    m[8] = 64'h00100000000;
    return m;
  endfunction

  // Radix-2 DIT for N = 1024, eq. (10).
  function automatic move_mat_t move_dit_1024();
    move_mat_t m = '0;
    m[0] = 64'h0012345678;
    m[1] = 64'h0012345670;
    m[2] = 64'h0012345600;
    m[3] = 64'h0012345000;
    m[4] = 64'h0012340000;
    m[5] = 64'h0012300000;
    m[6] = 64'h0012000000;
    m[7] = 64'h0010000000;
    return m;
  endfunction

  // Modified radix-2^2 for N = 2048, eq. (11): the right-most min-common
  // factor of positions 1, 3 and 5 stays behind.
  function automatic move_mat_t move_mod_r22_2048();
    move_mat_t m = '0;
    m[0] = 64'h00111111110;
    m[2] = 64'h00111111000;
    m[4] = 64'h00111100000;
    m[6] = 64'h00111000000;
    m[8] = 64'h00100000000;
    return m;
  endfunction

  // Modified radix-2^2 for any size: as radix-2^2, but the first q odd
  // positions (1, 3, ..., 2q-1) keep their right-most min-common factor
  // (bit i-1). q = 3 at n = 11 gives eq. (11).
  function automatic move_mat_t move_mod_radix22(int n, int q);
    move_mat_t m = move_radix22(n);
    for (int s = 0; s < q; s++)
      if (2 * s + 1 < n) m[2*s][2*s] = 4'd0;
    return m;
  endfunction

  // Evenly-distributed radix-2^2 for N = 2048, eq. (12).
  function automatic move_mat_t move_even_r22_2048();
    move_mat_t m = '0;
    m[0] = 64'h00113333579;
    m[1] = 64'h00002222680;
    m[2] = 64'h00111111700;
    m[4] = 64'h00111150000;
    m[6] = 64'h00111000000;
    m[8] = 64'h00100000000;
    return m;
  endfunction

  // ------------------------------------------------------- matrix properties
  // Symbolic exponent matrix of the radix-2 DIF graph, eq. (5)/(6).
  function automatic bit e_entry(int n, int i, int j);
    return (i >= 1) && (i <= n - 1) && (j >= i - 1) && (j <= n - 2);
  endfunction

  // Moving span of the min-common factor b_ij, eq. (4).
  function automatic int span(int n, int j);
    return (j < n - 2) ? (n - 2 - j) : 0;
  endfunction

  // A moving matrix is legal when it moves only existing factors, and none
  // beyond its span.
  function automatic bit move_ok(int n, move_mat_t m);
    if (n < 3 || n > MAX_LOG2N) return 1'b0;
    for (int i = 1; i <= MAX_LOG2N; i++)
      for (int j = 0; j < MAX_LOG2N; j++) begin
        int r = int'(m[i-1][j]);
        if (r != 0) begin
          if (i > n || j >= n || !e_entry(n, i, j)) return 1'b0;
          if (r > span(n, j)) return 1'b0;
        end
      end
    return 1'b1;
  endfunction

  // Position that factor b_ij sits at after migration (K = M (*) E, eq. (8)).
  function automatic int target(move_mat_t m, int i, int j);
    return i + int'(m[i-1][j]);
  endfunction

  // Exponent bits below the two quadrant bits that position k receives.
  function automatic bit_mask_t live_mask(int n, move_mat_t m, int k);
    bit_mask_t mask = '0;
    for (int i = 1; i < n; i++)
      for (int j = i - 1; j <= n - 3; j++)
        if (target(m, i, j) == k) mask[j] = 1'b1;
    return mask;
  endfunction

  function automatic int popcount(bit_mask_t v);
    int c = 0;
    for (int b = 0; b < MAX_LOG2N; b++) c += int'(v[b]);
    return c;
  endfunction

  function automatic tw_kind_e pos_kind(int n, move_mat_t m, int k);
    int l = popcount(live_mask(n, m, k));
    if (l == 0) return TW_TRIVIAL;
    if (l == 1) return TW_CONSTANT;
    return TW_GENERAL;
  endfunction

  // Entries of the table at position k (0 when no table is needed).
  function automatic int table_entries(int n, move_mat_t m, int k);
    return (pos_kind(n, m, k) == TW_GENERAL) ? (1 << popcount(live_mask(n, m, k))) : 0;
  endfunction

  // Totals over a whole transform, the figures of merit of the comparison.
  function automatic int total_entries(int n, move_mat_t m);
    int t = 0;
    for (int k = 1; k < n; k++) t += table_entries(n, m, k);
    return t;
  endfunction

  function automatic int count_kind(int n, move_mat_t m, tw_kind_e kind);
    int c = 0;
    for (int k = 1; k < n; k++) if (pos_kind(n, m, k) == kind) c++;
    return c;
  endfunction

  // Deposit the low bits of addr, in order, into the set bits of mask.
  function automatic int scatter(int addr, bit_mask_t mask);
    int v = 0;
    int a = 0;
    for (int b = 0; b < MAX_LOG2N; b++)
      if (mask[b]) begin
        if (((addr >> a) & 1) != 0) v |= (1 << b);
        a++;
      end
    return v;
  endfunction

  // Fixed-point twiddle W_N^e = cos(2 pi e / N) - j sin(2 pi e / N), scaled
  // by 2^(tw-2) so that +1.0 is representable in a tw-bit signed word.
  localparam real PI = 3.14159265358979323846;

  function automatic int tw_cos(int n, int e, int tw);
    real a = 2.0 * PI * real'(e) / real'(1 << n);
    real s = real'(1 << (tw - 2));
    return int'($floor($cos(a) * s + 0.5));
  endfunction

  function automatic int tw_msin(int n, int e, int tw);
    real a = 2.0 * PI * real'(e) / real'(1 << n);
    real s = real'(1 << (tw - 2));
    return int'($floor(-$sin(a) * s + 0.5));
  endfunction

endpackage
