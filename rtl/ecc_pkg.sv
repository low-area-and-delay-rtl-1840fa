// ecc_pkg: constants and elaboration-time functions shared by the
// ECC-protected parallel filter bank.
//
// The code is a single-error-correcting Hamming code applied at word level:
// each of the K data filters is one "data bit" and each of the R redundant
// (check) filters is one "parity bit". Check j (1-based) covers data filter i
// when bit s_j of filter i's syndrome pattern is set. Syndromes are written
// s1 s2 ... sR with s1 as the most significant bit, as in the (7,4) table
// (d1=111, d2=110, d3=101, d4=011, p1=100, p2=010, p3=001).
//
// Pattern assignment: data filter i (0-based) takes the i-th R-bit value of
// weight two or more, counting down from all ones. For R=3 this reproduces
// the (7,4) code exactly. For other sizes (for example K=11, R=4) the
// ordering is this design's own choice; any column set of weight >= 2 gives a
// valid single-error-correcting code.
package ecc_pkg;

  // Filter case study sizes.
  localparam int unsigned TAPS_DEF   = 16; // coefficients per filter
  localparam int unsigned IN_W_DEF   = 8;  // input sample width
  localparam int unsigned COEF_W_DEF = 8;  // coefficient width
  localparam int unsigned OUT_W_DEF  = 18; // data filter output width
  localparam int unsigned K_DEF      = 4;  // number of parallel data filters
  localparam int unsigned MAX_R      = 8;  // largest number of checks supported

  function automatic int unsigned popcount(int unsigned v);
    int unsigned c = 0;
    for (int b = 0; b < 32; b++) c += (v >> b) & 1;
    return c;
  endfunction

  // Smallest R with 2^R - R - 1 >= k (Hamming bound for single error correction).
  function automatic int unsigned num_checks(int unsigned k);
    for (int unsigned r = 2; r <= MAX_R; r++)
      if ((1 << r) - r - 1 >= k) return r;
    return MAX_R;
  endfunction

  // Syndrome pattern of data filter i, s1 in bit r-1.
  function automatic int unsigned data_pattern(int unsigned r, int unsigned i);
    int unsigned cnt = 0;
    for (int v = (1 << r) - 1; v >= 0; v--) begin
      if (popcount(v) >= 2) begin
        if (cnt == i) return v;
        cnt++;
      end
    end
    return 0;
  endfunction

  // 1 when check j (0-based, j=0 is s1) covers data filter i.
  function automatic bit in_check(int unsigned r, int unsigned i, int unsigned j);
    return ((data_pattern(r, i) >> (r - 1 - j)) & 1) != 0;
  endfunction

  // Number of data filters covered by check j.
  function automatic int unsigned check_weight(int unsigned k, int unsigned r, int unsigned j);
    int unsigned w = 0;
    for (int unsigned i = 0; i < k; i++) w += in_check(r, i, j);
    return w;
  endfunction

  // Largest check weight over all checks.
  function automatic int unsigned max_weight(int unsigned k);
    int unsigned r = num_checks(k);
    int unsigned m = 0;
    for (int unsigned j = 0; j < r; j++)
      if (check_weight(k, r, j) > m) m = check_weight(k, r, j);
    return m;
  endfunction

  // Extra bits a check word needs over a data word (sum of max_weight words).
  function automatic int unsigned growth_bits(int unsigned k);
    return $clog2(max_weight(k));
  endfunction

  // First check (lowest j) that covers data filter i; used to rebuild it.
  function automatic int unsigned first_check(int unsigned r, int unsigned i);
    for (int unsigned j = 0; j < r; j++)
      if (in_check(r, i, j)) return j;
    return 0;
  endfunction

endpackage
