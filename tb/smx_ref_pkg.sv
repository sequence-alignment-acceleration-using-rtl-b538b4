// smx_ref_pkg: reference models used by the testbenches.
//
// Everything here works on absolute DP scores with the plain recurrence
// H[i][j] = max(H[i-1][j-1] + s(q_i, r_j), H[i-1][j] + I, H[i][j-1] + D),
// independently of the offset-delta arithmetic of the hardware, and only
// converts to the hardware's dv'/dh' encoding at the edges:
//   dv'(i,j) = H[i][j] - H[i-1][j] - I,   dh'(i,j) = H[i][j] - H[i][j-1] - D.
package smx_ref_pkg;

  typedef int int_q [];

  // Scoring scheme of one test.
  typedef struct {
    int match, mis, ins, del;
    bit use_mtx;
    int mtx [26][26];
  } scheme_t;

  function automatic int sub_score(scheme_t sc, int a, int b);
    if (sc.use_mtx) return sc.mtx[a][b];
    return (a == b) ? sc.match : sc.mis;
  endfunction

  function automatic int ref_ew(int mode);  return 2 * (mode + 1); endfunction
  function automatic int ref_vl(int mode);
    case (mode) 0: return 32; 1: return 16; 2: return 10; default: return 8; endcase
  endfunction

  // One tile: inputs and outputs are VL-element arrays of offset deltas.
  function automatic void tile(scheme_t sc, int vl, int q[], int r[],
                               int dv_in[], int dh_in[],
                               ref int dv_out[], ref int dh_out[]);
    int H [][];
    H = new[vl + 1];
    foreach (H[i]) H[i] = new[vl + 1];
    H[0][0] = 0;
    for (int j = 1; j <= vl; j++) H[0][j] = H[0][j-1] + dh_in[j-1] + sc.del;
    for (int i = 1; i <= vl; i++) H[i][0] = H[i-1][0] + dv_in[i-1] + sc.ins;
    for (int i = 1; i <= vl; i++)
      for (int j = 1; j <= vl; j++) begin
        int best;
        best = H[i-1][j-1] + sub_score(sc, q[i-1], r[j-1]);
        if (H[i-1][j] + sc.ins > best) best = H[i-1][j] + sc.ins;
        if (H[i][j-1] + sc.del > best) best = H[i][j-1] + sc.del;
        H[i][j] = best;
      end
    dv_out = new[vl];
    dh_out = new[vl];
    for (int i = 1; i <= vl; i++) dv_out[i-1] = H[i][vl] - H[i-1][vl] - sc.ins;
    for (int j = 1; j <= vl; j++) dh_out[j-1] = H[vl][j] - H[vl][j-1] - sc.del;
  endfunction

  // Full global-alignment matrix, H[0][j] = j*D, H[i][0] = i*I.
  function automatic void full_matrix(scheme_t sc, int q[], int r[], ref int H [][]);
    int m, n;
    m = q.size();
    n = r.size();
    H = new[m + 1];
    foreach (H[i]) H[i] = new[n + 1];
    for (int j = 0; j <= n; j++) H[0][j] = j * sc.del;
    for (int i = 1; i <= m; i++) begin
      H[i][0] = i * sc.ins;
      for (int j = 1; j <= n; j++) begin
        int best;
        best = H[i-1][j-1] + sub_score(sc, q[i-1], r[j-1]);
        if (H[i-1][j] + sc.ins > best) best = H[i-1][j] + sc.ins;
        if (H[i][j-1] + sc.del > best) best = H[i][j-1] + sc.del;
        H[i][j] = best;
      end
    end
  endfunction

  // Pack VL values of EW bits into a 64-bit vector.
  function automatic logic [63:0] pack(int v[], int ew);
    logic [63:0] x;
    x = '0;
    foreach (v[k]) x |= (64'(v[k]) & ((64'd1 << ew) - 1)) << (k * ew);
    return x;
  endfunction

  function automatic int_q unpack(logic [63:0] x, int vl, int ew);
    int v [];
    v = new[vl];
    foreach (v[k]) v[k] = int'((x >> (k * ew)) & ((64'd1 << ew) - 1));
    return v;
  endfunction

  // A small BLOSUM-like symmetric matrix with entries in -4..11, generated
  // from a formula: diagonal 4 + (a mod 8), off-diagonal ((a*7 + b*7) mod 9) - 4.
  function automatic void make_matrix(ref scheme_t sc);
    for (int a = 0; a < 26; a++)
      for (int b = 0; b < 26; b++)
        sc.mtx[a][b] = (a == b) ? 4 + (a % 8) : ((a * 7 + b * 7) % 9) - 4;
  endfunction

  // The 26 x 26 matrix as eight 512-bit lines of signed 6-bit entries.
  function automatic logic [511:0] matrix_line(scheme_t sc, int k);
    logic [4095:0] all;
    all = '0;
    for (int a = 0; a < 26; a++)
      for (int b = 0; b < 26; b++)
        all[(a * 26 + b) * 6 +: 6] = 6'(sc.mtx[a][b]);
    return all[k * 512 +: 512];
  endfunction
endpackage
