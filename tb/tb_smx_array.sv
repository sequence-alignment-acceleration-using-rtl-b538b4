// tb_smx_array: random tiles streamed one per cycle through two arrays, the
// default 32 x 32 2-bit compare array and a 10 x 10 6-bit array with the
// substitution matrix and three segments. Results are checked against the
// absolute-score tile model, and each must appear exactly NSEG cycles after
// its tile entered.
module tb_smx_array;
  import smx_pkg::*;
  import smx_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- array A: defaults (VL 32, EW 2, NSEG 2)
  logic a_iv, a_ov;
  logic [63:0] a_q, a_r, a_dv, a_dh, a_dvo, a_dho;
  logic [7:0] a_sm, a_sx;
  logic [MTX_N*MTX_N*MTX_EW-1:0] flat;

  smx_array u_a (.clk, .rst_n, .in_valid(a_iv), .q_vec(a_q), .r_vec(a_r),
    .dv_vec(a_dv), .dh_vec(a_dh), .s_match(a_sm), .s_mis(a_sx), .mtx(1'b0),
    .bias(8'sd0), .mtx_flat(flat), .out_valid(a_ov), .dv_out_vec(a_dvo),
    .dh_out_vec(a_dho));

  // ---------------- array B: VL 10, EW 6, NSEG 3, matrix
  logic b_iv, b_ov, b_mtx;
  logic [63:0] b_q, b_r, b_dv, b_dh, b_dvo, b_dho;
  logic [7:0] b_sm, b_sx;
  logic signed [7:0] b_bias;

  smx_array #(.VL(10), .EW(6), .NSEG(3), .HAS_MTX(1'b1)) u_b (.clk, .rst_n,
    .in_valid(b_iv), .q_vec(b_q), .r_vec(b_r), .dv_vec(b_dv), .dh_vec(b_dh),
    .s_match(b_sm), .s_mis(b_sx), .mtx(b_mtx), .bias(b_bias), .mtx_flat(flat),
    .out_valid(b_ov), .dv_out_vec(b_dvo), .dh_out_vec(b_dho));

  typedef struct { logic [63:0] dv, dh; int t; } exp_t;
  exp_t qa[$], qb[$];
  scheme_t sa, sb;

  // random valid delta vector for a scheme: any values in 0..max S' are
  // reachable borders, so any such vector is a legal input
  function automatic int_q rnd_vec(int vl, int mx);
    int v [];
    v = new[vl];
    foreach (v[k]) v[k] = $urandom_range(mx);
    return v;
  endfunction

  initial begin
    int ntiles = 300;
    sa = '{match: 0, mis: -1, ins: -1, del: -1, use_mtx: 0, mtx: '{default: 0}};
    sb = '{match: 0, mis: 0, ins: -4, del: -4, use_mtx: 1, mtx: '{default: 0}};
    make_matrix(sb);
    for (int k = 0; k < 8; k++) flat[k*512 +: 512] = (k < 7) ? matrix_line(sb, k) : 512'(matrix_line(sb, k));
    a_iv = 0; b_iv = 0;
    a_sm = 8'(sa.match - sa.ins - sa.del); a_sx = 8'(sa.mis - sa.ins - sa.del);
    b_sm = 0; b_sx = 0; b_mtx = 1; b_bias = 8'(-(sb.ins + sb.del));
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < ntiles; t++) begin
      int q[], r[], dvi[], dhi[], dvo[], dho[];
      // array A: 2-bit characters, deltas 0..2
      q = rnd_vec(32, 3); r = rnd_vec(32, 3);
      dvi = rnd_vec(32, 2); dhi = rnd_vec(32, 2);
      tile(sa, 32, q, r, dvi, dhi, dvo, dho);
      a_q <= pack(q, 2); a_r <= pack(r, 2); a_dv <= pack(dvi, 2); a_dh <= pack(dhi, 2);
      a_iv <= (t % 7 != 3);
      if (t % 7 != 3) qa.push_back('{pack(dvo, 2), pack(dho, 2), cyc + 1 + 2});
      // array B: letters 0..25, deltas 0..19
      q = rnd_vec(10, 25); r = rnd_vec(10, 25);
      dvi = rnd_vec(10, 19); dhi = rnd_vec(10, 19);
      tile(sb, 10, q, r, dvi, dhi, dvo, dho);
      b_q <= pack(q, 6); b_r <= pack(r, 6); b_dv <= pack(dvi, 6); b_dh <= pack(dhi, 6);
      b_iv <= 1;
      qb.push_back('{pack(dvo, 6), pack(dho, 6), cyc + 1 + 3});
      @(posedge clk);
    end
    a_iv <= 0; b_iv <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (qa.size() != 0 || qb.size() != 0) begin
      failures++;
      $display("missing results: %0d %0d", qa.size(), qb.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (a_ov) begin
      exp_t e;
      checks++;
      if (qa.size() == 0) begin failures++; $display("A: unexpected output"); end
      else begin
        e = qa.pop_front();
        if (e.dv != a_dvo || e.dh != a_dho || e.t != cyc) begin
          failures++;
          if (failures < 6) $display("A mismatch cyc %0d (want %0d) dv %h/%h dh %h/%h",
                                     cyc, e.t, a_dvo, e.dv, a_dho, e.dh);
        end
      end
    end
    if (b_ov) begin
      exp_t e;
      checks++;
      if (qb.size() == 0) begin failures++; $display("B: unexpected output"); end
      else begin
        e = qb.pop_front();
        if (e.dv != b_dvo || e.dh != b_dho || e.t != cyc) begin
          failures++;
          if (failures < 6) $display("B mismatch cyc %0d (want %0d) dv %h/%h dh %h/%h",
                                     cyc, e.t, b_dvo, e.dv, b_dho, e.dh);
        end
      end
    end
  end
endmodule
