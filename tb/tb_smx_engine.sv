// tb_smx_engine: the full engine with its four arrays. The substitution
// matrix is loaded first; then random tile tasks of all four element widths
// (and matrix tasks on the 6-bit array) are issued one per cycle with random
// worker ids. Each result must carry the right id and deltas and appear
// exactly NSEG = 2 cycles after its task.
module tb_smx_engine;
  import smx_pkg::*;
  import smx_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic req_valid, rsp_valid, mtx_line_valid;
  eng_req_t req;
  eng_rsp_t rsp;
  logic [2:0] mtx_line_idx;
  logic [LINE_W-1:0] mtx_line_data;

  smx_engine dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [1:0] wid; logic [63:0] dv, dh; int t; } exp_t;
  exp_t q[$];
  int per_mode [5] = '{default: 0};

  initial begin
    scheme_t sm, sg;
    sg = '{match: 1, mis: -2, ins: -2, del: -3, use_mtx: 0, mtx: '{default: 0}};
    sm = '{match: 0, mis: 0, ins: -4, del: -4, use_mtx: 1, mtx: '{default: 0}};
    make_matrix(sm);
    req_valid = 0; req = '0; mtx_line_valid = 0; mtx_line_idx = 0; mtx_line_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      mtx_line_valid <= 1; mtx_line_idx <= 3'(k); mtx_line_data <= matrix_line(sm, k);
      @(posedge clk);
    end
    mtx_line_valid <= 0;
    for (int t = 0; t < 400; t++) begin
      int mode, ew, vl, kind, cmax, dmax;
      int qv[], rv[], dvi[], dhi[], dvo[], dho[];
      scheme_t sc;
      mode = $urandom_range(3);
      kind = (mode == 2 && $urandom_range(1) == 1) ? 4 : mode;
      ew = ref_ew(mode); vl = ref_vl(mode);
      sc = (kind == 4) ? sm : sg;
      // edit scheme on 2-bit, gap scheme on the wider arrays
      if (mode == 0) sc = '{match: 0, mis: -1, ins: -1, del: -1, use_mtx: 0, mtx: '{default: 0}};
      cmax = (kind == 4) ? 25 : (1 << ew) - 1;
      dmax = (kind == 4) ? 19 : sc.match - sc.ins - sc.del;
      qv = new[vl]; rv = new[vl]; dvi = new[vl]; dhi = new[vl];
      foreach (qv[k]) begin
        qv[k] = $urandom_range(cmax); rv[k] = $urandom_range(cmax);
        // a small alphabet makes matches frequent
        if (kind != 4 && $urandom_range(1)) rv[k] = qv[k];
        dvi[k] = $urandom_range(dmax); dhi[k] = $urandom_range(dmax);
      end
      tile(sc, vl, qv, rv, dvi, dhi, dvo, dho);
      req_valid   <= ($urandom_range(5) != 0);
      req.wid     <= 2'($urandom_range(3));
      req.mode    <= ew_mode_e'(mode);
      req.mtx     <= (kind == 4);
      req.s_match <= 8'(sc.match - sc.ins - sc.del);
      req.s_mis   <= 8'(sc.mis - sc.ins - sc.del);
      req.bias    <= 8'(-(sc.ins + sc.del));
      req.q  <= pack(qv, ew);  req.r  <= pack(rv, ew);
      req.dv <= pack(dvi, ew); req.dh <= pack(dhi, ew);
      @(posedge clk);
      if (req_valid) begin
        q.push_back('{req.wid, pack(dvo, ew), pack(dho, ew), cyc + 2});
        per_mode[kind]++;
      end
    end
    req_valid <= 0;
    repeat (6) @(posedge clk);
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (per_mode[k] == 0) begin failures++; $display("kind %0d never issued", k); end
    end
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && rsp_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      e = q.pop_front();
      if (e.wid != rsp.wid || e.dv != rsp.dv || e.dh != rsp.dh || e.t != cyc) begin
        failures++;
        if (failures < 6) $display("mismatch at %0d (want %0d): wid %0d/%0d dv %h/%h dh %h/%h",
          cyc, e.t, rsp.wid, e.wid, rsp.dv, e.dv, rsp.dh, e.dh);
      end
    end
  end
endmodule
