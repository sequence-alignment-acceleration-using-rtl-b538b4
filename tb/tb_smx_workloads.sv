// tb_smx_workloads: the evaluation workloads at their 100 bp and 1 Kbp
// sizes, run on one worker and the engine with a behavioural memory of
// random latency (the same harness as tb_smx_worker).
//   - DNA edit distance, 2-bit elements;
//   - DNA with gap penalties, 4-bit elements;
//   - protein with a 26 x 26 substitution matrix, 6-bit elements;
//   - ASCII edit distance, 8-bit elements.
// Lengths are rounded up to whole supertiles (8*VL characters), as the host
// would pad them. Half of the jobs are score-only, half traceback. Every
// score is compared with a full reference alignment, every written border
// line with the reference matrix. The 10 Kbp size differs only in length
// and is left out to keep the run short.
module tb_smx_workloads;
  import smx_pkg::*;
  import smx_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic start, busy, done;
  job_t job;
  logic signed [31:0] score;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  logic eng_req_valid, eng_rsp_valid;
  eng_req_t eng_req;
  eng_rsp_t eng_rsp;
  perf_ev_t ev;
  logic mtx_line_valid;
  logic [2:0] mtx_line_idx;
  logic [LINE_W-1:0] mtx_line_data;

  smx_worker dut (
    .clk, .rst_n, .start, .job, .busy, .done, .score,
    .mem_req_valid, .mem_req, .mem_req_ready, .mem_rsp_valid, .mem_rsp,
    .eng_req_valid, .eng_req, .eng_req_ready(1'b1), .eng_rsp_valid, .eng_rsp, .ev);

  smx_engine eng (
    .clk, .rst_n, .req_valid(eng_req_valid), .req(eng_req),
    .rsp_valid(eng_rsp_valid), .rsp(eng_rsp),
    .mtx_line_valid, .mtx_line_idx, .mtx_line_data);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- memory
  logic [511:0] mem [longint];
  longint       wcount [longint];     // writes per line
  typedef struct { bit wack; logic [511:0] d; longint due; } rsp_t;
  rsp_t   rq [$];
  longint last_due = 0;
  int     n_writes = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      mem_req_ready <= 0;
      mem_rsp_valid <= 0;
      mem_rsp       <= '0;
    end else begin
      mem_req_ready <= ($urandom_range(3) != 0);
      if (mem_req_valid && mem_req_ready) begin
        rsp_t r;
        longint a, due;
        a   = longint'(mem_req.addr) >> 6;
        due = cyc + longint'($urandom_range(20, 3));
        if (due <= last_due) due = last_due + 1;
        last_due = due;
        checks++;
        if (mem_req.addr[5:0] != 0) failures++;
        if (mem_req.we) begin
          mem[a] = mem_req.data;
          wcount[a] = wcount.exists(a) ? wcount[a] + 1 : 1;
          n_writes++;
          r = '{1, '0, due};
        end else begin
          r = '{0, mem.exists(a) ? mem[a] : '0, due};
        end
        rq.push_back(r);
      end
      mem_rsp_valid <= 0;
      if (rq.size() > 0 && rq[0].due <= cyc) begin
        rsp_t r;
        r = rq.pop_front();
        mem_rsp_valid <= 1;
        mem_rsp.wack  <= r.wack;
        mem_rsp.data  <= r.d;
        mem_rsp.wid   <= '0;
      end
    end
  end

  // ---------------------------------------------------------------- events
  int n_byp = 0, n_eng_stall = 0, n_mem_stall = 0, n_ack_wait = 0, n_tiles = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.byp && dut.eng_fire) n_byp++;
    if (ev.eng_stall) n_eng_stall++;
    if (ev.mem_stall) n_mem_stall++;
    if (ev.tile) n_tiles++;
    if (dut.state == dut.S_LOAD && !dut.rd_gate) n_ack_wait++;
  end

  // ---------------------------------------------------------------- jobs
  localparam longint QBASE = 64'h80_0000_0000;
  localparam longint RBASE = 64'h40_0000_1000;
  localparam longint OBASE = 64'h10_0000_0000;

  task automatic run_job(int mode, bit use_mtx, bit score_only, int q_st, int r_st,
                         scheme_t sc);
    int ew, vl, m, n, cmax, nerr;
    int q[], r[];
    int H [][];
    int wr_before;
    ew = ref_ew(mode); vl = ref_vl(mode);
    m = q_st * 8 * vl; n = r_st * 8 * vl;
    cmax = use_mtx ? 25 : (1 << ew) - 1;
    q = new[m]; r = new[n];
    // related sequences: the reference is a mutated copy of the query
    foreach (q[k]) q[k] = $urandom_range(cmax);
    foreach (r[k]) r[k] = ($urandom_range(3) != 0 && k < m) ? q[k] : $urandom_range(cmax);
    // sequences in memory: line i holds tile vectors 8i..8i+7
    for (int l = 0; l < q_st; l++)
      for (int t = 0; t < 8; t++) begin
        int v [];
        v = new[vl];
        foreach (v[k]) v[k] = q[(l * 8 + t) * vl + k];
        if (t == 0) mem[(QBASE >> 6) + l] = '0;
        mem[(QBASE >> 6) + l][t * 64 +: 64] = pack(v, ew);
      end
    for (int l = 0; l < r_st; l++)
      for (int t = 0; t < 8; t++) begin
        int v [];
        v = new[vl];
        foreach (v[k]) v[k] = r[(l * 8 + t) * vl + k];
        if (t == 0) mem[(RBASE >> 6) + l] = '0;
        mem[(RBASE >> 6) + l][t * 64 +: 64] = pack(v, ew);
      end
    wcount.delete();
    wr_before = n_writes;
    full_matrix(sc, q, r, H);

    @(posedge clk);
    #1;
    job = '0;
    job.mode = ew_mode_e'(mode); job.mtx = use_mtx; job.score_only = score_only;
    job.qaddr = ADDR_W'(QBASE); job.raddr = ADDR_W'(RBASE); job.oaddr = ADDR_W'(OBASE);
    job.q_st = 16'(q_st); job.r_st = 16'(r_st);
    job.match = 8'(sc.match); job.mis = 8'(sc.mis); job.ins = 8'(sc.ins); job.del = 8'(sc.del);
    start = 1;
    @(posedge clk);
    #1 start = 0;
    checks++;
    if (!busy || done) failures++;
    wait (done);
    @(posedge clk);

    checks++;
    if (score != H[m][n]) begin
      failures++;
      $display("mode %0d: score %0d, expected %0d", mode, score, H[m][n]);
    end
    nerr = 0;
    if (!score_only) begin
      checks++;
      if (n_writes - wr_before != q_st * r_st * 16) nerr++;
      for (int i = 0; i < q_st; i++)
        for (int j = 0; j < r_st; j++)
          for (int ti = 0; ti < 8; ti++) begin
            longint base;
            logic [511:0] lh, lv;
            base = (OBASE >> 6) + (i * r_st + j) * 16 + 2 * ti;
            lh = mem.exists(base) ? mem[base] : '0;
            lv = mem.exists(base + 1) ? mem[base + 1] : '0;
            for (int tj = 0; tj < 8; tj++) begin
              int eh [], evv [];
              int row, col;
              eh = new[vl]; evv = new[vl];
              row = (i * 8 + ti + 1) * vl;       // bottom row of the tile
              col = (j * 8 + tj + 1) * vl;       // right column of the tile
              foreach (eh[k]) begin
                eh[k]  = H[row][col - vl + k + 1] - H[row][col - vl + k] - sc.del;
                evv[k] = H[row - vl + k + 1][col] - H[row - vl + k][col] - sc.ins;
              end
              checks += 2;
              if (lh[tj * 64 +: 64] != pack(eh, ew)) nerr++;
              if (lv[tj * 64 +: 64] != pack(evv, ew)) nerr++;
            end
          end
    end else begin
      checks++;
      if (n_writes - wr_before != q_st * r_st) nerr++;
      for (int j = 0; j < r_st; j++) begin
        longint a;
        logic [511:0] l;
        a = (OBASE >> 6) + j;
        l = mem.exists(a) ? mem[a] : '0;
        checks++;
        if (wcount[a] != q_st) nerr++;
        for (int tj = 0; tj < 8; tj++) begin
          int eh [];
          eh = new[vl];
          foreach (eh[k]) eh[k] = H[m][(j * 8 + tj) * vl + k + 1] - H[m][(j * 8 + tj) * vl + k] - sc.del;
          checks++;
          if (l[tj * 64 +: 64] != pack(eh, ew)) nerr++;
        end
      end
    end
    if (nerr != 0) $display("mode %0d: %0d line errors", mode, nerr);
    failures += nerr;
    $display("mode %0d mtx %0d score_only %0d: %0d x %0d, score %0d", mode, use_mtx,
             score_only, m, n, score);
  endtask

  initial begin
    scheme_t s_edit, s_lin, s_mtx;
    s_edit = '{match: 0, mis: -1, ins: -1, del: -1, use_mtx: 0, mtx: '{default: 0}};
    s_lin  = '{match: 2, mis: -3, ins: -2, del: -2, use_mtx: 0, mtx: '{default: 0}};
    s_mtx  = '{match: 0, mis: 0, ins: -4, del: -4, use_mtx: 1, mtx: '{default: 0}};
    make_matrix(s_mtx);
    start = 0; job = '0;
    mtx_line_valid = 0; mtx_line_idx = 0; mtx_line_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      @(posedge clk);
      #1 mtx_line_valid = 1; mtx_line_idx = 3'(k); mtx_line_data = matrix_line(s_mtx, k);
    end
    @(posedge clk);
    #1 mtx_line_valid = 0;

    // 100 bp: one supertile per sequence in every mode
    run_job(0, 0, 1, 1, 1, s_edit);
    run_job(1, 0, 0, 1, 1, s_lin);
    run_job(2, 1, 1, 2, 2, s_mtx);
    run_job(3, 0, 0, 2, 2, s_edit);
    // 1 Kbp: 1024, 1024, 1040 and 1024 characters
    run_job(0, 0, 0, 4, 4, s_edit);
    run_job(1, 0, 1, 8, 8, s_lin);
    run_job(2, 1, 0, 13, 13, s_mtx);
    run_job(3, 0, 1, 16, 16, s_edit);

    $display("tiles %0d, bypasses %0d, engine stalls %0d, memory stalls %0d, ack waits %0d",
             n_tiles, n_byp, n_eng_stall, n_mem_stall, n_ack_wait);
    checks += 4;
    if (n_byp == 0)       begin failures++; $display("no bypass seen"); end
    if (n_eng_stall == 0) begin failures++; $display("no engine stall seen"); end
    if (n_mem_stall == 0) begin failures++; $display("no memory stall seen"); end
    if (n_ack_wait == 0)  begin failures++; $display("no wait for write acks seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
