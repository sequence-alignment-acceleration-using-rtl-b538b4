// tb_smx_top: end-to-end test of the accelerator in its default
// configuration (two workers, one engine, 16 outstanding reads, NSEG = 2),
// driven like a host would: AXI4-Lite register accesses only, with the
// sequences, the substitution matrix and the results in a behavioural
// memory on the AXI4 master (random latency, random back-pressure,
// interleaved read data).
//
// The host loads the substitution matrix (and reloads it during the
// second batch), then runs two batches with both workers in parallel,
// covering all four element widths, the matrix mode, score-only and
// traceback jobs. It waits for the interrupt, reads the
// scores and the per-worker performance counters. Checks:
//   - each score equals H[m][n] of a reference global alignment;
//   - traceback jobs: every border line written to memory matches the
//     reference; score-only jobs: the last row's border lines match;
//   - the tile counters equal the number of tiles of the jobs.
// The run fails unless each mechanism was seen at least once: engine
// dependency stalls, result forwarding, memory stalls, both workers taking
// turns on the engine, more than one read in flight, the per-worker limit
// of the memory controller, R beats of different IDs interleaving, the wait
// for write acknowledges before a new supertile row, the matrix fetch and
// the interrupt.
module tb_smx_top;
  import smx_pkg::*;
  import smx_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] s_axil_awaddr, s_axil_araddr;
  logic s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0] s_axil_wstrb;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready;
  logic s_axil_rvalid, s_axil_rready;
  logic [2:0] m_axi_awid, m_axi_bid, m_axi_arid, m_axi_rid;
  logic [39:0] m_axi_awaddr, m_axi_araddr;
  logic [7:0] m_axi_awlen, m_axi_arlen;
  logic [2:0] m_axi_awsize, m_axi_arsize, m_axi_awprot, m_axi_arprot;
  logic [1:0] m_axi_awburst, m_axi_arburst, m_axi_bresp, m_axi_rresp;
  logic [3:0] m_axi_awcache, m_axi_arcache;
  logic m_axi_awvalid, m_axi_awready, m_axi_wlast, m_axi_wvalid, m_axi_wready;
  logic m_axi_bvalid, m_axi_bready, m_axi_arvalid, m_axi_arready;
  logic m_axi_rlast, m_axi_rvalid, m_axi_rready;
  logic [127:0] m_axi_wdata, m_axi_rdata;
  logic [15:0] m_axi_wstrb;
  logic irq;

  smx_top dut (.*);

  acp_mem_model #(.AW_WORDS(16), .LAT_MIN(4), .LAT_MAX(100)) mem (
    .clk, .rst_n,
    .awid(m_axi_awid), .awaddr(m_axi_awaddr), .awlen(m_axi_awlen), .awvalid(m_axi_awvalid),
    .awready(m_axi_awready), .wdata(m_axi_wdata), .wlast(m_axi_wlast), .wvalid(m_axi_wvalid),
    .wready(m_axi_wready), .bid(m_axi_bid), .bresp(m_axi_bresp), .bvalid(m_axi_bvalid),
    .bready(m_axi_bready), .arid(m_axi_arid), .araddr(m_axi_araddr), .arlen(m_axi_arlen),
    .arvalid(m_axi_arvalid), .arready(m_axi_arready), .rid(m_axi_rid), .rdata(m_axi_rdata),
    .rresp(m_axi_rresp), .rlast(m_axi_rlast), .rvalid(m_axi_rvalid), .rready(m_axi_rready));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- AXI checks
  always @(posedge clk) if (rst_n) begin
    if (m_axi_arvalid) begin
      checks++;
      if (m_axi_arlen != 3 || m_axi_arsize != 4 || m_axi_arburst != 1 ||
          m_axi_arcache != 4'b1111 || m_axi_araddr[5:0] != 0) failures++;
    end
    if (m_axi_awvalid) begin
      checks++;
      if (m_axi_awlen != 3 || m_axi_awsize != 4 || m_axi_awburst != 1 ||
          m_axi_awcache != 4'b1111 || m_axi_awaddr[5:0] != 0) failures++;
    end
  end

  // ---------------------------------------------------------------- mechanisms
  int n_eng_stall = 0, n_byp = 0, n_mem_stall = 0, n_switch = 0, n_limit = 0;
  int n_ack_wait = 0, n_mtx = 0, n_irq = 0, max_rd = 0, last_wid = -1;
  always @(posedge clk) if (rst_n) begin
    for (int w = 0; w < 2; w++) begin
      if (dut.ev[w].eng_stall) n_eng_stall++;
      if (dut.ev[w].mem_stall) n_mem_stall++;
    end
    if (dut.g_w[0].u_worker.byp && dut.g_w[0].u_worker.eng_fire) n_byp++;
    if (dut.g_w[1].u_worker.byp && dut.g_w[1].u_worker.eng_fire) n_byp++;
    if (dut.g_w[0].u_worker.state == dut.g_w[0].u_worker.S_LOAD &&
        !dut.g_w[0].u_worker.rd_gate) n_ack_wait++;
    if (dut.g_w[1].u_worker.state == dut.g_w[1].u_worker.S_LOAD &&
        !dut.g_w[1].u_worker.rd_gate) n_ack_wait++;
    if (dut.eng_req_valid) begin
      if (last_wid >= 0 && int'(dut.eng_req.wid) != last_wid) n_switch++;
      last_wid = int'(dut.eng_req.wid);
    end
    if (dut.arb_valid && dut.u_mem_ctrl.at_limit) n_limit++;
    if (32'(dut.rd_outstanding) > max_rd) max_rd = 32'(dut.rd_outstanding);
    if (dut.mtx_line_valid) n_mtx++;
    if (irq) n_irq++;
  end

  // ---------------------------------------------------------------- host
  task automatic wr(input int a, input logic [31:0] d);
    #1;
    s_axil_awaddr = 12'(a); s_axil_awvalid = 1;
    s_axil_wdata = d; s_axil_wstrb = 4'hF; s_axil_wvalid = 1; s_axil_bready = 1;
    do @(negedge clk); while (!s_axil_awready);
    @(posedge clk);
    #1 s_axil_awvalid = 0; s_axil_wvalid = 0;
    while (!s_axil_bvalid) @(negedge clk);
    @(posedge clk);
    #1 s_axil_bready = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    #1;
    s_axil_araddr = 12'(a); s_axil_arvalid = 1; s_axil_rready = 1;
    do @(negedge clk); while (!s_axil_arready);
    @(posedge clk);
    #1 s_axil_arvalid = 0;
    while (!s_axil_rvalid) @(negedge clk);
    d = s_axil_rdata;
    @(posedge clk);
    #1 s_axil_rready = 0;
  endtask

  // ---------------------------------------------------------------- memory
  localparam longint HI = 64'hA5_0000_0000;  // upper address bits, ignored by the model

  function automatic logic [511:0] get_line(longint byte_addr);
    logic [511:0] l;
    for (int b = 0; b < 4; b++) l[b*128 +: 128] = mem.mem[mem.widx(byte_addr + 16 * b)];
    return l;
  endfunction

  task automatic put_line(longint byte_addr, logic [511:0] l);
    for (int b = 0; b < 4; b++) mem.mem[mem.widx(byte_addr + 16 * b)] = l[b*128 +: 128];
  endtask

  typedef struct {
    int mode; bit use_mtx, score_only; int q_st, r_st;
    scheme_t sc;
    longint qa, ra, oa;
    int q [], r [];
  } job_d;

  job_d jobs [2];
  int tiles_expected [2] = '{0, 0};

  // Place a job's sequences in memory and program worker w.
  task automatic setup(int w, int mode, bit use_mtx, bit score_only, int q_st, int r_st,
                       scheme_t sc);
    job_d j;
    int ew, vl, cmax;
    ew = ref_ew(mode); vl = ref_vl(mode);
    j.mode = mode; j.use_mtx = use_mtx; j.score_only = score_only;
    j.q_st = q_st; j.r_st = r_st; j.sc = sc;
    j.qa = HI + 64'h20000 + w * 64'h40000;
    j.ra = j.qa + 64'h4000;
    j.oa = j.qa + 64'h8000;
    cmax = use_mtx ? 25 : (1 << ew) - 1;
    j.q = new[q_st * 8 * vl];
    j.r = new[r_st * 8 * vl];
    foreach (j.q[k]) j.q[k] = $urandom_range(cmax);
    foreach (j.r[k]) j.r[k] = ($urandom_range(3) != 0 && k < j.q.size()) ? j.q[k]
                                                                     : $urandom_range(cmax);
    for (int l = 0; l < q_st; l++) begin
      logic [511:0] line;
      for (int t = 0; t < 8; t++) begin
        int v [];
        v = new[vl];
        foreach (v[k]) v[k] = j.q[(l * 8 + t) * vl + k];
        line[t * 64 +: 64] = pack(v, ew);
      end
      put_line(j.qa + l * 64, line);
    end
    for (int l = 0; l < r_st; l++) begin
      logic [511:0] line;
      for (int t = 0; t < 8; t++) begin
        int v [];
        v = new[vl];
        foreach (v[k]) v[k] = j.r[(l * 8 + t) * vl + k];
        line[t * 64 +: 64] = pack(v, ew);
      end
      put_line(j.ra + l * 64, line);
    end
    jobs[w] = j;
    tiles_expected[w] += q_st * r_st * 64;
    wr(32'h104 + w * 32'h40, 32'(mode) | (32'(use_mtx) << 2) | (32'(score_only) << 3));
    wr(32'h108 + w * 32'h40, j.qa[31:0]);
    wr(32'h10C + w * 32'h40, 32'(j.qa[39:32]));
    wr(32'h110 + w * 32'h40, j.ra[31:0]);
    wr(32'h114 + w * 32'h40, 32'(j.ra[39:32]));
    wr(32'h118 + w * 32'h40, j.oa[31:0]);
    wr(32'h11C + w * 32'h40, 32'(j.oa[39:32]));
    wr(32'h120 + w * 32'h40, 32'(q_st));
    wr(32'h124 + w * 32'h40, 32'(r_st));
    wr(32'h128 + w * 32'h40, {8'(sc.del), 8'(sc.ins), 8'(sc.mis), 8'(sc.match)});
  endtask

  // Compare a finished job with the reference.
  task automatic verify(int w);
    job_d j;
    int H [][];
    int ew, vl, m, n, nerr;
    logic [31:0] sc_reg;
    j = jobs[w];
    ew = ref_ew(j.mode); vl = ref_vl(j.mode);
    m = j.q.size(); n = j.r.size();
    full_matrix(j.sc, j.q, j.r, H);
    rd(32'h12C + w * 32'h40, sc_reg);
    checks++;
    if ($signed(sc_reg) != H[m][n]) begin
      failures++;
      $display("worker %0d: score %0d, expected %0d", w, $signed(sc_reg), H[m][n]);
    end
    nerr = 0;
    if (!j.score_only) begin
      for (int i = 0; i < j.q_st; i++)
        for (int s = 0; s < j.r_st; s++)
          for (int ti = 0; ti < 8; ti++) begin
            logic [511:0] lh, lv;
            lh = get_line(j.oa + ((i * j.r_st + s) * 16 + 2 * ti) * 64);
            lv = get_line(j.oa + ((i * j.r_st + s) * 16 + 2 * ti + 1) * 64);
            for (int tj = 0; tj < 8; tj++) begin
              int eh [], ev [];
              int row, col;
              eh = new[vl]; ev = new[vl];
              row = (i * 8 + ti + 1) * vl;
              col = (s * 8 + tj + 1) * vl;
              foreach (eh[k]) begin
                eh[k] = H[row][col - vl + k + 1] - H[row][col - vl + k] - j.sc.del;
                ev[k] = H[row - vl + k + 1][col] - H[row - vl + k][col] - j.sc.ins;
              end
              checks += 2;
              if (lh[tj * 64 +: 64] != pack(eh, ew)) nerr++;
              if (lv[tj * 64 +: 64] != pack(ev, ew)) nerr++;
            end
          end
    end else begin
      for (int s = 0; s < j.r_st; s++) begin
        logic [511:0] l;
        l = get_line(j.oa + s * 64);
        for (int tj = 0; tj < 8; tj++) begin
          int eh [];
          eh = new[vl];
          foreach (eh[k]) eh[k] = H[m][(s * 8 + tj) * vl + k + 1] - H[m][(s * 8 + tj) * vl + k]
                                  - j.sc.del;
          checks++;
          if (l[tj * 64 +: 64] != pack(eh, ew)) nerr++;
        end
      end
    end
    if (nerr != 0) $display("worker %0d: %0d border vectors wrong", w, nerr);
    failures += nerr;
    $display("worker %0d: mode %0d mtx %0d score_only %0d, %0d x %0d, score %0d", w, j.mode,
             j.use_mtx, j.score_only, m, n, $signed(sc_reg));
  endtask

  task automatic run_batch(bit refetch);
    logic [31:0] st;
    wr(32'h010, 32'h3);                  // interrupts for both workers
    wr(32'h100, 1);
    wr(32'h140, 1);
    // reload the (unchanged) matrix while both workers fetch their first
    // lines, so reads of three IDs compete on the AXI port
    if (refetch) wr(32'h000, 1);
    rd(32'h004, st);
    checks++;
    if (st[5:4] == 2'b00) failures++;    // busy
    // wait for both: each done worker raises irq until restarted
    forever begin
      @(negedge clk);
      if (irq) begin
        rd(32'h004, st);
        if (st[9:8] == 2'b11) break;
      end
    end
    verify(0);
    verify(1);
  endtask

  initial begin
    scheme_t s_edit, s_lin, s_mtx, s_8;
    logic [31:0] v;
    s_edit = '{match: 0, mis: -1, ins: -1, del: -1, use_mtx: 0, mtx: '{default: 0}};
    s_lin  = '{match: 2, mis: -3, ins: -2, del: -2, use_mtx: 0, mtx: '{default: 0}};
    s_mtx  = '{match: 0, mis: 0, ins: -4, del: -4, use_mtx: 1, mtx: '{default: 0}};
    s_8    = '{match: 5, mis: -4, ins: -6, del: -7, use_mtx: 0, mtx: '{default: 0}};
    make_matrix(s_mtx);
    s_axil_awaddr = 0; s_axil_awvalid = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    s_axil_wvalid = 0; s_axil_bready = 0; s_axil_araddr = 0; s_axil_arvalid = 0;
    s_axil_rready = 0;
    for (int k = 0; k < 8; k++) put_line(HI + k * 64, matrix_line(s_mtx, k));
    repeat (5) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);

    // substitution matrix
    wr(32'h008, HI[31:0]);
    wr(32'h00C, 32'(HI[39:32]));
    wr(32'h000, 1);
    do rd(32'h004, v); while (v[0]);

    // batch 1: 6-bit matrix traceback next to 2-bit score-only
    setup(0, 2, 1, 0, 2, 2, s_mtx);
    setup(1, 0, 0, 1, 2, 3, s_edit);
    run_batch(0);
    // batch 2: 4-bit traceback next to 8-bit score-only
    setup(0, 1, 0, 0, 2, 2, s_lin);
    setup(1, 3, 0, 1, 3, 2, s_8);
    run_batch(1);

    // performance counters
    for (int w = 0; w < 2; w++) begin
      rd(32'h13C + w * 32'h40, v);
      checks++;
      if (v != 32'(tiles_expected[w])) begin
        failures++;
        $display("worker %0d tile counter %0d, expected %0d", w, v, tiles_expected[w]);
      end
    end
    rd(32'h024, v);
    checks++;
    if (v != 32'(tiles_expected[0] + tiles_expected[1])) failures++;

    $display("engine stalls %0d, forwards %0d, memory stalls %0d, worker switches %0d",
             n_eng_stall, n_byp, n_mem_stall, n_switch);
    $display("controller limit %0d, max reads in flight %0d, R interleaves %0d, ack waits %0d",
             n_limit, max_rd, mem.interleaves, n_ack_wait);
    $display("matrix lines %0d, irq cycles %0d", n_mtx, n_irq);
    checks += 11;
    if (n_eng_stall == 0)     begin failures++; $display("never: engine stall"); end
    if (n_byp == 0)           begin failures++; $display("never: forwarding"); end
    if (n_mem_stall == 0)     begin failures++; $display("never: memory stall"); end
    if (n_switch == 0)        begin failures++; $display("never: worker switch"); end
    if (n_limit == 0)         begin failures++; $display("never: controller limit"); end
    if (max_rd < 2)           begin failures++; $display("never: reads in flight"); end
    if (mem.interleaves == 0) begin failures++; $display("never: R interleave"); end
    if (n_ack_wait == 0)      begin failures++; $display("never: ack wait"); end
    if (n_mtx != 16)          begin failures++; $display("matrix lines %0d", n_mtx); end
    if (n_irq == 0)           begin failures++; $display("never: irq"); end
    if (max_rd > 16)          begin failures++; $display("too many reads in flight"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
