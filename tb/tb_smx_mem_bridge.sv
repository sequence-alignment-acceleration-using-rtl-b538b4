// tb_smx_mem_bridge: the memory bridge against a behavioural ACP slave with
// random latency, random back-pressure and interleaved read data.
//   1. 64 line writes under four worker ids, each acknowledged once;
//   2. 400 line reads of preloaded data under four ids, answered to the
//      right id in request order, with the 16-read limit reached and never
//      exceeded, and R beats of different ids interleaving;
//   3. the written lines read back through the bridge;
//   4. a substitution-matrix fetch delivering lines 0..7 in order.
module tb_smx_mem_bridge;
  import smx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid, req_ready, rsp_valid, rsp_ready;
  mem_req_t req;
  mem_rsp_t rsp;
  logic mtx_start, mtx_busy, mtx_line_valid;
  logic [ADDR_W-1:0] mtx_base;
  logic [2:0] mtx_line_idx;
  logic [LINE_W-1:0] mtx_line_data;
  logic [4:0] rd_outstanding;
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

  smx_mem_bridge dut (.*);

  acp_mem_model #(.AW_WORDS(14)) mem (
    .clk, .rst_n,
    .awid(m_axi_awid), .awaddr(m_axi_awaddr), .awlen(m_axi_awlen), .awvalid(m_axi_awvalid),
    .awready(m_axi_awready), .wdata(m_axi_wdata), .wlast(m_axi_wlast), .wvalid(m_axi_wvalid),
    .wready(m_axi_wready), .bid(m_axi_bid), .bresp(m_axi_bresp), .bvalid(m_axi_bvalid),
    .bready(m_axi_bready), .arid(m_axi_arid), .araddr(m_axi_araddr), .arlen(m_axi_arlen),
    .arvalid(m_axi_arvalid), .arready(m_axi_arready), .rid(m_axi_rid), .rdata(m_axi_rdata),
    .rresp(m_axi_rresp), .rlast(m_axi_rlast), .rvalid(m_axi_rvalid), .rready(m_axi_rready));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("timeout: acks %0d reads %0d mtx %0d", acks, reads_ok, mtx_lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [511:0] pattern(int line, int salt);
    logic [511:0] v;
    for (int k = 0; k < 16; k++) v[k*32 +: 32] = 32'(line * 1000 + k * 7 + salt);
    return v;
  endfunction

  // expected responses per worker id
  typedef struct { bit wack; logic [511:0] data; } exp_t;
  exp_t exq [4][$];
  int max_out = 0, acks = 0, reads_ok = 0, mtx_lines = 0;

  always @(posedge clk) if (rst_n) begin
    if (32'(rd_outstanding) > max_out) max_out = 32'(rd_outstanding);
    checks++;
    if (rd_outstanding > 16) failures++;
    if (m_axi_arvalid) begin
      checks++;
      if (m_axi_arlen != 3 || m_axi_arsize != 4 || m_axi_arburst != 1 || m_axi_araddr[5:0] != 0)
        failures++;
    end
    if (rsp_valid && rsp_ready) begin
      exp_t e;
      checks++;
      if (exq[rsp.wid].size() == 0) begin failures++; $display("unexpected response"); end
      else begin
        e = exq[rsp.wid].pop_front();
        if (e.wack != rsp.wack || (!e.wack && e.data != rsp.data)) begin
          failures++;
          if (failures < 5) $display("wrong response for id %0d", rsp.wid);
        end else if (rsp.wack) acks++;
        else reads_ok++;
      end
    end
    if (mtx_line_valid) begin
      checks++;
      if (32'(mtx_line_idx) != mtx_lines || mtx_line_data != pattern(2000 + mtx_lines, 5))
        failures++;
      mtx_lines++;
    end
  end

  // beat order inside each R burst (beat b of a line carries word 4b)
  int rb [8] = '{default: 0};
  always @(posedge clk) if (rst_n && m_axi_rvalid && m_axi_rready) begin
    checks++;
    if (((m_axi_rdata[31:0] % 1000) / 28) != rb[m_axi_rid]) failures++;
    rb[m_axi_rid] = m_axi_rlast ? 0 : rb[m_axi_rid] + 1;
  end

  task automatic send(bit we, int wid, int line, logic [511:0] d);
    req_valid <= 1;
    req.we <= we; req.wid <= 2'(wid); req.addr <= 40'(line * 64); req.data <= d;
    do @(posedge clk); while (!req_ready);

  endtask

  initial begin
    req_valid = 0; req = '0; rsp_ready = 0; mtx_start = 0; mtx_base = '0;
    // preload lines 0..399 (reads) and 2000..2007 (matrix)
    for (int l = 0; l < 400; l++)
      for (int b = 0; b < 4; b++) mem.mem[l * 4 + b] = pattern(l, 1)[b*128 +: 128];
    for (int l = 0; l < 8; l++)
      for (int b = 0; b < 4; b++) mem.mem[(2000 + l) * 4 + b] = pattern(2000 + l, 5)[b*128 +: 128];
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fork
      forever begin @(posedge clk); rsp_ready <= ($urandom_range(7) != 0); end
    join_none
    // 1. writes to lines 1000..1063
    for (int k = 0; k < 64; k++) begin
      exq[k % 4].push_back('{1, '0});
      send(1, k % 4, 1000 + k, pattern(1000 + k, 3));
    end
    req_valid <= 0;
    wait (acks == 64);
    // 2. reads
    for (int k = 0; k < 400; k++) begin
      int l, id;
      l = $urandom_range(399); id = $urandom_range(3);
      exq[id].push_back('{0, pattern(l, 1)});
      send(0, id, l, '0);
    end
    req_valid <= 0;
    wait (reads_ok == 400);
    // 3. read back the writes
    for (int k = 0; k < 64; k++) begin
      exq[k % 4].push_back('{0, pattern(1000 + k, 3)});
      send(0, k % 4, 1000 + k, '0);
    end
    req_valid <= 0;
    wait (reads_ok == 464);
    // 4. matrix fetch
    @(posedge clk);
    mtx_base <= 40'(2000 * 64); mtx_start <= 1;
    @(posedge clk);
    mtx_start <= 0;
    @(posedge clk);
    wait (!mtx_busy);
    repeat (5) @(posedge clk);
    checks++; if (mtx_lines != 8) begin failures++; $display("matrix lines %0d", mtx_lines); end
    checks++; if (max_out != 16) begin failures++; $display("max outstanding %0d", max_out); end
    checks++; if (mem.interleaves == 0) begin failures++; $display("no interleaving seen"); end
    checks++; if (acks != 64) failures++;
    $display("max outstanding %0d, interleaved beats %0d", max_out, mem.interleaves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
