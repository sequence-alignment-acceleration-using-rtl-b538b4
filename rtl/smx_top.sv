// smx_top: the SMX sequence-alignment accelerator as a programmable-logic
// kernel with a cache-coherent memory port.
//
// The host programs jobs through the AXI4-Lite control interface. Each
// SMX-Worker computes one DP-block: it fetches sequence and border lines
// through the memory arbiter, memory controller and memory bridge, which turn
// each 512-bit line request into one 4-beat 128-bit burst on the AXI4 master
// (meant for the Accelerator Coherency Port, so the data comes straight from
// the CPU's cache), and sends tile tasks through the engine arbiter to the
// one SMX-Engine, which finishes a whole VL x VL tile every cycle. Workers
// interleave on the engine to hide each other's dependency and memory
// waits. The memory bridge also loads the engine's substitution matrix from
// a base address. irq is raised while a worker with its interrupt enabled is
// done.
//
// Default configuration as in the document's implementation: one engine
// with four arrays, two workers, 16 outstanding reads. NSEG, the number of
// antidiagonal segments of the arrays, is this design's choice.
module smx_top
  import smx_pkg::*;
#(
  parameter int unsigned NUM_WORKERS = 2,
  parameter int unsigned NSEG        = 2,
  parameter int unsigned MAX_RD_OUT  = 16,
  parameter int unsigned AXIL_AW     = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // AXI4-Lite control slave
  input  logic [AXIL_AW-1:0]      s_axil_awaddr,
  input  logic                    s_axil_awvalid,
  output logic                    s_axil_awready,
  input  logic [31:0]             s_axil_wdata,
  input  logic [3:0]              s_axil_wstrb,
  input  logic                    s_axil_wvalid,
  output logic                    s_axil_wready,
  output logic [1:0]              s_axil_bresp,
  output logic                    s_axil_bvalid,
  input  logic                    s_axil_bready,
  input  logic [AXIL_AW-1:0]      s_axil_araddr,
  input  logic                    s_axil_arvalid,
  output logic                    s_axil_arready,
  output logic [31:0]             s_axil_rdata,
  output logic [1:0]              s_axil_rresp,
  output logic                    s_axil_rvalid,
  input  logic                    s_axil_rready,
  // AXI4 master towards the coherency port
  output logic [ACP_ID_W-1:0]     m_axi_awid,
  output logic [ADDR_W-1:0]       m_axi_awaddr,
  output logic [7:0]              m_axi_awlen,
  output logic [2:0]              m_axi_awsize,
  output logic [1:0]              m_axi_awburst,
  output logic [3:0]              m_axi_awcache,
  output logic [2:0]              m_axi_awprot,
  output logic                    m_axi_awvalid,
  input  logic                    m_axi_awready,
  output logic [ACP_DATA_W-1:0]   m_axi_wdata,
  output logic [ACP_DATA_W/8-1:0] m_axi_wstrb,
  output logic                    m_axi_wlast,
  output logic                    m_axi_wvalid,
  input  logic                    m_axi_wready,
  input  logic [ACP_ID_W-1:0]     m_axi_bid,
  input  logic [1:0]              m_axi_bresp,
  input  logic                    m_axi_bvalid,
  output logic                    m_axi_bready,
  output logic [ACP_ID_W-1:0]     m_axi_arid,
  output logic [ADDR_W-1:0]       m_axi_araddr,
  output logic [7:0]              m_axi_arlen,
  output logic [2:0]              m_axi_arsize,
  output logic [1:0]              m_axi_arburst,
  output logic [3:0]              m_axi_arcache,
  output logic [2:0]              m_axi_arprot,
  output logic                    m_axi_arvalid,
  input  logic                    m_axi_arready,
  input  logic [ACP_ID_W-1:0]     m_axi_rid,
  input  logic [ACP_DATA_W-1:0]   m_axi_rdata,
  input  logic [1:0]              m_axi_rresp,
  input  logic                    m_axi_rlast,
  input  logic                    m_axi_rvalid,
  output logic                    m_axi_rready,
  output logic                    irq
);
  if (NUM_WORKERS < 1 || NUM_WORKERS > MAX_WORKERS) begin : g_bad_nw
    $error("smx_top: the memory bridge serves 1 to 4 workers");
  end

  // ------------------------------------------------------------ signals
  job_t               job        [NUM_WORKERS];
  logic               start      [NUM_WORKERS];
  logic               busy       [NUM_WORKERS];
  logic               done       [NUM_WORKERS];
  logic signed [31:0] score      [NUM_WORKERS];
  perf_ev_t           ev         [NUM_WORKERS];

  logic               wm_req_valid [NUM_WORKERS];
  mem_req_t           wm_req       [NUM_WORKERS];
  logic               wm_req_ready [NUM_WORKERS];
  logic               wm_rsp_valid [NUM_WORKERS];
  mem_rsp_t           wm_rsp;

  logic               we_req_valid [NUM_WORKERS];
  eng_req_t           we_req       [NUM_WORKERS];
  logic               we_req_ready [NUM_WORKERS];
  logic               we_rsp_valid [NUM_WORKERS];
  eng_rsp_t           we_rsp;

  logic               eng_req_valid, eng_rsp_valid;
  eng_req_t           eng_req;
  eng_rsp_t           eng_rsp;

  logic               arb_valid, arb_ready;
  mem_req_t           arb_req;
  logic               br_req_valid, br_req_ready, br_rsp_valid, br_rsp_ready;
  mem_req_t           br_req;
  mem_rsp_t           br_rsp;
  logic [7:0]         outstanding [NUM_WORKERS];

  logic               mtx_start, mtx_busy, mtx_line_valid;
  logic [ADDR_W-1:0]  mtx_base;
  logic [2:0]         mtx_line_idx;
  logic [LINE_W-1:0]  mtx_line_data;
  logic [4:0]         rd_outstanding;

  // ------------------------------------------------------------ control
  smx_ctrl_if #(.NUM_WORKERS(NUM_WORKERS), .AXIL_AW(AXIL_AW)) u_ctrl (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready, .s_axil_wdata, .s_axil_wstrb,
    .s_axil_wvalid, .s_axil_wready, .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready, .s_axil_rdata, .s_axil_rresp,
    .s_axil_rvalid, .s_axil_rready,
    .job, .start, .busy, .done, .score,
    .mtx_start, .mtx_base, .mtx_busy,
    .ev, .eng_active(eng_req_valid), .irq);

  // ------------------------------------------------------------ workers
  for (genvar w = 0; w < NUM_WORKERS; w++) begin : g_w
    smx_worker u_worker (
      .clk, .rst_n,
      .start        (start[w]),
      .job          (job[w]),
      .busy         (busy[w]),
      .done         (done[w]),
      .score        (score[w]),
      .mem_req_valid(wm_req_valid[w]),
      .mem_req      (wm_req[w]),
      .mem_req_ready(wm_req_ready[w]),
      .mem_rsp_valid(wm_rsp_valid[w]),
      .mem_rsp      (wm_rsp),
      .eng_req_valid(we_req_valid[w]),
      .eng_req      (we_req[w]),
      .eng_req_ready(we_req_ready[w]),
      .eng_rsp_valid(we_rsp_valid[w]),
      .eng_rsp      (we_rsp),
      .ev           (ev[w]));
  end

  // ------------------------------------------------------------ engine side
  smx_engine_arbiter #(.NUM_WORKERS(NUM_WORKERS)) u_eng_arb (
    .clk, .rst_n,
    .w_req_valid(we_req_valid), .w_req(we_req), .w_req_ready(we_req_ready),
    .w_rsp_valid(we_rsp_valid), .w_rsp(we_rsp),
    .eng_req_valid, .eng_req, .eng_rsp_valid, .eng_rsp);

  smx_engine #(.NSEG(NSEG)) u_engine (
    .clk, .rst_n,
    .req_valid(eng_req_valid), .req(eng_req),
    .rsp_valid(eng_rsp_valid), .rsp(eng_rsp),
    .mtx_line_valid, .mtx_line_idx, .mtx_line_data);

  // ------------------------------------------------------------ memory side
  smx_mem_arbiter #(.NUM_WORKERS(NUM_WORKERS)) u_mem_arb (
    .clk, .rst_n,
    .w_req_valid(wm_req_valid), .w_req(wm_req), .w_req_ready(wm_req_ready),
    .out_valid(arb_valid), .out_req(arb_req), .out_ready(arb_ready));

  smx_mem_ctrl #(.NUM_WORKERS(NUM_WORKERS), .MAX_OUT(MAX_RD_OUT / NUM_WORKERS)) u_mem_ctrl (
    .clk, .rst_n,
    .in_valid(arb_valid), .in_req(arb_req), .in_ready(arb_ready),
    .br_req_valid, .br_req, .br_req_ready,
    .br_rsp_valid, .br_rsp, .br_rsp_ready,
    .w_rsp_valid(wm_rsp_valid), .w_rsp(wm_rsp), .outstanding);

  smx_mem_bridge #(.MAX_RD_OUT(MAX_RD_OUT)) u_bridge (
    .clk, .rst_n,
    .req_valid(br_req_valid), .req(br_req), .req_ready(br_req_ready),
    .rsp_valid(br_rsp_valid), .rsp(br_rsp), .rsp_ready(br_rsp_ready),
    .mtx_start, .mtx_base, .mtx_busy, .mtx_line_valid, .mtx_line_idx, .mtx_line_data,
    .rd_outstanding,
    .m_axi_awid, .m_axi_awaddr, .m_axi_awlen, .m_axi_awsize, .m_axi_awburst,
    .m_axi_awcache, .m_axi_awprot, .m_axi_awvalid, .m_axi_awready,
    .m_axi_wdata, .m_axi_wstrb, .m_axi_wlast, .m_axi_wvalid, .m_axi_wready,
    .m_axi_bid, .m_axi_bresp, .m_axi_bvalid, .m_axi_bready,
    .m_axi_arid, .m_axi_araddr, .m_axi_arlen, .m_axi_arsize, .m_axi_arburst,
    .m_axi_arcache, .m_axi_arprot, .m_axi_arvalid, .m_axi_arready,
    .m_axi_rid, .m_axi_rdata, .m_axi_rresp, .m_axi_rlast, .m_axi_rvalid, .m_axi_rready);
endmodule
