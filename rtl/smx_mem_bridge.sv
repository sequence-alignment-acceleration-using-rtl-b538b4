// smx_mem_bridge: width adapter between the 512-bit SMX memory requests and
// the 128-bit AXI4 Accelerator Coherency Port (ACP).
//
// Requests from the memory controller enter the REQ queue. A read becomes
// one AR burst of exactly four 128-bit beats (ARLEN = 3, ARSIZE = 16 bytes,
// INCR), a write one AW burst plus four W beats, so every request covers one
// 64-byte cache line. Reads are non-blocking: up to MAX_RD_OUT read bursts
// may be in flight. The AXI ID of a burst is the worker index, so that R
// beats of different workers may interleave; each ID owns a line buffer that
// collects its four beats. Completed lines and write acknowledges (one per
// B response) are picked round-robin into the RESP queue. Per ID, AXI
// returns data in request order, so each worker sees its reads in the order
// it issued them.
//
// The bridge also fetches the substitution matrix: a pulse on mtx_start
// reads the eight lines at mtx_base under AXI ID 4 (with priority on the AR
// channel) and hands each completed line, with its index, to the engine's
// matrix registers. mtx_busy stays high until the last line is delivered.
//
// Following the document: 512-to-4x128 mapping, 16 outstanding reads,
// response redistribution for up to 4 workers by AXI ID, matrix fetch from a
// base address. This design's own choices: queue depths, AxCACHE = 4'b1111
// (write-back cacheable, as coherent ACP traffic needs), one write burst at a
// time on the W channel, all addresses taken as 64-byte aligned.
module smx_mem_bridge
  import smx_pkg::*;
#(
  parameter int unsigned MAX_RD_OUT = 16,
  parameter int unsigned REQ_DEPTH  = 4,
  parameter int unsigned RESP_DEPTH = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // request / response queues towards the memory controller
  input  logic                  req_valid,
  input  mem_req_t              req,
  output logic                  req_ready,
  output logic                  rsp_valid,
  output mem_rsp_t              rsp,
  input  logic                  rsp_ready,
  // substitution matrix fetch
  input  logic                  mtx_start,
  input  logic [ADDR_W-1:0]     mtx_base,
  output logic                  mtx_busy,
  output logic                  mtx_line_valid,
  output logic [2:0]            mtx_line_idx,
  output logic [LINE_W-1:0]     mtx_line_data,
  // status
  output logic [4:0]            rd_outstanding,
  // AXI4 master (ACP)
  output logic [ACP_ID_W-1:0]   m_axi_awid,
  output logic [ADDR_W-1:0]     m_axi_awaddr,
  output logic [7:0]            m_axi_awlen,
  output logic [2:0]            m_axi_awsize,
  output logic [1:0]            m_axi_awburst,
  output logic [3:0]            m_axi_awcache,
  output logic [2:0]            m_axi_awprot,
  output logic                  m_axi_awvalid,
  input  logic                  m_axi_awready,
  output logic [ACP_DATA_W-1:0] m_axi_wdata,
  output logic [ACP_DATA_W/8-1:0] m_axi_wstrb,
  output logic                  m_axi_wlast,
  output logic                  m_axi_wvalid,
  input  logic                  m_axi_wready,
  input  logic [ACP_ID_W-1:0]   m_axi_bid,
  input  logic [1:0]            m_axi_bresp,
  input  logic                  m_axi_bvalid,
  output logic                  m_axi_bready,
  output logic [ACP_ID_W-1:0]   m_axi_arid,
  output logic [ADDR_W-1:0]     m_axi_araddr,
  output logic [7:0]            m_axi_arlen,
  output logic [2:0]            m_axi_arsize,
  output logic [1:0]            m_axi_arburst,
  output logic [3:0]            m_axi_arcache,
  output logic [2:0]            m_axi_arprot,
  output logic                  m_axi_arvalid,
  input  logic                  m_axi_arready,
  input  logic [ACP_ID_W-1:0]   m_axi_rid,
  input  logic [ACP_DATA_W-1:0] m_axi_rdata,
  input  logic [1:0]            m_axi_rresp,
  input  logic                  m_axi_rlast,
  input  logic                  m_axi_rvalid,
  output logic                  m_axi_rready
);
  localparam int unsigned NBUF   = MAX_WORKERS + 1;  // worker ids + matrix id
  localparam logic [ACP_ID_W-1:0] MTX_ID = ACP_ID_W'(MAX_WORKERS);

  // ------------------------------------------------------------ REQ queue
  logic     q_valid, q_ready;
  mem_req_t q_head;

  smx_fifo #(.W($bits(mem_req_t)), .DEPTH(REQ_DEPTH)) u_req_q (
    .clk(clk), .rst_n(rst_n),
    .in_valid(req_valid), .in_data(req), .in_ready(req_ready),
    .out_valid(q_valid), .out_data(q_head), .out_ready(q_ready));

  // ------------------------------------------------------------ matrix fetch
  logic [3:0]        mtx_issued, mtx_recv;
  logic [ADDR_W-1:0] mtx_addr;
  logic              mtx_ar;      // the matrix fetch owns AR this cycle

  assign mtx_busy = (mtx_recv != 4'(MTX_LINES));

  // ------------------------------------------------------------ read path
  logic       rd_room, ar_fire, r_beat, r_done;

  assign rd_room = 32'(rd_outstanding) < MAX_RD_OUT;
  // a queued read already offered on AR must not be replaced before it is
  // accepted, so the matrix fetch waits for it
  logic q_ar_hold;
  assign mtx_ar  = mtx_busy && (mtx_issued != 4'(MTX_LINES)) && rd_room && !q_ar_hold;

  always_comb begin
    m_axi_arlen   = 8'(ACP_BEATS - 1);
    m_axi_arsize  = 3'($clog2(ACP_DATA_W / 8));
    m_axi_arburst = 2'b01;
    m_axi_arcache = 4'b1111;
    m_axi_arprot  = 3'b000;
    if (mtx_ar) begin
      m_axi_arvalid = 1'b1;
      m_axi_arid    = MTX_ID;
      m_axi_araddr  = mtx_addr;
    end else begin
      m_axi_arvalid = q_valid && !q_head.we && rd_room;
      m_axi_arid    = ACP_ID_W'(q_head.wid);
      m_axi_araddr  = {q_head.addr[ADDR_W-1:6], 6'b0};
    end
  end
  assign ar_fire = m_axi_arvalid && m_axi_arready;

  // per-ID line buffers
  logic [LINE_W-1:0] lbuf  [NBUF];
  logic [1:0]        lbeat [NBUF];
  logic [NBUF-1:0]   lfull;
  logic              rid_ok;

  assign rid_ok       = 32'(m_axi_rid) < NBUF;
  assign m_axi_rready = rid_ok && !lfull[m_axi_rid];
  assign r_beat       = m_axi_rvalid && m_axi_rready;
  assign r_done       = r_beat && m_axi_rlast;

  // ------------------------------------------------------------ write path
  logic              wr_busy, aw_done, w_active;
  logic [1:0]        wbeat;
  logic [LINE_W-1:0] wline;
  logic              wack_pend;
  logic [WID_W-1:0]  wack_wid;

  assign m_axi_awlen   = 8'(ACP_BEATS - 1);
  assign m_axi_awsize  = 3'($clog2(ACP_DATA_W / 8));
  assign m_axi_awburst = 2'b01;
  assign m_axi_awcache = 4'b1111;
  assign m_axi_awprot  = 3'b000;
  assign m_axi_awvalid = wr_busy && !aw_done;
  assign m_axi_wvalid  = wr_busy && w_active;
  assign m_axi_wdata   = wline[32'(wbeat) * ACP_DATA_W +: ACP_DATA_W];
  assign m_axi_wstrb   = '1;
  assign m_axi_wlast   = (wbeat == 2'(ACP_BEATS - 1));
  assign m_axi_bready  = !wack_pend;

  // pop the REQ queue: reads when AR accepts them, writes when the write
  // engine is free to take them
  assign q_ready = q_valid && (q_head.we ? !wr_busy : (ar_fire && !mtx_ar));

  // ------------------------------------------------------------ RESP queue
  localparam int unsigned NSRC = MAX_WORKERS + 1;  // 4 read buffers + write ack
  logic [NSRC-1:0] src_req, src_gnt;
  logic [2:0]      src_idx;
  logic            rq_in_valid, rq_in_ready;
  mem_rsp_t        rq_in;

  always_comb begin
    for (int k = 0; k < MAX_WORKERS; k++) src_req[k] = lfull[k];
    src_req[MAX_WORKERS] = wack_pend;
  end

  smx_rr_arbiter #(.N(NSRC)) u_rsp_arb (
    .clk(clk), .rst_n(rst_n), .req(src_req), .accept(rq_in_ready),
    .grant(src_gnt), .grant_idx(src_idx));

  always_comb begin
    rq_in_valid = |src_gnt;
    rq_in       = '0;
    if (32'(src_idx) == MAX_WORKERS) begin
      rq_in.wid  = wack_wid;
      rq_in.wack = 1'b1;
    end else begin
      rq_in.wid  = WID_W'(src_idx);
      rq_in.wack = 1'b0;
      rq_in.data = lbuf[src_idx];
    end
  end

  smx_fifo #(.W($bits(mem_rsp_t)), .DEPTH(RESP_DEPTH)) u_rsp_q (
    .clk(clk), .rst_n(rst_n),
    .in_valid(rq_in_valid), .in_data(rq_in), .in_ready(rq_in_ready),
    .out_valid(rsp_valid), .out_data(rsp), .out_ready(rsp_ready));

  // matrix lines leave their buffer directly
  assign mtx_line_valid = lfull[NBUF-1];
  assign mtx_line_idx   = mtx_recv[2:0];
  assign mtx_line_data  = lbuf[NBUF-1];

  // ------------------------------------------------------------ state
  always_ff @(posedge clk) begin
    if (r_beat) lbuf[m_axi_rid][32'(lbeat[m_axi_rid]) * ACP_DATA_W +: ACP_DATA_W] <= m_axi_rdata;
    if (q_valid && q_head.we && !wr_busy) wline <= q_head.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_outstanding <= '0;
      q_ar_hold      <= 1'b0;
      lfull          <= '0;
      for (int k = 0; k < NBUF; k++) lbeat[k] <= '0;
      mtx_issued     <= 4'(MTX_LINES);
      mtx_recv       <= 4'(MTX_LINES);
      mtx_addr       <= '0;
      wr_busy        <= 1'b0;
      aw_done        <= 1'b0;
      w_active       <= 1'b0;
      wbeat          <= '0;
      wack_pend      <= 1'b0;
      wack_wid       <= '0;
      m_axi_awid     <= '0;
      m_axi_awaddr   <= '0;
    end else begin
      // outstanding read bursts
      rd_outstanding <= rd_outstanding + 5'(ar_fire) - 5'(r_done);
      q_ar_hold      <= m_axi_arvalid && !m_axi_arready && !mtx_ar;

      // line buffers
      if (r_beat) begin
        lbeat[m_axi_rid] <= lbeat[m_axi_rid] + 1'b1;
        if (m_axi_rlast) begin
          lbeat[m_axi_rid] <= '0;
          lfull[m_axi_rid] <= 1'b1;
        end
      end
      for (int k = 0; k < MAX_WORKERS; k++)
        if (src_gnt[k] && rq_in_ready) lfull[k] <= 1'b0;
      if (lfull[NBUF-1]) begin
        lfull[NBUF-1] <= 1'b0;
        mtx_recv      <= mtx_recv + 1'b1;
      end

      // matrix fetch sequencing
      if (mtx_start && !mtx_busy) begin
        mtx_issued <= '0;
        mtx_recv   <= '0;
        mtx_addr   <= {mtx_base[ADDR_W-1:6], 6'b0};
      end else if (mtx_ar && m_axi_arready) begin
        mtx_issued <= mtx_issued + 1'b1;
        mtx_addr   <= mtx_addr + ADDR_W'(LINE_W / 8);
      end

      // write engine
      if (!wr_busy) begin
        if (q_valid && q_head.we) begin
          wr_busy      <= 1'b1;
          aw_done      <= 1'b0;
          w_active     <= 1'b1;
          wbeat        <= '0;
          m_axi_awid   <= ACP_ID_W'(q_head.wid);
          m_axi_awaddr <= {q_head.addr[ADDR_W-1:6], 6'b0};
        end
      end else begin
        if (m_axi_awvalid && m_axi_awready) aw_done <= 1'b1;
        if (m_axi_wvalid && m_axi_wready) begin
          wbeat <= wbeat + 1'b1;
          if (m_axi_wlast) w_active <= 1'b0;
        end
        if ((aw_done || (m_axi_awvalid && m_axi_awready)) &&
            (!w_active || (m_axi_wvalid && m_axi_wready && m_axi_wlast)))
          wr_busy <= 1'b0;
      end

      // write acknowledges
      if (m_axi_bvalid && m_axi_bready) begin
        wack_pend <= 1'b1;
        wack_wid  <= WID_W'(m_axi_bid);
      end else if (src_gnt[MAX_WORKERS] && rq_in_ready) begin
        wack_pend <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------ checks
  a_rd_limit: assert property (@(posedge clk) disable iff (!rst_n)
    32'(rd_outstanding) <= MAX_RD_OUT);
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_arvalid && !m_axi_arready |=> m_axi_arvalid && $stable(m_axi_araddr));
  a_rid_known: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_rvalid |-> rid_ok);
endmodule
