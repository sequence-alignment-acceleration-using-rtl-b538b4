// smx_ctrl_if: the Control Interface, an AXI4-Lite slave holding the CSRs.
//
// The host configures and starts the workers, triggers the substitution
// matrix fetch, polls status and reads the score and the performance
// counters through 32-bit registers. Writes take the address and data
// channels together and answer OKAY; reads answer OKAY with the register
// value (0 for unmapped addresses). Start bits are self-clearing pulses.
//
// Register map (byte offsets, this design's own layout):
//   0x000 CTRL        W: bit0 start matrix fetch, bit1 clear perf counters
//   0x004 STATUS      R: bit0 matrix fetch busy, bits[7:4] worker busy,
//                        bits[11:8] worker done
//   0x008 MTX_BASE_LO 0x00C MTX_BASE_HI   substitution matrix address
//   0x010 IRQ_EN      bit w: raise irq while worker w is done
//   0x020 PERF_BUSY   cycles with any worker busy
//   0x024 PERF_ENG    cycles in which the engine accepted a tile
//   worker w at 0x100 + 0x40*w:
//   +0x00 CTRL    W: bit0 start
//   +0x04 CFG     [1:0] element width mode (0:2b 1:4b 2:6b 3:8b),
//                 [2] substitution matrix, [3] score-only
//   +0x08/0x0C QADDR lo/hi  +0x10/0x14 RADDR lo/hi  +0x18/0x1C OADDR lo/hi
//   +0x20 QLEN    query length in supertiles
//   +0x24 RLEN    reference length in supertiles
//   +0x28 SCORING [7:0] match, [15:8] mismatch, [23:16] insertion,
//                 [31:24] deletion score, all signed
//   +0x2C SCORE   R: final score of the last job
//   +0x30 PERF_BUSY +0x34 PERF_MEM_STALL +0x38 PERF_ENG_STALL +0x3C PERF_TILES
// The performance counters are instantiated here, as the document places
// them in the control interface's register space.
module smx_ctrl_if
  import smx_pkg::*;
#(
  parameter int unsigned NUM_WORKERS = 2,
  parameter int unsigned AXIL_AW     = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  // AXI4-Lite slave
  input  logic [AXIL_AW-1:0] s_axil_awaddr,
  input  logic               s_axil_awvalid,
  output logic               s_axil_awready,
  input  logic [31:0]        s_axil_wdata,
  input  logic [3:0]         s_axil_wstrb,
  input  logic               s_axil_wvalid,
  output logic               s_axil_wready,
  output logic [1:0]         s_axil_bresp,
  output logic               s_axil_bvalid,
  input  logic               s_axil_bready,
  input  logic [AXIL_AW-1:0] s_axil_araddr,
  input  logic               s_axil_arvalid,
  output logic               s_axil_arready,
  output logic [31:0]        s_axil_rdata,
  output logic [1:0]         s_axil_rresp,
  output logic               s_axil_rvalid,
  input  logic               s_axil_rready,
  // to / from the accelerator
  output job_t               job   [NUM_WORKERS],
  output logic               start [NUM_WORKERS],
  input  logic               busy  [NUM_WORKERS],
  input  logic               done  [NUM_WORKERS],
  input  logic signed [31:0] score [NUM_WORKERS],
  output logic               mtx_start,
  output logic [ADDR_W-1:0]  mtx_base,
  input  logic               mtx_busy,
  input  perf_ev_t           ev [NUM_WORKERS],
  input  logic               eng_active,
  output logic               irq
);
  // ------------------------------------------------------------ perf
  logic        perf_clear;
  logic [31:0] cyc_busy, cyc_eng;
  logic [31:0] p_busy [NUM_WORKERS], p_mem [NUM_WORKERS];
  logic [31:0] p_eng  [NUM_WORKERS], p_tiles [NUM_WORKERS];

  smx_perf_counters #(.NUM_WORKERS(NUM_WORKERS)) u_perf (
    .clk(clk), .rst_n(rst_n), .clear(perf_clear), .ev(ev), .eng_active(eng_active),
    .cyc_busy(cyc_busy), .cyc_eng(cyc_eng), .w_busy(p_busy), .w_mem_stall(p_mem),
    .w_eng_stall(p_eng), .w_tiles(p_tiles));

  // ------------------------------------------------------------ write side
  logic                   wr_fire;
  logic [AXIL_AW-1:0]     wa;
  logic [3:0]             irq_en;

  assign s_axil_awready = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_wready  = s_axil_awready;
  assign s_axil_bresp   = 2'b00;
  assign wr_fire        = s_axil_awready;
  assign wa             = s_axil_awaddr;

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] nw, logic [3:0] be);
    for (int b = 0; b < 4; b++) if (be[b]) old[b*8 +: 8] = nw[b*8 +: 8];
    return old;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axil_bvalid <= 1'b0;
      mtx_start     <= 1'b0;
      perf_clear    <= 1'b0;
      mtx_base      <= '0;
      irq_en        <= '0;
      for (int w = 0; w < NUM_WORKERS; w++) begin
        job[w]   <= '0;
        start[w] <= 1'b0;
      end
    end else begin
      mtx_start  <= 1'b0;
      perf_clear <= 1'b0;
      for (int w = 0; w < NUM_WORKERS; w++) start[w] <= 1'b0;
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (wr_fire) begin
        s_axil_bvalid <= 1'b1;
        case (wa)
          AXIL_AW'('h000): begin
            mtx_start  <= s_axil_wdata[0] && s_axil_wstrb[0];
            perf_clear <= s_axil_wdata[1] && s_axil_wstrb[0];
          end
          AXIL_AW'('h008): mtx_base[31:0] <= merge(mtx_base[31:0], s_axil_wdata, s_axil_wstrb);
          AXIL_AW'('h00C): if (s_axil_wstrb[0]) mtx_base[ADDR_W-1:32] <= s_axil_wdata[ADDR_W-33:0];
          AXIL_AW'('h010): if (s_axil_wstrb[0]) irq_en <= s_axil_wdata[3:0];
          default: ;
        endcase
        for (int w = 0; w < NUM_WORKERS; w++) begin
          if (32'(wa) >= 32'h100 + 32'h40 * w && 32'(wa) < 32'h140 + 32'h40 * w) begin
            case (32'(wa) - 32'h100 - 32'h40 * w)
              32'h00: start[w] <= s_axil_wdata[0] && s_axil_wstrb[0];
              32'h04: if (s_axil_wstrb[0]) begin
                job[w].mode       <= ew_mode_e'(s_axil_wdata[1:0]);
                job[w].mtx        <= s_axil_wdata[2];
                job[w].score_only <= s_axil_wdata[3];
              end
              32'h08: job[w].qaddr[31:0] <= merge(job[w].qaddr[31:0], s_axil_wdata, s_axil_wstrb);
              32'h0C: if (s_axil_wstrb[0]) job[w].qaddr[ADDR_W-1:32] <= s_axil_wdata[ADDR_W-33:0];
              32'h10: job[w].raddr[31:0] <= merge(job[w].raddr[31:0], s_axil_wdata, s_axil_wstrb);
              32'h14: if (s_axil_wstrb[0]) job[w].raddr[ADDR_W-1:32] <= s_axil_wdata[ADDR_W-33:0];
              32'h18: job[w].oaddr[31:0] <= merge(job[w].oaddr[31:0], s_axil_wdata, s_axil_wstrb);
              32'h1C: if (s_axil_wstrb[0]) job[w].oaddr[ADDR_W-1:32] <= s_axil_wdata[ADDR_W-33:0];
              32'h20: job[w].q_st <= 16'(merge({16'h0, job[w].q_st}, s_axil_wdata, s_axil_wstrb));
              32'h24: job[w].r_st <= 16'(merge({16'h0, job[w].r_st}, s_axil_wdata, s_axil_wstrb));
              32'h28: begin
                if (s_axil_wstrb[0]) job[w].match <= s_axil_wdata[7:0];
                if (s_axil_wstrb[1]) job[w].mis   <= s_axil_wdata[15:8];
                if (s_axil_wstrb[2]) job[w].ins   <= s_axil_wdata[23:16];
                if (s_axil_wstrb[3]) job[w].del   <= s_axil_wdata[31:24];
              end
              default: ;
            endcase
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ read side
  logic [31:0] rd_val;

  always_comb begin
    logic [31:0] a;
    a      = 32'(s_axil_araddr);
    rd_val = '0;
    case (a)
      32'h000: rd_val = '0;
      32'h004: begin
        rd_val[0] = mtx_busy;
        for (int w = 0; w < NUM_WORKERS; w++) begin
          rd_val[4 + w] = busy[w];
          rd_val[8 + w] = done[w];
        end
      end
      32'h008: rd_val = mtx_base[31:0];
      32'h00C: rd_val = 32'(mtx_base[ADDR_W-1:32]);
      32'h010: rd_val = 32'(irq_en);
      32'h020: rd_val = cyc_busy;
      32'h024: rd_val = cyc_eng;
      default: ;
    endcase
    for (int w = 0; w < NUM_WORKERS; w++) begin
      if (a >= 32'h100 + 32'h40 * w && a < 32'h140 + 32'h40 * w) begin
        case (a - 32'h100 - 32'h40 * w)
          32'h04: rd_val = {28'h0, job[w].score_only, job[w].mtx, job[w].mode};
          32'h08: rd_val = job[w].qaddr[31:0];
          32'h0C: rd_val = 32'(job[w].qaddr[ADDR_W-1:32]);
          32'h10: rd_val = job[w].raddr[31:0];
          32'h14: rd_val = 32'(job[w].raddr[ADDR_W-1:32]);
          32'h18: rd_val = job[w].oaddr[31:0];
          32'h1C: rd_val = 32'(job[w].oaddr[ADDR_W-1:32]);
          32'h20: rd_val = 32'(job[w].q_st);
          32'h24: rd_val = 32'(job[w].r_st);
          32'h28: rd_val = {job[w].del, job[w].ins, job[w].mis, job[w].match};
          32'h2C: rd_val = score[w];
          32'h30: rd_val = p_busy[w];
          32'h34: rd_val = p_mem[w];
          32'h38: rd_val = p_eng[w];
          32'h3C: rd_val = p_tiles[w];
          default: rd_val = '0;
        endcase
      end
    end
  end

  assign s_axil_arready = !s_axil_rvalid;
  assign s_axil_rresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else begin
      if (s_axil_arvalid && s_axil_arready) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= rd_val;
      end else if (s_axil_rready) begin
        s_axil_rvalid <= 1'b0;
      end
    end
  end

  always_comb begin
    irq = 1'b0;
    for (int w = 0; w < NUM_WORKERS; w++) irq |= done[w] && irq_en[w];
  end
endmodule
