// smx_worker: SMX-Worker, orchestrates the computation of one DP-block.
//
// The DP-block is cut into supertiles of 8 x 8 tiles. A tile is VL x VL
// DP-elements, so a supertile's query and reference characters are exactly
// one 512-bit cache line each (eight 64-bit vectors), and so is each of its
// borders. The worker walks the supertiles row by row. For each one it
//   1. issues, back to back, the reads it needs: the query line (first
//      supertile of a row only), the reference line, and the top border
//      line written by the supertile above (not for the first row);
//   2. runs the 64 tiles in row-major order on the engine, keeping the
//      borders locally: hbuf[tj] holds the dh' row below tile column tj,
//      vbuf[ti] the dv' column right of tile row ti; vbuf carries over to the
//      next supertile of the same row, so left borders are never fetched;
//   3. writes results back. In traceback mode every tile row produces two
//      lines (the eight tiles' bottom dh' rows, then their right dv' columns)
//      at oaddr + ((i*R + j)*16 + 2*ti + {0,1})*64, 16 lines per supertile.
//      In score-only mode only the supertile's bottom row is written, at
//      oaddr + j*64, where the next supertile row reads it back: 16 times
//      fewer writes, as the document states.
// While the tiles of a supertile run, the worker already reads the
// reference line and top border of the next supertile of the same row into
// prefetch buffers, so the memory latency overlaps with computation; when it
// moves on, it continues from whatever the prefetch has issued and received.
// (The first supertile of a row is not prefetched: its top border may still
// be on its way to memory.)
// A tile depends on the dv' column of the tile before it. While that result
// is in the engine the worker waits (an engine-dependency stall); the result
// is forwarded straight into the next tile's request in the cycle it
// arrives, so one worker issues a tile every NSEG cycles and a second worker
// fills the remaining engine slots.
//
// Score-only reduction: the dv' values of the rightmost tile column are
// summed as they arrive. With H[0][j] = j*D and H[i][0] = i*I the final score
// is H[m][n] = m*I + n*D + sum(dv'), which is placed in `score` when the job
// ends, so the host reads it with one register access.
//
// Boundaries are those of global alignment (all-zero offset deltas on the
// top and left edges). Sequence lengths are whole supertiles (8*VL
// characters); the host pads sequences. These restrictions, the line layout
// and the tile order are this design's choices; the supertile scheme, border
// writes, score-only reduction and the 16x write saving follow the document.
//
// Interface: start pulses with job stable; busy is high until the last write
// is acknowledged; done then stays high until the next start. Memory and
// engine ports use valid/ready, and responses are always accepted.
module smx_worker
  import smx_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  job_t               job,
  output logic               busy,
  output logic               done,
  output logic signed [31:0] score,
  // memory
  output logic               mem_req_valid,
  output mem_req_t           mem_req,
  input  logic               mem_req_ready,
  input  logic               mem_rsp_valid,
  input  mem_rsp_t           mem_rsp,
  // engine
  output logic               eng_req_valid,
  output eng_req_t           eng_req,
  input  logic               eng_req_ready,
  input  logic               eng_rsp_valid,
  input  eng_rsp_t           eng_rsp,
  // performance events
  output perf_ev_t           ev
);
  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_TILE, S_WRITE, S_STEND, S_DRAIN
  } state_e;

  localparam int unsigned LB = LINE_W / 8;  // bytes per line

  state_e            state;
  job_t              cfg;
  logic [15:0]       si, sj;          // supertile coordinates
  logic [2:0]        ti, tj;          // next tile to issue
  logic [2:0]        pti, ptj;        // tile whose result is pending
  logic              waiting;         // one tile in the engine
  logic              all_issued;
  logic [1:0]        ip, rp;          // read slots issued / received
  logic [2:0]        need;            // slot 0 query, 1 reference, 2 top
  logic [1:0]        pf_ip, pf_rp;    // prefetch slots issued / received
  logic [2:0]        pf_need;         // prefetch for the next supertile of the row
  logic [LINE_W-1:0] pf_rline, pf_top;
  logic              wsel;            // traceback: 0 dh' line, 1 dv' line
  logic [7:0]        wr_pending;
  logic [LINE_W-1:0] qline, rline;
  logic [VEC_W-1:0]  hbuf [VPL];
  logic [VEC_W-1:0]  vbuf [VPL];
  logic [VEC_W-1:0]  tcol [VPL];
  logic [31:0]       acc;

  // ------------------------------------------------------------ helpers
  function automatic logic [1:0] next_need(logic [2:0] nd, logic [1:0] from);
    for (int s = 0; s < 3; s++)
      if (s >= 32'(from) && nd[s]) return 2'(s);
    return 2'd3;
  endfunction

  function automatic logic [7:0] sprime(logic signed [7:0] s, logic signed [7:0] a,
                                        logic signed [7:0] b);
    logic signed [9:0] v;
    v = 10'(s) - 10'(a) - 10'(b);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  function automatic logic [31:0] vec_sum(logic [VEC_W-1:0] v, ew_mode_e m);
    logic [31:0] t;
    t = '0;
    case (m)
      EW2: for (int k = 0; k < 32; k++) t += 32'(v[k*2 +: 2]);
      EW4: for (int k = 0; k < 16; k++) t += 32'(v[k*4 +: 4]);
      EW6: for (int k = 0; k < 10; k++) t += 32'(v[k*6 +: 6]);
      default: for (int k = 0; k < 8; k++) t += 32'(v[k*8 +: 8]);
    endcase
    return t;
  endfunction

  logic [ADDR_W-1:0] tb_base;   // first traceback line of this supertile
  logic [ADDR_W-1:0] top_addr, pf_top_addr;
  logic [1:0]        ip_c, rp_c, pf_ip_c, pf_rp_c;
  logic              pf_rsp;
  logic              eng_fire, mem_fire, rd_gate, byp;
  logic              last_col;

  always_comb begin
    tb_base  = cfg.oaddr + ADDR_W'((64'(si) * 64'(cfg.r_st) + 64'(sj)) * 16 * LB);
    if (cfg.score_only)
      top_addr = cfg.oaddr + ADDR_W'(64'(sj) * LB);
    else
      top_addr = cfg.oaddr + ADDR_W'(((64'(si) - 1) * 64'(cfg.r_st) + 64'(sj)) * 16 * LB
                                     + 14 * LB);
    // the next supertile of the row reads the border above it
    pf_top_addr = cfg.score_only
                ? cfg.oaddr + ADDR_W'((64'(sj) + 1) * LB)
                : cfg.oaddr + ADDR_W'(((64'(si) - 1) * 64'(cfg.r_st) + 64'(sj) + 1) * 16 * LB
                                      + 14 * LB);
    ip_c     = next_need(need, ip);
    rp_c     = next_need(need, rp);
    pf_ip_c  = next_need(pf_need, pf_ip);
    pf_rp_c  = next_need(pf_need, pf_rp);
    // read data outside S_LOAD belongs to the prefetch
    pf_rsp   = mem_rsp_valid && !mem_rsp.wack && (state != S_LOAD);
    last_col = (32'(sj) == 32'(cfg.r_st) - 1);
    // the first supertile of a row reads what the previous row wrote, so
    // all writes must be acknowledged first
    rd_gate  = (sj != '0) || (wr_pending == '0);
  end

  // ------------------------------------------------------------ memory port
  always_comb begin
    mem_req_valid = 1'b0;
    mem_req       = '0;
    case (state)
      S_LOAD: begin
        mem_req_valid = (ip_c != 2'd3) && rd_gate;
        mem_req.we    = 1'b0;
        case (ip_c)
          2'd0:    mem_req.addr = cfg.qaddr + ADDR_W'(64'(si) * LB);
          2'd1:    mem_req.addr = cfg.raddr + ADDR_W'(64'(sj) * LB);
          default: mem_req.addr = top_addr;
        endcase
      end
      S_TILE: begin
        mem_req_valid = (pf_ip_c != 2'd3);
        mem_req.we    = 1'b0;
        mem_req.addr  = (pf_ip_c == 2'd1) ? cfg.raddr + ADDR_W'((64'(sj) + 1) * LB)
                                          : pf_top_addr;
      end
      S_WRITE: begin
        mem_req_valid = 1'b1;
        mem_req.we    = 1'b1;
        mem_req.addr  = tb_base + ADDR_W'((64'(pti) * 2 + 64'(wsel)) * LB);
        for (int k = 0; k < VPL; k++)
          mem_req.data[k*VEC_W +: VEC_W] = wsel ? tcol[k] : hbuf[k];
      end
      S_STEND: begin
        mem_req_valid = cfg.score_only;
        mem_req.we    = 1'b1;
        mem_req.addr  = cfg.oaddr + ADDR_W'(64'(sj) * LB);
        for (int k = 0; k < VPL; k++) mem_req.data[k*VEC_W +: VEC_W] = hbuf[k];
      end
      default: ;
    endcase
  end
  assign mem_fire = mem_req_valid && mem_req_ready;

  // ------------------------------------------------------------ engine port
  always_comb begin
    // forward the pending result into the next tile of the same tile row
    byp           = waiting && eng_rsp_valid && (tj != 3'd0);
    eng_req_valid = (state == S_TILE) && !all_issued && (!waiting || byp);
    eng_req       = '0;
    eng_req.mode  = cfg.mode;
    eng_req.mtx   = cfg.mtx;
    eng_req.s_match = sprime(cfg.match, cfg.ins, cfg.del);
    eng_req.s_mis   = sprime(cfg.mis, cfg.ins, cfg.del);
    eng_req.bias  = -(cfg.ins + cfg.del);
    eng_req.q     = qline[32'(ti) * VEC_W +: VEC_W];
    eng_req.r     = rline[32'(tj) * VEC_W +: VEC_W];
    eng_req.dv    = byp ? eng_rsp.dv : vbuf[ti];
    eng_req.dh    = hbuf[tj];
  end
  assign eng_fire = eng_req_valid && eng_req_ready;

  // ------------------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cfg        <= '0;
      si         <= '0;
      sj         <= '0;
      ti         <= '0;
      tj         <= '0;
      pti        <= '0;
      ptj        <= '0;
      waiting    <= 1'b0;
      all_issued <= 1'b0;
      ip         <= '0;
      rp         <= '0;
      need       <= '0;
      pf_ip      <= '0;
      pf_rp      <= '0;
      pf_need    <= '0;
      pf_rline   <= '0;
      pf_top     <= '0;
      wsel       <= 1'b0;
      wr_pending <= '0;
      acc        <= '0;
      done       <= 1'b0;
      score      <= '0;
      qline      <= '0;
      rline      <= '0;
      for (int k = 0; k < VPL; k++) begin
        hbuf[k] <= '0;
        vbuf[k] <= '0;
        tcol[k] <= '0;
      end
    end else begin
      // write acknowledges may arrive in any state
      wr_pending <= wr_pending + 8'(mem_fire && mem_req.we)
                               - 8'(mem_rsp_valid && mem_rsp.wack);
      if (pf_rsp) begin
        pf_rp <= pf_rp_c + 2'd1;
        if (pf_rp_c == 2'd1) pf_rline <= mem_rsp.data;
        else                 pf_top   <= mem_rsp.data;
      end

      case (state)
        S_IDLE: begin
          if (start) begin
            cfg   <= job;
            si    <= '0;
            sj    <= '0;
            acc   <= '0;
            done  <= 1'b0;
            state <= S_LOAD;
            ip    <= '0;
            rp    <= '0;
            need  <= 3'b011;
            for (int k = 0; k < VPL; k++) begin
              hbuf[k] <= '0;
              vbuf[k] <= '0;
            end
          end
        end

        S_LOAD: begin
          if (mem_fire) ip <= ip_c + 2'd1;
          if (mem_rsp_valid && !mem_rsp.wack) begin
            rp <= rp_c + 2'd1;
            case (rp_c)
              2'd0: qline <= mem_rsp.data;
              2'd1: rline <= mem_rsp.data;
              default: for (int k = 0; k < VPL; k++) hbuf[k] <= mem_rsp.data[k*VEC_W +: VEC_W];
            endcase
          end
          if (ip_c == 2'd3 && rp_c == 2'd3) begin
            state      <= S_TILE;
            ti         <= '0;
            tj         <= '0;
            all_issued <= 1'b0;
            // speculative reads for the next supertile of this row
            pf_ip      <= '0;
            pf_rp      <= '0;
            pf_need    <= (32'(sj) + 1 < 32'(cfg.r_st)) ? {si != '0, 2'b10} : 3'b000;
          end
        end

        S_TILE: begin
          if (mem_fire) pf_ip <= pf_ip_c + 2'd1;
          if (eng_fire) begin
            pti <= ti;
            ptj <= tj;
            tj  <= tj + 3'd1;
            if (tj == 3'd7) begin
              ti <= ti + 3'd1;
              if (ti == 3'd7) all_issued <= 1'b1;
            end
          end
          if (waiting && eng_rsp_valid) begin
            vbuf[pti] <= eng_rsp.dv;
            hbuf[ptj] <= eng_rsp.dh;
            tcol[ptj] <= eng_rsp.dv;
            if (last_col && ptj == 3'd7) acc <= acc + vec_sum(eng_rsp.dv, cfg.mode);
            if (ptj == 3'd7) begin
              if (!cfg.score_only) begin
                state <= S_WRITE;
                wsel  <= 1'b0;
              end else if (pti == 3'd7) begin
                state <= S_STEND;
              end
            end
          end
          waiting <= eng_fire || (waiting && !eng_rsp_valid);
        end

        S_WRITE: begin
          if (mem_fire) begin
            wsel <= 1'b1;
            if (wsel) state <= (pti == 3'd7) ? S_STEND : S_TILE;
          end
        end

        S_STEND: begin
          // a prefetched line arriving now is taken over next cycle
          if ((mem_fire || !cfg.score_only) && !pf_rsp) begin
            ip <= '0;
            rp <= '0;
            if (32'(sj) + 1 < 32'(cfg.r_st)) begin
              // continue with what the prefetch issued and received
              sj    <= sj + 16'd1;
              need  <= pf_need;
              ip    <= pf_ip;
              rp    <= pf_rp;
              rline <= pf_rline;
              state <= S_LOAD;
              // first supertile row: the top border is the alignment's edge
              for (int k = 0; k < VPL; k++)
                hbuf[k] <= (si == '0) ? '0 : pf_top[k*VEC_W +: VEC_W];
            end else if (32'(si) + 1 < 32'(cfg.q_st)) begin
              si    <= si + 16'd1;
              sj    <= '0;
              need  <= 3'b111;
              state <= S_LOAD;
              for (int k = 0; k < VPL; k++) vbuf[k] <= '0;
            end else begin
              state <= S_DRAIN;
            end
          end
        end

        S_DRAIN: begin
          if (wr_pending == '0) begin
            state <= S_IDLE;
            done  <= 1'b1;
            score <= $signed(acc)
                   + $signed(32'(cfg.q_st) * 8 * 32'(vl_of(cfg.mode))) * 32'(cfg.ins)
                   + $signed(32'(cfg.r_st) * 8 * 32'(vl_of(cfg.mode))) * 32'(cfg.del);
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  always_comb begin
    ev.busy      = busy;
    ev.mem_stall = (state == S_LOAD) || (state == S_DRAIN) ||
                   ((state == S_WRITE || state == S_STEND) && mem_req_valid && !mem_req_ready);
    ev.eng_stall = (state == S_TILE) && waiting && !eng_rsp_valid;
    ev.tile      = eng_fire;
  end

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    eng_rsp_valid |-> waiting);
endmodule
