// acp_mem_model: behavioural AXI4 slave standing in for the CPU cache behind
// the coherency port. Not synthesizable.
//
// Memory is an array of 2^AW_WORDS 128-bit words. Read bursts are queued and
// answered after a random latency of LAT_MIN..LAT_MAX cycles; beats of
// bursts with different IDs are interleaved at random, while bursts with the
// same ID keep their order, as AXI4 allows. Write bursts are taken in AW
// order and answered with one B each, also after a random latency. The
// ready signals are asserted at random to add back-pressure. The model
// counts the largest number of read bursts it held at once and how often
// beats of different IDs interleaved.
module acp_mem_model #(
  parameter int AW_WORDS = 16,
  parameter int LAT_MIN  = 4,
  parameter int LAT_MAX  = 30
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [2:0]   awid,
  input  logic [39:0]  awaddr,
  input  logic [7:0]   awlen,
  input  logic         awvalid,
  output logic         awready,
  input  logic [127:0] wdata,
  input  logic         wlast,
  input  logic         wvalid,
  output logic         wready,
  output logic [2:0]   bid,
  output logic [1:0]   bresp,
  output logic         bvalid,
  input  logic         bready,
  input  logic [2:0]   arid,
  input  logic [39:0]  araddr,
  input  logic [7:0]   arlen,
  input  logic         arvalid,
  output logic         arready,
  output logic [2:0]   rid,
  output logic [127:0] rdata,
  output logic [1:0]   rresp,
  output logic         rlast,
  output logic         rvalid,
  input  logic         rready
);
  logic [127:0] mem [1 << AW_WORDS];

  typedef struct { int id; longint addr; int beats; int left; longint due; } burst_t;
  burst_t rq [$];
  burst_t wq [$];
  int     bq [$];
  longint bdue [$];       // earliest cycle for each queued B
  longint now = 0;
  int     max_rd_held = 0;
  int     interleaves = 0;
  int     cur = -1;          // index in rq of the burst on R
  int     last_id = -1;
  bit     last_mid = 0;      // the last beat sent was not a burst's last

  function automatic int widx(longint a);
    return int'((a >> 4) & ((1 << AW_WORDS) - 1));
  endfunction

  assign bresp = 2'b00;
  assign rresp = 2'b00;

  always_ff @(posedge clk) now <= now + 1;

  // ready signals with random back-pressure
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      awready <= 0; wready <= 0; arready <= 0;
    end else begin
      awready <= ($urandom_range(3) != 0);
      wready  <= ($urandom_range(3) != 0);
      arready <= ($urandom_range(3) != 0);
    end
  end

  // address channels
  always_ff @(posedge clk) if (rst_n) begin
    if (arvalid && arready) begin
      rq.push_back('{int'(arid), longint'(araddr), int'(arlen) + 1, int'(arlen) + 1,
                     now + longint'($urandom_range(LAT_MAX, LAT_MIN))});
      if (rq.size() > max_rd_held) max_rd_held = rq.size();
    end
    if (awvalid && awready)
      wq.push_back('{int'(awid), longint'(awaddr), int'(awlen) + 1, int'(awlen) + 1, 0});
  end

  // write data: W beats follow AW order; a W beat may arrive before its AW
  typedef struct { logic [127:0] d; bit last; } wbeat_t;
  wbeat_t wdq [$];
  always_ff @(posedge clk) if (rst_n) begin
    if (wvalid && wready) wdq.push_back('{wdata, wlast});
    if (wq.size() > 0 && wdq.size() > 0) begin
      wbeat_t b;
      b = wdq.pop_front();
      mem[widx(wq[0].addr + 16 * (wq[0].beats - wq[0].left))] <= b.d;
      wq[0].left = wq[0].left - 1;
      if (wq[0].left == 0) begin
        bq.push_back(wq[0].id);
        bdue.push_back(now + longint'($urandom_range(LAT_MAX, LAT_MIN)));
        void'(wq.pop_front());
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid <= 0; bid <= 0;
    end else begin
      if (bvalid && bready) bvalid <= 0;
      if ((!bvalid || bready) && bq.size() > 0 && bdue[0] <= now) begin
        bvalid <= 1;
        bid    <= 3'(bq.pop_front());
        void'(bdue.pop_front());
      end
    end
  end

  // read data: pick an eligible burst (due, and oldest of its ID)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid <= 0; cur = -1;
    end else begin
      if (rvalid && rready) begin
        burst_t b;
        b = rq[cur];
        b.left = b.left - 1;
        if (b.left == 0) rq.delete(cur);
        else rq[cur] = b;
        rvalid <= 0;
        cur = -1;
      end
      if (!rvalid || rready) begin
        int cand [$];
        bit seen [8];
        seen = '{default: 0};
        cand.delete();
        for (int n = 0; n < rq.size(); n++) begin
          if (!seen[rq[n].id & 7] && rq[n].due <= now) cand.push_back(n);
          seen[rq[n].id & 7] = 1;
        end
        if (cand.size() > 0 && $urandom_range(4) != 0) begin
          int sel;
          sel = cand[$urandom_range(cand.size() - 1)];
          cur = sel;
          if (last_mid && rq[sel].id != last_id) interleaves++;
          rvalid <= 1;
          rid    <= 3'(rq[sel].id);
          rdata  <= mem[widx(rq[sel].addr + 16 * (rq[sel].beats - rq[sel].left))];
          rlast  <= (rq[sel].left == 1);
          last_id  = rq[sel].id;
          last_mid = (rq[sel].left != 1);
        end
      end
    end
  end
endmodule
