// smx_mem_arbiter: arbitrates the workers' cache-line requests.
//
// One request per cycle is passed to the memory controller, chosen
// round-robin among the workers with a pending request, and stamped with the
// worker's index, which later selects the AXI ID. The grant is held until the
// downstream ready accepts it, so the request a worker presents must stay
// stable while valid (standard valid/ready). Combinational from request to
// output.
module smx_mem_arbiter
  import smx_pkg::*;
#(
  parameter int unsigned NUM_WORKERS = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     w_req_valid [NUM_WORKERS],
  input  mem_req_t w_req       [NUM_WORKERS],
  output logic     w_req_ready [NUM_WORKERS],
  output logic     out_valid,
  output mem_req_t out_req,
  input  logic     out_ready
);
  localparam int unsigned IW = $clog2(NUM_WORKERS > 1 ? NUM_WORKERS : 2);
  logic [NUM_WORKERS-1:0] req_vec, grant;
  logic [IW-1:0]          gidx;
  logic                   locked;
  logic [IW-1:0]          lidx, sel;

  always_comb for (int w = 0; w < NUM_WORKERS; w++) req_vec[w] = w_req_valid[w];

  smx_rr_arbiter #(.N(NUM_WORKERS)) u_rr (
    .clk(clk), .rst_n(rst_n), .req(req_vec), .accept(out_ready && !locked),
    .grant(grant), .grant_idx(gidx));

  // A grant that was not accepted is locked until it is, so that a newly
  // arriving request of another worker cannot replace it.

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      lidx   <= '0;
    end else begin
      locked <= out_valid && !out_ready;
      lidx   <= sel;
    end
  end

  always_comb begin
    sel         = locked ? lidx : gidx;
    out_valid   = locked ? 1'b1 : |grant;
    out_req     = w_req[sel];
    out_req.wid = WID_W'(sel);
  end

  always_comb begin
    for (int w = 0; w < NUM_WORKERS; w++)
      w_req_ready[w] = out_valid && out_ready && (32'(sel) == w);
  end

  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_req));
endmodule
