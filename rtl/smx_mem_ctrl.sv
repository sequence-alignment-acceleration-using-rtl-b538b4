// smx_mem_ctrl: the SMX memory controller between the workers and the bridge.
//
// It forwards each arbitrated 512-bit line request to the memory bridge's
// request queue and steers every response (read data or write acknowledge)
// back to the worker whose index it carries. It also keeps, per worker, the
// number of requests still waiting for a response, and holds back a worker
// that has MAX_OUT of them, so that one worker cannot take all of the
// bridge's outstanding-read slots. The per-worker limit is this design's
// choice; the document only names this unit.
//
// Interface: valid/ready towards the arbiter and the bridge. Responses are
// always accepted (workers never refuse a response); w_rsp_valid[w] pulses
// for one cycle. outstanding[w] is the current count.
module smx_mem_ctrl
  import smx_pkg::*;
#(
  parameter int unsigned NUM_WORKERS = 2,
  parameter int unsigned MAX_OUT     = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  // from the memory arbiter
  input  logic     in_valid,
  input  mem_req_t in_req,
  output logic     in_ready,
  // to the memory bridge request queue
  output logic     br_req_valid,
  output mem_req_t br_req,
  input  logic     br_req_ready,
  // from the memory bridge response queue
  input  logic     br_rsp_valid,
  input  mem_rsp_t br_rsp,
  output logic     br_rsp_ready,
  // to the workers
  output logic     w_rsp_valid [NUM_WORKERS],
  output mem_rsp_t w_rsp,
  output logic [7:0] outstanding [NUM_WORKERS]
);
  logic at_limit;

  always_comb begin
    at_limit     = 1'b0;
    for (int w = 0; w < NUM_WORKERS; w++)
      if (32'(in_req.wid) == w && 32'(outstanding[w]) >= MAX_OUT) at_limit = 1'b1;
    br_req_valid = in_valid && !at_limit;
    br_req       = in_req;
    in_ready     = br_req_ready && !at_limit;
    br_rsp_ready = 1'b1;
    w_rsp        = br_rsp;
    for (int w = 0; w < NUM_WORKERS; w++)
      w_rsp_valid[w] = br_rsp_valid && (32'(br_rsp.wid) == w);
  end

  logic [NUM_WORKERS-1:0] inc, dec;
  always_comb begin
    for (int w = 0; w < NUM_WORKERS; w++) begin
      inc[w] = br_req_valid && br_req_ready && (32'(br_req.wid) == w);
      dec[w] = br_rsp_valid && (32'(br_rsp.wid) == w);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < NUM_WORKERS; w++) outstanding[w] <= '0;
    end else begin
      for (int w = 0; w < NUM_WORKERS; w++)
        outstanding[w] <= outstanding[w] + 8'(inc[w]) - 8'(dec[w]);
    end
  end

  for (genvar w = 0; w < NUM_WORKERS; w++) begin : g_chk
    a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
      w_rsp_valid[w] |-> outstanding[w] != 0);
  end
endmodule
