// smx_engine_arbiter: shares the single SMX-Engine among the SMX-Workers.
//
// Each cycle one pending tile task is granted, round-robin, and stamped with
// its worker's index; the engine accepts one task per cycle, so tasks of
// different workers interleave cycle by cycle. While one worker waits for a
// result it depends on, another fills the engine. Results return with the
// worker index and are steered back to that worker only.
//
// Interface: w_req_valid/w_req_ready handshake per worker; eng_req_valid
// has no ready because the engine never stalls. w_rsp_valid pulses for one
// cycle in the cycle the engine presents the result. Combinational paths:
// request to engine, engine result to worker.
module smx_engine_arbiter
  import smx_pkg::*;
#(
  parameter int unsigned NUM_WORKERS = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     w_req_valid [NUM_WORKERS],
  input  eng_req_t w_req       [NUM_WORKERS],
  output logic     w_req_ready [NUM_WORKERS],
  output logic     w_rsp_valid [NUM_WORKERS],
  output eng_rsp_t w_rsp,
  output logic     eng_req_valid,
  output eng_req_t eng_req,
  input  logic     eng_rsp_valid,
  input  eng_rsp_t eng_rsp
);
  localparam int unsigned IW = $clog2(NUM_WORKERS > 1 ? NUM_WORKERS : 2);
  logic [NUM_WORKERS-1:0] req_vec, grant;
  logic [IW-1:0]          gidx;

  always_comb for (int w = 0; w < NUM_WORKERS; w++) req_vec[w] = w_req_valid[w];

  smx_rr_arbiter #(.N(NUM_WORKERS)) u_rr (
    .clk(clk), .rst_n(rst_n), .req(req_vec), .accept(1'b1),
    .grant(grant), .grant_idx(gidx));

  always_comb begin
    eng_req_valid = |grant;
    eng_req       = w_req[gidx];
    eng_req.wid   = WID_W'(gidx);
  end

  always_comb for (int w = 0; w < NUM_WORKERS; w++) w_req_ready[w] = grant[w];

  always_comb begin
    for (int w = 0; w < NUM_WORKERS; w++)
      w_rsp_valid[w] = eng_rsp_valid && (32'(eng_rsp.wid) == w);
    w_rsp = eng_rsp;
  end
endmodule
