// tb_smx_mem_ctrl: requests of two workers flow to a bridge stand-in that
// accepts at random and answers each request after a random delay, in
// order. Checks that responses go to the worker they belong to, that a
// worker never has more than MAX_OUT = 8 requests outstanding, and that the
// limit was reached (so the hold-back was exercised).
module tb_smx_mem_ctrl;
  import smx_pkg::*;
  localparam int NW = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, br_req_valid, br_req_ready, br_rsp_valid, br_rsp_ready;
  mem_req_t in_req, br_req;
  mem_rsp_t br_rsp, w_rsp;
  logic w_rsp_valid [NW];
  logic [7:0] outstanding [NW];

  smx_mem_ctrl #(.NUM_WORKERS(NW)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  mem_req_t pend [$];
  int model_out [NW] = '{default: 0};
  int hit_limit = 0, nsent = 0, nrecv = 0;

  always_ff @(posedge clk) if (rst_n) begin
    if (br_req_valid && br_req_ready) begin
      pend.push_back(br_req);
      model_out[br_req.wid]++;
    end
    br_req_ready <= $urandom_range(3) != 0;
    if (br_rsp_valid) begin
      model_out[br_rsp.wid]--;
      void'(pend.pop_front());
      nrecv++;
    end
    br_rsp_valid <= 0;
    if (pend.size() > 1 && !br_rsp_valid && $urandom_range(5) == 0) begin
      br_rsp_valid <= 1;
      br_rsp.wid   <= pend[0].wid;
      br_rsp.wack  <= pend[0].we;
      br_rsp.data  <= 512'(pend[0].addr);
    end
    if (in_valid && in_ready) begin
      nsent++;
      in_req.wid  <= 2'($urandom_range(NW - 1));
      in_req.addr <= 40'($urandom);
      in_req.we   <= $urandom_range(1);
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int w = 0; w < NW; w++) begin
      checks++;
      if (int'(outstanding[w]) != model_out[w] || outstanding[w] > 8) failures++;
      if (outstanding[w] == 8) hit_limit++;
      checks++;
      if (w_rsp_valid[w] != (br_rsp_valid && br_rsp.wid == 2'(w))) failures++;
    end
    if (br_rsp_valid) begin
      checks++;
      if (w_rsp.data != br_rsp.data) failures++;
    end
  end

  initial begin
    in_valid = 0; in_req = '0; br_req_ready = 0; br_rsp_valid = 0; br_rsp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    in_valid = 1;
    wait (nsent >= 500);
    in_valid = 0;
    repeat (500) @(posedge clk);
    checks++;
    if (hit_limit == 0) begin failures++; $display("limit never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
