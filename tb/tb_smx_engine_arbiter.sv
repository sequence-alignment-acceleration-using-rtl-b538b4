// tb_smx_engine_arbiter: two workers request the engine at random. Checks
// that exactly the granted worker's task reaches the engine stamped with its
// index, that two workers asking all the time alternate, and that engine
// results are steered to the worker named in them only.
module tb_smx_engine_arbiter;
  import smx_pkg::*;
  localparam int NW = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic w_req_valid [NW], w_req_ready [NW], w_rsp_valid [NW];
  eng_req_t w_req [NW];
  eng_rsp_t w_rsp, eng_rsp;
  logic eng_req_valid, eng_rsp_valid;
  eng_req_t eng_req;

  smx_engine_arbiter #(.NUM_WORKERS(NW)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last_grant = -1, alternations = 0;

  initial begin
    for (int w = 0; w < NW; w++) begin w_req_valid[w] = 0; w_req[w] = '0; end
    eng_rsp_valid = 0; eng_rsp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      int nreq, g;
      for (int w = 0; w < NW; w++) begin
        w_req_valid[w] = (t < 500) ? 1'b1 : ($urandom_range(1) == 1);
        w_req[w].q   = 64'($urandom);
        w_req[w].wid = 2'($urandom_range(3));   // must be overwritten
      end
      eng_rsp_valid = $urandom_range(1);
      eng_rsp.wid   = 2'($urandom_range(NW - 1));
      eng_rsp.dv    = 64'($urandom);
      #1;
      nreq = 0; g = -1;
      for (int w = 0; w < NW; w++) begin
        if (w_req_valid[w]) nreq++;
        if (w_req_ready[w]) begin
          checks++;
          if (g != -1 || !w_req_valid[w]) failures++;
          g = w;
        end
        checks++;
        if (w_rsp_valid[w] != (eng_rsp_valid && eng_rsp.wid == 2'(w))) failures++;
      end
      checks++;
      if (eng_req_valid != (nreq > 0) || (nreq > 0 && g == -1)) failures++;
      if (g != -1) begin
        checks++;
        if (eng_req.wid != 2'(g) || eng_req.q != w_req[g].q) failures++;
        if (t < 500) begin
          checks++;
          if (g == last_grant) failures++;
          else alternations++;
        end
        last_grant = g;
      end
      checks++;
      if (w_rsp.dv != eng_rsp.dv) failures++;
      @(posedge clk);
    end
    checks++;
    if (alternations < 400) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
