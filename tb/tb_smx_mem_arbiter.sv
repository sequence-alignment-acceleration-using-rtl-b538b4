// tb_smx_mem_arbiter: two workers each send 200 numbered line requests while
// the downstream ready toggles at random. Every request must come out once,
// in order per worker, with the worker's index, and an offered request must
// stay unchanged until it is taken.
module tb_smx_mem_arbiter;
  import smx_pkg::*;
  localparam int NW = 2, N = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic w_req_valid [NW], w_req_ready [NW];
  mem_req_t w_req [NW];
  logic out_valid, out_ready;
  mem_req_t out_req;

  smx_mem_arbiter #(.NUM_WORKERS(NW)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent [NW], recv [NW] = '{default: 0};
  logic held_valid = 0;
  mem_req_t held;

  // workers: present request number sent[w], raise valid at random
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < NW; w++) begin sent[w] <= 0; w_req_valid[w] <= 0; end
    end else begin
      for (int w = 0; w < NW; w++) begin
        if (w_req_valid[w] && w_req_ready[w]) begin
          sent[w] <= sent[w] + 1;
          w_req_valid[w] <= (sent[w] + 1 < N) && ($urandom_range(3) != 0);
        end else if (!w_req_valid[w])
          w_req_valid[w] <= (sent[w] < N) && ($urandom_range(1) == 1);
      end
      out_ready <= $urandom_range(1);
    end
  end
  always_comb for (int w = 0; w < NW; w++) begin
    w_req[w] = '0;
    w_req[w].addr = 40'(w * 100000 + sent[w]);
    w_req[w].wid  = 2'(3 - w);
  end

  always @(posedge clk) if (rst_n) begin
    if (held_valid) begin
      checks++;
      if (!out_valid || out_req != held) failures++;
    end
    held_valid <= out_valid && !out_ready;
    held       <= out_req;
    if (out_valid && out_ready) begin
      int w;
      w = int'(out_req.wid);
      checks++;
      if (w >= NW || out_req.addr != 40'(w * 100000 + recv[w])) begin
        failures++;
        if (failures < 5) $display("bad request wid %0d addr %0d", w, out_req.addr);
      end else recv[w]++;
    end
  end

  initial begin
    out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (recv[0] == N && recv[1] == N);
    repeat (5) @(posedge clk);
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
