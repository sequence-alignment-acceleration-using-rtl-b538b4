// tb_smx_ctrl_if: AXI4-Lite register accesses to the control interface.
// Writes every configuration field of both workers and reads it back,
// checks that start and matrix-fetch bits give one-cycle pulses, that
// status, score and performance registers read what the accelerator side
// drives, and that irq follows done and the enable mask.
module tb_smx_ctrl_if;
  import smx_pkg::*;
  localparam int NW = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] s_axil_awaddr, s_axil_araddr;
  logic s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready, s_axil_bvalid, s_axil_bready;
  logic s_axil_arvalid, s_axil_arready, s_axil_rvalid, s_axil_rready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0] s_axil_wstrb;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  job_t job [NW];
  logic start [NW], busy [NW], done [NW];
  logic signed [31:0] score [NW];
  logic mtx_start, mtx_busy, eng_active, irq;
  logic [ADDR_W-1:0] mtx_base;
  perf_ev_t ev [NW];

  smx_ctrl_if #(.NUM_WORKERS(NW)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int start_pulses [NW] = '{default: 0};
  int mtx_pulses = 0;
  always @(posedge clk) begin
    for (int w = 0; w < NW; w++) if (start[w]) start_pulses[w]++;
    if (mtx_start) mtx_pulses++;
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(posedge clk);
    s_axil_awaddr <= 12'(a); s_axil_awvalid <= 1;
    s_axil_wdata <= d; s_axil_wstrb <= 4'hF; s_axil_wvalid <= 1;
    do @(posedge clk); while (!s_axil_awready);
    s_axil_awvalid <= 0; s_axil_wvalid <= 0;
    s_axil_bready <= 1;
    do @(posedge clk); while (!s_axil_bvalid);
    s_axil_bready <= 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(posedge clk);
    s_axil_araddr <= 12'(a); s_axil_arvalid <= 1;
    do @(posedge clk); while (!s_axil_arready);
    s_axil_arvalid <= 0; s_axil_rready <= 1;
    do @(posedge clk); while (!s_axil_rvalid);
    d = s_axil_rdata;
    s_axil_rready <= 0;
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    logic [31:0] d;
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_bready = 0; s_axil_arvalid = 0;
    s_axil_rready = 0; s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    mtx_busy = 0; eng_active = 0;
    for (int w = 0; w < NW; w++) begin busy[w] = 0; done[w] = 0; score[w] = 0; ev[w] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int w = 0; w < NW; w++) begin
      int b;
      b = 'h100 + 'h40 * w;
      wr(b + 'h04, (w == 0) ? 32'h0000000A : 32'h00000005); // w0: mode 2, score-only; w1: mode 1, matrix
      wr(b + 'h08, 32'h1000_0000 + w);  wr(b + 'h0C, 32'h12 + w);
      wr(b + 'h10, 32'h2000_0040 + w);  wr(b + 'h14, 32'h34);
      wr(b + 'h18, 32'h3000_0080);      wr(b + 'h1C, 32'h56);
      wr(b + 'h20, 32'd7 + w);          wr(b + 'h24, 32'd9);
      wr(b + 'h28, 32'hFCFD_FE01);
    end
    for (int w = 0; w < NW; w++) begin
      int b;
      b = 'h100 + 'h40 * w;
      expect_eq("mode", 32'(job[w].mode), 32'(2 - w));
      expect_eq("flags", {job[w].mtx, job[w].score_only}, (w == 0) ? 2'b01 : 2'b10);
      expect_eq("qaddr", 32'(job[w].qaddr >> 8), 32'((40'h12 + w) << 24 | 40'h10_0000));
      expect_eq("raddr lo", job[w].raddr[31:0], 32'h2000_0040 + w);
      expect_eq("oaddr hi", 32'(job[w].oaddr[39:32]), 32'h56);
      expect_eq("qlen", 32'(job[w].q_st), 32'd7 + w);
      expect_eq("rlen", 32'(job[w].r_st), 32'd9);
      expect_eq("scores", {job[w].del, job[w].ins, job[w].mis, job[w].match}, 32'hFCFD_FE01);
      rd(b + 'h08, d); expect_eq("rd qaddr", d, 32'h1000_0000 + w);
      rd(b + 'h28, d); expect_eq("rd scoring", d, 32'hFCFD_FE01);
      rd(b + 'h04, d); expect_eq("rd cfg", d, (w == 0) ? 32'h0000000A : 32'h00000005);
    end
    // start pulses
    wr('h100, 1); wr('h140, 1); wr('h140, 1);
    repeat (2) @(posedge clk);
    expect_eq("start0 pulses", start_pulses[0], 1);
    expect_eq("start1 pulses", start_pulses[1], 2);
    // matrix fetch
    wr('h008, 32'hABCD_0000); wr('h00C, 32'h7);
    wr('h000, 1);
    repeat (2) @(posedge clk);
    expect_eq("mtx pulses", mtx_pulses, 1);
    expect_eq("mtx base", 32'(mtx_base >> 8), 32'h07AB_CD00);
    // status, score, perf
    mtx_busy = 1; busy[1] = 1; done[0] = 1; score[0] = -1234; score[1] = 77;
    rd('h004, d); expect_eq("status", d, 32'h0000_0121);
    rd('h12C, d); expect_eq("score0", d, 32'(-1234));
    rd('h16C, d); expect_eq("score1", d, 32'd77);
    ev[1].tile = 1; ev[1].busy = 1; eng_active = 1;
    repeat (10) @(posedge clk);
    ev[1] = '0; eng_active = 0;
    rd('h17C, d); expect_eq("tiles1", d, 32'd10);
    rd('h024, d); expect_eq("eng cycles", d, 32'd10);
    wr('h000, 2);
    rd('h17C, d); expect_eq("tiles1 cleared", d, 32'd0);
    // irq
    checks++; if (irq) failures++;
    wr('h010, 1);
    @(posedge clk);
    checks++; if (!irq) failures++;
    done[0] = 0;
    #1;
    checks++; if (irq) failures++;
    rd('h800, d); expect_eq("unmapped", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
