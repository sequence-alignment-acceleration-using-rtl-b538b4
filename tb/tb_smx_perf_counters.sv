// tb_smx_perf_counters: random event flags for two workers; every counter
// is compared each cycle with a count kept by the testbench, and clear must
// zero them all.
module tb_smx_perf_counters;
  import smx_pkg::*;
  localparam int NW = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, eng_active;
  perf_ev_t ev [NW];
  logic [31:0] cyc_busy, cyc_eng;
  logic [31:0] w_busy [NW], w_mem_stall [NW], w_eng_stall [NW], w_tiles [NW];

  smx_perf_counters #(.NUM_WORKERS(NW)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_busy = 0, m_eng = 0;
  int m_wb [NW] = '{default: 0}, m_ms [NW] = '{default: 0};
  int m_es [NW] = '{default: 0}, m_t [NW] = '{default: 0};

  initial begin
    clear = 0; eng_active = 0;
    for (int w = 0; w < NW; w++) ev[w] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      bit anyb;
      clear = (t == 1000);
      eng_active = $urandom_range(1);
      anyb = 0;
      for (int w = 0; w < NW; w++) begin
        ev[w] = perf_ev_t'($urandom_range(15));
        anyb |= ev[w].busy;
      end
      @(posedge clk);
      if (clear) begin
        m_busy = 0; m_eng = 0;
        for (int w = 0; w < NW; w++) begin m_wb[w] = 0; m_ms[w] = 0; m_es[w] = 0; m_t[w] = 0; end
      end else begin
        m_busy += anyb; m_eng += eng_active;
        for (int w = 0; w < NW; w++) begin
          m_wb[w] += ev[w].busy; m_ms[w] += ev[w].mem_stall;
          m_es[w] += ev[w].eng_stall; m_t[w] += ev[w].tile;
        end
      end
      #1;
      checks++;
      if (int'(cyc_busy) != m_busy || int'(cyc_eng) != m_eng) begin
        failures++;
        if (failures < 4) $display("t=%0d busy %0d/%0d eng %0d/%0d", t, cyc_busy, m_busy, cyc_eng, m_eng);
      end
      for (int w = 0; w < NW; w++) begin
        checks++;
        if (int'(w_busy[w]) != m_wb[w] || int'(w_mem_stall[w]) != m_ms[w] ||
            int'(w_eng_stall[w]) != m_es[w] || int'(w_tiles[w]) != m_t[w]) begin
          failures++;
          if (failures < 4) $display("t=%0d w%0d %0d/%0d %0d/%0d %0d/%0d %0d/%0d", t, w,
            w_busy[w], m_wb[w], w_mem_stall[w], m_ms[w], w_eng_stall[w], m_es[w], w_tiles[w], m_t[w]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
