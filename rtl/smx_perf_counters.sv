// smx_perf_counters: profiling counters of the accelerator.
//
// Per worker it counts busy cycles, cycles stalled on memory (reads in
// flight, writes waiting to be accepted or acknowledged), cycles stalled on
// an engine result the next tile depends on, and tiles issued. Globally it
// counts cycles in which any worker is busy and cycles in which the engine
// accepted a tile. The counters only observe event flags, so they cannot
// slow the datapath down. The choice of events follows the document's
// examples (memory starvation versus engine dependencies); the exact set is
// this design's. clear zeroes all counters; they wrap at 2^32.
module smx_perf_counters
  import smx_pkg::*;
#(
  parameter int unsigned NUM_WORKERS = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  perf_ev_t    ev [NUM_WORKERS],
  input  logic        eng_active,
  output logic [31:0] cyc_busy,
  output logic [31:0] cyc_eng,
  output logic [31:0] w_busy      [NUM_WORKERS],
  output logic [31:0] w_mem_stall [NUM_WORKERS],
  output logic [31:0] w_eng_stall [NUM_WORKERS],
  output logic [31:0] w_tiles     [NUM_WORKERS]
);
  logic any_busy;
  always_comb begin
    any_busy = 1'b0;
    for (int w = 0; w < NUM_WORKERS; w++) any_busy |= ev[w].busy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_busy <= '0;
      cyc_eng  <= '0;
      for (int w = 0; w < NUM_WORKERS; w++) begin
        w_busy[w]      <= '0;
        w_mem_stall[w] <= '0;
        w_eng_stall[w] <= '0;
        w_tiles[w]     <= '0;
      end
    end else if (clear) begin
      cyc_busy <= '0;
      cyc_eng  <= '0;
      for (int w = 0; w < NUM_WORKERS; w++) begin
        w_busy[w]      <= '0;
        w_mem_stall[w] <= '0;
        w_eng_stall[w] <= '0;
        w_tiles[w]     <= '0;
      end
    end else begin
      cyc_busy <= cyc_busy + 32'(any_busy);
      cyc_eng  <= cyc_eng + 32'(eng_active);
      for (int w = 0; w < NUM_WORKERS; w++) begin
        w_busy[w]      <= w_busy[w]      + 32'(ev[w].busy);
        w_mem_stall[w] <= w_mem_stall[w] + 32'(ev[w].mem_stall);
        w_eng_stall[w] <= w_eng_stall[w] + 32'(ev[w].eng_stall);
        w_tiles[w]     <= w_tiles[w]     + 32'(ev[w].tile);
      end
    end
  end
endmodule
