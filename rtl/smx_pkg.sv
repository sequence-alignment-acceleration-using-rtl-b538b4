// smx_pkg: types and constants shared by the SMX alignment accelerator.
//
// The accelerator computes dynamic-programming alignment matrices in
// differential form. Every DP-element is kept as two offset deltas,
// dv' = (H[i][j] - H[i-1][j]) - I and dh' = (H[i][j] - H[i][j-1]) - D, where
// I and D are the insertion and deletion scores. Both are never negative,
// so they are stored as unsigned EW-bit numbers. A tile vector (a column of
// dv', a row of dh', or VL sequence characters) always fits in 64 bits and a
// 512-bit cache line holds eight of them.
//
// The element width (EW) selects one of four physical PE arrays, with the
// vector length (VL) the document gives for it: 2 bits/32, 4 bits/16,
// 6 bits/10, 8 bits/8. The packing of vectors into lines, the request and
// response structs and the CSR layout are this design's own choices.
package smx_pkg;

  localparam int unsigned LINE_W    = 512;  // cache line / worker request width
  localparam int unsigned VEC_W     = 64;   // one tile vector
  localparam int unsigned VPL       = LINE_W / VEC_W; // vectors per line = tiles per supertile side
  localparam int unsigned ADDR_W    = 40;   // physical address width of the ACP
  localparam int unsigned WID_W     = 2;    // worker index width (up to 4 workers)
  localparam int unsigned MAX_WORKERS = 4;
  localparam int unsigned ACP_DATA_W = 128;
  localparam int unsigned ACP_BEATS  = LINE_W / ACP_DATA_W; // 4-beat bursts
  localparam int unsigned ACP_ID_W   = 3;   // worker ids 0..3, matrix fetch uses id 4

  // Substitution matrix: 26 x 26 signed 6-bit entries, row-major, packed
  // into 8 cache lines (4056 of 4096 bits used).
  localparam int unsigned MTX_N      = 26;
  localparam int unsigned MTX_EW     = 6;
  localparam int unsigned MTX_LINES  = 8;

  // Element width modes and their vector lengths.
  typedef enum logic [1:0] {
    EW2 = 2'd0,
    EW4 = 2'd1,
    EW6 = 2'd2,
    EW8 = 2'd3
  } ew_mode_e;

  function automatic int unsigned vl_of(ew_mode_e m);
    case (m)
      EW2:     return 32;
      EW4:     return 16;
      EW6:     return 10;
      default: return 8;
    endcase
  endfunction

  // One tile task from a worker to the engine.
  typedef struct packed {
    logic [WID_W-1:0] wid;
    ew_mode_e         mode;
    logic             mtx;      // use the substitution matrix (6-bit array only)
    logic [7:0]       s_match;  // S' of a match   (score - I - D, clamped)
    logic [7:0]       s_mis;    // S' of a mismatch
    logic signed [7:0] bias;    // -(I + D), added to matrix entries
    logic [VEC_W-1:0] q;        // VL query characters (rows)
    logic [VEC_W-1:0] r;        // VL reference characters (columns)
    logic [VEC_W-1:0] dv;       // left-edge dv' column
    logic [VEC_W-1:0] dh;       // top-edge dh' row
  } eng_req_t;

  typedef struct packed {
    logic [WID_W-1:0] wid;
    logic [VEC_W-1:0] dv;       // right-edge dv' column
    logic [VEC_W-1:0] dh;       // bottom-edge dh' row
  } eng_rsp_t;

  // One 512-bit line request from a worker to memory.
  typedef struct packed {
    logic [WID_W-1:0]  wid;
    logic              we;
    logic [ADDR_W-1:0] addr;    // 64-byte aligned
    logic [LINE_W-1:0] data;
  } mem_req_t;

  typedef struct packed {
    logic [WID_W-1:0]  wid;
    logic              wack;    // 1: write acknowledge, 0: read data
    logic [LINE_W-1:0] data;
  } mem_rsp_t;

  // Job description a worker receives from the CSRs.
  typedef struct packed {
    ew_mode_e          mode;
    logic              mtx;
    logic              score_only;
    logic [ADDR_W-1:0] qaddr;
    logic [ADDR_W-1:0] raddr;
    logic [ADDR_W-1:0] oaddr;
    logic [15:0]       q_st;     // query length in supertiles
    logic [15:0]       r_st;     // reference length in supertiles
    logic signed [7:0] match;
    logic signed [7:0] mis;
    logic signed [7:0] ins;
    logic signed [7:0] del;
  } job_t;

  // Per-worker event flags for the performance counters.
  typedef struct packed {
    logic busy;        // job in progress
    logic mem_stall;   // waiting for memory data or write acks
    logic eng_stall;   // waiting for an engine result it depends on
    logic tile;        // a tile task was accepted by the engine
  } perf_ev_t;

endpackage
