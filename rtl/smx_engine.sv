// smx_engine: the SMX-Engine, four PE arrays behind one tile-task port.
//
// The engine holds one physical array per element width, as the document
// describes: 32 x 32 for 2-bit, 16 x 16 for 4-bit, 10 x 10 for 6-bit and
// 8 x 8 for 8-bit elements (1024, 256, 100 and 64 DP-elements per cycle).
// A task's mode field routes it to one array; the other arrays see zero
// operands so that they do not toggle. The 6-bit array is the one with the
// register-based substitution matrix (protein alignment); the others
// compare characters for match/mismatch. The matrix registers are loaded a
// line at a time from the memory bridge.
//
// Interface: req_valid/req is accepted every cycle (the engine never
// stalls). rsp_valid/rsp appear exactly NSEG cycles later, carrying the
// worker id of the task, its right dv' column and bottom dh' row.
module smx_engine
  import smx_pkg::*;
#(
  parameter int unsigned NSEG = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  eng_req_t          req,
  output logic              rsp_valid,
  output eng_rsp_t          rsp,
  // substitution matrix load
  input  logic              mtx_line_valid,
  input  logic [2:0]        mtx_line_idx,
  input  logic [LINE_W-1:0] mtx_line_data
);
  logic [MTX_N*MTX_N*MTX_EW-1:0] mtx_flat;

  smx_subst_matrix u_mtx (
    .clk       (clk),
    .rst_n     (rst_n),
    .line_valid(mtx_line_valid),
    .line_idx  (mtx_line_idx),
    .line_data (mtx_line_data),
    .mtx_flat  (mtx_flat)
  );

  localparam int unsigned NARR = 4;
  logic             a_out_valid [NARR];
  logic [VEC_W-1:0] a_dv [NARR];
  logic [VEC_W-1:0] a_dh [NARR];

  for (genvar a = 0; a < NARR; a++) begin : g_arr
    localparam int unsigned EWA = 2 * (a + 1);
    localparam int unsigned VLA = vl_of(ew_mode_e'(a));
    logic     sel;
    eng_req_t r;
    assign sel = req_valid && (req.mode == ew_mode_e'(a));
    assign r   = sel ? req : '0;

    smx_array #(.VL(VLA), .EW(EWA), .NSEG(NSEG), .HAS_MTX(a == 2)) u_array (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (sel),
      .q_vec     (r.q),
      .r_vec     (r.r),
      .dv_vec    (r.dv),
      .dh_vec    (r.dh),
      .s_match   (r.s_match),
      .s_mis     (r.s_mis),
      .mtx       (r.mtx),
      .bias      (r.bias),
      .mtx_flat  (mtx_flat),
      .out_valid (a_out_valid[a]),
      .dv_out_vec(a_dv[a]),
      .dh_out_vec(a_dh[a])
    );
  end

  // Worker id and mode travel alongside the tile.
  logic [WID_W+2-1:0] tag_out;
  smx_delay #(.W(WID_W + 2), .N(NSEG)) u_tag (
    .clk(clk), .d({req.wid, req.mode}), .q(tag_out));

  ew_mode_e mode_out;
  assign mode_out = ew_mode_e'(tag_out[1:0]);

  always_comb begin
    rsp_valid = a_out_valid[mode_out];
    rsp.wid   = tag_out[WID_W+1:2];
    rsp.dv    = a_dv[mode_out];
    rsp.dh    = a_dh[mode_out];
  end

  // At most one array may finish a tile in a given cycle.
  a_one_out: assert property (@(posedge clk) disable iff (!rst_n)
    $countones({a_out_valid[0], a_out_valid[1], a_out_valid[2], a_out_valid[3]}) <= 1);
endmodule
