// smx_array: one VL x VL mesh of SMX processing elements for one element width.
//
// A tile task gives VL query characters (rows), VL reference characters
// (columns), the dv' column entering on the left and the dh' row entering on
// the top. Every cell first gets its substitution score S' locally. In
// compare mode a broadcast mesh of equality comparators picks the match or
// mismatch score. In matrix mode (HAS_MTX = 1) each row selects its query
// character's row of the substitution matrix, all rows in parallel, and each
// cell then selects its reference character's entry and adds the bias
// -(I + D). S' is clamped to 0..2^EW-1; a negative S' can be clamped to 0
// because every delta is >= 0 and S' only enters a max.
//
// The deltas then ripple through the mesh as a wavefront. The antidiagonals
// are cut into NSEG segments: cell (i, j) belongs to segment
// ((i + j) * NSEG) / (2VL - 1). A value that crosses into the next segment
// passes a segmentation register, edge inputs and S' are delayed to the
// cycle of their cell's segment, and edge outputs are delayed so that all
// leave together. The array therefore accepts one tile every cycle and
// returns it NSEG cycles later (out_valid NSEG cycles after in_valid).
// Segmentation registers follow the document; their number and placement
// (equal slices of antidiagonals) are this design's choice.
//
// Vector packing: element k of a 64-bit vector is bits [k*EW +: EW].
module smx_array
  import smx_pkg::*;
#(
  parameter int unsigned VL      = 32,
  parameter int unsigned EW      = 2,
  parameter int unsigned NSEG    = 2,
  parameter bit          HAS_MTX = 1'b0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [VEC_W-1:0]              q_vec,
  input  logic [VEC_W-1:0]              r_vec,
  input  logic [VEC_W-1:0]              dv_vec,
  input  logic [VEC_W-1:0]              dh_vec,
  input  logic [7:0]                    s_match,
  input  logic [7:0]                    s_mis,
  input  logic                          mtx,
  input  logic signed [7:0]             bias,
  input  logic [MTX_N*MTX_N*MTX_EW-1:0] mtx_flat,
  output logic                          out_valid,
  output logic [VEC_W-1:0]              dv_out_vec,
  output logic [VEC_W-1:0]              dh_out_vec
);
  localparam int unsigned NDIAG = 2 * VL - 1;
  localparam logic [7:0]  SMAX  = 8'((1 << EW) - 1);

  if (VL * EW > VEC_W) begin : g_bad_vl
    $error("smx_array: VL*EW exceeds the vector width");
  end
  if (NSEG < 1 || NSEG > NDIAG) begin : g_bad_seg
    $error("smx_array: NSEG out of range");
  end

  function automatic int unsigned seg(int unsigned i, int unsigned j);
    return ((i + j) * NSEG) / NDIAG;
  endfunction

  function automatic logic [EW-1:0] clamp(logic signed [9:0] v);
    if (v < 0)                       return '0;
    else if (v > $signed({2'b00, SMAX})) return SMAX[EW-1:0];
    else                             return v[EW-1:0];
  endfunction

  // ---------------------------------------------------------------- S' mesh
  logic [EW-1:0] s_now [VL][VL];
  logic [MTX_N*MTX_EW-1:0] mrow [VL];

  always_comb begin
    for (int unsigned i = 0; i < VL; i++) begin
      logic [EW-1:0] qc;
      qc = q_vec[i*EW +: EW];
      mrow[i] = '0;
      if (HAS_MTX && 32'(qc) < MTX_N)
        mrow[i] = mtx_flat[32'(qc) * MTX_N * MTX_EW +: MTX_N * MTX_EW];
      for (int unsigned j = 0; j < VL; j++) begin
        logic [EW-1:0] rc;
        logic signed [MTX_EW-1:0] ent;
        rc = r_vec[j*EW +: EW];
        ent = '0;
        if (32'(rc) < MTX_N) ent = mrow[i][32'(rc) * MTX_EW +: MTX_EW];
        if (HAS_MTX && mtx)
          s_now[i][j] = clamp(10'(ent) + 10'(bias));
        else
          s_now[i][j] = clamp($signed({2'b00, (qc == rc) ? s_match : s_mis}));
      end
    end
  end

  // ------------------------------------------------------------- PE mesh
  for (genvar i = 0; i < VL; i++) begin : g_row
    for (genvar j = 0; j < VL; j++) begin : g_col
      localparam int unsigned B = seg(i, j);
      logic [EW-1:0] dv_i, dh_i, s_i;
      logic [EW-1:0] dv_o;  // dv' leaving to the right
      logic [EW-1:0] dh_o;  // dh' leaving downwards

      smx_delay #(.W(EW), .N(B)) u_s (.clk(clk), .d(s_now[i][j]), .q(s_i));

      if (j == 0) begin : g_ledge
        smx_delay #(.W(EW), .N(B)) u_d (.clk(clk), .d(dv_vec[i*EW +: EW]), .q(dv_i));
      end else begin : g_lnb
        smx_delay #(.W(EW), .N(B - seg(i, j-1))) u_d (.clk(clk), .d(g_row[i].g_col[j-1].dv_o), .q(dv_i));
      end

      if (i == 0) begin : g_tedge
        smx_delay #(.W(EW), .N(B)) u_d (.clk(clk), .d(dh_vec[j*EW +: EW]), .q(dh_i));
      end else begin : g_tnb
        smx_delay #(.W(EW), .N(B - seg(i-1, j))) u_d (.clk(clk), .d(g_row[i-1].g_col[j].dh_o), .q(dh_i));
      end

      smx_pe #(.EW(EW)) u_pe (
        .dv_in (dv_i),
        .dh_in (dh_i),
        .s     (s_i),
        .dv_out(dv_o),
        .dh_out(dh_o)
      );
    end
  end

  // ------------------------------------------------------------- edge outputs
  for (genvar k = 0; k < VL; k++) begin : g_out
    smx_delay #(.W(EW), .N(NSEG - seg(k, VL-1))) u_dv (
      .clk(clk), .d(g_row[k].g_col[VL-1].dv_o), .q(dv_out_vec[k*EW +: EW]));
    smx_delay #(.W(EW), .N(NSEG - seg(VL-1, k))) u_dh (
      .clk(clk), .d(g_row[VL-1].g_col[k].dh_o), .q(dh_out_vec[k*EW +: EW]));
  end
  if (VL * EW < VEC_W) begin : g_pad
    assign dv_out_vec[VEC_W-1:VL*EW] = '0;
    assign dh_out_vec[VEC_W-1:VL*EW] = '0;
  end

  // ------------------------------------------------------------- valid pipe
  logic [NSEG-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= NSEG'({vpipe, in_valid});
  end
  assign out_valid = vpipe[NSEG-1];
endmodule
