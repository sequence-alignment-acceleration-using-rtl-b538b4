// smx_subst_matrix: register-based storage of the 26 x 26 substitution matrix.
//
// The protein array needs a full matrix row for every one of its query
// characters in the same cycle, which a RAM with one or two ports cannot
// give, so the matrix is held in flip-flops and exposed as one flat vector.
// It is loaded a cache line at a time by the memory bridge, which fetches
// the matrix from a base address the host writes. Entry (a, b) is the signed
// 6-bit score of query letter a against reference letter b, at bits
// [(a*26 + b)*6 +: 6] of the flat vector; line k carries bits
// [k*512 +: 512] (the last 40 bits of line 7 are unused). The 6-bit entry
// and 26 x 26 size follow the document; the packing is this design's own.
//
// Timing: a line presented with line_valid is visible on mtx_flat from the
// next cycle. Reset clears the matrix.
module smx_subst_matrix
  import smx_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          line_valid,
  input  logic [2:0]                    line_idx,
  input  logic [LINE_W-1:0]             line_data,
  output logic [MTX_N*MTX_N*MTX_EW-1:0] mtx_flat
);
  logic [LINE_W-1:0] lines [MTX_LINES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < MTX_LINES; k++) lines[k] <= '0;
    end else if (line_valid) begin
      lines[line_idx] <= line_data;
    end
  end

  logic [MTX_LINES*LINE_W-1:0] all_bits;
  always_comb begin
    for (int k = 0; k < MTX_LINES; k++) all_bits[k*LINE_W +: LINE_W] = lines[k];
  end
  assign mtx_flat = all_bits[MTX_N*MTX_N*MTX_EW-1:0];
endmodule
