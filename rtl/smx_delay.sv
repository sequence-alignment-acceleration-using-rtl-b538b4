// smx_delay: a W-bit shift register of N stages (N = 0 is a plain wire).
//
// Used for the segmentation registers of the PE arrays, where values that
// enter or leave the mesh must be delayed by the number of antidiagonal
// segments they cross. Registers have no reset: the valid bits that travel
// alongside are reset elsewhere.
module smx_delay #(
  parameter int unsigned W = 1,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [N];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int unsigned k = 1; k < N; k++) stage[k] <= stage[k-1];
    end
    assign q = stage[N-1];
  end
endmodule
