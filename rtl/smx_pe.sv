// smx_pe: one SMX processing element, computing a single DP-element.
//
// The cell works on offset deltas (see smx_pkg). With z' = max(S', dh', dv')
// the new deltas are dv_out' = z' - dh' and dh_out' = z' - dv'. This is the
// recurrence H = max(diag + s, up + I, left + D) of the document, rewritten
// relative to the diagonal neighbour and shifted by the gap scores so that
// every value is a small unsigned number; the offset form itself is this
// design's choice. All outputs stay in 0..max(S').
//
// Interface: dv_in enters from the left, dh_in from the top, s is the cell's
// substitution score S'. dv_out leaves to the right, dh_out to the bottom.
// Timing: purely combinational.
module smx_pe #(
  parameter int unsigned EW = 2
) (
  input  logic [EW-1:0] dv_in,
  input  logic [EW-1:0] dh_in,
  input  logic [EW-1:0] s,
  output logic [EW-1:0] dv_out,
  output logic [EW-1:0] dh_out
);
  logic [EW-1:0] m1, z;

  always_comb begin
    m1     = (dh_in > dv_in) ? dh_in : dv_in;
    z      = (s > m1) ? s : m1;
    dv_out = z - dh_in;
    dh_out = z - dv_in;
  end
endmodule
