// smx_rr_arbiter: round-robin arbiter for N requesters.
//
// grant is one-hot (or zero when nobody requests). The requester after the
// last one served has the highest priority; the pointer only moves when the
// grant is used (accept = 1), so a stalled grant is held. Combinational from
// req to grant, one register for the pointer.
module smx_rr_arbiter #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         accept,
  output logic [N-1:0] grant,
  output logic [$clog2(N > 1 ? N : 2)-1:0] grant_idx
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);
  logic [IW-1:0] ptr;   // highest-priority requester

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned c;
      c = (32'(ptr) + k) % N;
      if (grant == '0 && req[c]) begin
        grant[c]  = 1'b1;
        grant_idx = IW'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (accept && grant != '0)
      ptr <= IW'((32'(grant_idx) + 1) % N);
  end
endmodule
