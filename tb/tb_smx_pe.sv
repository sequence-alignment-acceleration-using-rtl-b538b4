// tb_smx_pe: exhaustive check of one 4-bit processing element against the
// absolute-score recurrence with insertion -2 and deletion -3. All 4096
// combinations of dv', dh' and S' are applied; for each, the testbench
// rebuilds absolute scores of the cell's three neighbours, takes the plain
// max of diagonal + s, up + I and left + D, and converts the result back to
// the two output deltas. The cell is combinational, so outputs are compared
// one time step after the inputs change.
module tb_smx_pe;
  localparam int EW = 4;
  logic [EW-1:0] dv_in, dh_in, s, dv_out, dh_out;
  int checks = 0, failures = 0;

  smx_pe #(.EW(EW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    const int I = -2, D = -3;
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        for (int c = 0; c < 16; c++) begin
          int top, left, h, raw, edv, edh;
          dv_in = 4'(a); dh_in = 4'(b); s = 4'(c);
          #1;
          raw  = c + I + D;        // substitution score the S' stands for
          top  = b + D;            // H[i-1][j] relative to the diagonal
          left = a + I;            // H[i][j-1] relative to the diagonal
          h    = raw;
          if (top + I > h)  h = top + I;
          if (left + D > h) h = left + D;
          edv = h - top - I;
          edh = h - left - D;
          checks++;
          if (int'(dv_out) != edv || int'(dh_out) != edh) begin
            failures++;
            if (failures < 5) $display("dv=%0d dh=%0d s=%0d: got %0d/%0d want %0d/%0d",
                                       a, b, c, dv_out, dh_out, edv, edh);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
