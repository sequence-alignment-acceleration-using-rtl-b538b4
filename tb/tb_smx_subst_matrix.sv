// tb_smx_subst_matrix: loads the eight matrix lines in a shuffled order and
// checks every 6-bit entry of the flat output, and that reset clears it.
module tb_smx_subst_matrix;
  import smx_pkg::*;
  import smx_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic line_valid;
  logic [2:0] line_idx;
  logic [LINE_W-1:0] line_data;
  logic [MTX_N*MTX_N*MTX_EW-1:0] mtx_flat;
  int checks = 0, failures = 0;
  scheme_t sc;

  smx_subst_matrix dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [8] = '{5, 2, 7, 0, 3, 6, 1, 4};
    make_matrix(sc);
    line_valid = 0; line_idx = 0; line_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    checks++;
    if (mtx_flat != '0) failures++;
    foreach (order[k]) begin
      line_valid <= 1; line_idx <= 3'(order[k]); line_data <= matrix_line(sc, order[k]);
      @(posedge clk);
    end
    line_valid <= 0;
    @(posedge clk);
    for (int a = 0; a < 26; a++)
      for (int b = 0; b < 26; b++) begin
        checks++;
        if ($signed(mtx_flat[(a*26 + b)*6 +: 6]) != sc.mtx[a][b]) begin
          failures++;
          if (failures < 5) $display("entry %0d,%0d wrong", a, b);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
