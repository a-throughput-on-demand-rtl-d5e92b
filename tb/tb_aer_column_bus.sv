// Randomised test of the column bus at its default size (96 x 104): with
// one row driving random data, or with no row, each column line equals that
// row's bit; with several rows driving, each line is the OR of the rows.
module tb_aer_column_bus;
  localparam int ROWS = 96;
  localparam int COLS = 104;
  logic [ROWS-1:0][COLS-1:0] cox;
  logic [COLS-1:0] col, expect_col;
  int checks = 0, failures = 0;

  aer_column_bus dut (.cox_i(cox), .col_o(col));

  initial begin
    cox = '0; #1;
    checks++; if (col != '0) failures++;
    for (int t = 0; t < 300; t++) begin
      int nrows, y;
      logic v;
      nrows = (t < 200) ? 1 : 3;
      cox = '0; expect_col = '0;
      for (int k = 0; k < nrows; k++) begin
        y = $urandom_range(0, ROWS - 1);
        for (int x = 0; x < COLS; x++) begin
          v = 1'($urandom_range(0, 1));
          cox[y][x] = cox[y][x] | v;
          expect_col[x] = expect_col[x] | v;
        end
      end
      #1;
      checks++;
      if (col != expect_col) begin
        failures++;
        $display("FAIL trial %0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
