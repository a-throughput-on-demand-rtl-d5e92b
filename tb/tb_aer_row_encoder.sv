// Exhaustive test of the row address encoder at its default size (96 rows):
// every one-hot select gives its row number, and no select gives zero.
module tb_aer_row_encoder;
  localparam int N = 96;
  localparam int AW = $clog2(N);
  logic [N-1:0] sel;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;

  aer_row_encoder dut (.sel_i(sel), .addr_o(addr));

  initial begin
    sel = '0; #1;
    checks++; if (addr != 0) failures++;
    for (int n = 0; n < N; n++) begin
      sel = '0; sel[n] = 1'b1; #1;
      checks++;
      if (int'(addr) != n) begin
        failures++;
        $display("FAIL row %0d encoded as %0d", n, addr);
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
