// Directed test of one latch cell: set only while transparent, cleared only
// when acknowledged and opaque, held otherwise.
module tb_aer_latch_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  logic b = 1'b1, lix = 1'b0, gxi = 1'b0;
  logic gxo;
  int checks = 0, failures = 0;

  aer_latch_cell dut (.clk(clk), .rst_n(rst_n), .b_i(b), .lix_i(lix), .gxi_i(gxi), .gxo_o(gxo));

  always #5 clk = ~clk;

  task automatic expect1(input logic e, input string what);
    checks++;
    if (gxo !== e) begin
      failures++;
      $display("FAIL %s: gxo=%b expected %b", what, gxo, e);
    end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  initial begin
    step(); rst_n = 1'b1; step();
    expect1(0, "idle");
    b = 1'b0; lix = 1'b1; step();  expect1(0, "opaque: line ignored");
    b = 1'b1; step();              expect1(1, "transparent: set");
    lix = 1'b0; step();            expect1(1, "holds after line clears");
    gxi = 1'b1; step();            expect1(1, "acknowledged but transparent: kept");
    b = 1'b0; step();              expect1(0, "acknowledged and opaque: cleared");
    gxi = 1'b0; lix = 1'b1; step(); expect1(0, "opaque: no set");
    b = 1'b1; step();              expect1(1, "set again");
    b = 1'b0; lix = 1'b0; step();  expect1(1, "opaque, no acknowledge: held");
    gxi = 1'b1; step();            expect1(0, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
