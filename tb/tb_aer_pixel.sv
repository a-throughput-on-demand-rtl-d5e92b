// Directed test of one pixel: spike capture, readout on selection, spike
// clear, release on deselection, and lock-out of a spike that arrives while
// the row is already selected. Every node takes one clock to respond.
module tb_aer_pixel;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lix = 1'b0, s = 1'b0;
  logic lox, bx, cox;
  int checks = 0, failures = 0;

  aer_pixel dut (.clk(clk), .rst_n(rst_n), .lix_i(lix), .lox_o(lox), .s_i(s),
                 .bx_o(bx), .cox_o(cox));

  always #5 clk = ~clk;

  task automatic expect3(input logic e_bx, input logic e_cox, input string what);
    checks++;
    if (bx !== e_bx || cox !== e_cox || lox !== e_cox) begin
      failures++;
      $display("FAIL %s: bx=%b cox=%b lox=%b, expected bx=%b cox=lox=%b", what, bx, cox, lox, e_bx, e_cox);
    end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  initial begin
    step(); rst_n = 1'b1; step();
    expect3(0, 0, "idle");
    lix = 1'b1; step();            expect3(1, 0, "spike captured");
    step();                        expect3(1, 0, "holds while unselected");
    s = 1'b1; step();              expect3(1, 1, "selected: drive column, clear spike");
    lix = 1'b0; step();            expect3(0, 1, "bit falls after spike withdrawn");
    step();                        expect3(0, 1, "column held while selected");
    s = 1'b0; step();              expect3(0, 0, "released on deselect");
    // Lock-out: spike arriving while the row is selected.
    s = 1'b1; step();              expect3(0, 0, "selected with no spike: nothing driven");
    lix = 1'b1; step();            expect3(0, 0, "spike locked out while selected");
    step();                        expect3(0, 0, "still locked out");
    s = 1'b0; step();              expect3(1, 0, "spike captured after deselect");
    s = 1'b1; step();              expect3(1, 1, "read on next selection");
    lix = 1'b0; step(); s = 1'b0; step();
    expect3(0, 0, "back to idle");
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
