// Directed test of the latch controller through one complete row transfer:
// data arrives (lp), bits are set, the latch closes (b low), the bus is
// acknowledged (lo), the lines clear (lo falls while the latch still holds
// data), new data waiting on the lines is not sensed while the latch is
// opaque, and the latch reopens only once it is empty and the lines are
// clear, then senses the waiting data right away.
module tb_aer_latch_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_any = 1'b0, gxi_any = 1'b0, lp = 1'b0;
  logic b, g, l, lo;
  int checks = 0, failures = 0;

  aer_latch_ctrl dut (.clk(clk), .rst_n(rst_n), .bit_any_i(bit_any), .gxi_any_i(gxi_any),
                      .lp_i(lp), .b_o(b), .g_o(g), .l_o(l), .lo_o(lo));

  always #5 clk = ~clk;

  task automatic expect4(input logic eb, input logic eg, input logic el, input logic elo,
                         input string what);
    checks++;
    if (b !== eb || g !== eg || l !== el || lo !== elo) begin
      failures++;
      $display("FAIL %s: b=%b g=%b l=%b lo=%b, expected %b %b %b %b",
               what, b, g, l, lo, eb, eg, el, elo);
    end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  initial begin
    step(); rst_n = 1'b1; step();
    expect4(1, 0, 0, 0, "reset: transparent and empty");
    lp = 1'b1; bit_any = 1'b1; step(); expect4(1, 1, 1, 0, "data sensed, latch full");
    step();                            expect4(0, 1, 1, 0, "latch closes");
    step();                            expect4(0, 1, 1, 1, "bus acknowledged");
    gxi_any = 1'b1; step();            expect4(0, 1, 1, 1, "column served");
    lp = 1'b0; step();                 expect4(0, 1, 0, 1, "lines clear");
    step();                            expect4(0, 1, 0, 0, "acknowledge withdrawn while full");
    lp = 1'b1; step();                 expect4(0, 1, 0, 0, "new data not sensed while opaque");
    bit_any = 1'b0; step();            expect4(0, 1, 0, 0, "bits clear, acknowledge still high");
    gxi_any = 1'b0; step();            expect4(0, 0, 0, 0, "empty");
    step();                            expect4(1, 0, 0, 0, "reopens");
    bit_any = 1'b1; step();            expect4(1, 1, 1, 0, "waiting data sensed at once");
    step();                            expect4(0, 1, 1, 0, "closes again");
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
