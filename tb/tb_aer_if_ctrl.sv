// Directed test of the interface circuit: request relay, selection only
// after grant with the completion input low, waiting while completion is
// high, request withdrawal only after completion rises, and deselection on
// grant withdrawal. Every node takes one clock to respond.
module tb_aer_if_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic p = 1'b0, ri = 1'b0, ci = 1'b0;
  logic ro, s;
  int checks = 0, failures = 0;

  aer_if_ctrl dut (.clk(clk), .rst_n(rst_n), .p_i(p), .ro_o(ro), .ri_i(ri),
                   .ci_i(ci), .s_o(s));

  always #5 clk = ~clk;

  task automatic expect2(input logic e_ro, input logic e_s, input string what);
    checks++;
    if (ro !== e_ro || s !== e_s) begin
      failures++;
      $display("FAIL %s: ro=%b s=%b, expected ro=%b s=%b", what, ro, s, e_ro, e_s);
    end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  initial begin
    step(); rst_n = 1'b1; step();
    expect2(0, 0, "idle");
    p = 1'b1; step();               expect2(1, 0, "request relayed");
    ci = 1'b1; ri = 1'b1; step();   expect2(1, 0, "granted but completion high: wait");
    step();                         expect2(1, 0, "still waiting");
    ci = 1'b0; step();              expect2(1, 1, "selected once completion low");
    p = 1'b0; step();               expect2(1, 1, "request held until completion high");
    ci = 1'b1; step();              expect2(0, 1, "request withdrawn");
    step();                         expect2(0, 1, "select held while granted");
    ri = 1'b0; step();              expect2(0, 0, "deselected on grant withdrawal");
    ci = 1'b0; step();              expect2(0, 0, "idle again");
    // Second cycle with no waiting.
    p = 1'b1; step(); ri = 1'b1; step(); expect2(1, 1, "fast select");
    p = 1'b0; ci = 1'b1; step();    expect2(0, 1, "fast withdraw");
    ri = 1'b0; ci = 1'b0; step();   expect2(0, 0, "fast release");
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
