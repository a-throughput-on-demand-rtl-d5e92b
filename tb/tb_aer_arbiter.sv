// Test of the N-input arbiter tree.
//
// Part 1 (N = 8, three levels): a single request on an idle tree must be
// granted after levels + 1 = 4 clocks (one clock per level for the request
// to climb, one for the root completion, grants come straight down).
// Part 2 (N = 13, uneven tree): thirteen random four-phase requesters at a
// moderate load (a subtree that always has a request keeps the grant, by
// design, so a saturating load would starve the other side); at
// most one grant at a time, grants only to requesters that ask, and every
// requester is served many times.
module tb_aer_arbiter;
  localparam int N1 = 8;
  localparam int N2 = 13;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N1-1:0] req1 = '0, ack1;
  logic [N2-1:0] req2 = '0, ack2;
  int checks = 0, failures = 0;
  int served [N2];
  bit run2 = 1'b0;

  aer_arbiter #(.N(N1)) dut1 (.clk(clk), .rst_n(rst_n), .req_i(req1), .ack_o(ack1));
  aer_arbiter #(.N(N2)) dut2 (.clk(clk), .rst_n(rst_n), .req_i(req2), .ack_o(ack2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && run2) begin
    for (int k = 0; k < N2; k++) begin
      if (!req2[k] && !ack2[k] && $urandom_range(0, 59) == 0) req2[k] <= 1'b1;
      else if (req2[k] && ack2[k]) begin req2[k] <= 1'b0; served[k]++; end
    end
  end

  always @(posedge clk) if (rst_n) begin
    check($onehot0(ack2), "two grants at once");
    check((ack2 & ~req2) == '0 || (ack2 & ~$past(req2)) == '0, "grant without request");
  end

  initial begin
    int t;
    foreach (served[k]) served[k] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N1; k++) begin
      @(posedge clk); #1;
      req1[k] = 1'b1;
      t = 0;
      while (!ack1[k]) begin @(posedge clk); #1; t++; end
      check(t == 4, $sformatf("input %0d granted after %0d clocks, expected 4", k, t));
      check(ack1 == (N1'(1) << k), "only the requester granted");
      req1[k] = 1'b0;
      while (ack1 != '0) @(posedge clk);
      repeat (6) @(posedge clk);
    end
    run2 = 1'b1;
    repeat (20000) @(posedge clk);
    for (int k = 0; k < N2; k++)
      check(served[k] > 20, $sformatf("input %0d served only %0d times", k, served[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
