// Randomised test of the two-input arbiter cell.
//
// Two four-phase requesters drive l1i/l2i at random; a parent model answers
// ro with ri after a random delay and withdraws ri after ro falls. Checks:
// never both acknowledges high; an acknowledge only while the cell's ro and
// the parent's ri are high; ro rises only while ri is low; every request is
// acknowledged; and at least once a side is served with the parent's
// acknowledge left over from its sister (ro stays up between the two).
module tb_aer_arb2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic l1i = 1'b0, l2i = 1'b0, ri = 1'b0;
  logic l1o, l2o, ro;
  int checks = 0, failures = 0;
  int served1 = 0, served2 = 0, reuse = 0;
  int rdelay = 0;

  aer_arb2 dut (.clk(clk), .rst_n(rst_n), .l1i(l1i), .l1o(l1o), .l2i(l2i), .l2o(l2o),
                .ro(ro), .ri(ri));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Requesters: raise at random, drop after acknowledge, wait for ack low.
  always @(posedge clk) if (rst_n) begin
    if (!l1i && !l1o && $urandom_range(0, 3) == 0) l1i <= 1'b1;
    else if (l1i && l1o) begin l1i <= 1'b0; served1++; end
    if (!l2i && !l2o && $urandom_range(0, 3) == 0) l2i <= 1'b1;
    else if (l2i && l2o) begin l2i <= 1'b0; served2++; end
  end

  // Parent: four-phase passive side with random delay.
  always @(posedge clk) if (rst_n) begin
    if (ro != ri) begin
      if (rdelay == 0) begin ri <= ro; rdelay = $urandom_range(0, 4); end
      else rdelay--;
    end
  end

  // Protocol checks
  always @(posedge clk) if (rst_n) begin
    check(!(l1o && l2o), "both acknowledges high");
    if (l1o || l2o) check(ro && ri, "acknowledge without ro and ri");
    if (ro && !$past(ro)) check(!$past(ri), "ro rose while ri high");
    // A grant that follows the sister's without ro falling in between.
    if ((l1o && !$past(l1o) && $past(l2i, 3) && $past(ro, 1) && $past(ro, 2) && $past(ro, 3) &&
         $past(ro, 4)) ||
        (l2o && !$past(l2o) && $past(ro, 1) && $past(ro, 2) && $past(ro, 3) && $past(ro, 4)))
      reuse++;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (5000) @(posedge clk);
    check(served1 > 100 && served2 > 100, $sformatf("starvation: %0d / %0d", served1, served2));
    check(reuse > 0, "sister never served with the leftover acknowledge");
    $display("served1=%0d served2=%0d reuse=%0d", served1, served2, reuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
