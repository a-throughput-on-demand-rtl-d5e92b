// Test of the neuron array interface with 4 rows of 4 pixels.
//
// Neuron models spike at random. A row-arbiter model grants one row request
// at a time (four-phase), and a latch model acknowledges the column data
// (ci) some clocks after it appears and withdraws the acknowledge once the
// lines are clear. Checks: at most one row selected; column data only comes
// from the selected row; every spike is read out exactly once, at the
// column of its neuron, when its row is selected; and at least once a row
// read carries several spikes at once.
module tb_aer_array;
  localparam int ROWS = 4;
  localparam int COLS = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [ROWS-1:0][COLS-1:0] lix = '0, lox, cox;
  logic [ROWS-1:0] ro, ri = '0, sel;
  logic ci = 1'b0;
  int checks = 0, failures = 0;
  int expected [ROWS][COLS];
  int pending = 0, multi = 0, reads = 0;
  bit stim = 1'b0;

  aer_array #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .rst_n(rst_n), .lix_i(lix), .lox_o(lox), .ro_o(ro), .ri_i(ri),
    .ci_i(ci), .sel_o(sel), .cox_o(cox));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Neurons
  always @(posedge clk) if (rst_n) begin
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++)
        if (lix[y][x] && lox[y][x]) lix[y][x] <= 1'b0;
        else if (!lix[y][x] && !lox[y][x] && stim && $urandom_range(0, 29) == 0) begin
          lix[y][x] <= 1'b1;
          expected[y][x]++;
          pending++;
        end
  end

  // Row arbiter model
  always @(posedge clk) if (rst_n) begin
    if (ri == '0) begin
      for (int y = 0; y < ROWS; y++)
        if (ro[y]) begin ri[y] <= 1'b1; break; end
    end else begin
      for (int y = 0; y < ROWS; y++) if (ri[y] && !ro[y]) ri[y] <= 1'b0;
    end
  end

  // Latch model: takes the column data once, acknowledges, waits for clear.
  logic [COLS-1:0] lines;
  int ldelay = 0;
  always_comb begin
    lines = '0;
    for (int y = 0; y < ROWS; y++) lines |= cox[y];
  end
  always @(posedge clk) if (rst_n) begin
    if (!ci && lines != '0) begin
      if (ldelay == 0) begin
        int y;
        y = -1;
        for (int k = 0; k < ROWS; k++) if (sel[k]) y = k;
        check(y >= 0, "column data with no row selected");
        if (y >= 0) begin
          check(cox[y] == lines, "column data not from the selected row");
          for (int x = 0; x < COLS; x++) if (lines[x]) begin
            check(expected[y][x] > 0, $sformatf("spurious spike %0d/%0d", y, x));
            if (expected[y][x] > 0) begin expected[y][x]--; pending--; end
          end
          if ($countones(lines) > 1) multi++;
          reads++;
        end
        ci <= 1'b1;
        ldelay = $urandom_range(1, 4);
      end else ldelay--;
    end else if (ci && lines == '0) ci <= 1'b0;
  end

  always @(posedge clk) if (rst_n) check($onehot0(sel), "two rows selected");

  initial begin
    foreach (expected[y, x]) expected[y][x] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    stim = 1'b1;
    repeat (5000) @(posedge clk);
    stim = 1'b0;
    while (pending != 0 || lix != '0) @(posedge clk);
    repeat (20) @(posedge clk);
    check(sel == '0 && ro == '0 && cox == '0, "array idle at the end");
    check(multi > 0, "no parallel row read");
    $display("reads=%0d multi=%0d", reads, multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: pending=%0d", pending);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
