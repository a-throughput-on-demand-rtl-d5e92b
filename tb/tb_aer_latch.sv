// Test of the row-data/address latch with 8 columns.
//
// A row model puts random row data and a row address on the lines whenever
// the bus acknowledge is low, holds them until the acknowledge rises, then
// clears them. A column-side model serves the latch's requests one at a
// time, as the column arbiter and interface circuits would, with random
// delays, and records (stored row address, column) for each. Every bit of
// every row must come out exactly once with its own row address. The test
// also checks that the next row's data is put on the lines while the latch
// is still sending the previous row at least once.
module tb_aer_latch;
  localparam int COLS = 8;
  localparam int AW   = 3;
  localparam int NROWS = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [COLS-1:0] col = '0, gxo, gxi = '0;
  logic [AW-1:0] row_addr = '0, row_addr_q;
  logic lo;
  int checks = 0, failures = 0;
  int expected [1 << AW][COLS];
  int pending = 0, overlap = 0, sent_rows = 0;
  int serving = -1;

  aer_latch #(.COLS(COLS), .AW(AW)) dut (
    .clk(clk), .rst_n(rst_n), .col_i(col), .row_addr_i(row_addr), .lo_o(lo),
    .gxo_o(gxo), .gxi_i(gxi), .row_addr_o(row_addr_q));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Row model
  initial begin
    foreach (expected[a, x]) expected[a][x] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NROWS; r++) begin
      logic [COLS-1:0] d;
      d = COLS'($urandom());
      if (d == '0) d = COLS'(1) << (r % COLS);
      while (lo) @(posedge clk);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      if (gxo != '0) overlap++;
      for (int x = 0; x < COLS; x++) if (d[x]) begin expected[r % (1 << AW)][x]++; pending++; end
      col <= d;
      row_addr <= AW'(r);
      @(posedge clk);
      while (!lo) @(posedge clk);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      col <= '0;
      row_addr <= '0;
      @(posedge clk);
      sent_rows++;
    end
  end

  // Column-side model: one column at a time.
  int cdelay = 0;
  always @(posedge clk) if (rst_n) begin
    if (serving < 0) begin
      if (gxo != '0 && cdelay == 0) begin
        int pick;
        do pick = $urandom_range(0, COLS - 1); while (!gxo[pick]);
        serving <= pick;
        gxi[pick] <= 1'b1;
        check(expected[row_addr_q][pick] > 0,
              $sformatf("unexpected bit: row %0d column %0d", row_addr_q, pick));
        if (expected[row_addr_q][pick] > 0) begin
          expected[row_addr_q][pick]--;
          pending--;
        end
        cdelay = $urandom_range(0, 4);
      end else if (cdelay > 0) cdelay--;
    end else if (!gxo[serving]) begin
      gxi[serving] <= 1'b0;
      serving <= -1;
    end
  end

  initial begin
    wait (sent_rows == NROWS);
    while (pending != 0 || serving >= 0) @(posedge clk);
    repeat (20) @(posedge clk);
    check(gxo == '0 && !lo, "latch empty at the end");
    foreach (expected[a, x]) check(expected[a][x] == 0, $sformatf("bit %0d/%0d lost", a, x));
    check(overlap > 0, "next row never arrived while the latch was sending");
    $display("overlap=%0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: pending=%0d sent_rows=%0d", pending, sent_rows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
