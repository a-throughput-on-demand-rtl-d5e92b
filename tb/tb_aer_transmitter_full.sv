// Full-size run of the transmitter (96 rows x 104 columns, the default
// parameters).
//
// Several rows spike together: one row with every neuron active, the first
// and last neurons of the array, a diagonal, and a random scatter. The test
// receives events with a four-phase receiver until every spike has been
// sent, and checks that each spike produced exactly one event with its own
// row and column, that the corner addresses 0 and 95/103 come out, and that
// the 104 events of the full row come out as one burst of same-row events.
module tb_aer_transmitter_full;
  localparam int ROWS = 96;
  localparam int COLS = 104;
  localparam int RAW  = $clog2(ROWS);
  localparam int CAW  = $clog2(COLS);
  localparam int FULL_ROW = 37;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [ROWS-1:0][COLS-1:0] spike = '0, spike_ack;
  logic ev_req, ev_ack = 1'b0;
  logic [RAW-1:0] ev_row;
  logic [CAW-1:0] ev_col;
  int checks = 0, failures = 0;
  int expected [ROWS][COLS];
  int outstanding = 0, n_events = 0, full_row_run = 0, best_run = 0;
  int last_row = -1;

  aer_transmitter dut (
    .clk(clk), .rst_n(rst_n), .spike_i(spike), .spike_ack_o(spike_ack),
    .ev_req_o(ev_req), .ev_row_o(ev_row), .ev_col_o(ev_col), .ev_ack_i(ev_ack));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic fire(input int y, input int x);
    if (!spike[y][x]) begin
      spike[y][x] = 1'b1;
      expected[y][x]++;
      outstanding++;
    end
  endtask

  // Neurons: withdraw the spike when the pixel acknowledges.
  always @(posedge clk)
    for (int y = 0; y < ROWS; y++)
      if (|(spike[y] & spike_ack[y])) spike[y] <= spike[y] & ~spike_ack[y];

  // Receiver
  always @(posedge clk) if (rst_n) begin
    if (ev_req && !ev_ack) begin
      check(int'(ev_row) < ROWS && int'(ev_col) < COLS, "address out of range");
      if (int'(ev_row) < ROWS && int'(ev_col) < COLS) begin
        check(expected[ev_row][ev_col] > 0,
              $sformatf("event (%0d,%0d) without a spike", ev_row, ev_col));
        if (expected[ev_row][ev_col] > 0) begin
          expected[ev_row][ev_col]--;
          outstanding--;
        end
      end
      if (int'(ev_row) == FULL_ROW) full_row_run = (last_row == FULL_ROW) ? full_row_run + 1 : 1;
      if (full_row_run > best_run) best_run = full_row_run;
      last_row = int'(ev_row);
      n_events++;
      ev_ack <= 1'b1;
    end else if (!ev_req && ev_ack) ev_ack <= 1'b0;
  end

  initial begin
    int sent;
    foreach (expected[y, x]) expected[y][x] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int x = 0; x < COLS; x++) fire(FULL_ROW, x);
    fire(0, 0);
    fire(ROWS - 1, COLS - 1);
    for (int y = 0; y < ROWS; y += 5) fire(y, y % COLS);
    for (int k = 0; k < 200; k++) fire($urandom_range(0, ROWS - 1), $urandom_range(0, COLS - 1));
    sent = outstanding;
    while (outstanding != 0 || spike != '0) @(posedge clk);
    repeat (50) @(posedge clk);
    check(n_events == sent, $sformatf("%0d events for %0d spikes", n_events, sent));
    check(!ev_req, "output idle");
    foreach (expected[y, x]) if (expected[y][x] != 0) check(1'b0, $sformatf("spike %0d/%0d lost", y, x));
    check(best_run == COLS, $sformatf("full row came out in bursts of %0d, expected %0d", best_run, COLS));
    $display("events=%0d", n_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: outstanding=%0d", outstanding);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
