// End-to-end test of the address-event transmitter on an 8 x 8 array.
//
// Each neuron is a small behavioural model: at random it raises its spike,
// holds it until the pixel acknowledges, and may spike again once the
// acknowledge has fallen. Every spike adds one to an expected count for its
// (row, column). A four-phase receiver with a random response delay takes
// the events, checks each against the expected counts and removes it. After
// a period of random activity (including bursts where whole rows spike) and
// a period where a single neuron fires as fast as it can, the spikes stop, the transmitter drains, and every expected count must be zero.
//
// The test also counts how often each mechanism of the design happens and
// fails if one never does: a row read yielding several spikes, the next row
// waiting on the column lines while the latch is still sending, a granted
// row waiting for the bus acknowledge, a column granted without a new trip
// through the arbiter root, a column waiting for the receiver, and a spike
// locked out because its row was already selected. It also sorts the gaps
// between events into three clusters: new row, same row and column (the
// neuron fired again), and same row with another column. The last must be
// the shortest on average, which is the point of the design, and a repeated
// address must take longer than a burst event, since it needs a new row
// read.
module tb_aer_transmitter;
  localparam int ROWS = 8;
  localparam int COLS = 8;
  localparam int RAW  = $clog2(ROWS);
  localparam int CAW  = $clog2(COLS);
  localparam int ACTIVE_CYCLES = 20000;
  localparam int WATCHDOG      = 200000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [ROWS-1:0][COLS-1:0] spike, spike_ack;
  logic ev_req, ev_ack;
  logic [RAW-1:0] ev_row;
  logic [CAW-1:0] ev_col;

  int checks = 0, failures = 0;
  int expected [ROWS][COLS];
  int outstanding = 0;
  int n_events = 0;
  bit stimulus_on = 1'b0;
  bit solo_on = 1'b0;   // only neuron (2,3) fires, as often as it can

  // Mechanism counters
  int n_parallel = 0, n_overlap = 0, n_bus_wait = 0, n_sister = 0;
  int n_enc_wait = 0, n_lockout = 0;
  // Event spacing
  longint last_req_cycle = -1;
  int last_row = -1, last_col = -1;
  longint same_sum = 0, diff_sum = 0, rep_sum = 0;
  int same_n = 0, diff_n = 0, rep_n = 0;
  longint cycle = 0;
  int burst_row = 0;

  aer_transmitter #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk        (clk),
    .rst_n      (rst_n),
    .spike_i    (spike),
    .spike_ack_o(spike_ack),
    .ev_req_o   (ev_req),
    .ev_row_o   (ev_row),
    .ev_col_o   (ev_col),
    .ev_ack_i   (ev_ack)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Neuron models
  initial begin
    spike = '0;
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++) expected[y][x] = 0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      for (int y = 0; y < ROWS; y++) begin
        // Occasionally a whole row fires at once to exercise wide reads.
        bit row_burst;
        row_burst = stimulus_on && ($urandom_range(0, 399) == 0);
        for (int x = 0; x < COLS; x++) begin
          if (spike[y][x] && spike_ack[y][x]) spike[y][x] <= 1'b0;
          else if (!spike[y][x] && !spike_ack[y][x] &&
                   ((stimulus_on && (row_burst || $urandom_range(0, 299) == 0)) ||
                    (solo_on && y == 2 && x == 3))) begin
            spike[y][x] <= 1'b1;
            expected[y][x]++;
            outstanding++;
          end
        end
      end
    end
  end

  // Receiver
  int ack_delay = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      ev_ack <= 1'b0;
    end else if (ev_req && !ev_ack) begin
      if (ack_delay == 0) begin
        check(expected[ev_row][ev_col] > 0,
              $sformatf("event (%0d,%0d) without a pending spike", ev_row, ev_col));
        if (expected[ev_row][ev_col] > 0) begin
          expected[ev_row][ev_col]--;
          outstanding--;
        end
        n_events++;
        ev_ack <= 1'b1;
        ack_delay = $urandom_range(0, 3);
      end else begin
        ack_delay--;
      end
    end else if (!ev_req && ev_ack) begin
      ev_ack <= 1'b0;
    end
  end

  // Event spacing: request-to-request time, split by whether the row changed.
  always @(posedge clk) begin
    if (rst_n && ev_req && !$past(ev_req)) begin
      if (last_req_cycle >= 0) begin
        if (int'(ev_row) == last_row && int'(ev_col) == last_col) begin
          rep_sum += cycle - last_req_cycle; rep_n++;
        end else if (int'(ev_row) == last_row) begin
          same_sum += cycle - last_req_cycle; same_n++;
        end else begin
          diff_sum += cycle - last_req_cycle; diff_n++;
        end
      end
      last_req_cycle = cycle;
      last_row = int'(ev_row);
      last_col = int'(ev_col);
    end
  end

  // Mechanism monitors
  always @(posedge clk) begin
    if (rst_n) begin
      if ($fell(dut.u_latch.b) && $countones(dut.u_latch.gxo_o) >= 2) n_parallel++;
      if (!dut.u_latch.b && (|dut.u_latch.gxo_o) && (|dut.col_lines) &&
          dut.row_addr_lines != dut.ev_row_o) n_overlap++;
      if ((|(dut.row_ri & ~dut.row_sel)) && dut.bus_ack) n_bus_wait++;
      if ((|(dut.col_ri & ~$past(dut.col_ri))) && $past(dut.u_col_arb.root_ri) &&
          $past(dut.u_col_arb.root_ri, 2) && $past(dut.u_col_arb.root_ri, 3)) n_sister++;
      if ((|(dut.col_ri & ~dut.gxi)) && dut.enc_ack) n_enc_wait++;
      // A spike that appears while its row is selected is held out of the
      // current readout.
      for (int y = 0; y < ROWS; y++)
        if (dut.row_sel[y] && (|(spike[y] & ~$past(spike[y])))) n_lockout++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    stimulus_on = 1'b1;
    repeat (ACTIVE_CYCLES) @(posedge clk);
    stimulus_on = 1'b0;
    while (outstanding != 0 || spike != '0) @(posedge clk);
    solo_on = 1'b1;
    repeat (500) @(posedge clk);
    solo_on = 1'b0;
    // Drain: wait until every spike has become an event.
    while (outstanding != 0 || spike != '0) @(posedge clk);
    repeat (50) @(posedge clk);
    check(!ev_req && !ev_ack, "output idle after drain");
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++)
        check(expected[y][x] == 0, $sformatf("spike (%0d,%0d) never sent", y, x));
    check(n_events > 200, $sformatf("too few events: %0d", n_events));
    check(n_parallel > 0, "no row read yielded several spikes");
    check(n_overlap > 0, "next row never waited on the lines during transmission");
    check(n_bus_wait > 0, "granted row never waited for the bus acknowledge");
    check(n_sister > 0, "no column grant reused the arbiter root's acknowledge");
    check(n_enc_wait > 0, "no column waited for the receiver");
    check(n_lockout > 0, "no spike was locked out by a selected row");
    check(same_n > 0 && diff_n > 0, "both same-row and new-row event spacings seen");
    if (same_n > 0 && diff_n > 0)
      check(same_sum * diff_n < diff_sum * same_n,
            $sformatf("same-row spacing %0d/%0d not below new-row spacing %0d/%0d",
                      same_sum, same_n, diff_sum, diff_n));
    // A repeated address needs a new read of the row, so it must not come
    // out as fast as the other events of a burst.
    check(rep_n > 0, "no repeated address");
    if (rep_n > 0 && same_n > 0)
      check(rep_sum * same_n > same_sum * rep_n, "repeated address as fast as a burst event");
    $display("events=%0d parallel_reads=%0d overlap=%0d bus_wait=%0d sister=%0d enc_wait=%0d lockout=%0d",
             n_events, n_parallel, n_overlap, n_bus_wait, n_sister, n_enc_wait, n_lockout);
    if (same_n > 0 && diff_n > 0)
      $display("mean spacing: same row %0.2f cycles (%0d), new row %0.2f cycles (%0d), repeat %0.2f (%0d)",
               real'(same_sum) / same_n, same_n, real'(diff_sum) / diff_n, diff_n,
               (rep_n > 0) ? real'(rep_sum) / rep_n : 0.0, rep_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired, outstanding=%0d", outstanding);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
