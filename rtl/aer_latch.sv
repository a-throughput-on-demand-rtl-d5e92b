// Row-data/address latch (LATCH(X)).
//
// Holds the spikes of one row, read in parallel from the COLS column lines,
// together with that row's address, read from the row-address lines of the
// bus. Each stored spike is a request (gxo_o[x]) to the interface circuit of
// its column; the column arbiter serves these one at a time, and each bit is
// cleared when its column is acknowledged (gxi_i[x]). Meanwhile the
// controller acknowledges the bus (lo_o), so the next row can be selected
// and its data put on the lines while this row is still being sent: row
// readout and event transmission overlap.
//
// The cells and controller follow the document. The row-address bits are
// this RTL's choice of storage: a transparent latch that follows the lines
// while b is high and holds while b is low (the document only says the
// address is stored in extra latch bits).
module aer_latch
  import aer_pkg::*;
#(
  parameter int unsigned COLS = COLS_DEFAULT,
  parameter int unsigned AW   = $clog2(ROWS_DEFAULT)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [COLS-1:0] col_i,        // column lines
  input  logic [AW-1:0]   row_addr_i,   // row-address lines
  output logic            lo_o,         // acknowledge to the rows
  output logic [COLS-1:0] gxo_o,        // requests to the column interfaces
  input  logic [COLS-1:0] gxi_i,        // column acknowledges
  output logic [AW-1:0]   row_addr_o    // stored row address
);

  logic b, g, l;
  logic [AW-1:0] addr_q;

  for (genvar x = 0; x < COLS; x++) begin : g_cell
    aer_latch_cell u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .b_i  (b),
      .lix_i(col_i[x]),
      .gxi_i(gxi_i[x]),
      .gxo_o(gxo_o[x])
    );
  end

  aer_latch_ctrl u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .bit_any_i(|gxo_o),
    .gxi_any_i(|gxi_i),
    .lp_i     (|col_i),
    .b_o      (b),
    .g_o      (g),
    .l_o      (l),
    .lo_o     (lo_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  addr_q <= '0;
    else if (b)  addr_q <= row_addr_i;
  end

  assign row_addr_o = addr_q;

  // A bit may only be cleared when the latch is opaque.
  a_clear_opaque: assert property (@(posedge clk) disable iff (!rst_n)
    (|(~gxo_o & $past(gxo_o))) |-> $past(!b));

  // The latch closes only once it holds data and the lines carry data.
  a_close: assert property (@(posedge clk) disable iff (!rst_n)
    $fell(b) |-> $past(g && l));

endmodule
