// Column bus (BUS(Y,X)): merges the column-line drives of all rows.
//
// Only one row is selected at a time, so each of the COLS column lines is
// simply the OR of that column's drives over all ROWS rows (a wired-NOR with
// an edge pull-up in silicon). The latch's acknowledge needs no steering: it
// is broadcast to every row, and rows that are not selected use it to wait
// until the bus is free. Combinational. cox_i is row-major as in aer_array.
module aer_column_bus
  import aer_pkg::*;
#(
  parameter int unsigned ROWS = ROWS_DEFAULT,
  parameter int unsigned COLS = COLS_DEFAULT
) (
  input  logic [ROWS-1:0][COLS-1:0] cox_i,
  output logic [COLS-1:0]           col_o
);

  always_comb begin
    col_o = '0;
    for (int unsigned y = 0; y < ROWS; y++) col_o = col_o | cox_i[y];
  end

endmodule
