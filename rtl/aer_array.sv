// Neuron array interface: ROWS rows of COLS pixels, each row with its own
// interface circuit to the row arbiter.
//
// Each pixel stores a spike of its neuron. A row's request line p is the OR
// of its pixels' bits (a wired-NOR in silicon). The row's interface circuit
// requests the row arbiter and, once granted and once the column bus
// acknowledge ci is low, selects the row (sel_o). All pixels of a selected
// row with a stored spike then drive their column lines at once (cox_o) and
// clear their neurons' spikes (lox_o): the whole row is read in parallel.
// When every bit of the row has cleared and the latch has acknowledged the
// column data (ci high), the row withdraws its arbiter request; when the
// arbiter withdraws its grant, the row is deselected and its column lines
// are released. sel_o also tells the row address encoder to drive the row's
// address.
//
// Structure and rules follow the document; the clocking is this RTL's.
// cox_o is row-major: bit y*COLS+x belongs to row y, column x.
module aer_array
  import aer_pkg::*;
#(
  parameter int unsigned ROWS = ROWS_DEFAULT,
  parameter int unsigned COLS = COLS_DEFAULT
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [ROWS-1:0][COLS-1:0] lix_i,   // neuron spikes
  output logic [ROWS-1:0][COLS-1:0] lox_o,   // spike clears
  output logic [ROWS-1:0]           ro_o,    // requests to the row arbiter
  input  logic [ROWS-1:0]           ri_i,    // grants from the row arbiter
  input  logic                      ci_i,    // column-bus acknowledge (broadcast)
  output logic [ROWS-1:0]           sel_o,   // row selects
  output logic [ROWS-1:0][COLS-1:0] cox_o    // column-line drives
);

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    logic [COLS-1:0] bx;
    logic            p;

    for (genvar x = 0; x < COLS; x++) begin : g_col
      aer_pixel u_pixel (
        .clk  (clk),
        .rst_n(rst_n),
        .lix_i(lix_i[y][x]),
        .lox_o(lox_o[y][x]),
        .s_i  (sel_o[y]),
        .bx_o (bx[x]),
        .cox_o(cox_o[y][x])
      );
    end

    assign p = |bx;

    aer_if_ctrl u_row_if (
      .clk  (clk),
      .rst_n(rst_n),
      .p_i  (p),
      .ro_o (ro_o[y]),
      .ri_i (ri_i[y]),
      .ci_i (ci_i),
      .s_o  (sel_o[y])
    );
  end

endmodule
