// Row address encoder (ENC(N)).
//
// While row y is selected its interface circuit raises sel_i[y], and the
// encoder drives the binary number y onto the row-address lines of the
// column bus, next to the row's spike data, so that the latch can store the
// address together with the data. Rows are selected one at a time, so the
// address is the OR of the indices of the selected rows: each address line
// is a wired-OR of the rows whose index has that bit set. Combinational.
module aer_row_encoder
  import aer_pkg::*;
#(
  parameter int unsigned N  = ROWS_DEFAULT,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  sel_i,
  output logic [AW-1:0] addr_o
);

  always_comb begin
    addr_o = '0;
    for (int unsigned n = 0; n < N; n++)
      if (sel_i[n]) addr_o = addr_o | AW'(n);
  end

endmodule
