// Latch cell: one bit of the row-data latch.
//
// While the strobe b is high the latch is transparent and the bit is set by
// a high column line. The bit itself is the request to the column interface
// circuit (gxo). Once the column has been chosen by the column arbiter and
// its address is being sent, the interface acknowledges on gxi, and the bit
// is cleared provided the latch is opaque (b low). Checking b before
// clearing stops a bit from being cleared and then set again from column
// data that is still on the lines.
//
// Production rules (from the document):
//   b & lix -> bx+      ~b & gxi -> bx-      gxo = bx
// The bit is a flip-flop updated once per clock (this RTL's choice).
module aer_latch_cell
  import aer_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic b_i,     // strobe: latch transparent
  input  logic lix_i,   // column line
  input  logic gxi_i,   // acknowledge from the column interface
  output logic gxo_o    // stored bit / request to the column interface
);

  logic bx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bx_q <= 1'b0;
    else        bx_q <= prs_next(bx_q, b_i & lix_i, ~b_i & gxi_i);
  end

  assign gxo_o = bx_q;

endmodule
