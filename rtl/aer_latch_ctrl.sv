// Latch controller: strobes the row-data latch and acknowledges the bus.
//
// Three signals track the latch:
//   g  (full)  rises when any bit is set or any column is acknowledged, and
//              falls when no bit is set and no column acknowledge is high;
//   l  (lines) rises when the latch is transparent and any column line is
//              high, and falls when all column lines are low;
//   b  (strobe) is a C-element of the two: it falls (latch opaque) when the
//              latch is full and data is on the lines, and rises (latch
//              transparent) when the latch is empty and the lines are clear.
// lo, the acknowledge to the rows, rises once the latch is opaque with data
// sensed, and falls as soon as the lines are clear or the latch transparent.
// lo falls while the latch may still be emptying, so the next row can be
// selected and drive its data onto the lines in advance; that data is taken
// as soon as b rises. Including b in the guard of l+ prevents new data from
// raising l while the latch is still opaque.
//
// Production rules (from the document):
//   {bx|} | {gxi|} -> g+     {~gxi&} & {~bx&} -> g-
//   ~g & ~l -> b+            g & l -> b-
//   l & ~b -> lo+            ~l | b -> lo-
//   lp & b -> l+             ~lp -> l-
// b and l are built as the C-element and aC-element that the document
// specifies, not as the simple NOR gates it reports were used on its chip.
// Each node is a flip-flop updated once per clock (this RTL's choice); b
// resets high, the empty, transparent state.
module aer_latch_ctrl
  import aer_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic bit_any_i,   // OR of the stored bits
  input  logic gxi_any_i,   // OR of the column acknowledges
  input  logic lp_i,        // OR of the column lines
  output logic b_o,         // strobe
  output logic g_o,         // latch full
  output logic l_o,         // column data sensed
  output logic lo_o         // acknowledge to the rows
);

  logic g_q, l_q, b_q, lo_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_q  <= 1'b0;
      l_q  <= 1'b0;
      b_q  <= 1'b1;
      lo_q <= 1'b0;
    end else begin
      g_q  <= prs_next(g_q, bit_any_i | gxi_any_i, ~gxi_any_i & ~bit_any_i);
      l_q  <= prs_next(l_q, lp_i & b_q, ~lp_i);
      b_q  <= prs_next(b_q, ~g_q & ~l_q, g_q & l_q);
      lo_q <= prs_next(lo_q, l_q & ~b_q, ~l_q | b_q);
    end
  end

  assign b_o  = b_q;
  assign g_o  = g_q;
  assign l_o  = l_q;
  assign lo_o = lo_q;

endmodule
