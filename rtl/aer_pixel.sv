// Pixel: the neuron interface circuit of one array cell.
//
// A spike from the neuron (lix high) is captured in bit bx as long as the row
// is not selected; the bit feeds the row's request line. When the row is
// selected (s high) a cell whose bit is set drives its column line (cox) and
// tells the neuron to clear its spike (lox). The bit falls once the neuron
// has withdrawn lix; cox and lox stay up until the row is deselected. Taking
// s high therefore freezes which cells take part in the readout: a spike that
// arrives after selection waits for the next selection of the row.
//
// Production rules (from the document):
//   lix & ~s -> bx+        ~lix -> bx-
//   s & bx   -> cox+,lox+  ~s   -> cox-,lox-
// Each state-holding node is a flip-flop updated once per clock (a choice of
// this RTL; the original circuit is clockless). cox and lox share a node
// because their guards are identical. Reset clears everything.
module aer_pixel
  import aer_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic lix_i,   // neuron has a spike
  output logic lox_o,   // clear the neuron's spike
  input  logic s_i,     // row selected
  output logic bx_o,    // stored spike, to the row request
  output logic cox_o    // column line drive
);

  logic bx_q, co_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bx_q <= 1'b0;
      co_q <= 1'b0;
    end else begin
      bx_q <= prs_next(bx_q, lix_i & ~s_i, ~lix_i);
      co_q <= prs_next(co_q, s_i & bx_q, ~s_i);
    end
  end

  assign bx_o  = bx_q;
  assign cox_o = co_q;
  assign lox_o = co_q;

endmodule
