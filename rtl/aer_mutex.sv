// Two-way mutual-exclusion element of the arbiter cell.
//
// Grants at most one of two requests and holds the grant until that request
// is withdrawn. When the holder withdraws and the other side is waiting, the
// grant passes to the other side on the same clock, as the cross-coupled
// NAND pair of the original circuit does. When both sides request in the
// same clock while the element is free, side 1 wins; the original element
// decides this case by resolving metastability, which has no counterpart in
// a clocked design.
module aer_mutex (
  input  logic clk,
  input  logic rst_n,
  input  logic r1_i,
  input  logic r2_i,
  output logic g1_o,
  output logic g2_o
);

  logic g1_q, g2_q;
  logic free1, free2;

  // The element is free for a side once the other side holds no grant, or
  // is about to release it on this clock.
  assign free1 = ~g2_q | ~r2_i;
  assign free2 = ~g1_q | ~r1_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1_q <= 1'b0;
      g2_q <= 1'b0;
    end else begin
      g1_q <= r1_i & (g1_q | free1);
      g2_q <= r2_i & (g2_q | (free2 & ~(r1_i & ~g1_q & free1)));
    end
  end

  assign g1_o = g1_q;
  assign g2_o = g2_q;

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(g1_q && g2_q));

endmodule
