// Two-input arbiter cell, the building block of the arbiter trees.
//
// Requests from the two subtrees (l1i, l2i) go to a mutex and, through a
// modified OR gate, up to the parent as ro. The parent's acknowledge ri is
// steered down to the side that holds the mutex, and only while ro is high.
// ro rises only when the parent has withdrawn its previous acknowledge, and
// falls only once both subtree requests are low. So if a second request
// arrives while the first is being served, ro stays up and the sister is
// served with the parent's acknowledge that is still high, without a new
// round trip to the top of the tree. The arbitration spans the smallest
// subtree that holds another request.
//
// Handshake expansion of one side (from the document):
//   *[l1i -> a1o+, l1i & ~ri -> ro+; [ri & a1i]; l1o+; [~l1i];
//     ro-, a1o-; [~a1i]; l1o-]
// with ro- taken only when both requests are low. In this RTL the mutex
// requests a1o/a2o are the subtree requests themselves, ro is a flip-flop,
// and the acknowledges are the gate ri & grant & ro. Timing: a request
// reaches ro one clock later; a grant one clock after the parent's
// acknowledge, or at once if the mutex was already granted.
module aer_arb2
  import aer_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic l1i,   // request from subtree 1
  output logic l1o,   // acknowledge to subtree 1
  input  logic l2i,   // request from subtree 2
  output logic l2o,   // acknowledge to subtree 2
  output logic ro,    // request to the parent
  input  logic ri     // acknowledge from the parent
);

  logic a1i, a2i;
  logic ro_q;

  aer_mutex u_mutex (
    .clk  (clk),
    .rst_n(rst_n),
    .r1_i (l1i),
    .r2_i (l2i),
    .g1_o (a1i),
    .g2_o (a2i)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ro_q <= 1'b0;
    else        ro_q <= prs_next(ro_q, (l1i | l2i) & ~ri, ~l1i & ~l2i);
  end

  assign ro  = ro_q;
  assign l1o = ri & a1i & ro_q;
  assign l2o = ri & a2i & ro_q;

  a_one_ack: assert property (@(posedge clk) disable iff (!rst_n) !(l1o && l2o));

endmodule
