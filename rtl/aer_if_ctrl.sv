// Interface circuit between a requester and an arbiter/encoder pair.
//
// The same circuit serves each row of the array and each cell of the latch.
// It relays the requester's request p to the arbiter as ro. When the arbiter
// acknowledges (ri) and the completion input ci is low, it raises s, which
// selects the requester and at the same time asks the address encoder to
// send its address. For a row, ci is the column-bus acknowledge from the
// latch: a newly chosen row waits until the previous row's column data has
// been taken and the lines are clear. For a latch column, ci is the address
// encoder's acknowledge: a newly chosen column waits until the previous
// event has finished on the output. ro falls once p has fallen and ci is
// high; s falls once the arbiter withdraws ri.
//
// Production rules (from the document):
//   p        -> ro+      ~p & ci -> ro-
//   ri & ~ci -> s+       ~ri     -> s-
// Each node is a flip-flop updated once per clock (this RTL's choice).
module aer_if_ctrl
  import aer_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic p_i,    // request from row / latch cell
  output logic ro_o,   // request to the arbiter
  input  logic ri_i,   // acknowledge from the arbiter
  input  logic ci_i,   // completion: bus acknowledge (row) or encoder acknowledge (column)
  output logic s_o     // select; also the address encoder request
);

  logic ro_q, s_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ro_q <= 1'b0;
      s_q  <= 1'b0;
    end else begin
      ro_q <= prs_next(ro_q, p_i, ~p_i & ci_i);
      s_q  <= prs_next(s_q, ri_i & ~ci_i, ~ri_i);
    end
  end

  assign ro_o = ro_q;
  assign s_o  = s_q;

endmodule
