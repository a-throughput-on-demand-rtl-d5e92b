// N-input arbiter (ARB(N)): grants one of N four-phase requests at a time.
//
// A balanced tree of N-1 two-input cells (aer_arbiter_tree). The root cell
// serves every input, so its parent is a process that completes every
// communication at once (*[L]): here a flip-flop that copies the root's
// request to its acknowledge. Requester k raises req_i[k] and holds it until
// ack_o[k] rises; it then lowers req_i[k] and ack_o[k] falls. At most one
// acknowledge is high at a time. Requests in the same subtree as the one
// just served are served without going back through the root.
//
// Tree shape and cell behaviour follow the document; the clocked root
// completion is this RTL's choice. On an idle tree a request at depth d is
// granted d+1 clocks after it is raised: one clock per level to climb, one
// for the root completion, and the grant comes straight down.
module aer_arbiter #(
  parameter int unsigned N = 104
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req_i,
  output logic [N-1:0] ack_o
);

  logic root_ro, root_ri;

  aer_arbiter_tree #(.N(N)) u_tree (
    .clk  (clk),
    .rst_n(rst_n),
    .req_i(req_i),
    .ack_o(ack_o),
    .ro   (root_ro),
    .ri   (root_ri)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) root_ri <= 1'b0;
    else        root_ri <= root_ro;
  end

  a_onehot_ack: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ack_o));

endmodule
