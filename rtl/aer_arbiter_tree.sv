// Subtree of an N-input arbiter, built by the recursion
//   ARB(N) = ARB(N/2) || ARB(2) || ARB(N - N/2)
// i.e. a balanced binary tree of N-1 two-input cells with ceil(log2 N)
// levels. The subtree's request ro goes to the parent, and its acknowledge
// ri comes back from it. A one-input subtree is a plain wire.
//
// Lint note: when this recursive module is itself linted as the top, the
// linter also reports its unelaborated recursive body and flags ack_o, ro_a
// and ro_b as undriven. Every elaborated instance drives them; linting
// aer_arbiter or the full design shows no such warning.
module aer_arbiter_tree #(
  parameter int unsigned N = 104
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req_i,
  output logic [N-1:0] ack_o,
  output logic         ro,
  input  logic         ri
);

  localparam int unsigned NA = N / 2;
  localparam int unsigned NB = N - N / 2;

  if (N == 1) begin : g_leaf
    assign ro    = req_i[0];
    assign ack_o = ri;
  end else begin : g_node
    logic ro_a, ri_a, ro_b, ri_b;

    aer_arbiter_tree #(.N(NA)) u_a (
      .clk  (clk),
      .rst_n(rst_n),
      .req_i(req_i[NA-1:0]),
      .ack_o(ack_o[NA-1:0]),
      .ro   (ro_a),
      .ri   (ri_a)
    );

    aer_arbiter_tree #(.N(NB)) u_b (
      .clk  (clk),
      .rst_n(rst_n),
      .req_i(req_i[N-1:NA]),
      .ack_o(ack_o[N-1:NA]),
      .ro   (ro_b),
      .ri   (ri_b)
    );

    aer_arb2 u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .l1i  (ro_a),
      .l1o  (ri_a),
      .l2i  (ro_b),
      .l2o  (ri_b),
      .ro   (ro),
      .ri   (ri)
    );
  end

endmodule
