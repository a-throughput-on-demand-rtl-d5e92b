// Throughput-on-demand address-event transmitter (top level).
//
// Sends the spikes of a ROWS x COLS neuron array off chip as address events:
// one (row, column) address per spike, on a single four-phase bundled-data
// port. Instead of arbitrating for one neuron at a time, it arbitrates for a
// row, reads all of that row's spikes in parallel over the COLS column lines
// into a latch, and then sends them one by one through a column arbiter and
// column encoder. While the latch is being emptied, the next row is already
// chosen and its data waits on the column lines, so row selection overlaps
// event transmission. The busier the array, the more spikes each row read
// yields, and the more events share the cost of one row cycle.
//
// Data path:
//   neurons -> aer_array (pixels + row interfaces) <-> row aer_arbiter
//           -> aer_column_bus (+ row address from aer_row_encoder)
//           -> aer_latch -> per-column aer_if_ctrl <-> column aer_arbiter
//           -> aer_col_encoder -> ev_req_o / ev_row_o / ev_col_o, ev_ack_i
//
// Interface: a neuron raises spike_i[y][x] and holds it until
// spike_ack_o[y][x] rises, then lowers it; it may spike again once
// spike_ack_o has fallen. The receiver sees ev_req_o rise with ev_row_o and
// ev_col_o valid, raises ev_ack_i, waits for ev_req_o to fall, and lowers
// ev_ack_i. The row address is carried in extra latch bits alongside the
// row's data, as the document's second option for the row encoder.
//
// The block structure and every handshake follow the document, which
// describes a clockless circuit; this RTL updates every state-holding node
// on one clock (clk) and resets all handshakes to idle with rst_n.
module aer_transmitter
  import aer_pkg::*;
#(
  parameter int unsigned ROWS = ROWS_DEFAULT,
  parameter int unsigned COLS = COLS_DEFAULT,
  localparam int unsigned RAW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CAW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [ROWS-1:0][COLS-1:0] spike_i,
  output logic [ROWS-1:0][COLS-1:0] spike_ack_o,
  output logic                      ev_req_o,
  output logic [RAW-1:0]            ev_row_o,
  output logic [CAW-1:0]            ev_col_o,
  input  logic                      ev_ack_i
);

  // Row side
  logic [ROWS-1:0]           row_ro, row_ri, row_sel;
  logic [ROWS-1:0][COLS-1:0] cox;
  logic [RAW-1:0]            row_addr_lines;
  // Column bus and latch
  logic [COLS-1:0]           col_lines;
  logic                      bus_ack;
  logic [COLS-1:0]           gxo, gxi;
  // Column side
  logic [COLS-1:0]           col_ro, col_ri;
  logic                      enc_ack;

  aer_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk  (clk),
    .rst_n(rst_n),
    .lix_i(spike_i),
    .lox_o(spike_ack_o),
    .ro_o (row_ro),
    .ri_i (row_ri),
    .ci_i (bus_ack),
    .sel_o(row_sel),
    .cox_o(cox)
  );

  aer_arbiter #(.N(ROWS)) u_row_arb (
    .clk  (clk),
    .rst_n(rst_n),
    .req_i(row_ro),
    .ack_o(row_ri)
  );

  aer_row_encoder #(.N(ROWS), .AW(RAW)) u_row_enc (
    .sel_i (row_sel),
    .addr_o(row_addr_lines)
  );

  aer_column_bus #(.ROWS(ROWS), .COLS(COLS)) u_bus (
    .cox_i(cox),
    .col_o(col_lines)
  );

  aer_latch #(.COLS(COLS), .AW(RAW)) u_latch (
    .clk       (clk),
    .rst_n     (rst_n),
    .col_i     (col_lines),
    .row_addr_i(row_addr_lines),
    .lo_o      (bus_ack),
    .gxo_o     (gxo),
    .gxi_i     (gxi),
    .row_addr_o(ev_row_o)
  );

  for (genvar x = 0; x < COLS; x++) begin : g_col_if
    aer_if_ctrl u_col_if (
      .clk  (clk),
      .rst_n(rst_n),
      .p_i  (gxo[x]),
      .ro_o (col_ro[x]),
      .ri_i (col_ri[x]),
      .ci_i (enc_ack),
      .s_o  (gxi[x])
    );
  end

  aer_arbiter #(.N(COLS)) u_col_arb (
    .clk  (clk),
    .rst_n(rst_n),
    .req_i(col_ro),
    .ack_o(col_ri)
  );

  aer_col_encoder #(.N(COLS), .AW(CAW)) u_col_enc (
    .ao_i  (gxi),
    .ack_i (ev_ack_i),
    .req_o (ev_req_o),
    .addr_o(ev_col_o),
    .ai_o  (enc_ack)
  );

  // Handshake rules of the design.
  a_one_row:    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(row_sel));
  a_one_column: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gxi));
  a_addr_held:  assert property (@(posedge clk) disable iff (!rst_n)
                  ev_req_o && $past(ev_req_o) |-> $stable(ev_col_o) && $stable(ev_row_o));

endmodule
