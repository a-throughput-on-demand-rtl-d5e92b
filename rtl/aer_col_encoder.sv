// Column address encoder and address-event output port (ENC(N)).
//
// The interface circuit of the column chosen by the column arbiter raises
// its encoder request ao_i[x]. The encoder puts the binary column number x
// on addr_o and raises req_o toward the receiver; the receiver's acknowledge
// ack_i is passed back to every column interface as ai_o. Column interfaces
// only raise ao_i while ai_o is low, so at most one is high and req_o/ack_i
// form a four-phase bundled-data handshake: the address is valid for as long
// as req_o is high. Combinational.
module aer_col_encoder
  import aer_pkg::*;
#(
  parameter int unsigned N  = COLS_DEFAULT,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  ao_i,
  input  logic          ack_i,
  output logic          req_o,
  output logic [AW-1:0] addr_o,
  output logic          ai_o
);

  always_comb begin
    addr_o = '0;
    for (int unsigned n = 0; n < N; n++)
      if (ao_i[n]) addr_o = addr_o | AW'(n);
  end

  assign req_o = |ao_i;
  assign ai_o  = ack_i;

endmodule
