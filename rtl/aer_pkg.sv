// Shared definitions for the throughput-on-demand address-event transmitter.
//
// The transmitter is specified as a set of production rules: every
// state-holding node has a pull-up guard and a pull-down guard, and holds
// its value while neither is true. This RTL renders each such node as a
// flip-flop whose next value is given by prs_next(); the guards of every node
// in the design are mutually exclusive, so the order of the two tests does
// not matter. Purely combinational gates (ORs, wired-NORs, wires) stay
// combinational. The array size defaults are those of the fabricated chip:
// 96 rows by 104 columns.
package aer_pkg;

  // Default array size of the fabricated transmitter.
  localparam int unsigned ROWS_DEFAULT = 96;
  localparam int unsigned COLS_DEFAULT = 104;

  // Next value of a production-rule node with pull-up guard `up` and
  // pull-down guard `dn`: a gate with a staticizer (keeper).
  function automatic logic prs_next(input logic q, input logic up, input logic dn);
    if (up) return 1'b1;
    if (dn) return 1'b0;
    return q;
  endfunction

endpackage
