// bidir_io: bidirectional I/O cell built from two tristate buffers and one
// inverter.
//
// Buffer b1 drives y from x and is enabled by the inverted select; buffer
// b2 drives x from y and is enabled by the select itself, so exactly one of
// the two is on at any time and the cell never drives both sides:
//
//   sel = 0 : b1 on,  y = x, b2 off (x is the input, y the output)
//   sel = 1 : b2 on,  x = y, b1 off (y is the input, x the output)
//
// The cell is purely combinational; the output follows the input with no
// clock. The structure and the select table follow the original I/O
// description; where that description is inconsistent about the
// polarity, its direction table is followed (sel = 0: flow from x to y).
//
// Lint (UNOPTFLAT in Verilator) flags the x <-> y path as a possible
// combinational loop. It is a false path: the two buffers are never enabled
// together, so no loop exists in the circuit.
module bidir_io (
  input  logic sel,   // direction select
  inout  tri   x,     // side X
  inout  tri   y      // side Y
);

  logic sel_n;  // the inverter: enable of b1

  assign sel_n = ~sel;

  // b1: X -> Y
  assign y = sel_n ? x : 1'bz;
  // b2: Y -> X
  assign x = sel   ? y : 1'bz;

endmodule
