// Tri-state bus driver for one byte lane of the AD bus.
//
// While oe_n is low the buffer drives data onto the pad lines; while oe_n is
// high it leaves them in high impedance so the CPU (or another driver) can
// use the bus. The active-low enable is as drawn for the read-back buffer in
// the block diagram. The same module also drives the input port onto the
// other byte lane.
//
// Interface: pad (bidirectional bus lines), data (value to drive), oe_n
// (output enable, active low). Purely combinational.
module bus_buffer #(
  parameter int unsigned W = 8
) (
  inout  wire  [W-1:0] pad,
  input  logic [W-1:0] data,
  input  logic         oe_n
);

  assign pad = oe_n ? 'z : data;

endmodule
