// Shared constants of the MC9S12 port expander.
//
// The expander sits on the 16-bit multiplexed address/data bus (AD15-0) of
// an MC9S12 running in wide expanded mode. Two byte-wide ports live in one
// aligned 16-bit word: the input port at the even address 0x4000, which the
// CPU sees on the high byte AD15-8, and the output port at the odd address
// 0x4001, seen on the low byte AD7-0. The two addresses are the design's
// given numbers; the byte-lane mapping is the usual big-endian lane
// assignment of this CPU family in wide mode.
package port_exp_pkg;

  localparam int unsigned ADDR_W = 16;  // multiplexed address/data bus width
  localparam int unsigned PORT_W = 8;   // width of each port

  localparam logic [ADDR_W-1:0] IN_PORT_ADDR  = 16'h4000;
  localparam logic [ADDR_W-1:0] OUT_PORT_ADDR = 16'h4001;

  // Bus access direction as signalled on R/W (1 = read, 0 = write).
  typedef enum logic {
    BUS_WRITE = 1'b0,
    BUS_READ  = 1'b1
  } bus_dir_e;

endpackage
