// Address decoder of the output port at 0x4001.
//
// The decoder looks at the latched address, E, R/W and LSTRB and produces
// two active-low strobes:
//   cs_r_n  read select: low during E high of a read cycle (R/W = 1) that
//           touches 0x4001. It enables the tri-state buffer that returns the
//           port's contents on AD7-0.
//   we_n    write enable: low during a write cycle (R/W = 0) that touches
//           0x4001. The output register loads on the falling edge of E while
//           we_n is low, so we_n itself does not need E.
// An access touches 0x4001 when the latched address is 0x4000 or 0x4001
// and LSTRB is low: an 8-bit access to the odd byte, or a 16-bit word
// access to 0x4000 whose low byte is 0x4001. These conditions are exactly
// the ones given for the decoder in the block diagram. The base address is
// a parameter whose default is the design's 0x4001.
//
// Purely combinational; both strobes settle one gate delay after the
// latched address, E or the control lines change.
//
// Circuit note: in a design that feeds this block from the address latch
// and lets it drive AD, lint tools report a combinational loop through
// this select (AD -> latch -> select -> AD driver). It cannot oscillate:
// the latch is open only while E is low and the select requires E high.
module port_decoder
  import port_exp_pkg::*;
#(
  parameter logic [ADDR_W-1:0] PORT_ADDR = OUT_PORT_ADDR
) (
  input  logic [ADDR_W-1:0] addr,     // latched address
  input  logic              e,        // E clock
  input  logic              r_w,      // 1 = read, 0 = write
  input  logic              lstrb_n,  // low byte strobe, active low
  output logic              cs_r_n,   // read select, active low
  output logic              we_n      // write enable, active low
);

  logic hit;  // latched address is the word holding PORT_ADDR, low byte on

  always_comb begin
    hit    = (addr[ADDR_W-1:1] == PORT_ADDR[ADDR_W-1:1]) && !lstrb_n;
    cs_r_n = !(hit && e && (bus_dir_e'(r_w) == BUS_READ));
    we_n   = !(hit && (bus_dir_e'(r_w) == BUS_WRITE));
  end

endmodule
