// MC9S12 port expander: an output port at 0x4001 and an input port at
// 0x4000 on the CPU's 16-bit multiplexed address/data bus.
//
// Structure (as in the block diagram, plus the input port):
//   addr_latch    captures AD15-0 while E is low; holds it while E is high
//   port_decoder  makes cs_r_n (read 0x4001) and we_n (write 0x4001)
//   out_port_reg  8 flip-flops loaded from AD7-0 on E falling with we_n low
//   bus_buffer    returns the output port on AD7-0 while cs_r_n is low
//   in_port       drives the input pins onto AD15-8 on a read of 0x4000
//
// Bus cycle, one per E period: E low = address phase (CPU drives the
// address, latch transparent); E high = data phase (CPU drives data for a
// write, the expander drives data for a read). Writes take effect on the
// falling edge of E; reads are sampled by the CPU on that same edge.
//
// Ports: e, r_w, lstrb_n (the three bus control lines), ad (bidirectional
// AD15-0), rst_n (reset of the output port, this design's addition),
// in_pins (input port, switches on the four LSBs), out_pins (output port,
// to the LEDs).
//
// An immediate assertion checks the bus rule that the expander never
// drives AD while E is low.
//
// Circuit note: lint tools report a combinational loop from the AD pins
// through the address latch and the two read selects back to the AD
// drivers. It cannot oscillate: the latch passes AD only while E is low,
// and both read selects require E high, so the drivers are off whenever
// the latch is open.
module port_expander
  import port_exp_pkg::*;
(
  input  logic              e,
  input  logic              r_w,
  input  logic              lstrb_n,
  input  logic              rst_n,
  inout  wire  [ADDR_W-1:0] ad,
  input  logic [PORT_W-1:0] in_pins,
  output logic [PORT_W-1:0] out_pins
);

  logic [ADDR_W-1:0] addr;
  logic              cs_r_n;
  logic              we_n;
  logic              cs_in_n;

  addr_latch #(.AW(ADDR_W)) u_latch (
    .e    (e),
    .ad   (ad),
    .addr (addr)
  );

  port_decoder #(.PORT_ADDR(OUT_PORT_ADDR)) u_dec (
    .addr    (addr),
    .e       (e),
    .r_w     (r_w),
    .lstrb_n (lstrb_n),
    .cs_r_n  (cs_r_n),
    .we_n    (we_n)
  );

  out_port_reg #(.W(PORT_W)) u_out (
    .e     (e),
    .rst_n (rst_n),
    .we_n  (we_n),
    .d     (ad[PORT_W-1:0]),
    .q     (out_pins)
  );

  bus_buffer #(.W(PORT_W)) u_rdback (
    .pad  (ad[PORT_W-1:0]),
    .data (out_pins),
    .oe_n (cs_r_n)
  );

  in_port #(.PORT_ADDR(IN_PORT_ADDR)) u_in (
    .addr    (addr),
    .e       (e),
    .r_w     (r_w),
    .pins    (in_pins),
    .ad_hi   (ad[ADDR_W-1:ADDR_W-PORT_W]),
    .cs_in_n (cs_in_n)
  );

  // Bus rule: the CPU owns AD during the address phase, so the expander
  // may drive it only while E is high.
  always_comb begin
    if (!e) begin
      assert (cs_r_n && cs_in_n)
        else $error("expander drives AD during the address phase");
    end
  end

endmodule
