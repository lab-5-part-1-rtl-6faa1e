// Input port at address 0x4000.
//
// The port has no storage: when the CPU reads the even byte 0x4000 the
// port's pins are driven straight onto AD15-8 during E high, and the CPU
// samples them on the falling edge of E. A read touches 0x4000 when the
// latched address is exactly 0x4000 (A0 = 0): both the 8-bit read of 0x4000
// (LSTRB high) and the 16-bit word read of 0x4000/0x4001 (LSTRB low) need
// the high byte, so LSTRB is not examined. The design only states that an
// eight-bit input port sits at 0x4000 with switches on its four least
// significant bits; the decode and the byte lane are this design's choice,
// made to mirror the output port's decoder.
//
// Interface: addr (latched address), e, r_w, pins (the port's inputs),
// ad_hi (AD15-8, driven only during a read of 0x4000), cs_in_n (the read
// select, brought out for observation). Combinational.
//
// Circuit note: in a design that feeds this block from the address latch
// and lets it drive AD, lint tools report a combinational loop through
// this select (AD -> latch -> select -> AD driver). It cannot oscillate:
// the latch is open only while E is low and the select requires E high.
module in_port
  import port_exp_pkg::*;
#(
  parameter logic [ADDR_W-1:0] PORT_ADDR = IN_PORT_ADDR
) (
  input  logic [ADDR_W-1:0] addr,
  input  logic              e,
  input  logic              r_w,
  input  logic [PORT_W-1:0] pins,
  inout  wire  [PORT_W-1:0] ad_hi,
  output logic              cs_in_n
);

  always_comb begin
    cs_in_n = !((addr == PORT_ADDR) && e && (bus_dir_e'(r_w) == BUS_READ));
  end

  bus_buffer #(.W(PORT_W)) u_drv (
    .pad  (ad_hi),
    .data (pins),
    .oe_n (cs_in_n)
  );

endmodule
