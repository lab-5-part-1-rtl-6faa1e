// Output port register: eight flip-flops at address 0x4001.
//
// The flip-flops are clocked by the falling edge of E and have an
// active-low load enable, the decoder's we_n. In a write cycle the CPU
// holds the data on AD7-0 through the end of E high, so the falling edge of
// E with the write enabled captures the byte written. Otherwise the register
// keeps its value. The outputs drive the port pins (the LEDs) and, through
// the read-back buffer, the data bus.
//
// Falling-edge clocking and the active-low enable follow the block
// diagram. Two details are this design's own:
//   - we_n is sampled into a one-bit flip-flop on the rising edge of E and
//     that copy enables the load at the falling edge. we_n depends only on
//     the latched address, R/W and LSTRB, which are all settled when E
//     rises, so the write decision is the same; but at the falling edge the
//     address latch reopens, and without the copy the load would race
//     against the enable decoded from the next address.
//   - an asynchronous active-low reset clears the port to 0x00.
//
// Interface: e (E clock), rst_n, we_n (write enable, valid at E rise),
// d (AD7-0), q (port value). Timing: q changes on the falling edge of e
// that ends a cycle in which we_n was low when e rose.
module out_port_reg #(
  parameter int unsigned W = 8
) (
  input  logic         e,
  input  logic         rst_n,
  input  logic         we_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic we_n_q;  // write enable of the current E-high phase

  always_ff @(posedge e or negedge rst_n) begin
    if (!rst_n) we_n_q <= 1'b1;
    else        we_n_q <= we_n;
  end

  always_ff @(negedge e or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (!we_n_q) q <= d;
  end

endmodule
