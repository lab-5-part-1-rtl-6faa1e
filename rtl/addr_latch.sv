// Address latch for the MC9S12 multiplexed address/data bus.
//
// During the low half of each E-clock cycle the CPU puts the address on
// AD15-0; during the high half the same lines carry data. This latch is
// transparent while E is low and holds its value while E is high, so the
// address captured at the rising edge of E stays available to the decoder
// for the whole data phase; the next cycle's address flows through again
// once E falls. The active-low enable driven by E is as drawn in the
// block diagram.
//
// Interface: e (E clock), ad (AD15-0 as seen at the pins), addr (latched
// address). Timing: addr follows ad with no clock while e = 0; frozen from
// the rising edge of e until e falls again.
//
// Circuit note: the level-sensitive latch that synthesis reports is the
// function of this block, not an accident of coding.
module addr_latch #(
  parameter int unsigned AW = 16
) (
  input  logic          e,
  input  logic [AW-1:0] ad,
  output logic [AW-1:0] addr
);

  always_latch begin
    if (!e) addr = ad;
  end

endmodule
