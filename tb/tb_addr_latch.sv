// Testbench for addr_latch: the latch must follow AD while E is low and
// keep the value present at the rising edge of E while E is high, whatever
// the bus does during the data phase. Random addresses and data, checked
// against a value remembered by the testbench.
module tb_addr_latch;
  localparam int unsigned AW = 16;
  logic          e;
  logic [AW-1:0] ad, addr, held;
  int checks = 0, failures = 0;

  addr_latch #(.AW(AW)) dut (.e(e), .ad(ad), .addr(addr));

  task automatic check(input logic [AW-1:0] exp, input string what);
    checks++;
    if (addr !== exp) begin
      failures++;
      $display("FAIL %s: addr=%h expected %h", what, addr, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e  = 1'b0;
    ad = '0;
    for (int i = 0; i < 200; i++) begin
      // address phase: transparent
      e  = 1'b0;
      ad = AW'($urandom);
      #5 check(ad, "transparent");
      ad = AW'($urandom);
      #5 check(ad, "transparent follow");
      held = ad;
      // data phase: held
      e = 1'b1;
      #2 check(held, "hold at rise");
      ad = AW'($urandom);
      #5 check(held, "hold with new data");
      ad = ~ad;
      #5 check(held, "hold with inverted data");
    end
    e = 1'b0;
    #5 check(ad, "transparent again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
