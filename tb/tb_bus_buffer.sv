// Testbench for bus_buffer: with the enable asserted the buffer must put
// its data on the bus; with it released another driver must own the bus.
module tb_bus_buffer;
  wire  [7:0] pad;
  logic [7:0] data, other;
  logic       oe_n, other_en;
  int checks = 0, failures = 0;

  assign pad = other_en ? other : 'z;

  bus_buffer #(.W(8)) dut (.pad(pad), .data(data), .oe_n(oe_n));

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (pad !== exp) begin
      failures++;
      $display("FAIL %s: pad=%h expected %h", what, pad, exp);
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
    for (int i = 0; i < 200; i++) begin
      data  = 8'($urandom);
      other = 8'($urandom);
      // buffer drives
      other_en = 1'b0; oe_n = 1'b0;
      #1 check(data, "buffer drives");
      // buffer released, other driver owns the bus
      oe_n = 1'b1; other_en = 1'b1;
      #1 check(other, "buffer released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
