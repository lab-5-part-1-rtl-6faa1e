// Testbench for in_port: during E high of a read of 0x4000 (with LSTRB high
// for a byte read or low for a word read) the pins appear on the high byte
// lane; for every other address, for writes and while E is low the port
// must leave the lane to the CPU.
module tb_in_port;
  logic [15:0] addr;
  logic        e, r_w, cs_in_n, cpu_en;
  logic [7:0]  pins, cpu;
  wire  [7:0]  ad_hi;
  int checks = 0, failures = 0, reads = 0;

  assign ad_hi = cpu_en ? cpu : 'z;

  in_port dut (.addr(addr), .e(e), .r_w(r_w), .pins(pins), .ad_hi(ad_hi),
               .cs_in_n(cs_in_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [15:0] list[] = '{16'h4000, 16'h4001, 16'h4002, 16'h0480,
                                      16'hc000, 16'h4800, 16'h5000, 16'h0000};
    logic sel;
    for (int i = 0; i < 600; i++) begin
      addr = (i % 3 == 0) ? 16'($urandom) : list[$urandom_range(0, 7)];
      e    = 1'($urandom);
      r_w  = 1'($urandom);
      pins = 8'($urandom);
      cpu  = 8'($urandom);
      sel  = (addr == 16'h4000) && e && r_w;
      cpu_en = !sel;         // the CPU drives whenever the port must not
      #1;
      checks += 2;
      if (cs_in_n !== !sel) begin
        failures++;
        $display("FAIL cs_in_n addr=%h e=%b rw=%b got %b", addr, e, r_w, cs_in_n);
      end
      if (ad_hi !== (sel ? pins : cpu)) begin
        failures++;
        $display("FAIL ad_hi addr=%h e=%b rw=%b got %h", addr, e, r_w, ad_hi);
      end
      if (sel) reads++;
    end
    checks++;
    if (reads == 0) begin
      failures++;
      $display("FAIL no read of 0x4000 happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
