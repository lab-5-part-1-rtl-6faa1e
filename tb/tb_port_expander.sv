// End-to-end testbench for port_expander, at its default (and only)
// configuration.
//
// The testbench plays the MC9S12 in wide expanded mode: each bus cycle is
// one E period; during E low the CPU drives the address on AD15-0 together
// with R/W and LSTRB, shortly after E rises it either drives write data or
// releases the bus for a read, and read data is sampled just before E
// falls. E is run at 24 MHz-like timing (half period 21 time units).
// Byte lanes: 0x4000 on AD15-8, 0x4001 on AD7-0.
//
// Workloads:
//   1. reset of the output port;
//   2. the D-Bug12 "MM" sequence: the CPU in single-chip mode toggles the
//      bus pins by hand, slowly, in the order E low, address 0x4001,
//      R/W and LSTRB low, E high, data on AD7-0, E low;
//   3. the interrupt routine of the demonstration program: read 0x4001,
//      write back the value plus one, then read the switches at 0x4000 and
//      the LEDs at 0x4001 (300 times, so the port wraps past 0xFF);
//   4. the logic-analyser loop: instruction fetches from 0x0480 onward,
//      a word read of 0x4000 (ldx), a read-modify-write of 0x4001 (inc)
//      and a byte read of 0x4000 (ldaa), repeated;
//   5. random cycles of every kind, including word writes, even-byte
//      writes that must not touch the output port, and other addresses.
// Latency: a write must reach the output pins at the falling edge of E that
// ends its own bus cycle (no wait states), and not before; a read returns
// the data within its own cycle.
// Every read result and the output pins are compared with a reference
// model kept in the testbench. Bus contention is checked on every cycle:
// the expander may drive a byte lane only during E high of a read that
// selects it. Each mechanism is counted and must occur at least once.
module tb_port_expander;
  localparam int HALF = 21;   // E half period
  localparam int T_AD = 4;    // address valid after E falls
  localparam int T_MAH = 2;   // muxed address hold after E rises
  localparam int T_WDH = 2;   // write data hold after E falls

  logic        e, r_w, lstrb_n, rst_n;
  logic [7:0]  in_pins, out_pins;
  logic [15:0] cpu_ad;
  logic        cpu_oe;
  wire  [15:0] ad;

  assign ad = cpu_oe ? cpu_ad : 'z;

  port_expander dut (
    .e(e), .r_w(r_w), .lstrb_n(lstrb_n), .rst_n(rst_n), .ad(ad),
    .in_pins(in_pins), .out_pins(out_pins)
  );

  int checks = 0, failures = 0;
  logic [7:0] out_model;
  logic [7:0] out_before_fall;  // output pins just before E falls

  // mechanism counters
  int n_reset, n_dbug12, n_wr_odd, n_wr_word, n_wr_even_ignored;
  int n_rd_odd, n_rd_word, n_rd_even, n_other_ignored, n_wrap;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // The expander's drivers must stay off unless a read selects them.
  task automatic check_no_drive(input string what);
    check(dut.cs_r_n && dut.cs_in_n, {"expander off the bus: ", what});
  endtask

  // One HCS12 bus cycle. Returns whatever is on AD just before E falls.
  task automatic bus_cycle(input logic [15:0] a, input logic rw,
                           input logic ls_n, input logic [15:0] wd,
                           output logic [15:0] rd);
    e = 1'b0;
    #T_WDH;                          // previous write data hold
    cpu_oe = 1'b1; cpu_ad = a; r_w = rw; lstrb_n = ls_n;
    #(T_AD - T_WDH);
    check_no_drive("address phase");
    #(HALF - T_AD);
    e = 1'b1;                        // address latched
    #T_MAH;
    if (rw) cpu_oe = 1'b0; else cpu_ad = wd;
    #(HALF - T_MAH - 1);
    if (!rw) check_no_drive("write data phase");
    rd = ad;
    out_before_fall = out_pins;
    #1;
    e = 1'b0;                        // write captured, read sampled
  endtask

  task automatic write_odd(input logic [7:0] v);      // byte write 0x4001
    logic [15:0] rd;
    bus_cycle(16'h4001, 1'b0, 1'b0, {8'h00, v}, rd);
    check(out_before_fall == out_model, "byte write: no change before E falls");
    out_model = v; n_wr_odd++;
    #1 check(out_pins == out_model, "out pins after byte write 0x4001");
  endtask

  task automatic write_word(input logic [15:0] v);    // word write 0x4000
    logic [15:0] rd;
    bus_cycle(16'h4000, 1'b0, 1'b0, v, rd);
    check(out_before_fall == out_model, "word write: no change before E falls");
    out_model = v[7:0]; n_wr_word++;
    #1 check(out_pins == out_model, "out pins after word write 0x4000");
  endtask

  task automatic write_even(input logic [7:0] v);     // byte write 0x4000
    logic [15:0] rd;
    bus_cycle(16'h4000, 1'b0, 1'b1, {v, 8'h00}, rd);
    n_wr_even_ignored++;
    #1 check(out_pins == out_model, "even-byte write leaves out port");
  endtask

  task automatic read_odd(output logic [7:0] v);      // byte read 0x4001
    logic [15:0] rd;
    bus_cycle(16'h4001, 1'b1, 1'b0, 16'h0000, rd);
    v = rd[7:0]; n_rd_odd++;
    check(v == out_model, "byte read 0x4001 returns out port");
  endtask

  task automatic read_even(output logic [7:0] v);     // byte read 0x4000
    logic [15:0] rd;
    bus_cycle(16'h4000, 1'b1, 1'b1, 16'h0000, rd);
    v = rd[15:8]; n_rd_even++;
    check(v == in_pins, "byte read 0x4000 returns input pins");
    check(dut.cs_r_n, "even-byte read does not enable read-back");
  endtask

  task automatic read_word(output logic [15:0] v);    // word read 0x4000
    bus_cycle(16'h4000, 1'b1, 1'b0, 16'h0000, v);
    n_rd_word++;
    check(v == {in_pins, out_model}, "word read 0x4000 returns {in, out}");
  endtask

  task automatic other_cycle(input logic [15:0] a, input logic rw,
                             input logic ls_n);        // not our address
    logic [15:0] rd;
    bus_cycle(a, rw, ls_n, 16'($urandom), rd);
    check_no_drive("other address");
    n_other_ignored++;
    #1 check(out_pins == out_model, "other address leaves out port");
  endtask

  // D-Bug12 MM bit-banging: each step is a separate slow pin update.
  task automatic dbug12_write(input logic [7:0] v);
    localparam int STEP = 500;
    e = 1'b0;                               #STEP;
    cpu_oe = 1'b1; cpu_ad = 16'h4001;       #STEP;
    r_w = 1'b0; lstrb_n = 1'b0;             #STEP;
    e = 1'b1;                               #STEP;
    cpu_ad[7:0] = v;                        #STEP;
    check(out_pins == out_model, "dbug12: no change before E falls");
    e = 1'b0;                               #STEP;
    out_model = v; n_dbug12++;
    check(out_pins == out_model, "dbug12: port written on E fall");
    r_w = 1'b1; lstrb_n = 1'b1;             #STEP;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  b, sw;
    logic [15:0] w;
    e = 1'b0; r_w = 1'b1; lstrb_n = 1'b1; cpu_oe = 1'b1; cpu_ad = 16'h0000;
    in_pins = 8'h00; rst_n = 1'b1;
    {n_reset, n_dbug12, n_wr_odd, n_wr_word, n_wr_even_ignored} = '0;
    {n_rd_odd, n_rd_word, n_rd_even, n_other_ignored, n_wrap} = '0;

    // 1. reset
    #5 rst_n = 1'b0;
    #5 out_model = 8'h00; n_reset++;
    check(out_pins == 8'h00, "reset clears out port");
    rst_n = 1'b1;
    #20;

    // 2. D-Bug12 MM sequence
    dbug12_write(8'ha5);
    dbug12_write(8'h3c);
    read_odd(b);

    // 3. interrupt routine: OUT_PORT = OUT_PORT + 1, then print both ports
    for (int i = 0; i < 300; i++) begin
      sw = {4'h0, 4'($urandom)};         // four switches on the LSBs
      in_pins = sw;
      read_odd(b);
      if (b == 8'hff) n_wrap++;
      write_odd(b + 8'd1);
      other_cycle(16'h0900 + 16'(2 * i), 1'b1, 1'b0);  // code in EEPROM
      read_even(b);
      check(b[3:0] == sw[3:0], "switches seen on 0x4000 bits 3-0");
      read_odd(b);
    end

    // 4. logic-analyser loop at 0x0480: fetches, ldx, inc, ldaa, bra
    for (int i = 0; i < 50; i++) begin
      in_pins = 8'($urandom);
      other_cycle(16'h0480, 1'b1, 1'b0);  // fetch
      other_cycle(16'h0482, 1'b1, 1'b0);  // fetch
      read_word(w);                       // ldx $4000
      other_cycle(16'h0484, 1'b1, 1'b0);  // fetch
      read_odd(b);                        // inc $4001: read
      write_odd(b + 8'd1);                // inc $4001: write
      other_cycle(16'h0486, 1'b1, 1'b0);  // fetch
      read_even(b);                       // ldaa $4000
      other_cycle(16'h0488, 1'b1, 1'b0);  // fetch, bra loop
    end

    // 5. random mix of every cycle kind
    for (int i = 0; i < 2000; i++) begin
      if (i % 7 == 0) in_pins = 8'($urandom);
      case ($urandom_range(0, 6))
        0: write_odd(8'($urandom));
        1: write_word(16'($urandom));
        2: write_even(8'($urandom));
        3: read_odd(b);
        4: read_even(b);
        5: read_word(w);
        default: begin
          w = 16'($urandom);
          if (w[15:1] == 15'h2000) w[15] = 1'b1;   // keep it off the ports
          other_cycle(w, 1'($urandom), 1'($urandom));
        end
      endcase
    end

    // every mechanism must have happened
    check(n_reset > 0,           "mechanism: reset");
    check(n_dbug12 > 0,          "mechanism: D-Bug12 bit-bang write");
    check(n_wr_odd > 0,          "mechanism: byte write 0x4001");
    check(n_wr_word > 0,         "mechanism: word write 0x4000");
    check(n_wr_even_ignored > 0, "mechanism: even-byte write ignored");
    check(n_rd_odd > 0,          "mechanism: read-back of 0x4001");
    check(n_rd_even > 0,         "mechanism: byte read of input port");
    check(n_rd_word > 0,         "mechanism: word read of both ports");
    check(n_other_ignored > 0,   "mechanism: other address ignored");
    check(n_wrap > 0,            "mechanism: port increment wraps past 0xFF");
    $display("mechanisms: reset=%0d dbug12=%0d wr_odd=%0d wr_word=%0d wr_even=%0d",
             n_reset, n_dbug12, n_wr_odd, n_wr_word, n_wr_even_ignored);
    $display("            rd_odd=%0d rd_even=%0d rd_word=%0d other=%0d wrap=%0d",
             n_rd_odd, n_rd_even, n_rd_word, n_other_ignored, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
