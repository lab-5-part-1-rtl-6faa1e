// Testbench for port_decoder: every combination of E, R/W and LSTRB with
// a set of addresses around the port (0x4000, 0x4001, neighbours, and
// instruction-fetch addresses in 0x0400-0x0fff) and random addresses.
// Expected strobes are computed from the rules:
//   read select low  <=> addr in {0x4000,0x4001}, LSTRB low, R/W high, E high
//   write enable low <=> addr in {0x4000,0x4001}, LSTRB low, R/W low
module tb_port_decoder;
  logic [15:0] addr;
  logic        e, r_w, lstrb_n, cs_r_n, we_n;
  int checks = 0, failures = 0;

  port_decoder dut (.addr(addr), .e(e), .r_w(r_w), .lstrb_n(lstrb_n),
                    .cs_r_n(cs_r_n), .we_n(we_n));

  task automatic try_one(input logic [15:0] a);
    logic in_word, exp_cs, exp_we;
    for (int k = 0; k < 8; k++) begin
      addr    = a;
      e       = k[0];
      r_w     = k[1];
      lstrb_n = k[2];
      #1;
      in_word = (a == 16'h4000) || (a == 16'h4001);
      exp_cs  = !(in_word && !lstrb_n && r_w && e);
      exp_we  = !(in_word && !lstrb_n && !r_w);
      checks += 2;
      if (cs_r_n !== exp_cs) begin
        failures++;
        $display("FAIL cs_r_n addr=%h e=%b rw=%b lstrb_n=%b got %b", a, e, r_w, lstrb_n, cs_r_n);
      end
      if (we_n !== exp_we) begin
        failures++;
        $display("FAIL we_n addr=%h e=%b rw=%b lstrb_n=%b got %b", a, e, r_w, lstrb_n, we_n);
      end
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
    automatic logic [15:0] list[] = '{16'h4000, 16'h4001, 16'h4002, 16'h4003,
                                      16'h3fff, 16'h3ffe, 16'hc001, 16'h4401,
                                      16'h0480, 16'h0481, 16'h0400, 16'h0fff,
                                      16'h0000, 16'hffff, 16'h6001, 16'h4081};
    foreach (list[i]) try_one(list[i]);
    for (int i = 0; i < 300; i++) try_one(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
