// Testbench for out_port_reg: reset clears the port; on each falling edge
// of E the register loads D when WE was low at the preceding rising edge and
// keeps its value otherwise; WE changing during E high, D changing after
// the falling edge and the rising edge itself change nothing.
module tb_out_port_reg;
  logic       e, rst_n, we_n;
  logic [7:0] d, q, model, model_next;
  logic       load;
  int checks = 0, failures = 0, loads = 0;

  out_port_reg #(.W(8)) dut (.e(e), .rst_n(rst_n), .we_n(we_n), .d(d), .q(q));

  task automatic check(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, model);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e = 1'b0; we_n = 1'b1; d = 8'h00; rst_n = 1'b1;
    #3 rst_n = 1'b0;
    #3 model = 8'h00; check("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      e    = 1'b0;
      we_n = 1'($urandom);
      d    = 8'($urandom);
      #10;
      e = 1'b1;              // rising edge: no load, we_n sampled
      #1 check("after rising edge");
      if (!we_n) begin
        model_next = d;
        load = 1'b1;
      end else load = 1'b0;
      #4 we_n = 1'($urandom); // the decoder's enable may move now
      #5;
      e = 1'b0;              // falling edge: load when we_n was low
      if (load) begin
        model = model_next;
        loads++;
      end
      #1 check("after falling edge");
      d = ~d;                // data changes after the edge: no effect
      #2 check("data after edge");
    end
    if (loads == 0) begin
      failures++;
      $display("FAIL no load happened");
    end
    rst_n = 1'b0;
    model = 8'h00;
    #1 check("reset while running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
