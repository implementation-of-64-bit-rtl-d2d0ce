// tb_csla_mux: checks the 12:6 group multiplexer (default) and a 22:11 one
// with random data words and both select values; the output must equal the
// word picked by the select. Combinational; a watchdog ends a hung run.
module tb_csla_mux;
  logic [5:0]  d0a, d1a, ya;
  logic [10:0] d0b, d1b, yb;
  logic        sel;
  int          checks = 0, failures = 0;

  csla_mux            dut6  (.d0(d0a), .d1(d1a), .sel(sel), .y(ya));
  csla_mux #(.W(11))  dut11 (.d0(d0b), .d1(d1b), .sel(sel), .y(yb));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      d0a = 6'($urandom);
      d1a = 6'($urandom);
      d0b = 11'($urandom);
      d1b = 11'($urandom);
      sel = i[0];
      #1;
      checks += 2;
      if (ya !== (sel ? d1a : d0a)) begin
        failures++;
        if (failures < 10) $display("FAIL W=6 sel=%b d0=%h d1=%h y=%h", sel, d0a, d1a, ya);
      end
      if (yb !== (sel ? d1b : d0b)) begin
        failures++;
        if (failures < 10) $display("FAIL W=11 sel=%b d0=%h d1=%h y=%h", sel, d0b, d1b, yb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
