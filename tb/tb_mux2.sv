// tb_mux2: exhaustive check of the one-bit 2:1 multiplexer against a truth
// table written out by hand. Combinational; a watchdog ends a hung run.
module tb_mux2;
  logic d0, d1, s, y;
  int   checks = 0, failures = 0;
  // expected y for index {s,d1,d0}: s=0 -> d0, s=1 -> d1
  localparam logic [7:0] TT = 8'b1100_1010;

  mux2 dut (.d0(d0), .d1(d1), .s(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {s, d1, d0} = 3'(i);
      #1;
      checks++;
      if (y !== TT[i]) begin
        failures++;
        $display("FAIL s=%b d1=%b d0=%b y=%b", s, d1, d0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
