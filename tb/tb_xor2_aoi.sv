// tb_xor2_aoi: exhaustive check of the AOI exclusive OR against a truth
// table written out by hand. Combinational; a watchdog ends a hung run.
module tb_xor2_aoi;
  logic a, b, y;
  int   checks = 0, failures = 0;
  // expected y for {a,b} = 00, 01, 10, 11 (index = {a,b})
  localparam logic [3:0] TT = 4'b0110;

  xor2_aoi dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y !== TT[i]) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
