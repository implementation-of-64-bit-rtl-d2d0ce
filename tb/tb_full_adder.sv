// tb_full_adder: exhaustive check of the full adder: {co,s} must equal the
// arithmetic sum a + b + ci. Combinational; a watchdog ends a hung run.
module tb_full_adder;
  logic a, b, ci, s, co;
  int   checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, ci} = 3'(i);
      #1;
      checks++;
      if ({co, s} !== 2'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b -> co=%b s=%b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
