// tb_rca: checks the ripple carry adder with carry in. The 2-bit default
// (group 0 of the 64-bit adder) and an 8-bit instance are both driven with
// every operand and carry combination and compared with integer addition.
// Combinational; a watchdog ends a hung run.
module tb_rca;
  logic [1:0] a2, b2, s2;
  logic [7:0] a8, b8, s8;
  logic       ci2, co2, ci8, co8;
  int         checks = 0, failures = 0;

  rca            dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));
  rca #(.N(8))   dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {ci2, a2, b2} = 5'(i);
      #1;
      checks++;
      if ({co2, s2} !== 3'(int'(a2) + int'(b2) + int'(ci2))) begin
        failures++;
        $display("FAIL N=2 %0d+%0d+%0d -> %0d", a2, b2, ci2, {co2, s2});
      end
    end
    for (int i = 0; i < (1 << 17); i++) begin
      {ci8, a8, b8} = 17'(i);
      #1;
      checks++;
      if ({co8, s8} !== 9'(int'(a8) + int'(b8) + int'(ci8))) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 %0d+%0d+%0d -> %0d", a8, b8, ci8, {co8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
