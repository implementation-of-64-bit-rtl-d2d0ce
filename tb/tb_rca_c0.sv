// tb_rca_c0: checks the carry-in-0 ripple adder at its 5-bit default and at
// 1 and 10 bits (the narrowest and widest groups of the 64-bit adder),
// exhaustively, against integer addition. Combinational; a watchdog ends a
// hung run.
module tb_rca_c0;
  logic [4:0] a5, b5, s5;
  logic [0:0] a1, b1, s1;
  logic [9:0] a10, b10, s10;
  logic       co5, co1, co10;
  int         checks = 0, failures = 0;

  rca_c0            dut5  (.a(a5),  .b(b5),  .sum(s5),  .cout(co5));
  rca_c0 #(.N(1))   dut1  (.a(a1),  .b(b1),  .sum(s1),  .cout(co1));
  rca_c0 #(.N(10))  dut10 (.a(a10), .b(b10), .sum(s10), .cout(co10));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 10); i++) begin
      {a5, b5} = 10'(i);
      {a1, b1} = 2'(i);
      #1;
      checks++;
      if ({co5, s5} !== 6'(int'(a5) + int'(b5))) begin
        failures++;
        if (failures < 10) $display("FAIL N=5 %0d+%0d -> %0d", a5, b5, {co5, s5});
      end
      if (i < 4) begin
        checks++;
        if ({co1, s1} !== 2'(int'(a1) + int'(b1))) begin
          failures++;
          $display("FAIL N=1 %0d+%0d -> %0d", a1, b1, {co1, s1});
        end
      end
    end
    for (int i = 0; i < (1 << 20); i++) begin
      {a10, b10} = 20'(i);
      #1;
      checks++;
      if ({co10, s10} !== 11'(int'(a10) + int'(b10))) begin
        failures++;
        if (failures < 10) $display("FAIL N=10 %0d+%0d -> %0d", a10, b10, {co10, s10});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
