// tb_csla_group: checks a carry select group. The 5-bit default (12:6 mux)
// and 2- and 8-bit groups are driven with every operand pair and both carry
// in values; {cout, sum} must equal a + b + cin. It also counts how often
// the mux picked the BEC path (cin = 1) and how often the carry-in-1 result
// differed from the carry-in-0 one in the carry bit, and fails if either
// never happened. Combinational; a watchdog ends a hung run.
module tb_csla_group;
  logic [4:0] a5, b5, s5;
  logic [1:0] a2, b2, s2;
  logic [7:0] a8, b8, s8;
  logic       ci5, co5, ci2, co2, ci8, co8;
  int         checks = 0, failures = 0;
  int         n_bec_sel = 0, n_carry_from_bec = 0;

  csla_group           dut5 (.a(a5), .b(b5), .cin(ci5), .sum(s5), .cout(co5));
  csla_group #(.N(2))  dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));
  csla_group #(.N(8))  dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 11); i++) begin
      {ci5, a5, b5} = 11'(i);
      {ci2, a2, b2} = 5'(i);
      #1;
      checks++;
      if ({co5, s5} !== 6'(int'(a5) + int'(b5) + int'(ci5))) begin
        failures++;
        if (failures < 10) $display("FAIL N=5 %0d+%0d+%0d -> %0d", a5, b5, ci5, {co5, s5});
      end
      if (ci5) n_bec_sel++;
      // carry produced only because of the +1: a+b = 31 exactly
      if (ci5 && co5 && (int'(a5) + int'(b5) == 31)) n_carry_from_bec++;
      if (i < 32) begin
        checks++;
        if ({co2, s2} !== 3'(int'(a2) + int'(b2) + int'(ci2))) begin
          failures++;
          $display("FAIL N=2 %0d+%0d+%0d -> %0d", a2, b2, ci2, {co2, s2});
        end
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
    $display("mechanisms: bec_path_selected=%0d carry_created_by_bec=%0d", n_bec_sel, n_carry_from_bec);
    if (n_bec_sel == 0) failures++;
    if (n_carry_from_bec == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
