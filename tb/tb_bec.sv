// tb_bec: checks the binary to excess-1 converter. The 6-bit default and
// 2-, 3- and 12-bit instances are driven with every input value; each output
// must be the input plus one, modulo 2^M. Combinational; a watchdog ends a
// hung run.
module tb_bec;
  logic [5:0]  b6,  x6;
  logic [1:0]  b2,  x2;
  logic [2:0]  b3,  x3;
  logic [11:0] b12, x12;
  int          checks = 0, failures = 0;

  bec            dut6  (.b(b6),  .x(x6));
  bec #(.M(2))   dut2  (.b(b2),  .x(x2));
  bec #(.M(3))   dut3  (.b(b3),  .x(x3));
  bec #(.M(12))  dut12 (.b(b12), .x(x12));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 12); i++) begin
      b12 = 12'(i);
      b6  = 6'(i);
      b3  = 3'(i);
      b2  = 2'(i);
      #1;
      checks++;
      if (x12 !== 12'(i + 1)) begin
        failures++;
        if (failures < 10) $display("FAIL M=12 %0d -> %0d", b12, x12);
      end
      if (i < 64) begin
        checks++;
        if (x6 !== 6'(i + 1)) begin
          failures++;
          $display("FAIL M=6 %0d -> %0d", b6, x6);
        end
      end
      if (i < 8) begin
        checks += 2;
        if (x3 !== 3'(i + 1)) begin
          failures++;
          $display("FAIL M=3 %0d -> %0d", b3, x3);
        end
        if (x2 !== 2'(i + 1)) begin
          failures++;
          $display("FAIL M=2 %0d -> %0d", b2, x2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
