// tb_sqrt_csla_widths: runs the square-root carry select adder at 16, 32
// and 128 bits, the other sizes at which the BEC-based adder is compared
// with the regular one, next to the 64-bit default. Each width gets corner
// vectors and random operand pairs (a quarter of them a + ~a + 1, whose
// carry ripples through every group) checked against wide integer addition.
// A watchdog ends a hung run.
module tb_sqrt_csla_widths;
  logic start;
  logic d16, d32, d128;
  int   c16, c32, c128, f16, f32, f128, r16, r32, r128;
  int   checks, failures;

  csla_width_check #(.W(16),  .NVEC(20000)) u16  (.start(start), .done(d16),  .checks(c16),  .failures(f16),  .full_ripple(r16));
  csla_width_check #(.W(32),  .NVEC(20000)) u32  (.start(start), .done(d32),  .checks(c32),  .failures(f32),  .full_ripple(r32));
  csla_width_check #(.W(128), .NVEC(20000)) u128 (.start(start), .done(d128), .checks(c128), .failures(f128), .full_ripple(r128));

  initial begin
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c32 + c128, f16 + f32 + f128 + 1);
    $finish;
  end

  initial begin
    start = 1'b0;
    #1 start = 1'b1;
    wait (d16 && d32 && d128);
    checks   = c16 + c32 + c128;
    failures = f16 + f32 + f128;
    if (r16 == 0 || r32 == 0 || r128 == 0) failures++;
    $display("full ripple vectors: 16b=%0d 32b=%0d 128b=%0d", r16, r32, r128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
