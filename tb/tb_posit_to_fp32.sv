// tb_posit_to_fp32: exhaustive check of the posit -> binary32 converter for
// posit<8,0>, posit<16,0> and posit<16,1>: every bit pattern is decoded by
// the reference model and compared with the converter's binary32 result
// (zero -> +0, NaR -> 0x7FC00000).
module tb_posit_to_fp32;
  import posit_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  p8;
  logic [15:0] p160, p161;
  logic [31:0] f8, f160, f161;
  posit_to_fp32 #(.N(8),  .ES(0)) dut8   (.p(p8),   .f(f8));
  posit_to_fp32 #(.N(16), .ES(0)) dut160 (.p(p160), .f(f160));
  posit_to_fp32 #(.N(16), .ES(1)) dut161 (.p(p161), .f(f161));

  task automatic check(int n, int es, int unsigned bits, logic [31:0] got);
    int eb;
    real r = posit_value(n, es, bits, eb);
    logic [31:0] exp;
    exp = (bits == (1 << (n - 1))) ? 32'h7FC0_0000 : real_to_f32(r);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL posit<%0d,%0d> %h: got %h exp %h", n, es, bits, got, exp);
    end
  endtask

  initial begin
    for (int b = 0; b < 256; b++) begin
      p8 = 8'(b); #1; check(8, 0, b, f8);
    end
    for (int b = 0; b < 65536; b++) begin
      p160 = 16'(b); p161 = 16'(b); #1;
      check(16, 0, b, f160);
      check(16, 1, b, f161);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
