// tb_fp32_to_posit: checks the binary32 -> posit converter for posit<8,0>,
// posit<16,0> and posit<16,1>.
//  * every posit value, given exactly as binary32, must come back unchanged;
//  * the exact midpoint between two neighbouring positive posits (where the
//    lower one holds all its exponent bits) must round to the even one, and
//    values just above / below it to the upper / lower neighbour; the same for
//    the negated values;
//  * special cases: 0, Inf/NaN -> NaR, huge -> maxpos, tiny and subnormal ->
//    minpos.
module tb_fp32_to_posit;
  import posit_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] f;
  logic [7:0]  p8;
  logic [15:0] p160, p161;
  fp32_to_posit #(.N(8),  .ES(0)) dut8   (.f(f), .p(p8));
  fp32_to_posit #(.N(16), .ES(0)) dut160 (.f(f), .p(p160));
  fp32_to_posit #(.N(16), .ES(1)) dut161 (.f(f), .p(p161));

  function automatic int unsigned get(int n, int es);
    if (n == 8) return p8;
    if (es == 0) return p160;
    return p161;
  endfunction

  task automatic expect_p(int n, int es, real v, int unsigned exp_bits);
    int unsigned got;
    f = real_to_f32(v);
    #1;
    got = get(n, es);
    checks++;
    if (got != exp_bits) begin
      failures++;
      if (failures < 10) $display("FAIL posit<%0d,%0d> v=%g: got %h exp %h", n, es, v, got, exp_bits);
    end
  endtask

  task automatic expect_raw(int n, int es, logic [31:0] fv, int unsigned exp_bits);
    f = fv;
    #1;
    checks++;
    if (get(n, es) != exp_bits) begin
      failures++;
      $display("FAIL posit<%0d,%0d> f=%h: got %h exp %h", n, es, fv, get(n, es), exp_bits);
    end
  endtask

  task automatic run(int n, int es);
    int unsigned mask = (1 << n) - 1;
    int unsigned maxpos = (1 << (n - 1)) - 1;
    int eb, eb2;
    real a, b, m;
    for (int unsigned p = 1; p < (1 << n); p++) begin
      if (p == (1 << (n - 1))) continue;
      expect_p(n, es, posit_value(n, es, p, eb), p);
    end
    for (int unsigned p = 1; p < maxpos; p++) begin
      a = posit_value(n, es, p, eb);
      b = posit_value(n, es, p + 1, eb2);
      if (eb != es) continue;
      m = (a + b) / 2.0;
      expect_p(n, es, m, (p % 2 == 0) ? p : p + 1);
      expect_p(n, es, -m, ((p % 2 == 0) ? (-p) : (-(p + 1))) & mask);
      expect_p(n, es, m * (1.0 + pow2(-20)), p + 1);
      expect_p(n, es, m * (1.0 - pow2(-20)), p);
    end
    expect_raw(n, es, 32'h0000_0000, 0);
    expect_raw(n, es, 32'h8000_0000, 0);
    expect_raw(n, es, 32'h7F80_0000, 1 << (n - 1));
    expect_raw(n, es, 32'h7FC0_0000, 1 << (n - 1));
    expect_raw(n, es, 32'h7F7F_FFFF, maxpos);
    expect_raw(n, es, 32'hFF7F_FFFF, (-maxpos) & mask);
    expect_raw(n, es, 32'h0000_0001, 1);
    expect_raw(n, es, 32'h0080_0000, 1);
    expect_raw(n, es, 32'h8080_0000, mask);
  endtask

  initial begin
    run(8, 0);
    run(16, 0);
    run(16, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
