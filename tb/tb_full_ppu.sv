// tb_full_ppu: checks the Full PPU for posit<8,0> (every operand pair, all
// four operations), posit<16,1> and posit<16,0> (random operand pairs, with
// extra pairs of nearly equal magnitude to exercise cancellation).
// The reference decodes both operands to reals, computes the exact (or, for
// division, double-precision) result, and rounds it to a posit by writing out
// the posit bit string (regime run, exponent bits, fraction bits) and rounding
// it to nearest, ties to even, with saturation to maxpos / minpos. It also
// checks NaR propagation, division by zero, x - x = 0, operations with zero,
// the posit <-> binary32 conversions and the one-cycle result timing.
module tb_full_ppu;
  import posit_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    #400_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  logic        in_valid;
  logic [2:0]  opcode;
  logic [15:0] a, b;
  logic [31:0] f32;
  logic        v8, v160, v161;
  logic [31:0] r8, r160, r161;

  full_ppu #(.N(8),  .ES(0)) dut8   (.clk, .rst_n, .in_valid, .opcode, .a(a[7:0]), .b(b[7:0]), .f32,
                                     .out_valid(v8),   .result(r8));
  full_ppu #(.N(16), .ES(0)) dut160 (.clk, .rst_n, .in_valid, .opcode, .a, .b, .f32,
                                     .out_valid(v160), .result(r160));
  full_ppu #(.N(16), .ES(1)) dut161 (.clk, .rst_n, .in_valid, .opcode, .a, .b, .f32,
                                     .out_valid(v161), .result(r161));

  // reference rounding of a real to posit<n,es>
  function automatic int unsigned ref_round(int n, int es, real x);
    int unsigned mask = (1 << n) - 1;
    int unsigned maxpos = (1 << (n - 1)) - 1;
    int unsigned top, mag;
    int s, k, e, run, pos;
    bit neg, bitv, guard, sticky, run_bit;
    real f;
    if (x == 0.0) return 0;
    neg = (x < 0.0);
    if (neg) x = -x;
    s = 0;
    while (x >= pow2(s + 1)) s++;
    while (x < pow2(s)) s--;
    k = s >>> es;
    e = s - (k << es);
    f = x / pow2(s) - 1.0;
    if (k >= n - 2) mag = maxpos;
    else if (k < -(n - 2)) mag = 1;
    else begin
      run_bit = (k >= 0);
      run = run_bit ? k + 1 : -k;
      top = 0; guard = 0; sticky = 0;
      pos = 0;
      // regime, terminator, exponent, fraction, as one stream of bits
      for (int i = 0; i < run + 1 + es + 64; i++) begin
        if (i < run) bitv = run_bit;
        else if (i == run) bitv = !run_bit;
        else if (i < run + 1 + es) bitv = (e >> (es - 1 - (i - run - 1))) & 1;
        else begin
          f = f * 2.0;
          bitv = (f >= 1.0);
          if (bitv) f = f - 1.0;
        end
        if (pos < n - 1) top = (top << 1) | bitv;
        else if (pos == n - 1) guard = bitv;
        else sticky = sticky | bitv;
        pos++;
      end
      if (f != 0.0) sticky = 1;
      mag = top + ((guard && (sticky || (top & 1))) ? 1 : 0);
      if (mag > maxpos) mag = maxpos;
      if (mag == 0) mag = 1;
    end
    return neg ? ((-mag) & mask) : mag;
  endfunction

  function automatic int unsigned get(int n, int es);
    if (n == 8) return r8;
    if (es == 0) return r160;
    return r161;
  endfunction

  function automatic bit get_v(int n, int es);
    if (n == 8) return v8;
    if (es == 0) return v160;
    return v161;
  endfunction

  task automatic issue(logic [2:0] op, logic [15:0] pa, logic [15:0] pb, logic [31:0] pf);
    @(negedge clk);
    in_valid = 1; opcode = op; a = pa; b = pb; f32 = pf;
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic expect_r(int n, int es, logic [2:0] op, int unsigned pa, int unsigned pb,
                          int unsigned want);
    int unsigned got;
    issue(op, 16'(pa), 16'(pb), 32'h0);
    got = get(n, es);
    checks++;
    if (!get_v(n, es) || got != want) begin
      failures++;
      if (failures < 20)
        $display("FAIL posit<%0d,%0d> op%0d a=%h b=%h: got %h exp %h (valid %0b)",
                 n, es, op, pa, pb, got, want, get_v(n, es));
    end
  endtask

  // reference result of a op b for posit<n,es>
  function automatic int unsigned ref_op(int n, int es, int op, int unsigned pa, int unsigned pb);
    int unsigned nar = 1 << (n - 1);
    int eb;
    real va, vb;
    if (pa == nar || pb == nar) return nar;
    va = posit_value(n, es, pa, eb);
    vb = posit_value(n, es, pb, eb);
    case (op)
      0: return ref_round(n, es, va + vb);
      1: return ref_round(n, es, va - vb);
      2: return ref_round(n, es, va * vb);
      default: return (vb == 0.0) ? nar : ref_round(n, es, va / vb);
    endcase
  endfunction

  task automatic check_pair(int n, int es, int unsigned pa, int unsigned pb);
    for (int op = 0; op < 4; op++) expect_r(n, es, 3'(op), pa, pb, ref_op(n, es, op, pa, pb));
  endtask

  int unsigned ra, rb;
  int eb;
  int unsigned got;
  initial begin
    in_valid = 0; opcode = 0; a = 0; b = 0; f32 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // output valid only one cycle after a request
    @(negedge clk);
    checks++;
    if (v8 || v160 || v161) begin failures++; $display("FAIL out_valid without request"); end

    // posit<8,0>: every pair
    for (int unsigned pa = 0; pa < 256; pa++)
      for (int unsigned pb = 0; pb < 256; pb++)
        check_pair(8, 0, pa, pb);

    // posit<16,1> and posit<16,0>: random pairs
    for (int i = 0; i < 40000; i++) begin
      ra = $urandom & 16'hFFFF;
      case ($urandom % 4)
        0: rb = (ra + ($urandom % 64) - 32) & 16'hFFFF;            // near a
        1: rb = ((-ra) + ($urandom % 64) - 32) & 16'hFFFF;         // near -a
        default: rb = $urandom & 16'hFFFF;
      endcase
      check_pair(16, 1, ra, rb);
      check_pair(16, 0, ra, rb);
    end

    // special cases for posit<16,1>
    expect_r(16, 1, 3'd3, 16'h4000, 16'h0000, 16'h8000);   // 1 / 0 = NaR
    expect_r(16, 1, 3'd3, 16'h0000, 16'h0000, 16'h8000);   // 0 / 0 = NaR
    expect_r(16, 1, 3'd3, 16'h0000, 16'h4000, 16'h0000);   // 0 / 1 = 0
    expect_r(16, 1, 3'd0, 16'h8000, 16'h4000, 16'h8000);   // NaR + 1
    expect_r(16, 1, 3'd2, 16'h0000, 16'h8000, 16'h8000);   // 0 * NaR
    expect_r(16, 1, 3'd2, 16'h0000, 16'h7FFF, 16'h0000);   // 0 * maxpos
    expect_r(16, 1, 3'd1, 16'h1234, 16'h1234, 16'h0000);   // x - x
    expect_r(16, 1, 3'd0, 16'h1234, 16'h0000, 16'h1234);   // x + 0
    expect_r(16, 1, 3'd1, 16'h0000, 16'h1234, (-16'h1234) & 16'hFFFF);  // 0 - x
    expect_r(16, 1, 3'd2, 16'h7FFF, 16'h7FFF, 16'h7FFF);   // maxpos^2 saturates
    expect_r(16, 1, 3'd2, 16'h0001, 16'h0001, 16'h0001);   // minpos^2 stays minpos
    expect_r(16, 1, 3'd0, 16'h4000, 16'h4000, 16'h5000);   // 1 + 1 = 2
    expect_r(16, 1, 3'd3, 16'h4000, 16'h5000, 16'h3000);   // 1 / 2 = 0.5
    expect_r(16, 1, 3'd7, 16'h4000, 16'h4000, 16'h0000);   // unused opcode

    // conversions through the unit (posit<16,1>)
    for (int i = 0; i < 3000; i++) begin
      ra = $urandom & 16'hFFFF;
      if (ra == 16'h8000) continue;
      issue(3'd4, 16'(ra), 16'h0, 32'h0);
      checks++;
      if (r161 != real_to_f32(posit_value(16, 1, ra, eb))) begin
        failures++;
        if (failures < 20) $display("FAIL p2f %h: got %h", ra, r161);
      end
      issue(3'd5, 16'h0, 16'h0, real_to_f32(posit_value(16, 1, ra, eb)));
      checks++;
      if (r161 != ra) begin
        failures++;
        if (failures < 20) $display("FAIL f2p %h: got %h", ra, r161);
      end
    end
    issue(3'd5, 16'h0, 16'h0, 32'h7FC0_0000);   // NaN -> NaR
    checks++;
    if (r161 != 32'h8000) begin failures++; $display("FAIL f2p NaN: got %h", r161); end
    issue(3'd4, 16'h8000, 16'h0, 32'h0);        // NaR -> NaN
    checks++;
    if (r161[30:22] != 9'h1FF) begin failures++; $display("FAIL p2f NaR: got %h", r161); end

    // result holds while no request arrives
    got = r161;
    repeat (3) @(negedge clk);
    checks++;
    if (r161 != got || v161) begin failures++; $display("FAIL result not held"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
