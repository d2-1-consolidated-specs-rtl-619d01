// posit_to_fp32: converts a posit<N,ES> to IEEE-754 binary32 (combinational).
// A posit is sign, regime (a run of equal bits ended by the opposite bit or by
// the end of the word), ES exponent bits and a fraction. The magnitude of a
// negative posit is its two's complement. With a run of m bits the regime
// value is k = m-1 for a run of ones and k = -m for a run of zeros; the value is
// (-1)^s * 2^(k*2^ES + e) * 1.fraction. Bits cut off by a long regime read as 0.
// Zero maps to +0 and NaR (1 followed by zeros) to the quiet NaN 0x7FC00000.
// For N <= 16 and ES <= 1 (the posit8 and posit16 formats of the Light PPU)
// every posit is exactly representable in binary32, so no rounding is needed.
// The converter set comes from the Light PPU; the circuit (leading-run count
// and shift) is this design's.
module posit_to_fp32 #(
  parameter int unsigned N  = 8,
  parameter int unsigned ES = 0
) (
  input  logic [N-1:0] p,
  output logic [31:0]  f
);
  initial assert (N >= 3 && N <= 24 && ES <= 3) else $error("unsupported posit format");

  logic          sign;
  logic [N-1:0]  mag;
  logic [N-2:0]  body, rest;
  logic          first;
  logic signed [31:0] run, k, scale;
  logic [ES:0]   e;
  logic [22:0]   frac;

  always_comb begin
    sign = p[N-1];
    mag  = sign ? (~p + 1'b1) : p;
    body = mag[N-2:0];
    first = body[N-2];
    run = 0;
    for (int i = N - 2; i >= 0; i--) begin
      if (body[i] == first && run == (N - 2 - i)) run++;
    end
    k = first ? run - 1 : -run;
    // drop the regime run and its terminating bit
    rest = (run + 1 >= int'(N - 1)) ? '0 : body << (run + 1);
    e = '0;
    if (ES > 0) e = (ES + 1)'(rest >> (N - 1 - ES));
    frac = '0;
    for (int i = 0; i < int'(N) - 1 - int'(ES); i++)
      if (22 - i >= 0) frac[22 - i] = rest[N - 2 - ES - i];
    scale = k * (1 << ES) + int'(e);
    if (p == '0)
      f = 32'h0000_0000;
    else if (p == {1'b1, {(N - 1){1'b0}}})
      f = 32'h7FC0_0000;
    else
      f = {sign, 8'(scale + 127), frac};
  end
endmodule
