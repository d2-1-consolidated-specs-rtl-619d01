// fp32_to_posit: converts IEEE-754 binary32 to posit<N,ES> (combinational).
// The binary32 scale s = exp-127 is split into regime k = floor(s / 2^ES) and
// exponent e = s mod 2^ES. The unrounded posit magnitude is built as a bit
// string: the regime run (k+1 ones then a zero for k >= 0, -k zeros then a one
// for k < 0), the ES exponent bits and the 23 fraction bits. Its top N-1 bits
// are kept and rounded to nearest, ties to even, using the next bit and the OR
// of all lower bits. As posits require, magnitudes above maxpos saturate to
// maxpos and nonzero magnitudes below minpos (binary32 subnormals included)
// become minpos, never zero. A negative result is the two's complement.
// +-0 maps to 0; Inf and NaN map to NaR.
// The converter set comes from the Light PPU; the circuit is this design's.
module fp32_to_posit #(
  parameter int unsigned N  = 8,
  parameter int unsigned ES = 0
) (
  input  logic [31:0]  f,
  output logic [N-1:0] p
);
  initial assert (N >= 3 && N <= 24 && ES <= 3) else $error("unsupported posit format");

  localparam int unsigned TW = ES + 23;            // exponent + fraction bits
  localparam int unsigned LW = (N - 1) + TW + 2;    // regime can take up to N-1 bits
  localparam logic [N-2:0] MAXPOS = '1;
  localparam logic [N-2:0] MINPOS = (N - 1)'(1);

  logic          sign;
  logic [7:0]    expo;
  logic [22:0]   mant;
  logic signed [31:0] s, k, run;
  logic          run_bit;
  logic [TW-1:0] tail;
  logic [LW-1:0] v;
  logic [N-2:0]  top;
  logic          guard, sticky;
  logic [N-1:0]  rounded;      // one extra bit for the rounding carry
  logic [N-2:0]  mag;

  always_comb begin
    sign = f[31];
    expo = f[30:23];
    mant = f[22:0];
    s    = int'(expo) - 127;
    k    = s >>> ES;                                 // floor division
    tail = TW'({8'(s - (k << ES)), mant});   // low ES bits of e, then the fraction
    run_bit = (k >= 0);
    run     = (k >= 0) ? k + 1 : -k;
    v = '0;
    for (int i = 0; i < int'(LW); i++) begin
      if (i < run)             v[LW - 1 - i] = run_bit;
      else if (i == run)       v[LW - 1 - i] = !run_bit;
      else if (i - run - 1 < int'(TW)) v[LW - 1 - i] = tail[TW - 1 - (i - run - 1)];
    end
    top     = v[LW-1 -: (N - 1)];
    guard   = v[LW - N];
    sticky  = |v[LW - N - 1:0];
    rounded = {1'b0, top} + N'(guard && (sticky || top[0]));

    if (k >= int'(N) - 2)          mag = MAXPOS;
    else if (k < -(int'(N) - 2))   mag = MINPOS;
    else if (rounded[N-1])         mag = MAXPOS;
    else if (rounded[N-2:0] == '0) mag = MINPOS;
    else                           mag = rounded[N-2:0];

    if (expo == 8'hFF)                      p = {1'b1, {(N - 1){1'b0}}};   // Inf/NaN -> NaR
    else if (expo == 8'h00 && mant == '0)   p = '0;
    else if (expo == 8'h00)                 p = sign ? -{1'b0, MINPOS} : {1'b0, MINPOS};
    else                                    p = sign ? -{1'b0, mag} : {1'b0, mag};
  end
endmodule
