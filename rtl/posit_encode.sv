// posit_encode: rounds an exact (or sticky-marked) value to posit<N,ES>
// (combinational). The value is (-1)^sign * 2^scale * 1.frac, with MW
// fraction bits and a sticky flag standing for nonzero bits below them.
// Like the binary32 converter, it splits the scale into regime k =
// floor(scale / 2^ES) and exponent e = scale mod 2^ES, lays out the regime
// run, e and the fraction as one bit string, keeps its top N-1 bits and
// rounds to nearest, ties to even, using the next bit and the OR of everything
// below (sticky included). Results above maxpos saturate to maxpos, nonzero
// results below minpos become minpos; zero and NaR flags override the value.
// Helper of the Full PPU; the circuit is this design's.
module posit_encode #(
  parameter int unsigned N  = 16,
  parameter int unsigned ES = 1,
  parameter int unsigned MW = 48
) (
  input  logic          sign,
  input  logic          zero,
  input  logic          nar,
  input  logic signed [11:0] scale,
  input  logic [MW-1:0] frac,
  input  logic          sticky_in,
  output logic [N-1:0]  p
);
  localparam int unsigned TW = ES + MW;
  localparam int unsigned LW = (N - 1) + TW + 2;
  localparam logic [N-2:0] MAXPOS = '1;
  localparam logic [N-2:0] MINPOS = (N - 1)'(1);

  logic signed [11:0] k;
  logic [11:0]   run;
  logic          run_bit;
  logic [TW-1:0] tail;
  logic [LW-1:0] v;
  logic [N-2:0]  top;
  logic          guard, sticky;
  logic [N-1:0]  rounded;
  logic [N-2:0]  mag;

  always_comb begin
    k       = scale >>> ES;
    tail    = TW'({12'(scale - (k <<< ES)), frac});
    run_bit = (k >= 0);
    run     = (k >= 0) ? 12'(k + 1) : 12'(-k);
    v = '0;
    for (int i = 0; i < int'(LW); i++) begin
      if (i < int'(run))             v[LW - 1 - i] = run_bit;
      else if (i == int'(run))       v[LW - 1 - i] = !run_bit;
      else if (i - int'(run) - 1 < int'(TW)) v[LW - 1 - i] = tail[TW - 1 - (i - int'(run) - 1)];
    end
    top     = v[LW-1 -: (N - 1)];
    guard   = v[LW - N];
    sticky  = (|v[LW - N - 1:0]) || sticky_in;
    rounded = {1'b0, top} + N'(guard && (sticky || top[0]));

    if (k >= $signed(12'(N - 2)))       mag = MAXPOS;
    else if (k < -$signed(12'(N - 2))) mag = MINPOS;
    else if (rounded[N-1])             mag = MAXPOS;
    else if (rounded[N-2:0] == '0)     mag = MINPOS;
    else                               mag = rounded[N-2:0];

    if (nar)       p = {1'b1, {(N - 1){1'b0}}};
    else if (zero) p = '0;
    else           p = sign ? -{1'b0, mag} : {1'b0, mag};
  end
endmodule
