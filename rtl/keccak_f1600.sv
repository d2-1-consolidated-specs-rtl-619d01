// keccak_f1600: the Keccak-f[1600] permutation of FIPS 202, iterative, one
// round per clock cycle (24 rounds).
// The 1600-bit state is 25 lanes of 64 bits, lane (x,y) at bits
// [64*(x+5y) +: 64]. Each round applies theta (column parities), rho (lane
// rotations), pi (lane transposition), chi (non-linear row step) and iota
// (round constant into lane (0,0)). The rotation offsets and the 24 round
// constants are not stored as tables: they are generated at elaboration from
// the FIPS 202 definitions (the (x,y) -> (y, 2x+3y) walk with offsets
// (t+1)(t+2)/2 mod 64, and the LFSR x^8+x^6+x^5+x^4+1).
// Interface: pulse start with state_in; done pulses for one cycle 24 cycles
// later with the result on state_out (held until the next start). busy is high
// while rounds run.
module keccak_f1600 (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [1599:0] state_in,
  output logic [1599:0] state_out,
  output logic          busy,
  output logic          done
);
  typedef logic [63:0] lane_t;

  function automatic logic [24*64-1:0] gen_rc();
    logic [7:0] r = 8'h01;
    logic [24*64-1:0] all = '0;
    for (int i = 0; i < 24; i++)
      for (int j = 0; j < 7; j++) begin
        if (r[0]) all[i*64 + (1 << j) - 1] = 1'b1;
        r = r[7] ? ((r << 1) ^ 8'h71) : (r << 1);
      end
    return all;
  endfunction

  function automatic logic [25*6-1:0] gen_rho();
    logic [25*6-1:0] o = '0;
    int x = 1, y = 0, t2;
    for (int t = 0; t < 24; t++) begin
      o[(x + 5*y)*6 +: 6] = 6'(((t + 1) * (t + 2) / 2) % 64);
      t2 = (2*x + 3*y) % 5;
      x  = y;
      y  = t2;
    end
    return o;
  endfunction

  localparam logic [24*64-1:0] RC  = gen_rc();
  localparam logic [25*6-1:0]  RHO = gen_rho();

  function automatic lane_t rotl(lane_t v, int unsigned n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  function automatic logic [1599:0] round(logic [1599:0] s, logic [4:0] ri);
    lane_t a [25];
    lane_t b [25];
    lane_t c [5];
    lane_t d [5];
    for (int i = 0; i < 25; i++) a[i] = s[64*i +: 64];
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = c[(x + 4) % 5] ^ rotl(c[(x + 1) % 5], 1);
    for (int i = 0; i < 25; i++) a[i] = a[i] ^ d[i % 5];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl(a[x + 5*y], 32'(RHO[(x + 5*y)*6 +: 6]));
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x + 5*y] = b[x + 5*y] ^ (~b[(x + 1) % 5 + 5*y] & b[(x + 2) % 5 + 5*y]);
    a[0] = a[0] ^ RC[64*ri +: 64];
    for (int i = 0; i < 25; i++) round[64*i +: 64] = a[i];
  endfunction

  logic [4:0] rnd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_out <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      rnd       <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        state_out <= round(state_in, 5'd0);
        rnd       <= 5'd1;
        busy      <= 1'b1;
      end else if (busy) begin
        state_out <= round(state_out, rnd);
        rnd       <= rnd + 1'b1;
        if (rnd == 5'd23) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
