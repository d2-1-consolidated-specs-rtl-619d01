// full_ppu: Full Posit Processing Unit for one lane of two posit<N,ES>
// operands (default posit<16,1>): addition, subtraction, multiplication and
// division in posit arithmetic, plus posit <-> binary32 conversion so that
// float code can run through it on a core without an FPU.
// How it works: both operands are decoded exactly into sign, scale and a
// 24-bit significand (every posit of up to 24 bits is exact in binary32, so
// the binary32 decoder serves). Each operation is computed exactly or with
// guard bits and a sticky bit, and rounded once by posit_encode, to nearest
// with ties to even:
//  * multiply: 24 x 24-bit significand product, exact;
//  * divide: 27-bit quotient of the significands plus a sticky bit from the
//    remainder;
//  * add / subtract: the smaller operand is aligned to the larger one with
//    three guard bits and a sticky bit (enough for correct rounding to the
//    posit's at most N-3 fraction bits), then added or subtracted.
// NaR in, or division by zero, gives NaR; x - x gives 0.
// Interface: opcode 0 ADD, 1 SUB, 2 MUL, 3 DIV (a op b), 4 P2F (a -> binary32),
// 5 F2P (f32 -> posit); other opcodes give 0. in_valid starts an operation;
// the result (posit results zero-extended to 32 bits) is registered and
// valid one cycle later on out_valid / result.
// The operation set, the float conversions and the two-operand single lane
// follow the Full PPU specification; the datapath and the opcode encoding are
// this design's choices (the posit16 format with es = 1 is the default).
module full_ppu #(
  parameter int unsigned N  = 16,
  parameter int unsigned ES = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [2:0]   opcode,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [31:0]  f32,
  output logic         out_valid,
  output logic [31:0]  result
);
  typedef enum logic [2:0] {
    OP_ADD = 3'd0, OP_SUB = 3'd1, OP_MUL = 3'd2, OP_DIV = 3'd3, OP_P2F = 3'd4, OP_F2P = 3'd5
  } op_t;
  localparam int unsigned MW = 48;
  localparam logic [N-1:0] NAR = {1'b1, {(N - 1){1'b0}}};

  // ---------------- decode (exact) ----------------
  logic [31:0] fa, fb;
  posit_to_fp32 #(.N(N), .ES(ES)) u_dec_a (.p(a), .f(fa));
  posit_to_fp32 #(.N(N), .ES(ES)) u_dec_b (.p(b), .f(fb));

  logic               a_zero, b_zero, a_nar, b_nar, sa, sb;
  logic signed [11:0] ea, eb;
  logic [23:0]        ma, mb;
  always_comb begin
    a_zero = (a == '0);
    b_zero = (b == '0);
    a_nar  = (a == NAR);
    b_nar  = (b == NAR);
    sa = fa[31];
    sb = fb[31] ^ (opcode == OP_SUB);
    ea = 12'(fa[30:23]) - 12'sd127;
    eb = 12'(fb[30:23]) - 12'sd127;
    ma = {1'b1, fa[22:0]};
    mb = {1'b1, fb[22:0]};
  end

  // ---------------- multiply ----------------
  logic [47:0]        prod;
  logic signed [11:0] mul_scale;
  logic [MW-1:0]      mul_frac;
  always_comb begin
    prod = ma * mb;
    if (prod[47]) begin
      mul_scale = ea + eb + 12'sd1;
      mul_frac  = {prod[46:0], 1'b0};
    end else begin
      mul_scale = ea + eb;
      mul_frac  = {prod[45:0], 2'b0};
    end
  end

  // ---------------- divide ----------------
  logic [50:0]        num;
  logic [26:0]        quo;
  logic [23:0]        rem;
  logic signed [11:0] div_scale;
  logic [MW-1:0]      div_frac;
  logic               div_sticky;
  always_comb begin
    num = {ma, 27'b0} >> 1;               // ma * 2^26
    quo = 27'(num / 51'(mb));             // in (2^25, 2^27)
    rem = 24'(num % 51'(mb));
    div_sticky = (rem != '0);
    if (quo[26]) begin
      div_scale = ea - eb;
      div_frac  = {quo[25:0], 22'b0};
    end else begin
      div_scale = ea - eb - 12'sd1;
      div_frac  = {quo[24:0], 23'b0};
    end
  end

  // ---------------- add / subtract ----------------
  logic               a_big, s_big, s_sml;
  logic signed [11:0] e_big, add_scale;
  logic [11:0]        d;
  logic [27:0]        x_big, y_sml, y_full, sum;
  logic               sh_sticky;
  logic [MW-1:0]      add_frac;
  logic               add_zero;
  logic signed [31:0] lead;
  always_comb begin
    a_big = (ea > eb) || (ea == eb && ma >= mb);
    e_big = a_big ? ea : eb;
    s_big = a_big ? sa : sb;
    s_sml = a_big ? sb : sa;
    d     = a_big ? 12'(ea - eb) : 12'(eb - ea);
    x_big  = {1'b0, (a_big ? ma : mb), 3'b0};
    y_full = {1'b0, (a_big ? mb : ma), 3'b0};
    if (d >= 12'd28) begin
      y_sml = '0; sh_sticky = 1'b1;
    end else begin
      y_sml = y_full >> d;
      sh_sticky = (y_full & ~('1 << d)) != '0;
    end
    y_sml[0] = y_sml[0] | sh_sticky;
    sum = (s_big == s_sml) ? x_big + y_sml : x_big - y_sml;
    add_zero = (sum == '0);
    lead = 0;
    for (int i = 0; i < 28; i++) if (sum[i]) lead = i;
    add_scale = e_big + 12'(lead - 26);
    add_frac  = MW'({sum, 48'b0} >> lead);
  end

  // ---------------- select, round ----------------
  logic               r_sign, r_zero, r_nar, r_sticky;
  logic signed [11:0] r_scale;
  logic [MW-1:0]      r_frac;
  logic [N-1:0]       p_arith, p_conv;
  logic [31:0]        f_conv;
  logic [31:0]        res;

  always_comb begin
    r_sign = 1'b0; r_zero = 1'b0; r_nar = a_nar || b_nar; r_sticky = 1'b0;
    r_scale = '0; r_frac = '0;
    unique case (opcode)
      OP_ADD, OP_SUB: begin
        if (a_zero && b_zero) r_zero = 1'b1;
        else if (a_zero) begin r_sign = sb; r_scale = eb; r_frac = {mb[22:0], 25'b0}; end
        else if (b_zero) begin r_sign = sa; r_scale = ea; r_frac = {ma[22:0], 25'b0}; end
        else begin
          r_sign = s_big; r_zero = add_zero; r_scale = add_scale; r_frac = add_frac;
        end
      end
      OP_MUL: begin
        r_sign = sa ^ sb; r_zero = a_zero || b_zero; r_scale = mul_scale; r_frac = mul_frac;
      end
      OP_DIV: begin
        r_nar    = a_nar || b_nar || b_zero;
        r_sign   = sa ^ sb; r_zero = a_zero; r_scale = div_scale; r_frac = div_frac;
        r_sticky = div_sticky;
      end
      default: ;
    endcase
  end

  posit_encode #(.N(N), .ES(ES), .MW(MW)) u_enc (
    .sign(r_sign), .zero(r_zero), .nar(r_nar), .scale(r_scale), .frac(r_frac),
    .sticky_in(r_sticky), .p(p_arith));
  posit_to_fp32 #(.N(N), .ES(ES)) u_p2f (.p(a), .f(f_conv));
  fp32_to_posit #(.N(N), .ES(ES)) u_f2p (.f(f32), .p(p_conv));

  always_comb begin
    unique case (opcode)
      OP_ADD, OP_SUB, OP_MUL, OP_DIV: res = 32'(p_arith);
      OP_P2F:                         res = f_conv;
      OP_F2P:                         res = 32'(p_conv);
      default:                        res = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) result <= res;
    end
  end
endmodule
