// light_ppu: the Light Posit Processing Unit, a conversion-only posit unit
// placed beside the ALU and FPU in a RISC-V execute stage. Posits serve here
// as a compressed storage format: values are computed in binary32 on the FPU
// and converted to/from posit8 or posit16 by this unit.
// Six converters run in parallel on the three inputs (8-bit, 16-bit and
// 32-bit operand) and a multiplexer driven by the opcode selects one result
// for the 32-bit output (posit results zero-extended):
//   0 P8_FP32    posit<8,0>  -> binary32     1 FP32_P8    binary32 -> posit<8,0>
//   2 P160_FP32  posit<16,0> -> binary32     3 FP32_P160  binary32 -> posit<16,0>
//   4 P161_FP32  posit<16,1> -> binary32     5 FP32_P161  binary32 -> posit<16,1>
// Opcodes 6 and 7 give 0. The result is registered: out_valid follows in_valid
// by one cycle, one conversion per cycle.
// The six converters, their names and the opcode-selected 32-bit output follow
// the Light PPU block diagram; the opcode numbering, the output register and
// the exponent size of posit8 (0, as in the posit standard draft 4.12 the unit
// refers to) are this design's choices.
module light_ppu (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [2:0]  opcode,
  input  logic [7:0]  in8,
  input  logic [15:0] in16,
  input  logic [31:0] in32,
  output logic        out_valid,
  output logic [31:0] out32
);
  typedef enum logic [2:0] {
    OP_P8_FP32 = 3'd0, OP_FP32_P8 = 3'd1, OP_P160_FP32 = 3'd2,
    OP_FP32_P160 = 3'd3, OP_P161_FP32 = 3'd4, OP_FP32_P161 = 3'd5
  } ppu_op_t;

  logic [31:0] f_p8, f_p160, f_p161;
  logic [7:0]  p8;
  logic [15:0] p160, p161;

  posit_to_fp32 #(.N(8),  .ES(0)) u_p8_fp32   (.p(in8),  .f(f_p8));
  fp32_to_posit #(.N(8),  .ES(0)) u_fp32_p8   (.f(in32), .p(p8));
  posit_to_fp32 #(.N(16), .ES(0)) u_p160_fp32 (.p(in16), .f(f_p160));
  fp32_to_posit #(.N(16), .ES(0)) u_fp32_p160 (.f(in32), .p(p160));
  posit_to_fp32 #(.N(16), .ES(1)) u_p161_fp32 (.p(in16), .f(f_p161));
  fp32_to_posit #(.N(16), .ES(1)) u_fp32_p161 (.f(in32), .p(p161));

  logic [31:0] sel;
  always_comb begin
    unique case (opcode)
      OP_P8_FP32:   sel = f_p8;
      OP_FP32_P8:   sel = {24'b0, p8};
      OP_P160_FP32: sel = f_p160;
      OP_FP32_P160: sel = {16'b0, p160};
      OP_P161_FP32: sel = f_p161;
      OP_FP32_P161: sel = {16'b0, p161};
      default:      sel = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out32     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out32 <= sel;
    end
  end
endmodule
