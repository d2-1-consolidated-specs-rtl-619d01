// tb_light_ppu: drives the Light PPU through all six opcodes with random
// operands and a few fixed values, checks each 32-bit result against the
// posit reference model and checks the one-cycle latency (out_valid exactly
// one cycle after in_valid) and that unused opcodes give 0.
module tb_light_ppu;
  import posit_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, in_valid, out_valid;
  logic [2:0]  opcode;
  logic [7:0]  in8;
  logic [15:0] in16;
  logic [31:0] in32, out32;

  light_ppu dut (.*);

  task automatic op(logic [2:0] o, logic [7:0] a8, logic [15:0] a16, logic [31:0] a32,
                    logic [31:0] expv);
    @(negedge clk);
    opcode = o; in8 = a8; in16 = a16; in32 = a32; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || out32 !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL op %0d: got %h (valid %b) exp %h", o, out32, out_valid, expv);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid held"); end
  endtask

  initial begin
    int eb;
    logic [15:0] r;
    rst_n = 0; in_valid = 0; opcode = 0; in8 = 0; in16 = 0; in32 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fixed values
    op(3'd1, 8'h00, 16'h0000, 32'h3F80_0000, 32'h40);      // 1.0 -> posit8 0x40
    op(3'd1, 8'h00, 16'h0000, 32'hBF80_0000, 32'hC0);      // -1.0
    op(3'd3, 8'h00, 16'h0000, 32'h3F00_0000, 32'h2000);    // 0.5 -> posit<16,0>
    op(3'd5, 8'h00, 16'h0000, 32'h3F00_0000, 32'h3000);    // 0.5 -> posit<16,1>
    op(3'd5, 8'h00, 16'h0000, 32'h4040_0000, 32'h5800);    // 3.0 -> posit<16,1>
    op(3'd0, 8'h40, 16'h0000, 32'h0, 32'h3F80_0000);       // posit8 1.0
    op(3'd4, 8'h00, 16'h5800, 32'h0, 32'h4040_0000);       // posit<16,1> 3.0
    op(3'd6, 8'h40, 16'h5800, 32'h3F80_0000, 32'h0);
    op(3'd7, 8'h40, 16'h5800, 32'h3F80_0000, 32'h0);
    // random operands
    for (int i = 0; i < 600; i++) begin
      r = 16'($urandom);
      if (r == 16'h8000 || r[7:0] == 8'h80) continue;
      op(3'd0, r[7:0], 16'h0, 32'h0, real_to_f32(posit_value(8, 0, r[7:0], eb)));
      op(3'd2, 8'h0, r, 32'h0, real_to_f32(posit_value(16, 0, r, eb)));
      op(3'd4, 8'h0, r, 32'h0, real_to_f32(posit_value(16, 1, r, eb)));
      op(3'd1, 8'h0, 16'h0, real_to_f32(posit_value(8, 0, r[7:0], eb)), 32'(r[7:0]));
      op(3'd3, 8'h0, 16'h0, real_to_f32(posit_value(16, 0, r, eb)), 32'(r));
      op(3'd5, 8'h0, 16'h0, real_to_f32(posit_value(16, 1, r, eb)), 32'(r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
