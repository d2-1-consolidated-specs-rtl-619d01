// tb_keccak_f1600: applies Keccak-f[1600] to the all-zero state and to its
// own result, and compares lanes with the published Keccak test values
// (lanes 0, 1 and 24 of the first permutation). Checks that done comes
// exactly 24 cycles after start and that busy is high in between.
module tb_keccak_f1600;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          rst_n, start, busy, done;
  logic [1599:0] state_in, state_out;
  keccak_f1600 dut (.*);

  task automatic chk(logic [63:0] got, logic [63:0] expv, string what);
    checks++;
    if (got !== expv) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, expv);
    end
  endtask

  task automatic permute(logic [1599:0] s);
    int cycles = 0;
    @(negedge clk);
    state_in = s; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low while running"); end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != 24) begin failures++; $display("FAIL latency %0d cycles, expected 24", cycles); end
  endtask

  initial begin
    logic [1599:0] first;
    rst_n = 0; start = 0; state_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    permute('0);
    first = state_out;
    chk(state_out[63:0],      64'hF1258F7940E1DDE7, "lane 0");
    chk(state_out[127:64],    64'h84D5CCF933C0478A, "lane 1");
    chk(state_out[1599:1536], 64'hEAF1FF7B5CECA249, "lane 24");
    permute(first);
    chk(state_out[63:0],      64'h2D5C954DF96ECB3C, "second permutation lane 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
