// tb_fts_cmd_queue: checks the FTS queue memory: power-up contents are all
// invalid (0), each port reads back what either port wrote one cycle later,
// the 16 subqueues occupy consecutive 64-entry ranges, and a same-address
// write collision keeps the FTS port's data.
module tb_fts_cmd_queue;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        h_we, f_we;
  logic [9:0]  h_addr, f_addr;
  logic [63:0] h_wdata, f_wdata, h_rdata, f_rdata;
  logic [63:0] model [1024];

  fts_cmd_queue dut (.*);

  task automatic chk(logic [63:0] got, logic [63:0] expv, string what);
    checks++;
    if (got !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, expv);
    end
  endtask

  initial begin
    h_we = 0; f_we = 0; h_addr = 0; f_addr = 0; h_wdata = 0; f_wdata = 0;
    for (int i = 0; i < 1024; i++) model[i] = '0;
    // power-up contents
    for (int i = 0; i < 1024; i += 37) begin
      @(negedge clk); h_addr = 10'(i); f_addr = 10'(1023 - i);
      @(negedge clk);
      chk(h_rdata, 64'h0, "init host"); chk(f_rdata, 64'h0, "init fts");
    end
    // random writes from both ports, reads through the other port
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      h_we = 1'($urandom); f_we = 1'($urandom);
      h_addr = 10'($urandom); f_addr = 10'($urandom);
      if (n % 7 == 0) f_addr = h_addr;
      h_wdata = {$urandom, $urandom}; f_wdata = {$urandom, $urandom};
      if (h_we && !(f_we && f_addr == h_addr)) model[h_addr] = h_wdata;
      if (f_we) model[f_addr] = f_wdata;
      @(negedge clk);
      h_we = 0; f_we = 0;
      h_addr = 10'($urandom); f_addr = 10'($urandom);
      @(negedge clk);
      chk(h_rdata, model[h_addr], "host read");
      chk(f_rdata, model[f_addr], "fts read");
    end
    // subqueue k, entry e sits at k*64+e
    @(negedge clk);
    h_we = 1; h_addr = 10'(5 * 64 + 63); h_wdata = 64'h8000_0000_0000_0005;
    @(negedge clk);
    h_we = 0; f_addr = 10'd383;
    @(negedge clk);
    chk(f_rdata, 64'h8000_0000_0000_0005, "subqueue 5 last entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
