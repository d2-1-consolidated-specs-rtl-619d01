// tb_fts_cmd_out: Cmd out with 4 accelerators and a cmd-out queue memory.
// The testbench plays the accelerator multiplexer (2-word Finished-task
// packets tagged with s_tid) and the host. Checks: each Finished command
// lands in its accelerator's subqueue at consecutive positions with valid
// byte 0x80 and code 0x03, followed by the task identifier; each produces one
// fin_valid pulse naming the accelerator; a suppressed command frees the
// accelerator but writes nothing; a command whose target slot still holds an
// unread entry waits until the host releases the slot.
module tb_fts_cmd_out;
  import fts_pkg::*;
  localparam int NA = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n;
  logic [63:0] s_tdata;
  logic        s_tvalid, s_tready, s_tlast;
  logic [1:0]  s_tid;
  logic [NA-1:0] suppress;
  logic        h_we, q_we;
  logic [7:0]  h_addr, q_addr;
  logic [63:0] h_wdata, h_rdata, q_wdata, q_rdata;
  logic        fin_valid;
  logic [1:0]  fin_acc;
  logic [31:0] finished_count;

  fts_cmd_queue #(.DEPTH(NA * 64), .SUBQ(NA)) u_q (
    .clk, .h_we, .h_addr, .h_wdata, .h_rdata,
    .f_we(q_we), .f_addr(q_addr), .f_wdata(q_wdata), .f_rdata(q_rdata));
  fts_cmd_out #(.N_ACC(NA)) dut (.*);

  int fins [NA];
  always @(posedge clk) if (fin_valid) fins[fin_acc]++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(int acc, logic [63:0] tid, int max_wait, output bit done);
    int t = 0;
    done = 0;
    @(negedge clk);
    s_tvalid = 1; s_tid = 2'(acc); s_tdata = {8'h80, 48'h00AB_0000_0000, 8'h03}; s_tlast = 0;
    #1;
    while (!s_tready && t < max_wait) begin @(negedge clk); #1; t++; end
    if (!s_tready) return;
    @(negedge clk);
    s_tdata = tid; s_tlast = 1;
    #1;
    while (!s_tready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_tvalid = 0; s_tlast = 0;
    done = 1;
  endtask

  initial begin
    bit ok;
    rst_n = 0; s_tvalid = 0; s_tlast = 0; s_tdata = 0; s_tid = 0; suppress = 0;
    h_we = 0; h_addr = 0; h_wdata = 0;
    for (int i = 0; i < NA; i++) fins[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(2, 64'h1111, 100, ok);
    send(2, 64'h2222, 100, ok);
    send(0, 64'h3333, 100, ok);
    repeat (5) @(negedge clk);
    chk(u_q.mem[2*64 + 0] == {8'h80, 48'h00AB_0000_0000, 8'h03}, "acc 2 entry 0 header");
    chk(u_q.mem[2*64 + 1] == 64'h1111, "acc 2 entry 0 task id");
    chk(u_q.mem[2*64 + 2][63:56] == 8'h80 && u_q.mem[2*64 + 2][7:0] == 8'h03, "acc 2 entry 1 header");
    chk(u_q.mem[2*64 + 3] == 64'h2222, "acc 2 entry 1 task id");
    chk(u_q.mem[0] [63:56] == 8'h80 && u_q.mem[1] == 64'h3333, "acc 0 entry");
    chk(fins[2] == 2 && fins[0] == 1, "fin pulses");
    chk(finished_count == 3, "finished counter");
    // suppressed
    suppress = 4'b0010;
    send(1, 64'h4444, 100, ok);
    repeat (5) @(negedge clk);
    chk(u_q.mem[64] == 64'h0 && u_q.mem[65] == 64'h0, "suppressed command not written");
    chk(fins[1] == 1, "suppressed command still frees accelerator");
    suppress = 0;
    // occupied slot: host has not read acc 3 entry 0
    @(negedge clk); h_we = 1; h_addr = 8'(3*64); h_wdata = {8'h80, 56'h5}; @(negedge clk); h_we = 0;
    send(3, 64'h5555, 40, ok);
    chk(!ok, "command waits for an occupied slot");
    @(negedge clk); h_we = 1; h_addr = 8'(3*64); h_wdata = 64'h0; @(negedge clk); h_we = 0;
    // the header is still offered: complete the transfer
    s_tvalid = 1;
    #1;
    while (!s_tready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_tdata = 64'h5555; s_tlast = 1;
    @(negedge clk);
    s_tvalid = 0; s_tlast = 0;
    repeat (5) @(negedge clk);
    chk(u_q.mem[3*64 + 1] == 64'h5555 && u_q.mem[3*64][63:56] == 8'h80, "written after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
