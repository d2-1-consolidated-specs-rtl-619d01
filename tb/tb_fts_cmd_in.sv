// tb_fts_cmd_in: Cmd in with 4 accelerators, a cmd-in queue memory and a
// stream sink with random back-pressure. The testbench plays the host
// (writing commands into the subqueues) and Cmd out (fin_valid pulses).
// Checks: an Execute-task command is sent whole and unchanged to its
// accelerator with tlast on its last word and its slots are released; the
// accelerator is then busy and a second command waits until it is freed; the
// second command's repeated input argument has its copy flag cleared and bit
// 7 set (data reuse) while a changed argument is untouched; an even-coded
// command does not make its accelerator busy; a periodic task is launched
// 'repetitions' times, each launch at least 'period' microseconds after the
// previous one, suppress is set until the last launch, and the slots are
// released only after it.
module tb_fts_cmd_in;
  import fts_pkg::*;
  localparam int NA = 4, CPU = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, reuse_en;
  logic        h_we, q_we;
  logic [7:0]  h_addr, q_addr;
  logic [63:0] h_wdata, h_rdata, q_wdata, q_rdata;
  logic [63:0] m_tdata;
  logic        m_tvalid, m_tready, m_tlast;
  logic [1:0]  m_tdest;
  logic        fin_valid;
  logic [1:0]  fin_acc;
  logic [NA-1:0] suppress, busy;
  logic [31:0] reuse_count;

  fts_cmd_queue #(.DEPTH(NA * 64), .SUBQ(NA)) u_q (
    .clk, .h_we, .h_addr, .h_wdata, .h_rdata,
    .f_we(q_we), .f_addr(q_addr), .f_wdata(q_wdata), .f_rdata(q_rdata));
  fts_cmd_in #(.N_ACC(NA), .CYCLES_PER_US(CPU)) dut (.*);

  typedef struct { logic [63:0] d; logic last; int t; } beat_t;
  beat_t rx [NA][$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (m_tvalid && m_tready) rx[m_tdest].push_back('{m_tdata, m_tlast, cyc});
  end
  always @(negedge clk) m_tready = ($urandom % 4 != 0);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host_write(int acc, int idx, logic [63:0] d);
    @(negedge clk);
    h_we = 1; h_addr = 8'(acc * 64 + idx); h_wdata = d;
    @(negedge clk);
    h_we = 0;
  endtask

  function automatic logic [63:0] host_peek(int acc, int idx);
    return u_q.mem[acc * 64 + idx];
  endfunction

  task automatic fin(int acc);
    @(negedge clk);
    fin_valid = 1; fin_acc = 2'(acc);
    @(negedge clk);
    fin_valid = 0;
  endtask

  task automatic wait_words(int acc, int n);
    int t = 0;
    while (rx[acc].size() < n && t < 5000) begin @(negedge clk); t++; end
  endtask

  // Execute task with two arguments; word list returned in w
  task automatic exec_cmd(output logic [63:0] w [7], input logic [63:0] tid,
                          input logic [31:0] id0, input logic [63:0] v0,
                          input logic [31:0] id1, input logic [63:0] v1);
    w[0] = {ENTRY_VALID, 8'h1F, 8'h00, 8'h01, 16'h0, 8'd2, CMD_EXEC};
    w[1] = tid;
    w[2] = 64'hABCD;
    w[3] = {id0, 24'h0, FLAG_IN_COPY | 8'h02};
    w[4] = v0;
    w[5] = {id1, 24'h0, FLAG_IN_COPY | FLAG_OUT_COPY};
    w[6] = v1;
  endtask

  initial begin
    logic [63:0] a [7];
    logic [63:0] b [7];
    logic [63:0] p [6];
    int t_launch [3];
    rst_n = 0; reuse_en = 1; h_we = 0; h_addr = 0; h_wdata = 0; fin_valid = 0; fin_acc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. first task to accelerator 1 (payload first, header last)
    exec_cmd(a, 64'h11, 32'h7, 64'h1000, 32'h8, 64'h2000);
    for (int i = 6; i >= 0; i--) host_write(1, i, a[i]);
    wait_words(1, 7);
    chk(rx[1].size() == 7, "task A length");
    for (int i = 0; i < 7 && i < rx[1].size(); i++) begin
      chk(rx[1][i].d == a[i], $sformatf("task A word %0d", i));
      chk(rx[1][i].last == (i == 6), "task A tlast");
    end
    repeat (12) @(negedge clk);
    chk(busy[1], "accelerator 1 busy after odd command");
    for (int i = 0; i < 7; i++) chk(host_peek(1, i) == 64'h0, "task A slot released");
    rx[1].delete();

    // 2. second task reuses argument 0; must wait for the accelerator
    exec_cmd(b, 64'h12, 32'h7, 64'h1000, 32'h8, 64'h2222);
    for (int i = 6; i >= 0; i--) host_write(1, 7 + i, b[i]);
    repeat (60) @(negedge clk);
    chk(rx[1].size() == 0, "task B held while accelerator busy");
    fin(1);
    wait_words(1, 7);
    chk(rx[1].size() == 7, "task B length");
    if (rx[1].size() == 7) begin
      chk(rx[1][3].d == {b[3][63:8], 8'h82}, "reused argument: copy flag cleared, bit 7 set");
      chk(rx[1][5].d == b[5], "changed argument untouched");
      chk(rx[1][4].d == b[4] && rx[1][6].d == b[6], "argument values");
    end
    chk(reuse_count == 1, "reuse counter");
    fin(1);

    // 3. even-coded single-word command
    host_write(2, 0, {ENTRY_VALID, 48'h123, 8'h02});
    wait_words(2, 1);
    repeat (5) @(negedge clk);
    chk(rx[2].size() == 1 && rx[2][0].last, "even command sent as one word");
    chk(!busy[2], "even command leaves accelerator free");

    // 4. periodic task: 3 repetitions, period 6 us
    p[0] = {ENTRY_VALID, 8'h1F, 8'h00, 8'h01, 16'h0, 8'd1, CMD_EXEC_PERIODIC};
    p[1] = 64'h33; p[2] = 64'h0; p[3] = {32'd6, 32'd3};
    p[4] = {32'h9, 24'h0, 8'h01}; p[5] = 64'h5000;
    for (int i = 5; i >= 0; i--) host_write(3, i, p[i]);
    for (int r = 0; r < 3; r++) begin
      wait_words(3, 6 * (r + 1));
      chk(rx[3].size() == 6 * (r + 1), $sformatf("periodic launch %0d", r));
      if (rx[3].size() >= 6 * (r + 1)) begin
        t_launch[r] = rx[3][6 * r].t;
        for (int i = 0; i < 6; i++) chk(rx[3][6 * r + i].d == p[i], "periodic words");
      end
      repeat (12) @(negedge clk);
      chk(suppress[3] == (r < 2), $sformatf("suppress after launch %0d", r));
      chk((host_peek(3, 0) == 64'h0) == (r == 2), $sformatf("slots after launch %0d", r));
      repeat (5) @(negedge clk);
      fin(3);
    end
    chk(t_launch[1] - t_launch[0] >= 6 * CPU, "period between launch 0 and 1");
    chk(t_launch[2] - t_launch[1] >= 6 * CPU, "period between launch 1 and 2");
    chk(t_launch[2] - t_launch[1] <= 6 * CPU + 40, "launch follows the period closely");
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
