// tb_fts_top: end-to-end run of the Fast Task Scheduler at its default size
// (16 accelerators, 1024-entry queues). A host model posts four Execute-task
// commands into every accelerator's cmd-in subqueue (all with the same
// one-argument input buffer, so tasks 2..4 can reuse it) and one periodic
// task (3 repetitions, 2 us apart) to accelerator 5, then polls the cmd-out
// queue through its host port, checks and releases every Finished entry.
// 16 accelerator models receive commands, check their format and flags, and
// answer odd-coded commands with a Finished-task command after a random
// delay. Checks: every task reaches the right accelerator once and in order,
// the reuse flag rewriting, one Finished entry per task in order (periodic:
// one, after its three runs), accelerators never get a command while busy.
// Mechanisms counted (each must occur): commands held while busy, data reuse,
// periodic relaunch, suppressed intermediate Finished, simultaneous Finished
// commands from several accelerators.
module tb_fts_top;
  import fts_pkg::*;
  localparam int NA = 16, TASKS = 4, PER_ACC = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, reuse_en;
  logic        host_in_we, host_out_we;
  logic [9:0]  host_in_addr, host_out_addr;
  logic [63:0] host_in_wdata, host_in_rdata, host_out_wdata, host_out_rdata;
  logic [63:0] acc_cmd_tdata;
  logic [NA-1:0] acc_cmd_tvalid, acc_cmd_tready, acc_fin_tvalid, acc_fin_tready, acc_fin_tlast;
  logic        acc_cmd_tlast;
  logic [63:0] acc_fin_tdata [NA];
  logic [NA-1:0] acc_busy;
  logic [31:0] reuse_count, finished_count;

  fts_top dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  // ---------------- accelerator models ----------------
  logic [63:0] cmd_words [NA][$];
  int          got_tasks [NA][$];
  int          fin_delay [NA];
  logic [63:0] fin_tid   [NA];
  int          fin_state [NA];      // 0 idle, 1 waiting, 2 header, 3 tid
  int          n_held = 0, n_contention = 0, n_periodic_runs = 0, n_cmd_while_busy = 0;
  bit          model_busy [NA];

  always @(posedge clk) begin
    if (rst_n) begin
      if ($countones(acc_fin_tvalid) > 1) n_contention++;
      for (int a = 0; a < NA; a++) begin
        if (acc_cmd_tvalid[a] && acc_cmd_tready[a]) begin
          if (cmd_words[a].size() == 0 && model_busy[a]) n_cmd_while_busy++;
          cmd_words[a].push_back(acc_cmd_tdata);
          if (acc_cmd_tlast) begin
            automatic logic [63:0] h = cmd_words[a][0];
            automatic int hw = (h[7:0] == CMD_EXEC_PERIODIC) ? 4 : 3;
            automatic int tid = int'(cmd_words[a][1]);
            chk(h[63:56] == ENTRY_VALID, "command header valid");
            chk(cmd_words[a].size() == hw + 2 * int'(h[15:8]), "command length");
            got_tasks[a].push_back(tid);
            if (tid >= 'h500) n_periodic_runs++;
            else if (cmd_words[a].size() >= 5) begin
              // first task on each accelerator copies, later ones reuse
              automatic int k = got_tasks[a].size();
              chk(cmd_words[a][3][7:0] == ((k == 1) ? 8'h10 : 8'h80),
                  $sformatf("acc %0d task %0d flags %h", a, k, cmd_words[a][3][7:0]));
            end
            if (h[0]) begin
              model_busy[a] = 1;
              fin_delay[a] = 5 + $urandom % 40;
              fin_tid[a]   = cmd_words[a][1];
              fin_state[a] = 1;
            end
            cmd_words[a].delete();
          end
        end
        case (fin_state[a])
          1: if (fin_delay[a] == 0) fin_state[a] = 2; else fin_delay[a]--;
          2: if (acc_fin_tready[a]) fin_state[a] = 3;
          3: if (acc_fin_tready[a]) begin fin_state[a] = 0; model_busy[a] = 0; end
          default: ;
        endcase
      end
    end
  end

  always_comb
    for (int a = 0; a < NA; a++) begin
      acc_fin_tvalid[a] = (fin_state[a] == 2 || fin_state[a] == 3);
      acc_fin_tlast[a]  = (fin_state[a] == 3);
      acc_fin_tdata[a]  = (fin_state[a] == 3) ? fin_tid[a] : {ENTRY_VALID, 48'h0, CMD_FINISHED};
    end
  always @(negedge clk) acc_cmd_tready = NA'({$urandom, $urandom});

  // ---------------- host ----------------
  task automatic host_write(int acc, int idx, logic [63:0] d);
    @(negedge clk);
    host_in_we = 1; host_in_addr = 10'(acc * 64 + idx); host_in_wdata = d;
    @(negedge clk);
    host_in_we = 0;
  endtask

  task automatic host_read_out(int acc, int idx, output logic [63:0] d);
    @(negedge clk);
    host_out_addr = 10'(acc * 64 + idx);
    @(negedge clk);
    d = host_out_rdata;
  endtask

  task automatic host_clear_out(int acc, int idx);
    @(negedge clk);
    host_out_we = 1; host_out_addr = 10'(acc * 64 + idx); host_out_wdata = '0;
    @(negedge clk);
    host_out_we = 0;
  endtask

  initial begin
    int wr_ptr [NA];
    int rd_ptr [NA];
    int seen [NA][$];
    int t;
    bit all_done;
    logic [63:0] h, d;
    rst_n = 0; reuse_en = 1;
    host_in_we = 0; host_in_addr = 0; host_in_wdata = 0;
    host_out_we = 0; host_out_addr = 0; host_out_wdata = 0;
    for (int a = 0; a < NA; a++) begin
      fin_state[a] = 0; fin_delay[a] = 0; model_busy[a] = 0; wr_ptr[a] = 0; rd_ptr[a] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < TASKS; k++)
      for (int a = 0; a < NA; a++) begin
        automatic int tid = a * 16 + k + 1;
        if (acc_busy[a]) n_held++;
        host_write(a, wr_ptr[a] + 4, 64'h0000_0000_0000_4000);               // argument value
        host_write(a, wr_ptr[a] + 3, {32'd1, 24'h0, FLAG_IN_COPY});          // argument flags / id
        host_write(a, wr_ptr[a] + 2, 64'h0);                                 // parent task id
        host_write(a, wr_ptr[a] + 1, 64'(tid));                              // task id
        host_write(a, wr_ptr[a] + 0, {ENTRY_VALID, 8'h1F, 8'h00, 8'h01, 16'h0, 8'd1, CMD_EXEC});
        wr_ptr[a] += 5;
      end
    // periodic task on accelerator 5: 3 runs, 2 us apart, one argument
    host_write(5, wr_ptr[5] + 5, 64'h0000_0000_0000_8000);
    host_write(5, wr_ptr[5] + 4, {32'd2, 24'h0, 8'h01});
    host_write(5, wr_ptr[5] + 3, {32'd2, 32'd3});
    host_write(5, wr_ptr[5] + 2, 64'h0);
    host_write(5, wr_ptr[5] + 1, 64'h500);
    host_write(5, wr_ptr[5] + 0, {ENTRY_VALID, 8'h1F, 8'h00, 8'h01, 16'h0, 8'd1, CMD_EXEC_PERIODIC});

    // collect Finished entries
    t = 0;
    do begin
      all_done = 1;
      for (int a = 0; a < NA; a++) begin
        host_read_out(a, rd_ptr[a], h);
        if (h[63:56] == ENTRY_VALID) begin
          chk(h[7:0] == CMD_FINISHED, "finished code");
          host_read_out(a, rd_ptr[a] + 1, d);
          seen[a].push_back(int'(d));
          host_clear_out(a, rd_ptr[a] + 1);
          host_clear_out(a, rd_ptr[a]);
          rd_ptr[a] += 2;
        end
        if (seen[a].size() < ((a == 5) ? PER_ACC : TASKS)) all_done = 0;
      end
      t++;
    end while (!all_done && t < 2000);

    for (int a = 0; a < NA; a++) begin
      chk(got_tasks[a].size() == ((a == 5) ? TASKS + 3 : TASKS), $sformatf("acc %0d commands", a));
      chk(seen[a].size() == ((a == 5) ? PER_ACC : TASKS), $sformatf("acc %0d finished", a));
      for (int k = 0; k < TASKS && k < seen[a].size(); k++)
        chk(seen[a][k] == a * 16 + k + 1, $sformatf("acc %0d finished order", a));
    end
    chk(seen[5].size() == PER_ACC && seen[5][PER_ACC - 1] == 'h500, "periodic finished once");
    chk(n_cmd_while_busy == 0, "no command to a busy accelerator");
    chk(reuse_count == NA * (TASKS - 1), "reuse count");
    chk(finished_count == NA * TASKS + 1, "finished count");
    $display("mechanisms: held=%0d reuse=%0d periodic_runs=%0d suppressed=%0d contention=%0d",
             n_held, reuse_count, n_periodic_runs, n_periodic_runs - 1, n_contention);
    chk(n_held > 0, "mechanism: command held while accelerator busy");
    chk(reuse_count > 0, "mechanism: data reuse");
    chk(n_periodic_runs == 3, "mechanism: periodic relaunch");
    chk(n_periodic_runs - 1 > 0, "mechanism: suppressed intermediate Finished");
    chk(n_contention > 0, "mechanism: simultaneous Finished commands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
