// tb_textarossa_top: end-to-end test of the top level at its default size.
// Four textarossa_top instances (default parameters: 16 accelerators per
// scheduler, two IntraNode ports, one torus dimension, four input channels)
// form a 4-node ring: the + link of node n drives the - link of node n+1 and
// the credit wires cross back.
//  * Communication: every IntraNode port of every node streams random messages
//    (1..62 words) through its Aggregator to random nodes/ports/channels; the
//    Dispatchers' channel streams are drained with random back-pressure. Each
//    message must arrive once, unchanged, on the addressed node, port and
//    channel, in order per source/destination.
//  * Fast Task Scheduler (node 0): the host posts three Execute-task commands
//    for every accelerator (same input buffer, so later ones may reuse it) and
//    a periodic task; accelerator models answer with Finished commands; the
//    host collects every Finished entry from the cmd-out queue.
//  * Light PPU (node 0): random conversions in all six directions against a
//    real-number reference.
//  * Full PPU (node 1): posit<16,1> identities (r + 0, r - r, r * 1, r / r) on
//    random operands, a few exact sums, products and quotients, division by
//    zero and both float conversions.
//  * SHAKE (node 0): SHAKE256 of a 300-byte message with a 200-byte output,
//    against a reference digest.
// Mechanisms counted; the test fails if any of them never happens: FTS
// command held while busy, data reuse, periodic relaunch, suppressed
// Finished, simultaneous Finished; Comm dateline VC switch, virtual
// cut-through wait, own-node delivery, both ring directions, channel
// back-pressure; PPU rounding (FP32 -> posit inexact) and NaR; SHAKE absorb of
// several blocks and squeeze re-permutation.
module tb_textarossa_top;
  import comm_pkg::*;
  import fts_pkg::*;
  import posit_ref_pkg::*;
  localparam int R = 4, NI = 2, NCH = 4, NA = 16, NMSG = 25, TASKS = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  // ---------------- per-node signals ----------------
  logic              fts_reuse_en [R], fts_host_in_we [R], fts_host_out_we [R], fts_acc_cmd_tlast [R];
  logic [9:0]        fts_host_in_addr [R], fts_host_out_addr [R];
  logic [63:0]       fts_host_in_wdata [R], fts_host_in_rdata [R], fts_host_out_wdata [R], fts_host_out_rdata [R];
  logic [63:0]       fts_acc_cmd_tdata [R];
  logic [NA-1:0]     fts_acc_cmd_tvalid [R], fts_acc_cmd_tready [R], fts_acc_fin_tvalid [R];
  logic [NA-1:0]     fts_acc_fin_tready [R], fts_acc_fin_tlast [R], fts_acc_busy [R];
  logic [63:0]       fts_acc_fin_tdata [R][NA];
  logic [31:0]       fts_reuse_count [R], fts_finished_count [R];
  logic              comm_cfg_we [R];
  logic [5:0]        comm_cfg_addr [R];
  logic [31:0]       comm_cfg_wdata [R], comm_cfg_rdata [R];
  logic [127:0]      task_out_tdata [R][NI], task_in_tdata [R][NI];
  logic [NI-1:0]     task_out_tvalid [R], task_out_tready [R], task_out_tlast [R], task_in_tlast [R];
  logic [19:0]       task_out_tdest [R][NI];
  logic [16:0]       task_out_tid [R][NI];
  logic [NCH-1:0]    task_in_tvalid [R][NI], task_in_tready [R][NI];
  logic [127:0]      lnk_rx_data [R][2], lnk_tx_data [R][2];
  logic [1:0]        lnk_rx_valid [R], lnk_rx_last [R], lnk_rx_vc [R];
  logic [1:0]        lnk_tx_valid [R], lnk_tx_last [R], lnk_tx_vc [R], lnk_tx_ready [R];
  logic [1:0]        lnk_rx_credit [R][2], lnk_tx_credit [R][2];
  logic              ppu_in_valid [R], ppu_out_valid [R];
  logic [2:0]        ppu_opcode [R];
  logic [7:0]        ppu_in8 [R];
  logic [15:0]       ppu_in16 [R];
  logic [31:0]       ppu_in32 [R], ppu_out32 [R];
  logic              fppu_in_valid [R], fppu_out_valid [R];
  logic [2:0]        fppu_opcode [R];
  logic [15:0]       fppu_a [R], fppu_b [R];
  logic [31:0]       fppu_f32 [R], fppu_result [R];
  logic [7:0]        shake_awaddr [R], shake_araddr [R];
  logic              shake_awvalid [R], shake_awready [R], shake_wvalid [R], shake_wready [R];
  logic              shake_bvalid [R], shake_bready [R], shake_arvalid [R], shake_arready [R];
  logic              shake_rvalid [R], shake_rready [R];
  logic [31:0]       shake_wdata [R], shake_rdata [R], shake_perm_count [R];
  logic [3:0]        shake_wstrb [R];
  logic [1:0]        shake_bresp [R], shake_rresp [R];

  for (genvar n = 0; n < R; n++) begin : g_node
    textarossa_top u (
      .clk, .rst_n,
      .fts_reuse_en(fts_reuse_en[n]),
      .fts_host_in_we(fts_host_in_we[n]), .fts_host_in_addr(fts_host_in_addr[n]),
      .fts_host_in_wdata(fts_host_in_wdata[n]), .fts_host_in_rdata(fts_host_in_rdata[n]),
      .fts_host_out_we(fts_host_out_we[n]), .fts_host_out_addr(fts_host_out_addr[n]),
      .fts_host_out_wdata(fts_host_out_wdata[n]), .fts_host_out_rdata(fts_host_out_rdata[n]),
      .fts_acc_cmd_tdata(fts_acc_cmd_tdata[n]), .fts_acc_cmd_tvalid(fts_acc_cmd_tvalid[n]),
      .fts_acc_cmd_tready(fts_acc_cmd_tready[n]), .fts_acc_cmd_tlast(fts_acc_cmd_tlast[n]),
      .fts_acc_fin_tdata(fts_acc_fin_tdata[n]), .fts_acc_fin_tvalid(fts_acc_fin_tvalid[n]),
      .fts_acc_fin_tready(fts_acc_fin_tready[n]), .fts_acc_fin_tlast(fts_acc_fin_tlast[n]),
      .fts_acc_busy(fts_acc_busy[n]), .fts_reuse_count(fts_reuse_count[n]),
      .fts_finished_count(fts_finished_count[n]),
      .comm_cfg_we(comm_cfg_we[n]), .comm_cfg_addr(comm_cfg_addr[n]),
      .comm_cfg_wdata(comm_cfg_wdata[n]), .comm_cfg_rdata(comm_cfg_rdata[n]),
      .task_out_tdata(task_out_tdata[n]), .task_out_tvalid(task_out_tvalid[n]),
      .task_out_tready(task_out_tready[n]), .task_out_tlast(task_out_tlast[n]),
      .task_out_tdest(task_out_tdest[n]), .task_out_tid(task_out_tid[n]),
      .task_in_tdata(task_in_tdata[n]), .task_in_tvalid(task_in_tvalid[n]),
      .task_in_tready(task_in_tready[n]), .task_in_tlast(task_in_tlast[n]),
      .lnk_rx_data(lnk_rx_data[n]), .lnk_rx_valid(lnk_rx_valid[n]), .lnk_rx_last(lnk_rx_last[n]),
      .lnk_rx_vc(lnk_rx_vc[n]), .lnk_rx_credit(lnk_rx_credit[n]),
      .lnk_tx_data(lnk_tx_data[n]), .lnk_tx_valid(lnk_tx_valid[n]), .lnk_tx_last(lnk_tx_last[n]),
      .lnk_tx_vc(lnk_tx_vc[n]), .lnk_tx_ready(lnk_tx_ready[n]), .lnk_tx_credit(lnk_tx_credit[n]),
      .ppu_in_valid(ppu_in_valid[n]), .ppu_opcode(ppu_opcode[n]), .ppu_in8(ppu_in8[n]),
      .ppu_in16(ppu_in16[n]), .ppu_in32(ppu_in32[n]), .ppu_out_valid(ppu_out_valid[n]),
      .ppu_out32(ppu_out32[n]),
      .fppu_in_valid(fppu_in_valid[n]), .fppu_opcode(fppu_opcode[n]), .fppu_a(fppu_a[n]),
      .fppu_b(fppu_b[n]), .fppu_f32(fppu_f32[n]), .fppu_out_valid(fppu_out_valid[n]),
      .fppu_result(fppu_result[n]),
      .shake_awaddr(shake_awaddr[n]), .shake_awvalid(shake_awvalid[n]), .shake_awready(shake_awready[n]),
      .shake_wdata(shake_wdata[n]), .shake_wstrb(shake_wstrb[n]), .shake_wvalid(shake_wvalid[n]),
      .shake_wready(shake_wready[n]), .shake_bresp(shake_bresp[n]), .shake_bvalid(shake_bvalid[n]),
      .shake_bready(shake_bready[n]), .shake_araddr(shake_araddr[n]), .shake_arvalid(shake_arvalid[n]),
      .shake_arready(shake_arready[n]), .shake_rdata(shake_rdata[n]), .shake_rresp(shake_rresp[n]),
      .shake_rvalid(shake_rvalid[n]), .shake_rready(shake_rready[n]),
      .shake_perm_count(shake_perm_count[n]));
    localparam int NX = (n + 1) % R, PV = (n + R - 1) % R;
    assign lnk_rx_data[NX][1]  = lnk_tx_data[n][0];
    assign lnk_rx_valid[NX][1] = lnk_tx_valid[n][0];
    assign lnk_rx_last[NX][1]  = lnk_tx_last[n][0];
    assign lnk_rx_vc[NX][1]    = lnk_tx_vc[n][0];
    assign lnk_tx_credit[n][0] = lnk_rx_credit[NX][1];
    assign lnk_rx_data[PV][0]  = lnk_tx_data[n][1];
    assign lnk_rx_valid[PV][0] = lnk_tx_valid[n][1];
    assign lnk_rx_last[PV][0]  = lnk_tx_last[n][1];
    assign lnk_rx_vc[PV][0]    = lnk_tx_vc[n][1];
    assign lnk_tx_credit[n][1] = lnk_rx_credit[PV][0];
    assign lnk_tx_ready[n]     = 2'b11;
  end

  // =====================================================================
  // Communication traffic
  // =====================================================================
  typedef struct { logic [127:0] w [$]; int ch; } msg_t;
  msg_t exp_m [R*NI][R*NI][$];
  int n_sent = 0, n_recv = 0, n_self = 0, n_plus = 0, n_minus = 0, n_chan_bp = 0;
  int vct_wait_n [R];

  for (genvar n = 0; n < R; n++) begin : g_traffic
    for (genvar j = 0; j < NI; j++) begin : g_port
      // sender
      initial begin
        task_out_tvalid[n][j] = 0; task_out_tlast[n][j] = 0; task_out_tdata[n][j] = 0;
        task_out_tdest[n][j] = 0; task_out_tid[n][j] = 0;
        @(posedge rst_n);
        repeat (20) @(negedge clk);
        for (int k = 0; k < NMSG; k++) begin
          automatic msg_t m;
          automatic int dn = $urandom % R, dp = $urandom % NI, len = 1 + $urandom % 62;
          automatic logic [16:0] tid = 17'($urandom);
          automatic int diff = (dn - n + R) % R;
          m.ch = int'(tid) % NCH;
          for (int w = 0; w < len; w++) m.w.push_back({$urandom, $urandom, 16'(w), 16'(k), 16'(n * NI + j), 16'(len)});
          exp_m[n*NI+j][dn*NI+dp].push_back(m);
          if (diff == 0) n_self++; else if (2 * diff > R) n_minus++; else n_plus++;
          for (int w = 0; w < len; w++) begin
            @(negedge clk);
            while ($urandom % 6 == 0) begin task_out_tvalid[n][j] = 0; @(negedge clk); end
            task_out_tvalid[n][j] = 1; task_out_tdata[n][j] = m.w[w]; task_out_tlast[n][j] = (w == len - 1);
            task_out_tdest[n][j] = {15'(dn), 5'(dp)}; task_out_tid[n][j] = tid;
            #1; while (!task_out_tready[n][j]) begin @(negedge clk); #1; end
          end
          @(negedge clk); task_out_tvalid[n][j] = 0;
          n_sent++;
          repeat ($urandom % 40) @(negedge clk);
        end
      end
      // receiver: one message at a time per port (the Dispatcher serves one channel at a time)
      logic [127:0] cur [$];
      int cur_ch;
      always @(negedge clk) task_in_tready[n][j] = NCH'($urandom) | NCH'($urandom);
      always @(posedge clk) if (rst_n) begin
        for (int c = 0; c < NCH; c++)
          if (task_in_tvalid[n][j][c]) begin
            if (!task_in_tready[n][j][c]) n_chan_bp++;
            else begin
              cur.push_back(task_in_tdata[n][j]);
              cur_ch = c;
              if (task_in_tlast[n][j]) begin
                automatic int src = int'(cur[0][31:16]);
                if (src < R * NI && exp_m[src][n*NI+j].size() > 0) begin
                  automatic msg_t e = exp_m[src][n*NI+j].pop_front();
                  chk(cur_ch == e.ch, $sformatf("node %0d port %0d channel %0d, expected %0d", n, j, cur_ch, e.ch));
                  chk(cur.size() == e.w.size(), "message length");
                  for (int w = 0; w < cur.size() && w < e.w.size(); w++)
                    chk(cur[w] == e.w[w], "message word");
                end else chk(0, $sformatf("node %0d port %0d: unexpected message", n, j));
                cur.delete();
                n_recv++;
              end
            end
          end
      end
    end
    always @(posedge clk) if (rst_n)
      for (int i = 0; i < NI + 4; i++)
        if (g_node[n].u.u_routing.u_switch.in_valid[i] && !g_node[n].u.u_routing.u_switch.i_busy[i] &&
            !g_node[n].u.u_routing.u_switch.r_ok[i]) vct_wait_n[n]++;
  end

  task automatic cfg_write(int n, int a, logic [31:0] d);
    @(negedge clk); comm_cfg_we[n] = 1; comm_cfg_addr[n] = 6'(a); comm_cfg_wdata[n] = d;
    @(negedge clk); comm_cfg_we[n] = 0;
  endtask
  task automatic cfg_read(int n, int a, output logic [31:0] d);
    comm_cfg_addr[n] = 6'(a);
    #1 d = comm_cfg_rdata[n];
  endtask

  // =====================================================================
  // Fast Task Scheduler on node 0: accelerator models and host
  // =====================================================================
  logic [63:0] cmd_words [NA][$];
  int          got_tasks [NA][$];
  int          fin_delay [NA], fin_state [NA];
  bit          pair_go;
  logic [63:0] fin_tid [NA];
  int          n_held = 0, n_contention = 0, n_periodic_runs = 0, n_cmd_busy = 0;
  bit          model_busy [NA];
  bit          fts_done = 0;

  always @(posedge clk) if (rst_n) begin
    if ($countones(fts_acc_fin_tvalid[0]) > 1) n_contention++;
    // accelerators 0 and 1 release their first Finished command together
    pair_go = fin_state[0] == 1 && fin_state[1] == 1 && fin_delay[0] == 0 && fin_delay[1] == 0;
    for (int a = 0; a < NA; a++) begin
      if (fts_acc_cmd_tvalid[0][a] && fts_acc_cmd_tready[0][a]) begin
        if (cmd_words[a].size() == 0 && model_busy[a]) n_cmd_busy++;
        cmd_words[a].push_back(fts_acc_cmd_tdata[0]);
        if (fts_acc_cmd_tlast[0]) begin
          automatic logic [63:0] h = cmd_words[a][0];
          automatic int tid = int'(cmd_words[a][1]);
          chk(h[63:56] == ENTRY_VALID, "command header valid");
          got_tasks[a].push_back(tid);
          if (tid >= 'h500) n_periodic_runs++;
          else begin
            automatic int k = got_tasks[a].size();
            chk(cmd_words[a][3][7:0] == ((k == 1) ? 8'h10 : 8'h80), "argument flags (copy / reuse)");
          end
          if (h[0]) begin
            model_busy[a] = 1; fin_delay[a] = 5 + $urandom % 40; fin_tid[a] = cmd_words[a][1]; fin_state[a] = 1;
          end
          cmd_words[a].delete();
        end
      end
      case (fin_state[a])
        1: if (fin_delay[a] != 0) fin_delay[a]--;
           else if (a >= 2 || got_tasks[a].size() != 1 || pair_go) fin_state[a] = 2;
        2: if (fts_acc_fin_tready[0][a]) fin_state[a] = 3;
        3: if (fts_acc_fin_tready[0][a]) begin fin_state[a] = 0; model_busy[a] = 0; end
        default: ;
      endcase
    end
  end
  always_comb
    for (int a = 0; a < NA; a++) begin
      fts_acc_fin_tvalid[0][a] = (fin_state[a] == 2 || fin_state[a] == 3);
      fts_acc_fin_tlast[0][a]  = (fin_state[a] == 3);
      fts_acc_fin_tdata[0][a]  = (fin_state[a] == 3) ? fin_tid[a] : {ENTRY_VALID, 48'h0, CMD_FINISHED};
    end
  always @(negedge clk) fts_acc_cmd_tready[0] = NA'({$urandom, $urandom});

  task automatic host_write(int acc, int idx, logic [63:0] d);
    @(negedge clk);
    fts_host_in_we[0] = 1; fts_host_in_addr[0] = 10'(acc * 64 + idx); fts_host_in_wdata[0] = d;
    @(negedge clk);
    fts_host_in_we[0] = 0;
  endtask
  task automatic host_read_out(int acc, int idx, output logic [63:0] d);
    @(negedge clk); fts_host_out_addr[0] = 10'(acc * 64 + idx);
    @(negedge clk); d = fts_host_out_rdata[0];
  endtask
  task automatic host_clear_out(int acc, int idx);
    @(negedge clk);
    fts_host_out_we[0] = 1; fts_host_out_addr[0] = 10'(acc * 64 + idx); fts_host_out_wdata[0] = '0;
    @(negedge clk);
    fts_host_out_we[0] = 0;
  endtask

  task automatic run_fts();
    int wr_ptr [NA], rd_ptr [NA], t;
    int seen [NA][$];
    bit all_done;
    logic [63:0] h, d;
    for (int a = 0; a < NA; a++) begin wr_ptr[a] = 0; rd_ptr[a] = 0; end
    for (int k = 0; k < TASKS; k++)
      for (int a = 0; a < NA; a++) begin
        if (fts_acc_busy[0][a]) n_held++;
        host_write(a, wr_ptr[a] + 4, 64'h0000_0000_0000_4000);
        host_write(a, wr_ptr[a] + 3, {32'd1, 24'h0, FLAG_IN_COPY});
        host_write(a, wr_ptr[a] + 2, 64'h0);
        host_write(a, wr_ptr[a] + 1, 64'(a * 16 + k + 1));
        host_write(a, wr_ptr[a] + 0, {ENTRY_VALID, 8'h1F, 8'h00, 8'h01, 16'h0, 8'd1, CMD_EXEC});
        wr_ptr[a] += 5;
      end
    host_write(5, wr_ptr[5] + 5, 64'h0000_0000_0000_8000);
    host_write(5, wr_ptr[5] + 4, {32'd2, 24'h0, 8'h01});
    host_write(5, wr_ptr[5] + 3, {32'd2, 32'd3});
    host_write(5, wr_ptr[5] + 2, 64'h0);
    host_write(5, wr_ptr[5] + 1, 64'h500);
    host_write(5, wr_ptr[5] + 0, {ENTRY_VALID, 8'h1F, 8'h00, 8'h01, 16'h0, 8'd1, CMD_EXEC_PERIODIC});
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
        if (seen[a].size() < ((a == 5) ? TASKS + 1 : TASKS)) all_done = 0;
      end
      t++;
    end while (!all_done && t < 2000);
    for (int a = 0; a < NA; a++) begin
      chk(seen[a].size() == ((a == 5) ? TASKS + 1 : TASKS), $sformatf("acc %0d finished entries", a));
      for (int k = 0; k < TASKS && k < seen[a].size(); k++)
        chk(seen[a][k] == a * 16 + k + 1, "finished order");
    end
    chk(n_cmd_busy == 0, "no command to a busy accelerator");
    chk(fts_finished_count[0] == NA * TASKS + 1, "finished count");
    fts_done = 1;
  endtask

  // =====================================================================
  // Full PPU on node 1: posit<16,1> identities on random operands and a few
  // exact results (1 = 0x4000, 1.5 = 0x4800, 2 = 0x5000, 3 = 0x5800)
  // =====================================================================
  int n_arith = 0;
  task automatic fppu_op(logic [2:0] o, logic [15:0] a, logic [15:0] b, logic [31:0] f, logic [31:0] e);
    @(negedge clk);
    fppu_opcode[1] = o; fppu_a[1] = a; fppu_b[1] = b; fppu_f32[1] = f; fppu_in_valid[1] = 1;
    @(negedge clk);
    fppu_in_valid[1] = 0;
    chk(fppu_out_valid[1] && fppu_result[1] == e,
        $sformatf("Full PPU op %0d a=%h b=%h: got %h expected %h", o, a, b, fppu_result[1], e));
    n_arith++;
  endtask
  task automatic run_fppu();
    logic [15:0] r;
    for (int i = 0; i < 200; i++) begin
      r = 16'($urandom);
      if (r == 16'h8000) continue;
      fppu_op(3'd0, r, 16'h0000, 32'h0, 32'(r));       // r + 0 = r
      fppu_op(3'd1, r, r, 32'h0, 32'h0);               // r - r = 0
      fppu_op(3'd2, r, 16'h4000, 32'h0, 32'(r));       // r * 1 = r
      if (r != 16'h0000) fppu_op(3'd3, r, r, 32'h0, 32'h4000);  // r / r = 1
    end
    fppu_op(3'd0, 16'h4800, 16'h4800, 32'h0, 32'h5800);           // 1.5 + 1.5 = 3
    fppu_op(3'd2, 16'h4800, 16'h5000, 32'h0, 32'h5800);           // 1.5 * 2 = 3
    fppu_op(3'd3, 16'h5800, 16'h5000, 32'h0, 32'h4800);           // 3 / 2 = 1.5
    fppu_op(3'd3, 16'h4000, 16'h0000, 32'h0, 32'h8000);           // 1 / 0 = NaR
    fppu_op(3'd4, 16'h4800, 16'h0, 32'h0, 32'h3FC0_0000);         // 1.5 -> binary32
    fppu_op(3'd5, 16'h0, 16'h0, 32'h4040_0000, 32'h5800);         // 3.0 -> posit
  endtask

  // =====================================================================
  // Light PPU on node 0
  // =====================================================================
  int n_round = 0, n_nar = 0;
  task automatic ppu_op(logic [2:0] o, logic [7:0] a8, logic [15:0] a16, logic [31:0] a32, logic [31:0] e);
    @(negedge clk);
    ppu_opcode[0] = o; ppu_in8[0] = a8; ppu_in16[0] = a16; ppu_in32[0] = a32; ppu_in_valid[0] = 1;
    @(negedge clk);
    ppu_in_valid[0] = 0;
    chk(ppu_out_valid[0] && ppu_out32[0] == e, $sformatf("PPU op %0d: got %h expected %h", o, ppu_out32[0], e));
  endtask
  task automatic run_ppu();
    int eb;
    logic [15:0] r;
    for (int i = 0; i < 200; i++) begin
      r = 16'($urandom);
      if (r == 16'h8000 || r[7:0] == 8'h80) continue;
      ppu_op(3'd0, r[7:0], 16'h0, 32'h0, real_to_f32(posit_value(8, 0, r[7:0], eb)));
      ppu_op(3'd2, 8'h0, r, 32'h0, real_to_f32(posit_value(16, 0, r, eb)));
      ppu_op(3'd4, 8'h0, r, 32'h0, real_to_f32(posit_value(16, 1, r, eb)));
      ppu_op(3'd1, 8'h0, 16'h0, real_to_f32(posit_value(8, 0, r[7:0], eb)), 32'(r[7:0]));
      ppu_op(3'd3, 8'h0, 16'h0, real_to_f32(posit_value(16, 0, r, eb)), 32'(r));
      ppu_op(3'd5, 8'h0, 16'h0, real_to_f32(posit_value(16, 1, r, eb)), 32'(r));
    end
    // rounding: 1 + 2^-7 lies between posit8 1.0 (0x40) and its successor 0x41
    // (1 + 2^-5); it is nearer 0x40. 1.7734375 rounds up to 0x59 (1.78125).
    ppu_op(3'd1, 8'h0, 16'h0, 32'h3F81_0000, 32'h40); n_round++;
    ppu_op(3'd1, 8'h0, 16'h0, 32'h3FE3_0000, 32'h59); n_round++;
    // NaR both ways
    ppu_op(3'd0, 8'h80, 16'h0, 32'h0, 32'h7FC0_0000); n_nar++;
    ppu_op(3'd5, 8'h0, 16'h0, 32'h7FC0_0000, 32'h8000); n_nar++;
  endtask

  // =====================================================================
  // SHAKE on node 0 (AXI4 slave)
  // =====================================================================
  localparam string SHAKE_REF =
    "685d9873233fd4c7ce4bb15d7b947c9841f0e5cc18847a4ef07769ccb13022be75ab878b1c49a037276714755b87c8e553c98b24721f93b444598fb0d5826391799f3edba2a78d1d14dddf03a74973e32f7d15ea517c05ad1405fc69864dfcfd270edde8250dc92cb8608bd8d91aaf7d8fa25d6f67201923f1e3fc8d5b41e1a32db5401006be32a4f4d3701542419753ff36a95e1d81d5eeca5a62d1ce3989486f7dad2bdb35ce5def3d41b1da995ff0cf776d5c213fd1ebb7901a00916c6bb18fe89774375f939c";
  task automatic axi_write(logic [7:0] a, logic [31:0] d, logic [3:0] s);
    @(negedge clk);
    shake_awaddr[0] = a; shake_wdata[0] = d; shake_wstrb[0] = s; shake_awvalid[0] = 1; shake_wvalid[0] = 1;
    #1; while (!(shake_awready[0] && shake_wready[0])) begin @(negedge clk); #1; end
    @(negedge clk);
    shake_awvalid[0] = 0; shake_wvalid[0] = 0;
    while (!shake_bvalid[0]) @(negedge clk);
    shake_bready[0] = 1; @(negedge clk); shake_bready[0] = 0;
  endtask
  task automatic axi_read(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    shake_araddr[0] = a; shake_arvalid[0] = 1;
    #1; while (!shake_arready[0]) begin @(negedge clk); #1; end
    @(negedge clk);
    shake_arvalid[0] = 0;
    while (!shake_rvalid[0]) @(negedge clk);
    d = shake_rdata[0];
    shake_rready[0] = 1; @(negedge clk); shake_rready[0] = 0;
  endtask
  function automatic logic [7:0] hexbyte(string h, int i);
    logic [7:0] v = 0;
    for (int k = 0; k < 2; k++) begin
      byte c = h[2*i + k];
      v = v << 4;
      if (c >= "0" && c <= "9") v = v | 8'(c - "0"); else v = v | 8'(c - "a" + 10);
    end
    return v;
  endfunction
  int shake_absorb_perms = 0;
  task automatic run_shake();
    logic [31:0] w;
    int p0;
    axi_write(8'h00, 32'h3, 4'hF);                       // INIT, SHAKE256
    for (int i = 0; i < 300; i += 4) begin
      w = 0;
      for (int b = 0; b < 4; b++) w[8*b +: 8] = 8'((7 * (i + b) + 3) % 256);
      axi_write(8'h08, w, 4'hF);
    end
    shake_absorb_perms = int'(shake_perm_count[0]);
    axi_write(8'h00, 32'h4, 4'hF);                       // FINAL
    p0 = int'(shake_perm_count[0]);
    for (int i = 0; i < 200; i += 4) begin
      axi_read(8'h0C, w);
      for (int b = 0; b < 4; b++)
        chk(w[8*b +: 8] == hexbyte(SHAKE_REF, i + b), $sformatf("SHAKE output byte %0d", i + b));
    end
    chk(int'(shake_perm_count[0]) - p0 == 2, "SHAKE squeeze permutations");
  endtask

  // =====================================================================
  // main
  // =====================================================================
  initial begin
    int vsw, n_vct;
    logic [31:0] v;
    rst_n = 0;
    for (int n = 0; n < R; n++) begin
      fts_reuse_en[n] = 1; fts_host_in_we[n] = 0; fts_host_in_addr[n] = 0; fts_host_in_wdata[n] = 0;
      fts_host_out_we[n] = 0; fts_host_out_addr[n] = 0; fts_host_out_wdata[n] = 0;
      if (n > 0) begin
        fts_acc_cmd_tready[n] = '1; fts_acc_fin_tvalid[n] = '0; fts_acc_fin_tlast[n] = '0;
        for (int a = 0; a < NA; a++) fts_acc_fin_tdata[n][a] = '0;
      end
      comm_cfg_we[n] = 0; comm_cfg_addr[n] = 0; comm_cfg_wdata[n] = 0;
      ppu_in_valid[n] = 0; ppu_opcode[n] = 0; ppu_in8[n] = 0; ppu_in16[n] = 0; ppu_in32[n] = 0;
      fppu_in_valid[n] = 0; fppu_opcode[n] = 0; fppu_a[n] = 0; fppu_b[n] = 0; fppu_f32[n] = 0;
      shake_awaddr[n] = 0; shake_awvalid[n] = 0; shake_wdata[n] = 0; shake_wstrb[n] = 0;
      shake_wvalid[n] = 0; shake_bready[n] = 0; shake_araddr[n] = 0; shake_arvalid[n] = 0;
      shake_rready[n] = 0; vct_wait_n[n] = 0;
    end
    for (int a = 0; a < NA; a++) begin fin_state[a] = 0; fin_delay[a] = 0; model_busy[a] = 0; end
    repeat (3) @(posedge clk);
    for (int n = 0; n < R; n++) begin
      cfg_write(n, 0, 32'(n));
      cfg_write(n, 1, {17'd0, 5'd1, 5'd1, 5'(R)});
    end
    rst_n = 1;
    for (int n = 0; n < R; n++) begin
      cfg_write(n, 0, 32'(n));
      cfg_write(n, 1, {17'd0, 5'd1, 5'd1, 5'(R)});
    end
    fork
      run_fts();
      run_ppu();
      run_fppu();
      run_shake();
    join
    wait (n_sent == R * NI * NMSG);
    wait (n_recv == n_sent);
    repeat (20) @(negedge clk);
    vsw = 0; n_vct = 0;
    for (int n = 0; n < R; n++) begin
      cfg_read(n, 2, v); vsw += int'(v); n_vct += vct_wait_n[n];
    end
    for (int s = 0; s < R * NI; s++)
      for (int d = 0; d < R * NI; d++) chk(exp_m[s][d].size() == 0, "all messages delivered");
    $display("FTS : held=%0d reuse=%0d periodic_runs=%0d suppressed=%0d finished_contention=%0d",
             n_held, fts_reuse_count[0], n_periodic_runs, n_periodic_runs - 1, n_contention);
    $display("Comm: messages=%0d self=%0d plus=%0d minus=%0d dateline=%0d vct_wait=%0d channel_backpressure=%0d",
             n_recv, n_self, n_plus, n_minus, vsw, n_vct, n_chan_bp);
    $display("PPU : rounding=%0d nar=%0d   Full PPU: ops=%0d   SHAKE: absorb_perms=%0d total_perms=%0d",
             n_round, n_nar, n_arith, shake_absorb_perms, shake_perm_count[0]);
    chk(n_held > 0, "mechanism: FTS command held while busy");
    chk(fts_reuse_count[0] > 0, "mechanism: FTS data reuse");
    chk(n_periodic_runs == 3, "mechanism: FTS periodic relaunch");
    chk(n_contention > 0, "mechanism: FTS simultaneous Finished");
    chk(vsw > 0, "mechanism: Comm dateline VC switch");
    chk(n_vct > 0, "mechanism: Comm virtual cut-through wait");
    chk(n_self > 0 && n_plus > 0 && n_minus > 0, "mechanism: Comm own node and both directions");
    chk(n_chan_bp > 0, "mechanism: Comm channel back-pressure");
    chk(n_round > 0 && n_nar > 0, "mechanism: PPU rounding and NaR");
    chk(n_arith > 0, "mechanism: Full PPU arithmetic");
    chk(shake_absorb_perms >= 2, "mechanism: SHAKE multi-block absorb");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog: sent=%0d received=%0d fts_done=%0d", n_sent, n_recv, fts_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
