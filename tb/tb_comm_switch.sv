// tb_comm_switch: the Routing IP switch in a 2-D torus (4 x 3) at node
// (X=3, Y=0), with two IntraNode ports. Every input (2 IntraNode TX streams and
// the two virtual channels of each of the 4 InterNode ports) plays random
// packets consistent with dimension-order routing (a packet that arrives in
// dimension X already has the right Y). Outputs accept words at random and
// model receivers whose free space ("room") falls with each word taken and
// refills at random.
// A reference model gives, per packet, the expected output (Y corrected
// before X, shorter way round, ties +; IntraNode port from the header when
// the coordinate matches) and the expected channel (kept within a dimension,
// 0 on entering one, 1 after the wrap link). Checks: output and channel,
// header channel field and hop count, payload, per-input order, room never
// exceeded, dateline counter.
// Mechanisms counted (each must occur): dateline switches in both
// directions, channel kept within a dimension, packets waiting for room,
// two inputs competing for one output.
module tb_comm_switch;
  import comm_pkg::*;
  localparam int NI = 2, DIMS = 2, N_IN = NI + 8, N_OUT = NI + 4, NPKT = 60, CAP = 64;
  localparam int SX = 4, SY = 3, MX = 3, MY = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;
  logic [COORD_W-1:0] my_coord [MAX_DIMS], dim_size [MAX_DIMS];
  logic [127:0] in_data [N_IN], out_data [N_OUT];
  logic [N_IN-1:0] in_valid, in_last, in_ready;
  logic [N_OUT-1:0] out_valid, out_last, out_vc, out_ready;
  logic [15:0] out_room [N_OUT][2];
  logic [31:0] vc_switch_count;

  comm_switch #(.N_INTRA(NI), .DIMS(DIMS)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  typedef struct { logic [127:0] w [$]; int out; bit vc; bit dl; } pkt_t;
  pkt_t exp_q [N_IN][$];
  int room [N_OUT][2];
  int n_dl_plus = 0, n_dl_minus = 0, n_keep = 0, n_room_wait = 0, n_compete = 0, n_dl = 0, n_done = 0;

  // reference routing
  function automatic void route(int in_i, int x, int y, int port, bit vc_in,
                                output int o, output bit vc, output bit dl, output bit minus);
    int arr_dim = (in_i < NI) ? -1 : (in_i - NI) / 4;
    int my [2] = '{MX, MY};
    int sz [2] = '{SX, SY};
    int c [2];
    c[0] = x; c[1] = y;
    o = port % NI; vc = 0; dl = 0; minus = 0;
    for (int d = 1; d >= 0; d--)
      if (c[d] != my[d]) begin
        int diff = (c[d] - my[d] + sz[d]) % sz[d];
        minus = (2 * diff > sz[d]);
        o = NI + 2 * d + int'(minus);
        vc = (arr_dim == d) ? vc_in : 1'b0;
        if ((!minus && my[d] == sz[d] - 1) || (minus && my[d] == 0)) begin dl = !vc; vc = 1; end
        return;
      end
  endfunction

  for (genvar i = 0; i < N_IN; i++) begin : g_src
    initial begin
      in_valid[i] = 0; in_last[i] = 0; in_data[i] = 0;
      @(posedge rst_n);
      for (int k = 0; k < NPKT; k++) begin
        automatic pkt_t pk;
        automatic comm_hdr_t h = 128'({$urandom, $urandom, $urandom, $urandom});
        automatic int d_in = (i < NI) ? -1 : (i - NI) / 4;
        automatic bit vc_in = (i < NI) ? 1'b0 : 1'((i - NI) % 2);
        automatic int x = $urandom % SX, y = $urandom % SY, len = $urandom % 40;
        automatic bit minus;
        if (d_in == 0) y = MY;                       // arrived in X: Y already done
        h.coord = {5'd0, 5'(y), 5'(x)};
        h.length = 14'(len); h.vchannel = 4'(vc_in); h.num_hops = 8'($urandom % 100);
        route(i, x, y, int'(h.intratile_port), vc_in, pk.out, pk.vc, pk.dl, minus);
        pk.w.push_back(h);
        for (int w = 0; w < len; w++) pk.w.push_back({$urandom, $urandom, $urandom, $urandom});
        pk.w.push_back({96'h0, 16'(i), 16'(k)});
        exp_q[i].push_back(pk);
        for (int w = 0; w < len + 2; w++) begin
          @(negedge clk);
          while ($urandom % 5 == 0) begin in_valid[i] = 0; @(negedge clk); end
          in_valid[i] = 1; in_data[i] = pk.w[w]; in_last[i] = (w == len + 1);
          #1; while (!in_ready[i]) begin @(negedge clk); #1; end
        end
        @(negedge clk); in_valid[i] = 0;
        repeat ($urandom % 30) @(negedge clk);
      end
    end
  end

  // output receivers
  int cnt [N_OUT];
  int cur_in [N_OUT];
  logic [127:0] cur_w [N_OUT][$];
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < N_OUT; o++) begin
      if (out_valid[o] && out_ready[o]) begin
        if (cur_w[o].size() == 0) begin
          automatic comm_hdr_t h = comm_hdr_t'(out_data[o]);
          chk(room[o][out_vc[o]] >= int'(h.length) + 2, $sformatf("out %0d room respected", o));
          chk(h.vchannel == 4'(out_vc[o]), "header channel field");
        end
        room[o][out_vc[o]]--;
        chk(room[o][out_vc[o]] >= 0, "receiver not overrun");
        cur_w[o].push_back(out_data[o]);
        if (out_last[o]) begin
          automatic int src = int'(out_data[o][31:16]);
          automatic pkt_t e;
          if (src < N_IN && exp_q[src].size() > 0) begin
            automatic comm_hdr_t eh, gh;
            e = exp_q[src].pop_front();
            eh = comm_hdr_t'(e.w[0]); gh = comm_hdr_t'(cur_w[o][0]);
            chk(o == e.out, $sformatf("in %0d routed to out %0d, expected %0d", src, o, e.out));
            chk(out_vc[o] == e.vc || o < NI, $sformatf("in %0d channel %0d expected %0d", src, out_vc[o], e.vc));
            chk(gh.num_hops == eh.num_hops + 8'd1, "hop count");
            chk(gh.coord == eh.coord && gh.length == eh.length && gh.pid_ch == eh.pid_ch, "header fields");
            chk(cur_w[o].size() == e.w.size(), "packet length");
            for (int w = 1; w < cur_w[o].size() && w < e.w.size(); w++)
              chk(cur_w[o][w] == e.w[w], "payload");
            if (e.dl) begin n_dl++; if (o == NI + 1 || o == NI + 3) n_dl_minus++; else n_dl_plus++; end
            if (src >= NI && o >= NI && (src - NI) / 4 == (o - NI) / 2 && e.vc) n_keep++;
          end else chk(0, "unexpected packet");
          cur_w[o].delete();
          n_done++;
        end
      end
      // refill the receiver now and then
      for (int v = 0; v < 2; v++)
        if ($urandom % 6 == 0 && room[o][v] < CAP) room[o][v]++;
    end
    // waiting for room / competing inputs
    for (int o = 0; o < N_OUT; o++) begin
      automatic int want = 0;
      for (int i = 0; i < N_IN; i++)
        if (in_valid[i] && !dut.i_busy[i] && int'(dut.r_out[i]) == o) begin
          want++;
          if (!dut.r_ok[i]) n_room_wait++;
        end
      if (want > 1) n_compete++;
    end
  end
  always_comb for (int o = 0; o < N_OUT; o++)
    for (int v = 0; v < 2; v++) out_room[o][v] = 16'(room[o][v]);
  always @(negedge clk) out_ready = N_OUT'($urandom) | N_OUT'($urandom);

  initial begin
    rst_n = 0;
    my_coord = '{5'(MX), 5'(MY), 5'd0};
    dim_size = '{5'(SX), 5'(SY), 5'd1};
    for (int o = 0; o < N_OUT; o++) room[o] = '{CAP, CAP};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_done == N_IN * NPKT);
    repeat (5) @(negedge clk);
    for (int i = 0; i < N_IN; i++) chk(exp_q[i].size() == 0, "all packets out");
    chk(vc_switch_count == 32'(n_dl), $sformatf("dateline counter %0d, expected %0d", vc_switch_count, n_dl));
    $display("mechanisms: dateline+=%0d dateline-=%0d vc_kept=%0d room_wait=%0d compete=%0d",
             n_dl_plus, n_dl_minus, n_keep, n_room_wait, n_compete);
    chk(n_dl_plus > 0 && n_dl_minus > 0, "mechanism: dateline switches both ways");
    chk(n_keep > 0, "mechanism: channel kept within a dimension");
    chk(n_room_wait > 0, "mechanism: waiting for room");
    chk(n_compete > 0, "mechanism: competing inputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog: done=%0d", n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
