// tb_comm_routing_ip: five Routing IPs (default configuration: two IntraNode
// ports, one torus dimension, 64-entry FIFOs) connected as a 5-node ring,
// each node's + link wired to the next node's - link with the credit wires
// crossing back. Every IntraNode port of every node runs a traffic generator
// that writes packets (payload to the data FIFO, then header and footer to the
// header/footer FIFO) to random destination nodes/ports, with random lengths
// up to the largest packet, and a receiver that drains its RX FIFOs with
// random stalls. The footer carries the source and a sequence number so the
// receiver can find the packet in the scoreboard.
// Checks: every packet arrives once, at the addressed node and port, in order
// per source/destination pair, with the header (length, coordinate, port,
// channel id) and payload unchanged, the hop count equal to the shorter ring
// distance plus one and the channel field 0 on ejection; the node's dateline
// counters add up to the number of packets that crossed the ring's wrap link;
// the packet counters in the register file match the traffic.
// Mechanisms counted (each must occur): dateline VC switches, packets held
// back by virtual cut-through (header waiting at an input for room),
// packets to the own node, both ring directions, full receive FIFOs.
module tb_comm_routing_ip;
  import comm_pkg::*;
  localparam int R = 5, NI = 2, NPKT = 40, MAXL = 62;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;

  logic              cfg_we [R];
  logic [5:0]        cfg_addr [R];
  logic [31:0]       cfg_wdata [R], cfg_rdata [R];
  logic [NI-1:0]     tx_hdr_push [R], tx_hdr_full [R], tx_dat_push [R], tx_dat_full [R];
  logic [NI-1:0]     rx_hdr_pop [R], rx_hdr_empty [R], rx_dat_pop [R], rx_dat_empty [R];
  logic [127:0]      tx_hdr_data [R][NI], tx_dat_data [R][NI], rx_hdr_data [R][NI], rx_dat_data [R][NI];
  logic [127:0]      lnk_rx_data [R][2], lnk_tx_data [R][2];
  logic [1:0]        lnk_rx_valid [R], lnk_rx_last [R], lnk_rx_vc [R];
  logic [1:0]        lnk_tx_valid [R], lnk_tx_last [R], lnk_tx_vc [R], lnk_tx_ready [R];
  logic [1:0]        lnk_rx_credit [R][2], lnk_tx_credit [R][2];

  for (genvar n = 0; n < R; n++) begin : g_node
    comm_routing_ip u (
      .clk, .rst_n,
      .cfg_we(cfg_we[n]), .cfg_addr(cfg_addr[n]), .cfg_wdata(cfg_wdata[n]), .cfg_rdata(cfg_rdata[n]),
      .tx_hdr_push(tx_hdr_push[n]), .tx_hdr_data(tx_hdr_data[n]), .tx_hdr_full(tx_hdr_full[n]),
      .tx_dat_push(tx_dat_push[n]), .tx_dat_data(tx_dat_data[n]), .tx_dat_full(tx_dat_full[n]),
      .rx_hdr_pop(rx_hdr_pop[n]), .rx_hdr_data(rx_hdr_data[n]), .rx_hdr_empty(rx_hdr_empty[n]),
      .rx_dat_pop(rx_dat_pop[n]), .rx_dat_data(rx_dat_data[n]), .rx_dat_empty(rx_dat_empty[n]),
      .lnk_rx_data(lnk_rx_data[n]), .lnk_rx_valid(lnk_rx_valid[n]), .lnk_rx_last(lnk_rx_last[n]),
      .lnk_rx_vc(lnk_rx_vc[n]), .lnk_rx_credit(lnk_rx_credit[n]),
      .lnk_tx_data(lnk_tx_data[n]), .lnk_tx_valid(lnk_tx_valid[n]), .lnk_tx_last(lnk_tx_last[n]),
      .lnk_tx_vc(lnk_tx_vc[n]), .lnk_tx_ready(lnk_tx_ready[n]), .lnk_tx_credit(lnk_tx_credit[n]));
    // + link (port 0) of node n feeds the - link (port 1) of node n+1
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

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  // scoreboard: one queue of expected packets per (source, destination) flow
  typedef struct { logic [127:0] hdr; logic [127:0] pay [$]; int hops; } pkt_t;
  pkt_t exp_q [R*NI][R*NI][$];
  int   n_sent = 0, n_recv = 0, n_wrap = 0, n_self = 0, n_plus = 0, n_minus = 0;
  int   n_vct_wait = 0, n_rx_full = 0;
  int   sent_from [R][NI], recv_at [R][NI];

  function automatic int ring_dist(int s, int d, output bit minus, output bit wrap);
    int diff = (d - s + R) % R;
    minus = (2 * diff > R);
    if (!minus) begin wrap = (s + diff >= R); return diff; end
    wrap = (s - (R - diff) < 0);
    return R - diff;
  endfunction

  task automatic gen(int n, int p);
    for (int k = 0; k < NPKT; k++) begin
      automatic pkt_t pk;
      automatic comm_hdr_t h = '0;
      automatic int dn = $urandom % R, dp = $urandom % NI, len = $urandom % (MAXL + 1);
      automatic bit minus, wrap;
      automatic int rdist = ring_dist(n, dn, minus, wrap);
      if ($urandom % 4 == 0) len = $urandom % 3;
      h.coord = 15'(dn); h.intratile_port = 5'(dp); h.length = 14'(len);
      h.pid_ch = 17'($urandom); h.pkt_type = 5'd1; h.dest_vaddr = 46'({$urandom, $urandom});
      pk.hdr = h; pk.hops = rdist + 1;
      for (int w = 0; w < len; w++) pk.pay.push_back({$urandom, $urandom, $urandom, $urandom});
      exp_q[n*NI+p][dn*NI+dp].push_back(pk);
      if (rdist == 0) n_self++; else if (minus) n_minus++; else n_plus++;
      if (wrap) n_wrap++;
      for (int w = 0; w < len; w++) begin
        @(negedge clk);
        while (tx_dat_full[n][p]) @(negedge clk);
        tx_dat_push[n][p] = 1; tx_dat_data[n][p] = pk.pay[w];
        @(negedge clk); tx_dat_push[n][p] = 0;
      end
      for (int w = 0; w < 2; w++) begin
        @(negedge clk);
        while (tx_hdr_full[n][p]) @(negedge clk);
        tx_hdr_push[n][p] = 1;
        tx_hdr_data[n][p] = (w == 0) ? pk.hdr : 128'({16'(n*NI+p), 16'(k)});
        @(negedge clk); tx_hdr_push[n][p] = 0;
      end
      sent_from[n][p]++;
      n_sent++;
      repeat ($urandom % 20) @(negedge clk);
    end
  endtask

  task automatic rcv(int n, int p);
    forever begin
      automatic comm_hdr_t h;
      automatic logic [127:0] pay [$];
      automatic logic [127:0] foot;
      automatic int src, seq;
      @(negedge clk);
      while (rx_hdr_empty[n][p]) @(negedge clk);
      // slow receivers now and then, so that RX FIFOs fill up
      if ($urandom % 3 == 0) repeat (100 + $urandom % 200) @(negedge clk);
      h = comm_hdr_t'(rx_hdr_data[n][p]);
      rx_hdr_pop[n][p] = 1; @(negedge clk); rx_hdr_pop[n][p] = 0;
      for (int w = 0; w < int'(h.length); w++) begin
        while (rx_dat_empty[n][p]) @(negedge clk);
        pay.push_back(rx_dat_data[n][p]);
        rx_dat_pop[n][p] = 1; @(negedge clk); rx_dat_pop[n][p] = 0;
      end
      while (rx_hdr_empty[n][p]) @(negedge clk);
      foot = rx_hdr_data[n][p];
      rx_hdr_pop[n][p] = 1; @(negedge clk); rx_hdr_pop[n][p] = 0;
      src = int'(foot[31:16]); seq = int'(foot[15:0]);
      if (src >= R * NI || exp_q[src][n*NI+p].size() == 0) begin
        chk(0, $sformatf("node %0d port %0d unexpected packet from %0d", n, p, src));
      end else begin
        automatic pkt_t e = exp_q[src][n*NI+p].pop_front();
        automatic comm_hdr_t eh = comm_hdr_t'(e.hdr);
        chk(h.length == eh.length && h.coord == eh.coord && h.intratile_port == eh.intratile_port &&
            h.pid_ch == eh.pid_ch && h.dest_vaddr == eh.dest_vaddr && h.pkt_type == eh.pkt_type,
            $sformatf("header fields node %0d port %0d seq %0d", n, p, seq));
        chk(int'(h.num_hops) == e.hops, $sformatf("hops %0d exp %0d", h.num_hops, e.hops));
        chk(h.vchannel == 0, "channel field on ejection");
        chk(pay.size() == e.pay.size(), "payload length");
        for (int w = 0; w < pay.size() && w < e.pay.size(); w++)
          chk(pay[w] == e.pay[w], $sformatf("payload word %0d", w));
      end
      recv_at[n][p]++;
      n_recv++;
    end
  endtask

  // mechanism monitors, one per node
  int vct_wait_n [R], rx_full_n [R];
  for (genvar n = 0; n < R; n++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      for (int i = 0; i < NI + 4; i++)
        if (g_node[n].u.u_switch.in_valid[i] && !g_node[n].u.u_switch.i_busy[i] &&
            !g_node[n].u.u_switch.r_ok[i]) vct_wait_n[n]++;
      for (int p = 0; p < NI; p++)
        if (g_node[n].u.u_switch.out_room[p][0] < 16'(MAXL + 2)) rx_full_n[n]++;
    end
  end

  task automatic cfg_write(int n, int a, logic [31:0] d);
    @(negedge clk); cfg_we[n] = 1; cfg_addr[n] = 6'(a); cfg_wdata[n] = d;
    @(negedge clk); cfg_we[n] = 0;
  endtask
  task automatic cfg_read(int n, int a, output logic [31:0] d);
    cfg_addr[n] = 6'(a);
    #1 d = cfg_rdata[n];
  endtask

  initial begin
    int vsw;
    logic [31:0] v, v2;
    rst_n = 0;
    for (int n = 0; n < R; n++) begin
      vct_wait_n[n] = 0; rx_full_n[n] = 0;
      cfg_we[n] = 0; cfg_addr[n] = 0; cfg_wdata[n] = 0;
      tx_hdr_push[n] = 0; tx_dat_push[n] = 0; rx_hdr_pop[n] = 0; rx_dat_pop[n] = 0;
      for (int p = 0; p < NI; p++) begin
        tx_hdr_data[n][p] = 0; tx_dat_data[n][p] = 0; sent_from[n][p] = 0; recv_at[n][p] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < R; n++) begin
      cfg_write(n, 0, 32'(n));
      cfg_write(n, 1, {17'd0, 5'd1, 5'd1, 5'(R)});
    end
    @(negedge clk);
    for (int n = 0; n < R; n++) begin
      cfg_read(n, 0, v); chk(v == 32'(n), "coordinate register");
      cfg_read(n, 1, v); chk(v == {17'd0, 5'd1, 5'd1, 5'(R)}, "size register");
    end
    for (int n = 0; n < R; n++)
      for (int p = 0; p < NI; p++)
        fork
          automatic int nn = n, pp = p;
          rcv(nn, pp);
        join_none
    fork
      begin
        for (int n = 0; n < R; n++)
          for (int p = 0; p < NI; p++)
            fork
              automatic int nn = n, pp = p;
              gen(nn, pp);
            join_none
        wait fork;
      end
    join
    wait (n_recv == n_sent);
    repeat (10) @(negedge clk);
    vsw = 0;
    for (int n = 0; n < R; n++) begin n_vct_wait += vct_wait_n[n]; n_rx_full += rx_full_n[n]; end
    for (int n = 0; n < R; n++) begin
      cfg_read(n, 2, v); vsw += int'(v);
      for (int p = 0; p < NI; p++) begin
        cfg_read(n, 16 + 2 * p, v); chk(v == 32'(sent_from[n][p]), "intra tx packet counter");
        cfg_read(n, 17 + 2 * p, v); chk(v == 32'(recv_at[n][p]), "intra rx packet counter");
      end
      cfg_read(n, 32, v); cfg_read((n + 1) % R, 35, v2);
      chk(v == v2 && v != 0, "link packet counters");
    end
    chk(vsw == n_wrap, $sformatf("dateline switches %0d, wrap crossings %0d", vsw, n_wrap));
    for (int s = 0; s < R * NI; s++)
      for (int d = 0; d < R * NI; d++)
        chk(exp_q[s][d].size() == 0, "all packets delivered");
    $display("mechanisms: sent=%0d self=%0d plus=%0d minus=%0d dateline=%0d vct_wait_cycles=%0d rx_low_room_cycles=%0d",
             n_sent, n_self, n_plus, n_minus, vsw, n_vct_wait, n_rx_full);
    chk(vsw > 0, "mechanism: dateline VC switch");
    chk(n_vct_wait > 0, "mechanism: virtual cut-through wait");
    chk(n_self > 0 && n_plus > 0 && n_minus > 0, "mechanism: own node and both directions");
    chk(n_rx_full > 0, "mechanism: receive FIFO filling");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog: sent=%0d received=%0d", n_sent, n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
