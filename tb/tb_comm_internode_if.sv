// tb_comm_internode_if: InterNode interface with its link looped back
// (transmit -> receive, returned credits -> credit inputs). A switch model
// sends packets on a random virtual channel, starting one only when tx_room
// says the whole packet (header + payload + footer) fits; the link accepts
// words at random. A reader takes words from the two receive channels with
// random stalls. Checks: each channel delivers its own packets in order with
// LAST on the footer; credits never overrun the receive FIFOs (FIFO
// assertions); after draining, tx_room is back to the FIFO depth; packet
// counters. Mechanisms: both channels used, packets held for credits.
module tb_comm_internode_if;
  import comm_pkg::*;
  localparam int NPKT = 300, DEPTH = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;
  logic [127:0] lnk_rx_data, lnk_tx_data, sw_tx_data;
  logic lnk_rx_valid, lnk_rx_last, lnk_rx_vc, lnk_tx_valid, lnk_tx_last, lnk_tx_vc, lnk_tx_ready;
  logic [1:0] lnk_rx_credit, lnk_tx_credit, vc_valid, vc_last, vc_ready;
  logic [127:0] vc_data [2];
  logic sw_tx_valid, sw_tx_last, sw_tx_vc, sw_tx_ready;
  logic [15:0] tx_room [2];
  logic [31:0] perf_tx_pkts, perf_rx_pkts;

  comm_internode_if dut (.*);

  assign lnk_rx_data   = lnk_tx_data;
  assign lnk_rx_last   = lnk_tx_last;
  assign lnk_rx_vc     = lnk_tx_vc;
  assign lnk_rx_valid  = lnk_tx_valid && lnk_tx_ready;
  assign lnk_tx_credit = lnk_rx_credit;
  always @(negedge clk) begin
    lnk_tx_ready = ($urandom % 4 != 0);
    vc_ready     = 2'($urandom) & {2{($urandom % 8 != 0)}};
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  logic [127:0] exp_q [2][$];
  logic         exp_l [2][$];
  int n_vc [2], n_wait = 0, n_got = 0;

  always @(posedge clk) if (rst_n)
    for (int v = 0; v < 2; v++)
      if (vc_valid[v] && vc_ready[v]) begin
        chk(exp_q[v].size() > 0 && vc_data[v] == exp_q[v][0], $sformatf("VC%0d word", v));
        chk(exp_l[v].size() > 0 && vc_last[v] == exp_l[v][0], $sformatf("VC%0d LAST", v));
        void'(exp_q[v].pop_front()); void'(exp_l[v].pop_front());
        if (vc_last[v]) n_got++;
      end

  initial begin
    rst_n = 0; sw_tx_valid = 0; sw_tx_last = 0; sw_tx_vc = 0; sw_tx_data = 0; n_vc = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NPKT; k++) begin
      automatic bit v = 1'($urandom);
      automatic int len = $urandom % 63;
      automatic comm_hdr_t h = 128'({$urandom, $urandom, $urandom, $urandom});
      h.length = 14'(len);
      @(negedge clk);
      if (tx_room[v] < 16'(len + 2)) n_wait++;
      while (tx_room[v] < 16'(len + 2)) @(negedge clk);
      n_vc[v]++;
      for (int w = 0; w < len + 2; w++) begin
        sw_tx_valid = 1; sw_tx_vc = v; sw_tx_last = (w == len + 1);
        sw_tx_data = (w == 0) ? h : {$urandom, $urandom, 32'(w), 32'(k)};
        exp_q[v].push_back(sw_tx_data); exp_l[v].push_back(sw_tx_last);
        #1; while (!sw_tx_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
      sw_tx_valid = 0;
    end
    wait (n_got == NPKT);
    repeat (10) @(negedge clk);
    chk(tx_room[0] == DEPTH && tx_room[1] == DEPTH, "all credits returned");
    chk(perf_tx_pkts == NPKT && perf_rx_pkts == NPKT, "packet counters");
    $display("mechanisms: vc0=%0d vc1=%0d credit_waits=%0d", n_vc[0], n_vc[1], n_wait);
    chk(n_vc[0] > 0 && n_vc[1] > 0, "mechanism: both channels");
    chk(n_wait > 0, "mechanism: packet held for credits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
