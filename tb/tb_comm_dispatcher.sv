// tb_comm_dispatcher: models the RX header/footer FIFO and RX data FIFO of an
// IntraNode port as queues filled with random packets (including zero-length
// ones), arriving at random times; the four output channels accept words at
// random. Checks: each packet's payload appears, in order, on the channel
// given by its channel id modulo 4, TLAST on its last word only, no other
// channel valid at the same time, nothing for zero-length packets, footers
// consumed, packet counter. Mechanisms: all channels used, zero-length packet,
// channel back-pressure.
module tb_comm_dispatcher;
  import comm_pkg::*;
  localparam int NPKT = 400, NCH = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;
  logic hdr_pop, hdr_empty, dat_pop, dat_empty, m_axis_tlast;
  logic [127:0] hdr_data, dat_data, m_axis_tdata;
  logic [NCH-1:0] m_axis_tvalid, m_axis_tready;
  logic [31:0] pkt_count;

  comm_dispatcher dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  logic [127:0] hq [$], dq [$];
  logic [127:0] exp_w [NCH][$];
  bit           exp_l [NCH][$];
  int n_ch [NCH], n_zero = 0, n_bp = 0;

  assign hdr_empty = (hq.size() == 0);
  assign dat_empty = (dq.size() == 0);
  assign hdr_data  = hdr_empty ? '0 : hq[0];
  assign dat_data  = dat_empty ? '0 : dq[0];
  always @(negedge clk) m_axis_tready = NCH'($urandom);

  always @(posedge clk) if (rst_n) begin
    chk($countones(m_axis_tvalid) <= 1, "one channel at a time");
    for (int c = 0; c < NCH; c++)
      if (m_axis_tvalid[c]) begin
        if (!m_axis_tready[c]) n_bp++;
        else begin
          chk(exp_w[c].size() > 0 && m_axis_tdata == exp_w[c][0], $sformatf("channel %0d word", c));
          chk(exp_l[c].size() > 0 && m_axis_tlast == exp_l[c][0], $sformatf("channel %0d LAST", c));
          void'(exp_w[c].pop_front()); void'(exp_l[c].pop_front());
        end
      end
    if (hdr_pop) void'(hq.pop_front());
    if (dat_pop) void'(dq.pop_front());
  end

  initial begin
    rst_n = 0; n_ch = '{0, 0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NPKT; k++) begin
      automatic comm_hdr_t h = 128'({$urandom, $urandom, $urandom, $urandom});
      automatic int len = ($urandom % 6 == 0) ? 0 : 1 + $urandom % 62;
      automatic int c;
      h.length = 14'(len);
      c = int'(h.pid_ch) % NCH;
      n_ch[c]++;
      if (len == 0) n_zero++;
      @(negedge clk);
      for (int w = 0; w < len; w++) begin
        automatic logic [127:0] d = {$urandom, $urandom, $urandom, $urandom};
        dq.push_back(d); exp_w[c].push_back(d); exp_l[c].push_back(w == len - 1);
      end
      hq.push_back(h); hq.push_back(128'(k));
      while (hq.size() > 6) @(negedge clk);
    end
    while (hq.size() > 0 || dq.size() > 0) @(negedge clk);
    repeat (5) @(negedge clk);
    for (int c = 0; c < NCH; c++) chk(exp_w[c].size() == 0, "all words out");
    chk(pkt_count == NPKT, "packet counter");
    $display("mechanisms: ch=%0d/%0d/%0d/%0d zero_length=%0d backpressure=%0d", n_ch[0], n_ch[1], n_ch[2], n_ch[3], n_zero, n_bp);
    chk(n_ch[0] > 0 && n_ch[1] > 0 && n_ch[2] > 0 && n_ch[3] > 0, "mechanism: all channels");
    chk(n_zero > 0, "mechanism: zero-length packet");
    chk(n_bp > 0, "mechanism: channel back-pressure");
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
