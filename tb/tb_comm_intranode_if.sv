// tb_comm_intranode_if: IntraNode interface with its switch side looped back
// (TX stream -> RX stream) through a random-ready link. The task side writes
// packets (payload into the TX data FIFO, then header and footer into the
// TX header/footer FIFO) and a reader drains the RX FIFOs with random stalls.
// Checks: the TX stream is header, LENGTH payload words, footer with LAST on
// the footer only; the same packet comes back split into the RX FIFOs; the
// room figure never lets the loop overflow (FIFO assertions); packet and word
// counters. Mechanisms: back-pressure (RX FIFO full, stream held) and
// zero-length packets must occur.
module tb_comm_intranode_if;
  import comm_pkg::*;
  localparam int NPKT = 200;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;
  logic tx_hdr_push, tx_hdr_full, tx_dat_push, tx_dat_full;
  logic rx_hdr_pop, rx_hdr_empty, rx_dat_pop, rx_dat_empty;
  logic [127:0] tx_hdr_data, tx_dat_data, rx_hdr_data, rx_dat_data, sw_tx_data, sw_rx_data;
  logic sw_tx_valid, sw_tx_last, sw_tx_ready, sw_rx_valid, sw_rx_last, sw_rx_ready;
  logic [15:0] rx_room;
  logic [31:0] perf_tx_pkts, perf_rx_pkts, perf_tx_words, perf_rx_words;
  logic link_en;

  comm_intranode_if dut (.*);

  // loop: the stream goes back in only when the RX side can take it
  assign sw_rx_data  = sw_tx_data;
  assign sw_rx_last  = sw_tx_last;
  assign sw_rx_valid = sw_tx_valid && link_en && sw_rx_ready;
  assign sw_tx_ready = link_en && sw_rx_ready;
  always @(negedge clk) link_en = ($urandom % 4 != 0);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  logic [127:0] exp_stream [$];
  int n_words = 0, n_zero = 0, n_full = 0, n_recv = 0, in_pkt = 0;
  bit first = 1;

  always @(posedge clk) if (rst_n) begin
    if (sw_tx_valid && !sw_tx_ready && !sw_rx_ready) n_full++;
    if (sw_tx_valid && sw_tx_ready) begin
      automatic logic [127:0] e = exp_stream.pop_front();
      chk(sw_tx_data == e, "TX stream word");
      if (first) in_pkt = int'(sw_tx_data[61:48]) + 1;
      else in_pkt--;
      chk(sw_tx_last == (!first && in_pkt == 0), "TX LAST position");
      first = sw_tx_last;
      n_words++;
    end
  end

  initial begin
    rst_n = 0;
    tx_hdr_push = 0; tx_dat_push = 0; rx_hdr_pop = 0; rx_dat_pop = 0;
    tx_hdr_data = 0; tx_dat_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      for (int k = 0; k < NPKT; k++) begin
        automatic comm_hdr_t h = 128'({$urandom, $urandom, $urandom, $urandom});
        automatic logic [127:0] foot = 128'(k);
        automatic int len = ($urandom % 5 == 0) ? 0 : 1 + $urandom % 62;
        h.length = 14'(len);
        if (len == 0) n_zero++;
        exp_stream.push_back(h);
        for (int w = 0; w < len; w++) begin
          automatic logic [127:0] d = {$urandom, $urandom, $urandom, 16'(w), 16'(k)};
          exp_stream.push_back(d);
          @(negedge clk); while (tx_dat_full) @(negedge clk);
          tx_dat_push = 1; tx_dat_data = d; @(negedge clk); tx_dat_push = 0;
        end
        exp_stream.push_back(foot);
        @(negedge clk); while (tx_hdr_full) @(negedge clk);
        tx_hdr_push = 1; tx_hdr_data = h; @(negedge clk);
        while (tx_hdr_full) @(negedge clk);
        tx_hdr_data = foot; @(negedge clk); tx_hdr_push = 0;
      end
      for (int k = 0; k < NPKT; k++) begin
        automatic comm_hdr_t h;
        @(negedge clk); while (rx_hdr_empty) @(negedge clk);
        if ($urandom % 4 == 0) repeat (150) @(negedge clk);
        h = comm_hdr_t'(rx_hdr_data);
        rx_hdr_pop = 1; @(negedge clk); rx_hdr_pop = 0;
        for (int w = 0; w < int'(h.length); w++) begin
          while (rx_dat_empty) @(negedge clk);
          chk(rx_dat_data[31:0] == {16'(w), 16'(k)}, "RX payload word");
          rx_dat_pop = 1; @(negedge clk); rx_dat_pop = 0;
        end
        while (rx_hdr_empty) @(negedge clk);
        chk(rx_hdr_data == 128'(k), "RX footer");
        rx_hdr_pop = 1; @(negedge clk); rx_hdr_pop = 0;
        n_recv++;
      end
    join
    repeat (5) @(negedge clk);
    chk(exp_stream.size() == 0, "whole stream sent");
    chk(perf_tx_pkts == NPKT && perf_rx_pkts == NPKT, "packet counters");
    chk(perf_tx_words == 32'(n_words) && perf_rx_words == 32'(n_words), "word counters");
    $display("mechanisms: packets=%0d zero_length=%0d rx_full_cycles=%0d", n_recv, n_zero, n_full);
    chk(n_zero > 0, "mechanism: zero-length packet");
    chk(n_full > 0, "mechanism: RX back-pressure");
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
