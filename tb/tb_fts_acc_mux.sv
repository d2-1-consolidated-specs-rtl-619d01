// tb_fts_acc_mux: 16 accelerator models each send several 2-word
// Finished-task packets ({acc, seq} in both words) with random gaps, while the
// sink applies random back-pressure. Checks that every packet arrives once,
// whole, in order per source, tagged with the right m_tid, never interleaved
// with another source, and that when all sources request at once the grants
// go round robin.
module tb_fts_acc_mux;
  localparam int N = 16, PKTS = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n;
  logic [63:0] s_tdata [N];
  logic [N-1:0] s_tvalid, s_tready, s_tlast;
  logic [63:0] m_tdata;
  logic        m_tvalid, m_tready, m_tlast;
  logic [3:0]  m_tid;

  fts_acc_mux dut (.*);

  int sent_seq [N];
  int word_idx [N];
  int got_seq  [N];
  int rx_word;
  int cur_src;
  int total;
  int order [$];

  // sources
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        if (s_tvalid[i] && s_tready[i]) begin
          if (word_idx[i] == 1) begin word_idx[i] <= 0; sent_seq[i] <= sent_seq[i] + 1; end
          else word_idx[i] <= 1;
        end
      end
    end
  end
  always_comb
    for (int i = 0; i < N; i++) begin
      s_tdata[i] = {32'(i), 32'(sent_seq[i])};
      s_tlast[i] = (word_idx[i] == 1);
    end

  // sink
  always @(posedge clk) begin
    if (rst_n && m_tvalid && m_tready) begin
      checks++;
      if (m_tdata[63:32] != 32'(m_tid) || int'(m_tdata[31:0]) != got_seq[m_tid] ||
          (rx_word == 1 && int'(m_tid) != cur_src) || m_tlast != (rx_word == 1)) begin
        failures++;
        if (failures < 10) $display("FAIL word from %0d data %h word %0d", m_tid, m_tdata, rx_word);
      end
      if (rx_word == 0) begin cur_src = int'(m_tid); rx_word = 1; order.push_back(int'(m_tid)); end
      else begin rx_word = 0; got_seq[m_tid]++; total++; end
    end
  end

  initial begin
    rst_n = 0; s_tvalid = '0; m_tready = 0; rx_word = 0; total = 0;
    for (int i = 0; i < N; i++) begin sent_seq[i] = 0; word_idx[i] = 0; got_seq[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: all sources request together, sink always ready -> round robin
    @(negedge clk);
    s_tvalid = '1; m_tready = 1;
    while (total < N) @(negedge clk);
    s_tvalid = '0;
    checks++;
    for (int k = 0; k < N; k++) if (order[k] != k) begin
      failures++; $display("FAIL round-robin order position %0d got %0d", k, order[k]); break;
    end
    // phase 2: random traffic
    while (total < N * PKTS) begin
      @(negedge clk);
      m_tready = 1'($urandom);
      for (int i = 0; i < N; i++)
        if (word_idx[i] == 1) s_tvalid[i] = 1'b1;                  // keep packet going
        else if (sent_seq[i] < PKTS) s_tvalid[i] = ($urandom % 4 == 0);
        else s_tvalid[i] = 1'b0;
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got_seq[i] != PKTS) begin failures++; $display("FAIL source %0d got %0d", i, got_seq[i]); end
    end
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
