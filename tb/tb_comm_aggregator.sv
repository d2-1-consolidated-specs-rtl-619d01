// tb_comm_aggregator: random messages (1..62 words, random destination in
// TDEST and channel id in TID) are streamed into the aggregator with random
// gaps, while the FIFO side reports "full" at random. Checks: every payload
// word reaches the data FIFO in order; after each message exactly one header
// then one footer go to the header/footer FIFO; the header carries the
// coordinate, port, channel id, length and packet type, VC 0 and hop count 0;
// the footer carries the running sequence number; nothing is pushed while the
// FIFO is full. Mechanism: stream held while header/footer are written or
// while a FIFO is full.
module tb_comm_aggregator;
  import comm_pkg::*;
  localparam int NMSG = 300;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;
  logic [127:0] s_axis_tdata, hdr_data, dat_data;
  logic s_axis_tvalid, s_axis_tready, s_axis_tlast, hdr_push, hdr_full, dat_push, dat_full;
  logic [19:0] s_axis_tdest;
  logic [16:0] s_axis_tid;

  comm_aggregator dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  logic [127:0] exp_dat [$];
  logic [127:0] exp_hdr [$];
  int n_held = 0, n_hdr_words = 0;
  always @(negedge clk) begin hdr_full = ($urandom % 4 == 0); dat_full = ($urandom % 5 == 0); end

  always @(posedge clk) if (rst_n) begin
    if (s_axis_tvalid && !s_axis_tready) n_held++;
    if (dat_push) begin
      chk(!dat_full, "no data push while full");
      chk(exp_dat.size() > 0 && dat_data == exp_dat[0], "data word");
      void'(exp_dat.pop_front());
    end
    if (hdr_push) begin
      chk(!hdr_full, "no header push while full");
      chk(exp_hdr.size() > 0 && hdr_data == exp_hdr[0], $sformatf("header/footer word %0d", n_hdr_words));
      void'(exp_hdr.pop_front());
      n_hdr_words++;
    end
  end

  initial begin
    rst_n = 0; s_axis_tvalid = 0; s_axis_tlast = 0; s_axis_tdata = 0; s_axis_tdest = 0; s_axis_tid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NMSG; k++) begin
      automatic int len = 1 + $urandom % 62;
      automatic logic [19:0] dest = 20'($urandom);
      automatic logic [16:0] tid = 17'($urandom);
      automatic comm_hdr_t h = '0;
      h.coord = dest[19:5]; h.intratile_port = dest[4:0]; h.pid_ch = tid;
      h.length = 14'(len); h.pkt_type = 5'd1;
      for (int w = 0; w < len; w++) begin
        automatic logic [127:0] d = {$urandom, $urandom, $urandom, $urandom};
        exp_dat.push_back(d);
        if (w == len - 1) begin exp_hdr.push_back(h); exp_hdr.push_back(128'(k)); end
        @(negedge clk);
        while ($urandom % 4 == 0) begin s_axis_tvalid = 0; @(negedge clk); end
        s_axis_tvalid = 1; s_axis_tdata = d; s_axis_tlast = (w == len - 1);
        s_axis_tdest = dest; s_axis_tid = tid;
        #1; while (!s_axis_tready) begin @(negedge clk); #1; end
      end
      @(negedge clk); s_axis_tvalid = 0;
    end
    repeat (30) @(negedge clk);
    chk(exp_dat.size() == 0 && exp_hdr.size() == 0, "everything written");
    $display("mechanisms: held_cycles=%0d header_words=%0d", n_held, n_hdr_words);
    chk(n_held > 0, "mechanism: stream held");
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
