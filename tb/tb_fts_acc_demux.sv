// tb_fts_acc_demux: random stimulus on the command demultiplexer; only the
// addressed accelerator may see tvalid, data and tlast are forwarded, and
// tready comes from the addressed accelerator.
module tb_fts_acc_demux;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0] s_tdata, m_tdata;
  logic        s_tvalid, s_tready, s_tlast, m_tlast;
  logic [3:0]  s_tdest;
  logic [15:0] m_tvalid, m_tready;

  fts_acc_demux dut (.*);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      s_tdata = {$urandom, $urandom}; s_tvalid = 1'($urandom); s_tlast = 1'($urandom);
      s_tdest = 4'($urandom); m_tready = 16'($urandom);
      #1;
      checks++;
      if (m_tvalid !== (s_tvalid ? (16'd1 << s_tdest) : 16'd0) || m_tdata !== s_tdata ||
          m_tlast !== s_tlast || s_tready !== m_tready[s_tdest]) begin
        failures++;
        if (failures < 10) $display("FAIL dest %0d valid %h ready %b", s_tdest, m_tvalid, s_tready);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
