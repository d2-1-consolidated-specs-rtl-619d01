// fts_acc_demux: the "cmd to accelerators" demultiplexer of the Fast Task
// Scheduler. One AXI stream from Cmd in is steered to the accelerator named by
// s_tdest; tdata and tlast are broadcast and only the addressed accelerator
// sees tvalid. Purely combinational: no added latency. Its role comes from the
// FTS block diagram; the broadcast implementation is this design's choice.
module fts_acc_demux #(
  parameter int unsigned N_ACC = 16,
  parameter int unsigned W     = 64,
  localparam int unsigned AIW  = (N_ACC > 1) ? $clog2(N_ACC) : 1
) (
  input  logic [W-1:0]     s_tdata,
  input  logic             s_tvalid,
  output logic             s_tready,
  input  logic             s_tlast,
  input  logic [AIW-1:0]   s_tdest,
  output logic [W-1:0]     m_tdata,
  output logic [N_ACC-1:0] m_tvalid,
  input  logic [N_ACC-1:0] m_tready,
  output logic             m_tlast
);
  assign m_tdata = s_tdata;
  assign m_tlast = s_tlast;
  always_comb begin
    m_tvalid = '0;
    m_tvalid[s_tdest] = s_tvalid;
  end
  assign s_tready = m_tready[s_tdest];
endmodule
