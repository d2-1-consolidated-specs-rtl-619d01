// fts_acc_mux: the "cmd from accelerators" multiplexer of the Fast Task
// Scheduler. N_ACC AXI streams (one per accelerator, Finished-task commands)
// are merged into one towards Cmd out. A round-robin arbiter picks the next
// requesting accelerator after the last one served and keeps the grant until
// the packet's tlast word has been transferred, so packets never interleave.
// m_tid carries the index of the accelerator the packet came from.
// Arbitration takes effect in the cycle after a packet ends (the output is
// registered only in its grant state, data passes combinationally).
// The block's role comes from the FTS diagram; round robin is this design's
// choice (the FTS only expects short bursts of contention here).
module fts_acc_mux #(
  parameter int unsigned N_ACC = 16,
  parameter int unsigned W     = 64,
  localparam int unsigned AIW  = (N_ACC > 1) ? $clog2(N_ACC) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     s_tdata [N_ACC],
  input  logic [N_ACC-1:0] s_tvalid,
  output logic [N_ACC-1:0] s_tready,
  input  logic [N_ACC-1:0] s_tlast,
  output logic [W-1:0]     m_tdata,
  output logic             m_tvalid,
  input  logic             m_tready,
  output logic             m_tlast,
  output logic [AIW-1:0]   m_tid
);
  logic           locked;
  logic [AIW-1:0] grant, last;
  logic [AIW-1:0] pick;
  logic           any;

  // next requester after 'last', in round-robin order
  always_comb begin
    pick = last;
    any  = 1'b0;
    for (int i = 1; i <= int'(N_ACC); i++) begin
      automatic int c = (int'(last) + i) % int'(N_ACC);
      if (!any && s_tvalid[c]) begin
        pick = AIW'(c);
        any  = 1'b1;
      end
    end
  end

  logic [AIW-1:0] sel;
  assign sel      = locked ? grant : pick;
  assign m_tid    = sel;
  assign m_tdata  = s_tdata[sel];
  assign m_tlast  = s_tlast[sel];
  assign m_tvalid = locked ? s_tvalid[grant] : any;
  always_comb begin
    s_tready = '0;
    s_tready[sel] = m_tready && (locked || any);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      grant  <= '0;
      last   <= AIW'(N_ACC - 1);
    end else if (m_tvalid && m_tready) begin
      if (m_tlast) begin
        locked <= 1'b0;
        last   <= sel;
      end else begin
        locked <= 1'b1;
        grant  <= sel;
      end
    end else if (!locked && any) begin
      locked <= 1'b1;
      grant  <= pick;
    end
  end

  // a granted packet stays on the same source until tlast
  assert property (@(posedge clk) disable iff (!rst_n)
    locked && !(m_tvalid && m_tready && m_tlast) |=> m_tid == $past(m_tid));
endmodule
