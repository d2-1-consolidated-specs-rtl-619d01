// comm_internode_if: one InterNode port of the Routing IP, facing one
// physical link of the torus (through the Network IP).
// RX: words arriving from the link carry the virtual channel they travel on
// (lnk_rx_vc); each goes to that channel's FIFO (VCH0 or VCH1), so a packet
// blocked on one channel cannot block the other. The two channels are offered
// to the switch as two independent packet streams. Every word popped by the
// switch returns one credit to the sender on the far side (lnk_rx_credit).
// TX: the switch's packet stream is sent on the link with its channel number.
// Per channel, a credit counter tracks the free space of the far side's FIFO
// (starting at VC_DEPTH, minus one per word sent, plus one per returned
// credit); tx_room tells the switch how many words (header, payload and
// footer together) the far side can still take, so the switch only starts
// packets that fit whole.
// Two virtual channels per physical link are the IP's deadlock-avoidance
// scheme; the credit protocol on the link is this design's choice (the link
// layer itself belongs to the Network IP).
module comm_internode_if
  import comm_pkg::*;
#(
  parameter int unsigned VC_DEPTH = 64,
  localparam int unsigned CW = $clog2(VC_DEPTH) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // link side, receive
  input  logic [DATA_W-1:0] lnk_rx_data,
  input  logic              lnk_rx_valid,
  input  logic              lnk_rx_last,
  input  logic              lnk_rx_vc,
  output logic [1:0]        lnk_rx_credit,
  // link side, transmit
  output logic [DATA_W-1:0] lnk_tx_data,
  output logic              lnk_tx_valid,
  output logic              lnk_tx_last,
  output logic              lnk_tx_vc,
  input  logic              lnk_tx_ready,
  input  logic [1:0]        lnk_tx_credit,
  // switch side: the two receive channels
  output logic [DATA_W-1:0] vc_data [2],
  output logic [1:0]        vc_valid,
  output logic [1:0]        vc_last,
  input  logic [1:0]        vc_ready,
  // switch side: transmit
  input  logic [DATA_W-1:0] sw_tx_data,
  input  logic              sw_tx_valid,
  input  logic              sw_tx_last,
  input  logic              sw_tx_vc,
  output logic              sw_tx_ready,
  output logic [15:0]       tx_room [2],
  // performance counters
  output logic [31:0]       perf_tx_pkts,
  output logic [31:0]       perf_rx_pkts
);
  for (genvar v = 0; v < 2; v++) begin : g_vc
    logic [DATA_W:0] q;
    logic            empty, full;
    logic [CW-1:0]   cnt, sp;
    comm_fifo #(.W(DATA_W + 1), .DEPTH(VC_DEPTH)) u_vch (
      .clk, .rst_n,
      .push(lnk_rx_valid && (lnk_rx_vc == 1'(v))), .wr_data({lnk_rx_last, lnk_rx_data}),
      .pop(vc_ready[v] && !empty), .rd_data(q),
      .empty, .full, .count(cnt), .space(sp));
    assign vc_data[v]       = q[DATA_W-1:0];
    assign vc_last[v]       = q[DATA_W];
    assign vc_valid[v]      = !empty;
    assign lnk_rx_credit[v] = vc_ready[v] && !empty;

    // credits for the far side's channel v
    logic [CW-1:0] credits;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) credits <= CW'(VC_DEPTH);
      else credits <= credits
                      - CW'(lnk_tx_valid && lnk_tx_ready && (lnk_tx_vc == 1'(v)))
                      + CW'(lnk_tx_credit[v]);
    end
    assign tx_room[v] = 16'(credits);
  end

  assign lnk_tx_data  = sw_tx_data;
  assign lnk_tx_valid = sw_tx_valid;
  assign lnk_tx_last  = sw_tx_last;
  assign lnk_tx_vc    = sw_tx_vc;
  assign sw_tx_ready  = lnk_tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf_tx_pkts <= '0;
      perf_rx_pkts <= '0;
    end else begin
      if (lnk_tx_valid && lnk_tx_ready && lnk_tx_last) perf_tx_pkts <= perf_tx_pkts + 1;
      if (lnk_rx_valid && lnk_rx_last) perf_rx_pkts <= perf_rx_pkts + 1;
    end
  end
endmodule
