// comm_routing_ip: the Routing IP of the Communication IP, a packet router
// for an n-D torus of FPGAs (1-D ring by default).
// It joins N_INTRA IntraNode ports (local tasks), 2*DIMS InterNode ports (one
// per direction per torus dimension, each with two receive virtual channels)
// and the switch (dimension-order router + round-robin arbiter, virtual
// cut-through) with a small block of configuration/status registers.
// Task side, per IntraNode port j: TX header/footer and data FIFO write ports,
// RX header/footer and data FIFO read ports. Link side, per InterNode port p
// (p = 2*dim + dir, dir 0 = +, 1 = -): a word stream with its VC number and
// per-VC credit returns in each direction; the serial link (Network IP) is
// outside this block.
// Registers (cfg_*, 32-bit, write in the cycle cfg_we is high, read
// combinationally): 0 = this node's coordinate {Z,Y,X} (5 bits each), 1 = the
// torus size per dimension {Z,Y,X}, 2 = number of dateline VC switches,
// 16+2j / 17+2j = packets sent / received by IntraNode port j,
// 32+2p / 33+2p = packets sent / received on InterNode port p.
// Latency through one node: a packet's header is granted one cycle after it
// reaches the head of its input FIFO, then one word per cycle.
// The partition (IntraNode IF, InterNode IF, switch, registers) and the
// defaults (2 IntraNode ports, 2 InterNode ports, 128-bit datapath) follow
// the IP's intermediate-release specification; the register map is this
// design's choice.
module comm_routing_ip
  import comm_pkg::*;
#(
  parameter int unsigned N_INTRA    = 2,
  parameter int unsigned DIMS       = 1,
  parameter int unsigned FIFO_DEPTH = 64,
  localparam int unsigned N_INTER = 2 * DIMS,
  localparam int unsigned N_IN    = N_INTRA + 2 * N_INTER,
  localparam int unsigned N_OUT   = N_INTRA + N_INTER
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration / status registers
  input  logic              cfg_we,
  input  logic [5:0]        cfg_addr,
  input  logic [31:0]       cfg_wdata,
  output logic [31:0]       cfg_rdata,
  // IntraNode ports, task side
  input  logic [N_INTRA-1:0] tx_hdr_push,
  input  logic [DATA_W-1:0]  tx_hdr_data [N_INTRA],
  output logic [N_INTRA-1:0] tx_hdr_full,
  input  logic [N_INTRA-1:0] tx_dat_push,
  input  logic [DATA_W-1:0]  tx_dat_data [N_INTRA],
  output logic [N_INTRA-1:0] tx_dat_full,
  input  logic [N_INTRA-1:0] rx_hdr_pop,
  output logic [DATA_W-1:0]  rx_hdr_data [N_INTRA],
  output logic [N_INTRA-1:0] rx_hdr_empty,
  input  logic [N_INTRA-1:0] rx_dat_pop,
  output logic [DATA_W-1:0]  rx_dat_data [N_INTRA],
  output logic [N_INTRA-1:0] rx_dat_empty,
  // InterNode ports, link side
  input  logic [DATA_W-1:0]  lnk_rx_data  [N_INTER],
  input  logic [N_INTER-1:0] lnk_rx_valid,
  input  logic [N_INTER-1:0] lnk_rx_last,
  input  logic [N_INTER-1:0] lnk_rx_vc,
  output logic [1:0]         lnk_rx_credit [N_INTER],
  output logic [DATA_W-1:0]  lnk_tx_data  [N_INTER],
  output logic [N_INTER-1:0] lnk_tx_valid,
  output logic [N_INTER-1:0] lnk_tx_last,
  output logic [N_INTER-1:0] lnk_tx_vc,
  input  logic [N_INTER-1:0] lnk_tx_ready,
  input  logic [1:0]         lnk_tx_credit [N_INTER]
);
  // ---------------- registers ----------------
  logic [14:0] reg_coord, reg_size;
  logic [COORD_W-1:0] my_coord [MAX_DIMS];
  logic [COORD_W-1:0] dim_size [MAX_DIMS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_coord <= '0;
      reg_size  <= {3{5'd1}};
    end else if (cfg_we) begin
      if (cfg_addr == 6'd0) reg_coord <= cfg_wdata[14:0];
      if (cfg_addr == 6'd1) reg_size  <= cfg_wdata[14:0];
    end
  end
  always_comb
    for (int d = 0; d < int'(MAX_DIMS); d++) begin
      my_coord[d] = reg_coord[d*COORD_W +: COORD_W];
      dim_size[d] = reg_size[d*COORD_W +: COORD_W];
    end

  // ---------------- switch wiring ----------------
  logic [DATA_W-1:0] in_data  [N_IN];
  logic [N_IN-1:0]   in_valid, in_last, in_ready;
  logic [DATA_W-1:0] out_data [N_OUT];
  logic [N_OUT-1:0]  out_valid, out_last, out_vc, out_ready;
  logic [15:0]       out_room [N_OUT][2];
  logic [31:0]       vc_switch_count;
  logic [31:0]       intra_tx_pkts [N_INTRA], intra_rx_pkts [N_INTRA];
  logic [31:0]       inter_tx_pkts [N_INTER], inter_rx_pkts [N_INTER];

  for (genvar j = 0; j < int'(N_INTRA); j++) begin : g_intra
    logic [15:0] room;
    logic [31:0] txw, rxw;
    comm_intranode_if #(.FIFO_DEPTH(FIFO_DEPTH)) u_if (
      .clk, .rst_n,
      .tx_hdr_push(tx_hdr_push[j]), .tx_hdr_data(tx_hdr_data[j]), .tx_hdr_full(tx_hdr_full[j]),
      .tx_dat_push(tx_dat_push[j]), .tx_dat_data(tx_dat_data[j]), .tx_dat_full(tx_dat_full[j]),
      .rx_hdr_pop(rx_hdr_pop[j]), .rx_hdr_data(rx_hdr_data[j]), .rx_hdr_empty(rx_hdr_empty[j]),
      .rx_dat_pop(rx_dat_pop[j]), .rx_dat_data(rx_dat_data[j]), .rx_dat_empty(rx_dat_empty[j]),
      .sw_tx_data(in_data[j]), .sw_tx_valid(in_valid[j]), .sw_tx_last(in_last[j]),
      .sw_tx_ready(in_ready[j]),
      .sw_rx_data(out_data[j]), .sw_rx_valid(out_valid[j]), .sw_rx_last(out_last[j]),
      .sw_rx_ready(out_ready[j]), .rx_room(room),
      .perf_tx_pkts(intra_tx_pkts[j]), .perf_rx_pkts(intra_rx_pkts[j]),
      .perf_tx_words(txw), .perf_rx_words(rxw));
    assign out_room[j][0] = room;
    assign out_room[j][1] = room;
  end

  for (genvar p = 0; p < int'(N_INTER); p++) begin : g_inter
    localparam int unsigned II = N_INTRA + 2 * p;
    localparam int unsigned OO = N_INTRA + p;
    logic [DATA_W-1:0] vcd [2];
    logic [1:0]        vcv, vcl, vcr;
    logic [15:0]       room [2];
    comm_internode_if #(.VC_DEPTH(FIFO_DEPTH)) u_if (
      .clk, .rst_n,
      .lnk_rx_data(lnk_rx_data[p]), .lnk_rx_valid(lnk_rx_valid[p]), .lnk_rx_last(lnk_rx_last[p]),
      .lnk_rx_vc(lnk_rx_vc[p]), .lnk_rx_credit(lnk_rx_credit[p]),
      .lnk_tx_data(lnk_tx_data[p]), .lnk_tx_valid(lnk_tx_valid[p]), .lnk_tx_last(lnk_tx_last[p]),
      .lnk_tx_vc(lnk_tx_vc[p]), .lnk_tx_ready(lnk_tx_ready[p]), .lnk_tx_credit(lnk_tx_credit[p]),
      .vc_data(vcd), .vc_valid(vcv), .vc_last(vcl), .vc_ready(vcr),
      .sw_tx_data(out_data[OO]), .sw_tx_valid(out_valid[OO]), .sw_tx_last(out_last[OO]),
      .sw_tx_vc(out_vc[OO]), .sw_tx_ready(out_ready[OO]), .tx_room(room),
      .perf_tx_pkts(inter_tx_pkts[p]), .perf_rx_pkts(inter_rx_pkts[p]));
    for (genvar v = 0; v < 2; v++) begin : g_v
      assign in_data[II + v]  = vcd[v];
      assign in_valid[II + v] = vcv[v];
      assign in_last[II + v]  = vcl[v];
      assign vcr[v]           = in_ready[II + v];
      assign out_room[OO][v]  = room[v];
    end
  end

  comm_switch #(.N_INTRA(N_INTRA), .DIMS(DIMS)) u_switch (
    .clk, .rst_n, .my_coord, .dim_size,
    .in_data, .in_valid, .in_last, .in_ready,
    .out_data, .out_valid, .out_last, .out_vc, .out_ready, .out_room,
    .vc_switch_count);

  // ---------------- register read ----------------
  always_comb begin
    cfg_rdata = '0;
    if (cfg_addr == 6'd0) cfg_rdata = 32'(reg_coord);
    if (cfg_addr == 6'd1) cfg_rdata = 32'(reg_size);
    if (cfg_addr == 6'd2) cfg_rdata = vc_switch_count;
    for (int j = 0; j < int'(N_INTRA); j++) begin
      if (cfg_addr == 6'(16 + 2 * j)) cfg_rdata = intra_tx_pkts[j];
      if (cfg_addr == 6'(17 + 2 * j)) cfg_rdata = intra_rx_pkts[j];
    end
    for (int p = 0; p < int'(N_INTER); p++) begin
      if (cfg_addr == 6'(32 + 2 * p)) cfg_rdata = inter_tx_pkts[p];
      if (cfg_addr == 6'(33 + 2 * p)) cfg_rdata = inter_rx_pkts[p];
    end
  end
endmodule
