// textarossa_top: five independent accelerator IPs side by side, each with its
// own ports; they share only the clock and reset.
//  * Fast Task Scheduler (fts_top): host command queues in, task commands out
//    to N_ACC accelerators, Finished-task commands back.
//  * Communication IP routing side (comm_routing_ip) with, on every IntraNode
//    port, an Aggregator (task message stream -> packets) and a Dispatcher
//    (packets -> task input channels). The InterNode link ports are brought
//    out for the serial-link layer (Network IP), which is not part of this RTL.
//  * Light PPU (light_ppu): posit8/posit16 <-> binary32 conversions.
//  * Full PPU (full_ppu): posit<16,1> add, sub, mul, div and posit <-> binary32.
//  * SHAKE-128/256 XOF accelerator (shake_axi) on an AXI4 slave port.
// Timing and protocols are those of each sub-block.
module textarossa_top
  import fts_pkg::*;
  import comm_pkg::*;
#(
  parameter int unsigned N_ACC   = 16,
  parameter int unsigned N_INTRA = 2,
  parameter int unsigned DIMS    = 1,
  parameter int unsigned N_CH    = 4,
  localparam int unsigned AW      = $clog2(N_ACC * 64),
  localparam int unsigned N_INTER = 2 * DIMS
) (
  input  logic              clk,
  input  logic              rst_n,
  // ---------------- Fast Task Scheduler ----------------
  input  logic              fts_reuse_en,
  input  logic              fts_host_in_we,
  input  logic [AW-1:0]     fts_host_in_addr,
  input  logic [WORD_W-1:0] fts_host_in_wdata,
  output logic [WORD_W-1:0] fts_host_in_rdata,
  input  logic              fts_host_out_we,
  input  logic [AW-1:0]     fts_host_out_addr,
  input  logic [WORD_W-1:0] fts_host_out_wdata,
  output logic [WORD_W-1:0] fts_host_out_rdata,
  output logic [WORD_W-1:0] fts_acc_cmd_tdata,
  output logic [N_ACC-1:0]  fts_acc_cmd_tvalid,
  input  logic [N_ACC-1:0]  fts_acc_cmd_tready,
  output logic              fts_acc_cmd_tlast,
  input  logic [WORD_W-1:0] fts_acc_fin_tdata [N_ACC],
  input  logic [N_ACC-1:0]  fts_acc_fin_tvalid,
  output logic [N_ACC-1:0]  fts_acc_fin_tready,
  input  logic [N_ACC-1:0]  fts_acc_fin_tlast,
  output logic [N_ACC-1:0]  fts_acc_busy,
  output logic [31:0]       fts_reuse_count,
  output logic [31:0]       fts_finished_count,
  // ---------------- Communication IP ----------------
  input  logic              comm_cfg_we,
  input  logic [5:0]        comm_cfg_addr,
  input  logic [31:0]       comm_cfg_wdata,
  output logic [31:0]       comm_cfg_rdata,
  input  logic [DATA_W-1:0] task_out_tdata [N_INTRA],
  input  logic [N_INTRA-1:0] task_out_tvalid,
  output logic [N_INTRA-1:0] task_out_tready,
  input  logic [N_INTRA-1:0] task_out_tlast,
  input  logic [19:0]       task_out_tdest [N_INTRA],
  input  logic [16:0]       task_out_tid   [N_INTRA],
  output logic [DATA_W-1:0] task_in_tdata  [N_INTRA],
  output logic [N_CH-1:0]   task_in_tvalid [N_INTRA],
  input  logic [N_CH-1:0]   task_in_tready [N_INTRA],
  output logic [N_INTRA-1:0] task_in_tlast,
  input  logic [DATA_W-1:0] lnk_rx_data  [N_INTER],
  input  logic [N_INTER-1:0] lnk_rx_valid,
  input  logic [N_INTER-1:0] lnk_rx_last,
  input  logic [N_INTER-1:0] lnk_rx_vc,
  output logic [1:0]        lnk_rx_credit [N_INTER],
  output logic [DATA_W-1:0] lnk_tx_data  [N_INTER],
  output logic [N_INTER-1:0] lnk_tx_valid,
  output logic [N_INTER-1:0] lnk_tx_last,
  output logic [N_INTER-1:0] lnk_tx_vc,
  input  logic [N_INTER-1:0] lnk_tx_ready,
  input  logic [1:0]        lnk_tx_credit [N_INTER],
  // ---------------- Light PPU ----------------
  input  logic              ppu_in_valid,
  input  logic [2:0]        ppu_opcode,
  input  logic [7:0]        ppu_in8,
  input  logic [15:0]       ppu_in16,
  input  logic [31:0]       ppu_in32,
  output logic              ppu_out_valid,
  output logic [31:0]       ppu_out32,
  // ---------------- Full PPU ----------------
  input  logic              fppu_in_valid,
  input  logic [2:0]        fppu_opcode,
  input  logic [15:0]       fppu_a,
  input  logic [15:0]       fppu_b,
  input  logic [31:0]       fppu_f32,
  output logic              fppu_out_valid,
  output logic [31:0]       fppu_result,
  // ---------------- SHAKE accelerator (AXI4 slave) ----------------
  input  logic [7:0]        shake_awaddr,
  input  logic              shake_awvalid,
  output logic              shake_awready,
  input  logic [31:0]       shake_wdata,
  input  logic [3:0]        shake_wstrb,
  input  logic              shake_wvalid,
  output logic              shake_wready,
  output logic [1:0]        shake_bresp,
  output logic              shake_bvalid,
  input  logic              shake_bready,
  input  logic [7:0]        shake_araddr,
  input  logic              shake_arvalid,
  output logic              shake_arready,
  output logic [31:0]       shake_rdata,
  output logic [1:0]        shake_rresp,
  output logic              shake_rvalid,
  input  logic              shake_rready,
  output logic [31:0]       shake_perm_count
);
  // ---------------- Fast Task Scheduler ----------------
  fts_top #(.N_ACC(N_ACC)) u_fts (
    .clk, .rst_n, .reuse_en(fts_reuse_en),
    .host_in_we(fts_host_in_we), .host_in_addr(fts_host_in_addr),
    .host_in_wdata(fts_host_in_wdata), .host_in_rdata(fts_host_in_rdata),
    .host_out_we(fts_host_out_we), .host_out_addr(fts_host_out_addr),
    .host_out_wdata(fts_host_out_wdata), .host_out_rdata(fts_host_out_rdata),
    .acc_cmd_tdata(fts_acc_cmd_tdata), .acc_cmd_tvalid(fts_acc_cmd_tvalid),
    .acc_cmd_tready(fts_acc_cmd_tready), .acc_cmd_tlast(fts_acc_cmd_tlast),
    .acc_fin_tdata(fts_acc_fin_tdata), .acc_fin_tvalid(fts_acc_fin_tvalid),
    .acc_fin_tready(fts_acc_fin_tready), .acc_fin_tlast(fts_acc_fin_tlast),
    .acc_busy(fts_acc_busy), .reuse_count(fts_reuse_count),
    .finished_count(fts_finished_count));

  // ---------------- Communication IP ----------------
  logic [N_INTRA-1:0] tx_hdr_push, tx_hdr_full, tx_dat_push, tx_dat_full;
  logic [DATA_W-1:0]  tx_hdr_data [N_INTRA], tx_dat_data [N_INTRA];
  logic [N_INTRA-1:0] rx_hdr_pop, rx_hdr_empty, rx_dat_pop, rx_dat_empty;
  logic [DATA_W-1:0]  rx_hdr_data [N_INTRA], rx_dat_data [N_INTRA];

  for (genvar j = 0; j < int'(N_INTRA); j++) begin : g_task_port
    logic [31:0] pkts;
    comm_aggregator u_aggregator (
      .clk, .rst_n,
      .s_axis_tdata(task_out_tdata[j]), .s_axis_tvalid(task_out_tvalid[j]),
      .s_axis_tready(task_out_tready[j]), .s_axis_tlast(task_out_tlast[j]),
      .s_axis_tdest(task_out_tdest[j]), .s_axis_tid(task_out_tid[j]),
      .hdr_push(tx_hdr_push[j]), .hdr_data(tx_hdr_data[j]), .hdr_full(tx_hdr_full[j]),
      .dat_push(tx_dat_push[j]), .dat_data(tx_dat_data[j]), .dat_full(tx_dat_full[j]));
    comm_dispatcher #(.N_CH(N_CH)) u_dispatcher (
      .clk, .rst_n,
      .hdr_pop(rx_hdr_pop[j]), .hdr_data(rx_hdr_data[j]), .hdr_empty(rx_hdr_empty[j]),
      .dat_pop(rx_dat_pop[j]), .dat_data(rx_dat_data[j]), .dat_empty(rx_dat_empty[j]),
      .m_axis_tdata(task_in_tdata[j]), .m_axis_tvalid(task_in_tvalid[j]),
      .m_axis_tready(task_in_tready[j]), .m_axis_tlast(task_in_tlast[j]),
      .pkt_count(pkts));
  end

  comm_routing_ip #(.N_INTRA(N_INTRA), .DIMS(DIMS)) u_routing (
    .clk, .rst_n,
    .cfg_we(comm_cfg_we), .cfg_addr(comm_cfg_addr), .cfg_wdata(comm_cfg_wdata),
    .cfg_rdata(comm_cfg_rdata),
    .tx_hdr_push, .tx_hdr_data, .tx_hdr_full, .tx_dat_push, .tx_dat_data, .tx_dat_full,
    .rx_hdr_pop, .rx_hdr_data, .rx_hdr_empty, .rx_dat_pop, .rx_dat_data, .rx_dat_empty,
    .lnk_rx_data, .lnk_rx_valid, .lnk_rx_last, .lnk_rx_vc, .lnk_rx_credit,
    .lnk_tx_data, .lnk_tx_valid, .lnk_tx_last, .lnk_tx_vc, .lnk_tx_ready, .lnk_tx_credit);

  // ---------------- Light PPU ----------------
  light_ppu u_light_ppu (
    .clk, .rst_n, .in_valid(ppu_in_valid), .opcode(ppu_opcode),
    .in8(ppu_in8), .in16(ppu_in16), .in32(ppu_in32),
    .out_valid(ppu_out_valid), .out32(ppu_out32));

  // ---------------- Full PPU ----------------
  full_ppu #(.N(16), .ES(1)) u_full_ppu (
    .clk, .rst_n, .in_valid(fppu_in_valid), .opcode(fppu_opcode),
    .a(fppu_a), .b(fppu_b), .f32(fppu_f32),
    .out_valid(fppu_out_valid), .result(fppu_result));

  // ---------------- SHAKE ----------------
  shake_axi #(.ADDR_W(8)) u_shake (
    .clk, .rst_n,
    .s_axi_awaddr(shake_awaddr), .s_axi_awvalid(shake_awvalid), .s_axi_awready(shake_awready),
    .s_axi_wdata(shake_wdata), .s_axi_wstrb(shake_wstrb), .s_axi_wvalid(shake_wvalid),
    .s_axi_wready(shake_wready), .s_axi_bresp(shake_bresp), .s_axi_bvalid(shake_bvalid),
    .s_axi_bready(shake_bready),
    .s_axi_araddr(shake_araddr), .s_axi_arvalid(shake_arvalid), .s_axi_arready(shake_arready),
    .s_axi_rdata(shake_rdata), .s_axi_rresp(shake_rresp), .s_axi_rvalid(shake_rvalid),
    .s_axi_rready(shake_rready), .perm_count(shake_perm_count));
endmodule
