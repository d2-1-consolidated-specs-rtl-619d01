// fts_top: the Fast Task Scheduler (FTS).
// The host posts task commands into the cmd-in queue (one 64-entry subqueue
// per accelerator) and collects Finished-task commands from the cmd-out queue.
// Cmd in reads the commands in order and sends each one, as an AXI stream,
// through the "cmd to accelerators" demultiplexer to its accelerator, only
// when that accelerator is free. Accelerators answer with Finished-task
// commands on their own AXI streams; the "cmd from accelerators" multiplexer
// merges them towards Cmd out, which writes them to the cmd-out queue and tells
// Cmd in the accelerator is free again. Cmd in also repeats periodic tasks and
// removes input copies of arguments reused from the previous task (reuse_en).
// Interface: two host RAM ports (one per queue, one cycle read latency),
// N_ACC command streams out (acc_cmd_*), N_ACC finished streams in (acc_fin_*).
// The structure follows the FTS block diagram; the host bus is abstracted to a
// RAM port.
module fts_top
  import fts_pkg::*;
#(
  parameter int unsigned N_ACC         = 16,
  parameter int unsigned SUBQ_DEPTH    = 64,
  parameter int unsigned MAX_ARGS      = 15,
  parameter int unsigned CYCLES_PER_US = 100,
  localparam int unsigned AIW = (N_ACC > 1) ? $clog2(N_ACC) : 1,
  localparam int unsigned AW  = $clog2(N_ACC * SUBQ_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reuse_en,
  // host port of the cmd in queue
  input  logic              host_in_we,
  input  logic [AW-1:0]     host_in_addr,
  input  logic [WORD_W-1:0] host_in_wdata,
  output logic [WORD_W-1:0] host_in_rdata,
  // host port of the cmd out queue
  input  logic              host_out_we,
  input  logic [AW-1:0]     host_out_addr,
  input  logic [WORD_W-1:0] host_out_wdata,
  output logic [WORD_W-1:0] host_out_rdata,
  // commands to accelerators
  output logic [WORD_W-1:0] acc_cmd_tdata,
  output logic [N_ACC-1:0]  acc_cmd_tvalid,
  input  logic [N_ACC-1:0]  acc_cmd_tready,
  output logic              acc_cmd_tlast,
  // Finished-task commands from accelerators
  input  logic [WORD_W-1:0] acc_fin_tdata [N_ACC],
  input  logic [N_ACC-1:0]  acc_fin_tvalid,
  output logic [N_ACC-1:0]  acc_fin_tready,
  input  logic [N_ACC-1:0]  acc_fin_tlast,
  // status
  output logic [N_ACC-1:0]  acc_busy,
  output logic [31:0]       reuse_count,
  output logic [31:0]       finished_count
);
  logic              qi_we, qo_we;
  logic [AW-1:0]     qi_addr, qo_addr;
  logic [WORD_W-1:0] qi_wdata, qo_wdata, qi_rdata, qo_rdata;

  logic [WORD_W-1:0] ci_tdata;
  logic              ci_tvalid, ci_tready, ci_tlast;
  logic [AIW-1:0]    ci_tdest;

  logic [WORD_W-1:0] co_tdata;
  logic              co_tvalid, co_tready, co_tlast;
  logic [AIW-1:0]    co_tid;

  logic              fin_valid;
  logic [AIW-1:0]    fin_acc;
  logic [N_ACC-1:0]  suppress;

  fts_cmd_queue #(.DEPTH(N_ACC * SUBQ_DEPTH), .SUBQ(N_ACC), .W(WORD_W)) u_cmd_in_queue (
    .clk,
    .h_we(host_in_we), .h_addr(host_in_addr), .h_wdata(host_in_wdata), .h_rdata(host_in_rdata),
    .f_we(qi_we), .f_addr(qi_addr), .f_wdata(qi_wdata), .f_rdata(qi_rdata));

  fts_cmd_queue #(.DEPTH(N_ACC * SUBQ_DEPTH), .SUBQ(N_ACC), .W(WORD_W)) u_cmd_out_queue (
    .clk,
    .h_we(host_out_we), .h_addr(host_out_addr), .h_wdata(host_out_wdata), .h_rdata(host_out_rdata),
    .f_we(qo_we), .f_addr(qo_addr), .f_wdata(qo_wdata), .f_rdata(qo_rdata));

  fts_cmd_in #(.N_ACC(N_ACC), .SUBQ_DEPTH(SUBQ_DEPTH), .MAX_ARGS(MAX_ARGS),
               .CYCLES_PER_US(CYCLES_PER_US)) u_cmd_in (
    .clk, .rst_n, .reuse_en,
    .q_we(qi_we), .q_addr(qi_addr), .q_wdata(qi_wdata), .q_rdata(qi_rdata),
    .m_tdata(ci_tdata), .m_tvalid(ci_tvalid), .m_tready(ci_tready), .m_tlast(ci_tlast),
    .m_tdest(ci_tdest),
    .fin_valid, .fin_acc, .suppress, .busy(acc_busy), .reuse_count);

  fts_acc_demux #(.N_ACC(N_ACC), .W(WORD_W)) u_cmd_to_acc (
    .s_tdata(ci_tdata), .s_tvalid(ci_tvalid), .s_tready(ci_tready), .s_tlast(ci_tlast),
    .s_tdest(ci_tdest),
    .m_tdata(acc_cmd_tdata), .m_tvalid(acc_cmd_tvalid), .m_tready(acc_cmd_tready),
    .m_tlast(acc_cmd_tlast));

  fts_acc_mux #(.N_ACC(N_ACC), .W(WORD_W)) u_cmd_from_acc (
    .clk, .rst_n,
    .s_tdata(acc_fin_tdata), .s_tvalid(acc_fin_tvalid), .s_tready(acc_fin_tready),
    .s_tlast(acc_fin_tlast),
    .m_tdata(co_tdata), .m_tvalid(co_tvalid), .m_tready(co_tready), .m_tlast(co_tlast),
    .m_tid(co_tid));

  fts_cmd_out #(.N_ACC(N_ACC), .SUBQ_DEPTH(SUBQ_DEPTH)) u_cmd_out (
    .clk, .rst_n,
    .s_tdata(co_tdata), .s_tvalid(co_tvalid), .s_tready(co_tready), .s_tlast(co_tlast),
    .s_tid(co_tid), .suppress,
    .q_we(qo_we), .q_addr(qo_addr), .q_wdata(qo_wdata), .q_rdata(qo_rdata),
    .fin_valid, .fin_acc, .finished_count);
endmodule
