// comm_intranode_if: one IntraNode port of the Routing IP, the attachment
// point of a local task (through the Aggregator and Dispatcher).
// TX (task -> network): two FIFOs written by the task side, one for headers
// and footers (tx_hdr_*) and one for payload (tx_dat_*). A sequencer turns
// them into a packet stream towards the switch: the header word, then as many
// payload words as the header's LENGTH field, then the footer (sw_tx_last).
// RX (network -> task): the packet stream from the switch is split back: the
// first and the last word go to the RX header/footer FIFO, the words between
// to the RX data FIFO. rx_room tells the switch how many words of a packet
// (header, payload and footer together) it can accept: the data FIFO's space
// plus two, or 0 if the header/footer FIFO cannot take two words (virtual
// cut-through: the switch starts a packet only if all of it fits).
// A performance counter block counts packets and words in both directions.
// Every word moves in one cycle when its FIFO allows. The two FIFOs per
// direction and the counters are the IP's structure; FIFO depths, the footer
// handling and the counter set are this design's choices.
module comm_intranode_if
  import comm_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 64,
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // task side, TX
  input  logic              tx_hdr_push,
  input  logic [DATA_W-1:0] tx_hdr_data,
  output logic              tx_hdr_full,
  input  logic              tx_dat_push,
  input  logic [DATA_W-1:0] tx_dat_data,
  output logic              tx_dat_full,
  // task side, RX
  input  logic              rx_hdr_pop,
  output logic [DATA_W-1:0] rx_hdr_data,
  output logic              rx_hdr_empty,
  input  logic              rx_dat_pop,
  output logic [DATA_W-1:0] rx_dat_data,
  output logic              rx_dat_empty,
  // switch side
  output logic [DATA_W-1:0] sw_tx_data,
  output logic              sw_tx_valid,
  output logic              sw_tx_last,
  input  logic              sw_tx_ready,
  input  logic [DATA_W-1:0] sw_rx_data,
  input  logic              sw_rx_valid,
  input  logic              sw_rx_last,
  output logic              sw_rx_ready,
  output logic [15:0]       rx_room,
  // performance counters
  output logic [31:0]       perf_tx_pkts,
  output logic [31:0]       perf_rx_pkts,
  output logic [31:0]       perf_tx_words,
  output logic [31:0]       perf_rx_words
);
  // ---------------- TX ----------------
  logic [DATA_W-1:0] th_q, td_q;
  logic th_empty, td_empty, th_pop, td_pop;
  logic [CW-1:0] th_cnt, th_sp, td_cnt, td_sp;

  comm_fifo #(.W(DATA_W), .DEPTH(FIFO_DEPTH)) u_tx_hdr (
    .clk, .rst_n, .push(tx_hdr_push), .wr_data(tx_hdr_data), .pop(th_pop), .rd_data(th_q),
    .empty(th_empty), .full(tx_hdr_full), .count(th_cnt), .space(th_sp));
  comm_fifo #(.W(DATA_W), .DEPTH(FIFO_DEPTH)) u_tx_dat (
    .clk, .rst_n, .push(tx_dat_push), .wr_data(tx_dat_data), .pop(td_pop), .rd_data(td_q),
    .empty(td_empty), .full(tx_dat_full), .count(td_cnt), .space(td_sp));

  typedef enum logic [1:0] {T_HDR, T_DATA, T_FOOT} tx_state_t;
  tx_state_t tstate;
  logic [13:0] remaining;
  comm_hdr_t   th_hdr;
  assign th_hdr = comm_hdr_t'(th_q);

  always_comb begin
    sw_tx_data  = th_q;
    sw_tx_valid = 1'b0;
    sw_tx_last  = 1'b0;
    th_pop      = 1'b0;
    td_pop      = 1'b0;
    unique case (tstate)
      T_HDR:  begin
        sw_tx_valid = !th_empty;
        th_pop      = sw_tx_valid && sw_tx_ready;
      end
      T_DATA: begin
        sw_tx_data  = td_q;
        sw_tx_valid = !td_empty;
        td_pop      = sw_tx_valid && sw_tx_ready;
      end
      T_FOOT: begin
        sw_tx_valid = !th_empty;
        sw_tx_last  = 1'b1;
        th_pop      = sw_tx_valid && sw_tx_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate        <= T_HDR;
      remaining     <= '0;
      perf_tx_pkts  <= '0;
      perf_tx_words <= '0;
    end else begin
      if (sw_tx_valid && sw_tx_ready) perf_tx_words <= perf_tx_words + 1;
      unique case (tstate)
        T_HDR: if (th_pop) begin
          remaining <= th_hdr.length;
          tstate    <= (th_hdr.length == 0) ? T_FOOT : T_DATA;
        end
        T_DATA: if (td_pop) begin
          remaining <= remaining - 1'b1;
          if (remaining == 14'd1) tstate <= T_FOOT;
        end
        T_FOOT: if (th_pop) begin
          tstate       <= T_HDR;
          perf_tx_pkts <= perf_tx_pkts + 1;
        end
        default: tstate <= T_HDR;
      endcase
    end
  end

  // ---------------- RX ----------------
  logic rx_first;
  logic rh_push, rd_push, rh_full, rd_full;
  logic [CW-1:0] rh_cnt, rh_sp, rd_cnt, rd_sp;

  assign rh_push     = sw_rx_valid && sw_rx_ready && (rx_first || sw_rx_last);
  assign rd_push     = sw_rx_valid && sw_rx_ready && !(rx_first || sw_rx_last);
  assign sw_rx_ready = (rx_first || sw_rx_last) ? !rh_full : !rd_full;
  assign rx_room     = (rh_sp >= CW'(2)) ? 16'(rd_sp) + 16'd2 : 16'd0;

  comm_fifo #(.W(DATA_W), .DEPTH(FIFO_DEPTH)) u_rx_hdr (
    .clk, .rst_n, .push(rh_push), .wr_data(sw_rx_data), .pop(rx_hdr_pop), .rd_data(rx_hdr_data),
    .empty(rx_hdr_empty), .full(rh_full), .count(rh_cnt), .space(rh_sp));
  comm_fifo #(.W(DATA_W), .DEPTH(FIFO_DEPTH)) u_rx_dat (
    .clk, .rst_n, .push(rd_push), .wr_data(sw_rx_data), .pop(rx_dat_pop), .rd_data(rx_dat_data),
    .empty(rx_dat_empty), .full(rd_full), .count(rd_cnt), .space(rd_sp));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_first      <= 1'b1;
      perf_rx_pkts  <= '0;
      perf_rx_words <= '0;
    end else if (sw_rx_valid && sw_rx_ready) begin
      perf_rx_words <= perf_rx_words + 1;
      rx_first      <= sw_rx_last;
      if (sw_rx_last) perf_rx_pkts <= perf_rx_pkts + 1;
    end
  end
endmodule
