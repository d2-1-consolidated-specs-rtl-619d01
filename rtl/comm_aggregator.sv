// comm_aggregator: task-side adaptor from an outgoing message stream to an
// IntraNode TX port of the Routing IP.
// The task writes a message as an AXI4-Stream of 128-bit words; the stream's
// side channels carry what the header needs: TDEST = {destination coordinate
// (15 bits, {Z,Y,X}), destination intra-tile port (5 bits)} and TID = the
// destination channel id. Payload words are written to the port's data FIFO
// as they arrive and counted; at TLAST the aggregator forges the header
// (coordinate, port, channel id, LENGTH = number of words, packet type
// PKT_TYPE, VC 0, hop count 0) and writes it, followed by a footer, to the
// header/footer FIFO. The port only starts a packet from its header, so the
// payload is always complete by then. The footer carries a 32-bit packet
// sequence number (its content is not otherwise defined). A message must fit
// the port's data FIFO (at most MAX_WORDS words).
// Timing: one payload word per cycle, then two cycles for header and footer
// during which the stream is held off.
// Building the header from side channels is the IP's scheme; the side-channel
// encoding, the footer and the packet type value are this design's choices.
module comm_aggregator
  import comm_pkg::*;
#(
  parameter int unsigned MAX_WORDS = 62,
  parameter logic [4:0]  PKT_TYPE  = 5'd1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] s_axis_tdata,
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  input  logic              s_axis_tlast,
  input  logic [19:0]       s_axis_tdest,
  input  logic [16:0]       s_axis_tid,
  output logic              hdr_push,
  output logic [DATA_W-1:0] hdr_data,
  input  logic              hdr_full,
  output logic              dat_push,
  output logic [DATA_W-1:0] dat_data,
  input  logic              dat_full
);
  typedef enum logic [1:0] {A_DATA, A_HDR, A_FOOT} state_t;
  state_t      state;
  logic [13:0] count;
  logic [19:0] dest_q;
  logic [16:0] tid_q;
  logic [31:0] seq;
  comm_hdr_t   h;

  always_comb begin
    h                = '0;
    h.coord          = dest_q[19:5];
    h.intratile_port = dest_q[4:0];
    h.pid_ch         = tid_q;
    h.length         = count;
    h.pkt_type       = PKT_TYPE;
  end

  assign s_axis_tready = (state == A_DATA) && !dat_full;
  assign dat_push      = s_axis_tvalid && s_axis_tready;
  assign dat_data      = s_axis_tdata;
  assign hdr_push      = (state != A_DATA) && !hdr_full;
  assign hdr_data      = (state == A_HDR) ? DATA_W'(h) : DATA_W'(seq);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= A_DATA;
      count  <= '0;
      dest_q <= '0;
      tid_q  <= '0;
      seq    <= '0;
    end else begin
      unique case (state)
        A_DATA: if (dat_push) begin
          count  <= count + 1'b1;
          dest_q <= s_axis_tdest;
          tid_q  <= s_axis_tid;
          if (s_axis_tlast) state <= A_HDR;
        end
        A_HDR:  if (hdr_push) state <= A_FOOT;
        A_FOOT: if (hdr_push) begin
          state <= A_DATA;
          count <= '0;
          seq   <= seq + 1;
        end
        default: state <= A_DATA;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) dat_push |-> count < 14'(MAX_WORDS))
    else $error("message longer than MAX_WORDS");
endmodule
