// comm_dispatcher: task-side adaptor from an IntraNode RX port of the Routing
// IP to the task's input channels.
// It takes a header from the port's RX header/footer FIFO, selects the input
// channel named by the header's channel-id field (modulo N_CH), forwards the
// header's LENGTH payload words from the RX data FIFO to that channel's
// AXI4-Stream (TLAST on the last word), then drops the footer. A packet with
// no payload produces no stream words. One word per cycle when the channel is
// ready. Dispatching on header fields is the IP's scheme; which field selects
// the channel and the dropping of the footer are this design's choices.
module comm_dispatcher
  import comm_pkg::*;
#(
  parameter int unsigned N_CH = 4,
  localparam int unsigned CHW = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              hdr_pop,
  input  logic [DATA_W-1:0] hdr_data,
  input  logic              hdr_empty,
  output logic              dat_pop,
  input  logic [DATA_W-1:0] dat_data,
  input  logic              dat_empty,
  output logic [DATA_W-1:0] m_axis_tdata,
  output logic [N_CH-1:0]   m_axis_tvalid,
  input  logic [N_CH-1:0]   m_axis_tready,
  output logic              m_axis_tlast,
  output logic [31:0]       pkt_count
);
  typedef enum logic [1:0] {D_HDR, D_DATA, D_FOOT} state_t;
  state_t      state;
  logic [13:0] remaining;
  logic [CHW-1:0] ch;
  comm_hdr_t   h;
  assign h = comm_hdr_t'(hdr_data);

  assign m_axis_tdata = dat_data;
  assign m_axis_tlast = (remaining == 14'd1);
  always_comb begin
    m_axis_tvalid = '0;
    if (state == D_DATA) m_axis_tvalid[ch] = !dat_empty;
  end
  assign dat_pop = (state == D_DATA) && !dat_empty && m_axis_tready[ch];
  assign hdr_pop = (state != D_DATA) && !hdr_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= D_HDR;
      remaining <= '0;
      ch        <= '0;
      pkt_count <= '0;
    end else begin
      unique case (state)
        D_HDR: if (hdr_pop) begin
          ch        <= CHW'(int'(h.pid_ch) % int'(N_CH));
          remaining <= h.length;
          state     <= (h.length == 0) ? D_FOOT : D_DATA;
        end
        D_DATA: if (dat_pop) begin
          remaining <= remaining - 1'b1;
          if (remaining == 14'd1) state <= D_FOOT;
        end
        D_FOOT: if (hdr_pop) begin
          state     <= D_HDR;
          pkt_count <= pkt_count + 1;
        end
        default: state <= D_HDR;
      endcase
    end
  end
endmodule
