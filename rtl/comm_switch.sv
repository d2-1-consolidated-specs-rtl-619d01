// comm_switch: Switch Component of the Routing IP (router + arbiter).
// Inputs, in order: N_INTRA IntraNode TX streams, then for each InterNode
// port p (p = 2*dim + dir, dir 0 = towards +1, 1 = towards -1) its two
// receive virtual channels (index N_INTRA + 2*p + vc). Outputs: N_INTRA
// IntraNode RX streams, then the 2*DIMS InterNode TX streams.
// Router: when a packet's header is at the head of an input, dimension-order
// routing picks the output: the highest dimension whose coordinate differs
// from this node's is corrected first (Z, then Y, then X), in the direction of
// the shorter way round the ring of that dimension (ties go +). When no
// coordinate differs, the packet leaves on the IntraNode port named by the
// header's intra-tile port field (modulo N_INTRA).
// Virtual channels: a packet enters a dimension on VC0 and moves to VC1 when it
// crosses that ring's wrap-around link (the dateline), which breaks the cyclic
// channel dependency of the ring; it keeps its channel while it stays in the
// dimension. The header's channel field is updated and its hop count
// incremented as the header passes.
// Arbiter: each free output grants, round robin, one of the inputs whose
// packet routes to it, but only when the receiver can hold the whole packet
// (room >= LENGTH + 2 words: virtual cut-through). The grant is registered and the
// output then stays with that input until the packet's last word; words pass
// combinationally, one per cycle.
// DOR, two VCs per link and VCT are the IP's scheme; the dateline rule, the
// round-robin order and the tie-break are this design's choices.
module comm_switch
  import comm_pkg::*;
#(
  parameter int unsigned N_INTRA = 2,
  parameter int unsigned DIMS    = 1,
  localparam int unsigned N_INTER = 2 * DIMS,
  localparam int unsigned N_IN    = N_INTRA + 2 * N_INTER,
  localparam int unsigned N_OUT   = N_INTRA + N_INTER,
  localparam int unsigned OW      = $clog2(N_OUT),
  localparam int unsigned IW      = $clog2(N_IN)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [COORD_W-1:0] my_coord  [MAX_DIMS],
  input  logic [COORD_W-1:0] dim_size  [MAX_DIMS],
  // inputs
  input  logic [DATA_W-1:0] in_data  [N_IN],
  input  logic [N_IN-1:0]   in_valid,
  input  logic [N_IN-1:0]   in_last,
  output logic [N_IN-1:0]   in_ready,
  // outputs
  output logic [DATA_W-1:0] out_data [N_OUT],
  output logic [N_OUT-1:0]  out_valid,
  output logic [N_OUT-1:0]  out_last,
  output logic [N_OUT-1:0]  out_vc,
  input  logic [N_OUT-1:0]  out_ready,
  input  logic [15:0]       out_room [N_OUT][2],
  // statistics
  output logic [31:0]       vc_switch_count
);
  // ---------------- router (per input) ----------------
  logic [OW-1:0] r_out [N_IN];
  logic          r_vc  [N_IN];
  logic [N_IN-1:0] r_ok;
  logic [N_IN-1:0] r_dateline;

  always_comb begin
    for (int i = 0; i < int'(N_IN); i++) begin
      automatic comm_hdr_t h = comm_hdr_t'(in_data[i]);
      automatic int  arr_dim = (i < int'(N_INTRA)) ? -1 : (i - int'(N_INTRA)) / 4;
      automatic logic found = 1'b0;
      automatic logic [COORD_W-1:0] diff;
      automatic logic dir;
      r_out[i]      = OW'(int'(h.intratile_port) % int'(N_INTRA));
      r_vc[i]       = 1'b0;
      r_dateline[i] = 1'b0;
      for (int d = int'(DIMS) - 1; d >= 0; d--) begin
        if (!found && coord_of(h.coord, d) != my_coord[d]) begin
          found = 1'b1;
          diff  = (coord_of(h.coord, d) >= my_coord[d]) ? coord_of(h.coord, d) - my_coord[d]
                                                        : coord_of(h.coord, d) + dim_size[d] - my_coord[d];
          dir   = ({diff, 1'b0} > {1'b0, dim_size[d]});   // 1 = go towards -1
          r_out[i] = OW'(int'(N_INTRA) + 2 * d + int'(dir));
          r_vc[i]  = (arr_dim == d) ? h.vchannel[0] : 1'b0;
          if ((!dir && my_coord[d] == dim_size[d] - 1'b1) || (dir && my_coord[d] == '0)) begin
            r_dateline[i] = !r_vc[i];
            r_vc[i]       = 1'b1;
          end
        end
      end
      r_ok[i] = out_room[r_out[i]][r_vc[i]] >= 16'(h.length) + 16'd2;
    end
  end

  // ---------------- grant state ----------------
  logic [N_OUT-1:0] o_busy;
  logic [IW-1:0]    o_src  [N_OUT];
  logic             o_vc   [N_OUT];
  logic             o_first[N_OUT];
  logic [N_IN-1:0]  i_busy;
  logic [IW-1:0]    rr_last[N_OUT];

  // ---------------- arbitration (per output) ----------------
  logic [N_OUT-1:0] g_valid;
  logic [IW-1:0]    g_src [N_OUT];
  always_comb begin
    for (int o = 0; o < int'(N_OUT); o++) begin
      g_valid[o] = 1'b0;
      g_src[o]   = '0;
      for (int k = 1; k <= int'(N_IN); k++) begin
        automatic int i = (int'(rr_last[o]) + k) % int'(N_IN);
        if (!g_valid[o] && !o_busy[o] && !i_busy[i] && in_valid[i] &&
            int'(r_out[i]) == o && r_ok[i]) begin
          g_valid[o] = 1'b1;
          g_src[o]   = IW'(i);
        end
      end
    end
  end

  // ---------------- data path ----------------
  always_comb begin
    in_ready = '0;
    for (int o = 0; o < int'(N_OUT); o++) begin
      automatic comm_hdr_t h = comm_hdr_t'(in_data[o_src[o]]);
      if (o_first[o]) begin
        h.vchannel = {3'b0, o_vc[o]};
        h.num_hops = h.num_hops + 1'b1;
      end
      out_data[o]  = h;
      out_valid[o] = o_busy[o] && in_valid[o_src[o]];
      out_last[o]  = in_last[o_src[o]];
      out_vc[o]    = o_vc[o];
      if (o_busy[o]) in_ready[o_src[o]] = out_ready[o];
    end
  end

  // dateline switches granted this cycle (several outputs may grant at once)
  logic [OW:0] n_dateline;
  always_comb begin
    n_dateline = '0;
    for (int o = 0; o < int'(N_OUT); o++)
      if (!o_busy[o] && g_valid[o] && r_dateline[g_src[o]]) n_dateline = n_dateline + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_busy          <= '0;
      i_busy          <= '0;
      vc_switch_count <= '0;
      for (int o = 0; o < int'(N_OUT); o++) begin
        o_src[o]   <= '0;
        o_vc[o]    <= 1'b0;
        o_first[o] <= 1'b0;
        rr_last[o] <= IW'(N_IN - 1);
      end
    end else begin
      vc_switch_count <= vc_switch_count + 32'(n_dateline);
      for (int o = 0; o < int'(N_OUT); o++) begin
        if (o_busy[o]) begin
          if (out_valid[o] && out_ready[o]) begin
            o_first[o] <= 1'b0;
            if (out_last[o]) begin
              o_busy[o]        <= 1'b0;
              i_busy[o_src[o]] <= 1'b0;
            end
          end
        end else if (g_valid[o]) begin
          o_busy[o]        <= 1'b1;
          o_src[o]         <= g_src[o];
          o_vc[o]          <= r_vc[g_src[o]];
          o_first[o]       <= 1'b1;
          i_busy[g_src[o]] <= 1'b1;
          rr_last[o]       <= g_src[o];
        end
      end
    end
  end
endmodule
