// shake_axi: SHAKE-128 / SHAKE-256 extendable-output function (FIPS 202) as
// a memory-mapped accelerator with an AXI4 slave port (single-beat transfers,
// 32-bit data, AXI4-Lite subset: no bursts, no IDs).
// The sponge keeps the 1600-bit Keccak state. Message words written to DIN
// are XORed into the rate part (168 bytes for SHAKE-128, 136 for SHAKE-256)
// at the current byte position; when the rate is full the Keccak-f[1600]
// permutation runs (24 cycles). FINAL applies the SHAKE padding (0x1F after
// the last message byte, 0x80 into the last rate byte) and permutes; the
// output is then read 32 bits at a time from DOUT, for as long as wanted:
// whenever the rate has been read out, the next permutation runs by itself.
// While the permutation runs the slave holds AWREADY/WREADY/ARREADY low, so
// software never needs to poll.
// Register map (byte addresses):
//   0x00 CTRL   (W)  bit0 INIT: clear the state, bit1 selects SHAKE-256 (1) or
//                    SHAKE-128 (0); bit2 FINAL: pad and start squeezing
//   0x04 STATUS (R)  bit0 busy, bit1 squeezing, bit2 SHAKE-256 selected
//   0x08 DIN    (W)  message bytes, little endian; WSTRB must be 0xF or a
//                    contiguous run from byte 0 (a partial word ends the message)
//   0x0C DOUT   (R)  next 4 output bytes, little endian
// Byte order and padding follow FIPS 202; the register map and the word-wide
// absorb/squeeze are this design's choices.
module shake_axi #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  output logic [31:0]       perm_count
);
  localparam logic [7:0] A_CTRL = 8'h00, A_STATUS = 8'h04, A_DIN = 8'h08, A_DOUT = 8'h0C;
  localparam int unsigned RATE128 = 168, RATE256 = 136;

  logic [1599:0] st;
  logic [1599:0] perm_out;
  logic          perm_start, perm_busy, perm_done;
  logic          mode256, squeezing;
  logic [7:0]    pos;      // byte position in the rate
  logic [7:0]    rate;
  logic          resume_squeeze;

  assign rate = mode256 ? 8'(RATE256) : 8'(RATE128);

  keccak_f1600 u_keccak (
    .clk, .rst_n, .start(perm_start), .state_in(st), .state_out(perm_out),
    .busy(perm_busy), .done(perm_done));

  logic busy;
  assign busy = perm_busy || perm_start || perm_done;

  logic wr_go, rd_go;
  assign wr_go          = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid && !busy;
  assign s_axi_awready  = wr_go;
  assign s_axi_wready   = wr_go;
  assign rd_go          = s_axi_arvalid && !s_axi_rvalid && !busy &&
                          !(wr_go);           // one access per cycle, writes first
  assign s_axi_arready  = rd_go;
  assign s_axi_bresp    = 2'b00;
  assign s_axi_rresp    = 2'b00;

  function automatic int unsigned strb_bytes(logic [3:0] s);
    unique case (s)
      4'b0001: return 1;
      4'b0011: return 2;
      4'b0111: return 3;
      4'b1111: return 4;
      default: return 0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st             <= '0;
      mode256        <= 1'b0;
      squeezing      <= 1'b0;
      pos            <= '0;
      perm_start     <= 1'b0;
      s_axi_bvalid   <= 1'b0;
      s_axi_rvalid   <= 1'b0;
      s_axi_rdata    <= '0;
      perm_count     <= '0;
      resume_squeeze <= 1'b0;
    end else begin
      perm_start <= 1'b0;
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (perm_done) begin
        st         <= perm_out;
        pos        <= '0;
        perm_count <= perm_count + 1;
        if (resume_squeeze) squeezing <= 1'b1;
      end

      if (wr_go) begin
        s_axi_bvalid <= 1'b1;
        unique case (8'(s_axi_awaddr))
          A_CTRL: begin
            if (s_axi_wdata[0]) begin
              st        <= '0;
              pos       <= '0;
              mode256   <= s_axi_wdata[1];
              squeezing <= 1'b0;
            end else if (s_axi_wdata[2] && !squeezing) begin
              // SHAKE domain bits + first pad bit, then the final pad bit
              if (pos == rate - 1) begin
                st[8*pos +: 8] <= st[8*pos +: 8] ^ 8'h9F;
              end else begin
                st[8*pos +: 8]      <= st[8*pos +: 8] ^ 8'h1F;
                st[8*(rate-1) +: 8] <= st[8*(rate-1) +: 8] ^ 8'h80;
              end
              perm_start     <= 1'b1;
              resume_squeeze <= 1'b1;
            end
          end
          A_DIN: if (!squeezing) begin
            for (int b = 0; b < 4; b++)
              if (b < int'(strb_bytes(s_axi_wstrb)))
                st[8*(int'(pos) + b) +: 8] <= st[8*(int'(pos) + b) +: 8] ^ s_axi_wdata[8*b +: 8];
            pos <= pos + 8'(strb_bytes(s_axi_wstrb));
            if (pos + 8'(strb_bytes(s_axi_wstrb)) == rate) begin
              perm_start     <= 1'b1;
              resume_squeeze <= 1'b0;
            end
          end
          default: ;
        endcase
      end else if (rd_go) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rdata  <= '0;
        unique case (8'(s_axi_araddr))
          A_STATUS: s_axi_rdata <= {29'b0, mode256, squeezing, perm_busy};
          A_DOUT: if (squeezing) begin
            s_axi_rdata <= st[8*pos +: 32];
            pos         <= pos + 8'd4;
            if (pos + 8'd4 == rate) begin
              perm_start     <= 1'b1;
              resume_squeeze <= 1'b1;
              squeezing      <= 1'b0;
            end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
