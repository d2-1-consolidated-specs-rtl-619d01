// comm_fifo: synchronous first-word-fall-through FIFO used for the port
// buffers of the Communication IP. rd_data shows the oldest word whenever
// empty is low; a push and a pop may happen in the same cycle. 'count' is the
// fill level and 'space' the free entries, which the switch uses for virtual
// cut-through decisions. DEPTH must be a power of two.
module comm_fifo #(
  parameter int unsigned W     = 128,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned CW   = $clog2(DEPTH) + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] wr_data,
  input  logic         pop,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic [CW-1:0] count,
  output logic [CW-1:0] space
);
  localparam int unsigned PW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;

  assign empty   = (count == 0);
  assign full    = (count == CW'(DEPTH));
  assign space   = CW'(DEPTH) - count;
  assign rd_data = mem[rp];

  always_ff @(posedge clk) if (push && !full) mem[wp] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push && !full) wp <= wp + 1'b1;
      if (pop && !empty) rp <= rp + 1'b1;
      count <= count + CW'(push && !full) - CW'(pop && !empty);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("comm_fifo overflow");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("comm_fifo underflow");
endmodule
