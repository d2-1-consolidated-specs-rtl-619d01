// fts_cmd_queue: one FTS command queue (used for both "cmd in" and "cmd out").
// A DEPTH x 64-bit memory divided into SUBQ subqueues of DEPTH/SUBQ entries;
// subqueue k belongs to accelerator k and occupies addresses
// [k*DEPTH/SUBQ, (k+1)*DEPTH/SUBQ-1]. The sizes (1024 entries, 16 subqueues of
// 64) are the FTS defaults.
// Two synchronous ports: the host port (h_*) and the FTS port (f_*). Each reads
// with one cycle of latency (rdata valid the cycle after the address) and writes
// in the cycle we is high. The host bus itself is abstracted to this plain RAM
// port; if both ports write one address in the same cycle the FTS port wins
// (a design choice; the host and the FTS never own the same slot at once).
module fts_cmd_queue #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned SUBQ  = 16,
  parameter int unsigned W     = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          h_we,
  input  logic [AW-1:0] h_addr,
  input  logic [W-1:0]  h_wdata,
  output logic [W-1:0]  h_rdata,
  input  logic          f_we,
  input  logic [AW-1:0] f_addr,
  input  logic [W-1:0]  f_wdata,
  output logic [W-1:0]  f_rdata
);
  initial assert (DEPTH % SUBQ == 0) else $error("DEPTH must be a multiple of SUBQ");

  logic [W-1:0] mem [DEPTH];

  // FPGA block RAM power-up contents: every slot starts as an invalid entry
  initial for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (h_we && !(f_we && f_addr == h_addr)) mem[h_addr] <= h_wdata;
    if (f_we) mem[f_addr] <= f_wdata;
    h_rdata <= mem[h_addr];
    f_rdata <= mem[f_addr];
  end
endmodule
