// fts_cmd_out: the "Cmd out" control module of the Fast Task Scheduler.
// It accepts Finished-task commands arriving from the accelerators (already
// merged by fts_acc_mux; s_tid names the sending accelerator) and copies them
// into that accelerator's cmd-out subqueue at its write pointer, then tells
// Cmd in that the accelerator is free again (fin_valid/fin_acc, one cycle).
// The header word is rewritten into the Finished-task format (code 0x03, valid
// byte 0x80, other bits kept); the following words (the task identifier) are
// copied as they are. Before accepting a command it reads the target header
// slot and waits until the host has released it (valid byte 0x00). Payload
// words are written first and the header last, so the host never sees a valid
// header in front of an incomplete entry. When suppress[acc] is set (an
// intermediate repetition of a periodic task) the accelerator is freed but
// nothing is written to the queue.
// Timing: 2 cycles to check the slot, then one cycle per word and one for the
// header write. Queue port read latency is one cycle.
// The queue layout and Finished-task format come from the FTS definition; the
// slot check and write order are this design's choices.
module fts_cmd_out
  import fts_pkg::*;
#(
  parameter int unsigned N_ACC      = 16,
  parameter int unsigned SUBQ_DEPTH = 64,
  localparam int unsigned AIW = (N_ACC > 1) ? $clog2(N_ACC) : 1,
  localparam int unsigned PW  = $clog2(SUBQ_DEPTH),
  localparam int unsigned AW  = $clog2(N_ACC * SUBQ_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WORD_W-1:0] s_tdata,
  input  logic              s_tvalid,
  output logic              s_tready,
  input  logic              s_tlast,
  input  logic [AIW-1:0]    s_tid,
  input  logic [N_ACC-1:0]  suppress,
  output logic              q_we,
  output logic [AW-1:0]     q_addr,
  output logic [WORD_W-1:0] q_wdata,
  input  logic [WORD_W-1:0] q_rdata,
  output logic              fin_valid,
  output logic [AIW-1:0]    fin_acc,
  output logic [31:0]       finished_count
);
  typedef enum logic [2:0] {S_IDLE, S_CHK_RD, S_CHK, S_PAYLOAD, S_HDR} state_t;
  state_t state;

  logic [AIW-1:0]    acc;
  logic [PW-1:0]     wr_ptr [N_ACC];
  logic [PW-1:0]     widx;
  logic [WORD_W-1:0] hdr;
  logic              skip;

  function automatic logic [AW-1:0] slot(logic [AIW-1:0] a, logic [PW-1:0] p);
    return AW'(a) * AW'(SUBQ_DEPTH) + AW'(p);
  endfunction

  always_comb begin
    q_we     = 1'b0;
    q_addr   = slot(acc, wr_ptr[acc] + widx);
    q_wdata  = s_tdata;
    s_tready = 1'b0;
    unique case (state)
      S_CHK:     s_tready = (q_rdata[63:56] == ENTRY_INVALID) || skip;  // header word
      S_PAYLOAD: begin
        s_tready = 1'b1;
        q_we     = s_tvalid && !skip;
      end
      S_HDR: begin
        q_addr  = slot(acc, wr_ptr[acc]);
        q_wdata = {ENTRY_VALID, hdr[55:8], CMD_FINISHED};
        q_we    = !skip;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      acc            <= '0;
      widx           <= '0;
      hdr            <= '0;
      skip           <= 1'b0;
      fin_valid      <= 1'b0;
      fin_acc        <= '0;
      finished_count <= '0;
      for (int a = 0; a < int'(N_ACC); a++) wr_ptr[a] <= '0;
    end else begin
      fin_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (s_tvalid) begin
          acc   <= s_tid;
          skip  <= suppress[s_tid];
          widx  <= '0;
          state <= S_CHK_RD;
        end
        S_CHK_RD: state <= S_CHK;
        S_CHK: if (s_tready && s_tvalid) begin
          hdr   <= s_tdata;
          widx  <= 1;
          state <= s_tlast ? S_HDR : S_PAYLOAD;
        end
        S_PAYLOAD: if (s_tvalid) begin
          widx <= widx + 1'b1;
          if (s_tlast) state <= S_HDR;
        end
        S_HDR: begin
          if (!skip) begin
            wr_ptr[acc]    <= wr_ptr[acc] + widx;
            finished_count <= finished_count + 1;
          end
          fin_valid <= 1'b1;
          fin_acc   <= acc;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
