// fts_cmd_in: the "Cmd in" control module of the Fast Task Scheduler.
// It visits the N_ACC cmd-in subqueues round robin. For an accelerator that is
// not busy it reads the entry at that subqueue's read pointer; an entry whose
// valid byte [63:56] is 0x80 is a command. The command length follows from its
// code: Execute task (0x01) = 3 header words + 2 words per argument, Execute
// periodic task (0x05) = 4 header words + 2 per argument, any other code = 1
// word. The words are streamed in order on an AXI stream (m_*) with tdest =
// accelerator index and tlast on the last word; afterwards the slots are
// cleared to 0 (invalid), handing them back to the host, and the read pointer
// advances (wrapping inside the subqueue). Odd codes mark the accelerator busy
// until Cmd out reports its Finished-task command (fin_valid/fin_acc).
//
// Periodic tasks: word 3 holds the number of repetitions [31:0] and the period
// in microseconds [63:32]. The command is re-sent from the queue until it has
// been launched that many times, each launch waiting for the previous one to
// finish and for the period to elapse since the previous launch (a
// microsecond tick derived from CYCLES_PER_US). Its slots are released only
// after the last launch. While more launches remain, suppress[acc] tells Cmd
// out not to forward the intermediate Finished-task commands to the host.
//
// Data reuse: when reuse_en is set, each argument's (ID, value) pair is
// compared with the argument at the same position of the previous task sent to
// the same accelerator (which is either still running there or has just run).
// If they match and the argument asks for an input copy (flag 0x10), the copy
// flag is cleared and flag bit 7 is set to record the optimisation. Up to
// MAX_ARGS argument positions are tracked per accelerator.
//
// Timing: a command word takes 3 cycles (address, read, send) plus 2 more for
// each argument value word when reuse is on; stream back-pressure adds cycles.
// The queue port has one cycle of read latency.
// Which queue layout, codes, flags and formats exist comes from the FTS
// command definitions; the scan order, the cycle-level sequencing, the way
// periodic repetitions are paced and the per-position reuse match are this
// design's choices.
module fts_cmd_in
  import fts_pkg::*;
#(
  parameter int unsigned N_ACC         = 16,
  parameter int unsigned SUBQ_DEPTH    = 64,
  parameter int unsigned MAX_ARGS      = 15,
  parameter int unsigned CYCLES_PER_US = 100,
  localparam int unsigned AIW = (N_ACC > 1) ? $clog2(N_ACC) : 1,
  localparam int unsigned PW  = $clog2(SUBQ_DEPTH),
  localparam int unsigned AW  = $clog2(N_ACC * SUBQ_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reuse_en,
  // cmd in queue, FTS port
  output logic              q_we,
  output logic [AW-1:0]     q_addr,
  output logic [WORD_W-1:0] q_wdata,
  input  logic [WORD_W-1:0] q_rdata,
  // commands to accelerators
  output logic [WORD_W-1:0] m_tdata,
  output logic              m_tvalid,
  input  logic              m_tready,
  output logic              m_tlast,
  output logic [AIW-1:0]    m_tdest,
  // from Cmd out
  input  logic              fin_valid,
  input  logic [AIW-1:0]    fin_acc,
  output logic [N_ACC-1:0]  suppress,
  // status
  output logic [N_ACC-1:0]  busy,
  output logic [31:0]       reuse_count
);
  typedef enum logic [3:0] {
    S_SCAN, S_HDR_RD, S_HDR_CHK, S_RD, S_RD_W, S_VAL_RD, S_VAL_W, S_SEND, S_CLR, S_DONE
  } state_t;
  state_t state;

  logic [AIW-1:0] acc;                   // accelerator being served
  logic [PW-1:0]  rd_ptr [N_ACC];        // subqueue read pointers
  logic [PW-1:0]  widx;                  // word index inside the command
  logic [PW-1:0]  len;                   // command length in words
  logic [PW-1:0]  hdr_words;
  logic [7:0]     code;
  logic [WORD_W-1:0] cur_word, val_word;
  logic           have_val;

  // periodic task bookkeeping
  logic [31:0] rep_left [N_ACC];         // launches still to do after the running one
  logic [31:0] period   [N_ACC];
  logic [31:0] launch_us[N_ACC];
  logic        repeat_launch;            // current send is a repetition
  logic [31:0] now_us;
  logic [$clog2(CYCLES_PER_US+1)-1:0] us_div;

  // reuse table: last task's arguments per accelerator
  logic [31:0]        last_id  [N_ACC][MAX_ARGS];
  logic [WORD_W-1:0]  last_val [N_ACC][MAX_ARGS];
  logic [N_ACC-1:0]   last_ok  [MAX_ARGS];

  logic [7:0]     nargs_q;

  function automatic logic [AW-1:0] slot(logic [AIW-1:0] a, logic [PW-1:0] p);
    return AW'(a) * AW'(SUBQ_DEPTH) + AW'(p);
  endfunction

  // argument position of the current word (valid when it is an argument flags word)
  logic [PW-1:0] arg_off;
  logic          is_flags_word;
  logic [PW-1:0] arg_k;
  assign arg_off       = widx - hdr_words;
  assign is_flags_word = (widx >= hdr_words) && !arg_off[0];
  assign arg_k         = arg_off >> 1;

  // this launch is the command's last one: its slots are released after it
  logic final_launch;
  assign final_launch = repeat_launch ? (rep_left[acc] == 32'd1) : (rep_left[acc] == 32'd0);

  logic eligible;
  logic period_ok;
  assign period_ok = (now_us - launch_us[acc]) >= period[acc];
  assign eligible  = !busy[acc] && (rep_left[acc] == 0 || period_ok);

  // microsecond time base
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      us_div <= '0;
      now_us <= '0;
    end else if (us_div == CYCLES_PER_US - 1) begin
      us_div <= '0;
      now_us <= now_us + 1;
    end else begin
      us_div <= us_div + 1'b1;
    end
  end

  always_comb begin
    q_we    = 1'b0;
    q_wdata = '0;
    q_addr  = slot(acc, rd_ptr[acc] + widx);
    if (state == S_HDR_RD || state == S_HDR_CHK) q_addr = slot(acc, rd_ptr[acc]);
    if (state == S_VAL_RD || state == S_VAL_W)   q_addr = slot(acc, rd_ptr[acc] + widx + 1'b1);
    if (state == S_CLR) q_we = 1'b1;
  end

  assign m_tdata  = cur_word;
  assign m_tvalid = (state == S_SEND);
  assign m_tlast  = (widx == len - 1'b1);
  assign m_tdest  = acc;

  always_comb
    for (int a = 0; a < int'(N_ACC); a++) suppress[a] = (rep_left[a] != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_SCAN;
      acc           <= '0;
      widx          <= '0;
      len           <= '0;
      hdr_words     <= '0;
      code          <= '0;
      cur_word      <= '0;
      val_word      <= '0;
      have_val      <= 1'b0;
      repeat_launch <= 1'b0;
      busy          <= '0;
      reuse_count   <= '0;
      nargs_q       <= '0;
      for (int a = 0; a < int'(N_ACC); a++) begin
        rd_ptr[a]    <= '0;
        rep_left[a]  <= '0;
        period[a]    <= '0;
        launch_us[a] <= '0;
      end
      for (int k = 0; k < int'(MAX_ARGS); k++) last_ok[k] <= '0;
    end else begin
      if (fin_valid) busy[fin_acc] <= 1'b0;

      unique case (state)
        S_SCAN: begin
          if (eligible) state <= S_HDR_RD;
          else          acc   <= (acc == AIW'(N_ACC - 1)) ? '0 : acc + 1'b1;
        end
        S_HDR_RD: state <= S_HDR_CHK;
        S_HDR_CHK: begin
          if (q_rdata[63:56] == ENTRY_VALID) begin
            code          <= q_rdata[7:0];
            nargs_q       <= q_rdata[15:8];
            repeat_launch <= (rep_left[acc] != 0);
            if (q_rdata[7:0] == CMD_EXEC) begin
              hdr_words <= PW'(HDR_WORDS_EXEC);
              len       <= PW'(HDR_WORDS_EXEC) + PW'({q_rdata[15:8], 1'b0});
            end else if (q_rdata[7:0] == CMD_EXEC_PERIODIC) begin
              hdr_words <= PW'(HDR_WORDS_PERIODIC);
              len       <= PW'(HDR_WORDS_PERIODIC) + PW'({q_rdata[15:8], 1'b0});
            end else begin
              hdr_words <= PW'(1);
              len       <= PW'(1);
            end
            widx  <= '0;
            state <= S_RD;
          end else begin
            acc   <= (acc == AIW'(N_ACC - 1)) ? '0 : acc + 1'b1;
            state <= S_SCAN;
          end
        end
        S_RD: state <= S_RD_W;
        S_RD_W: begin
          cur_word <= q_rdata;
          if (code == CMD_EXEC_PERIODIC && widx == PW'(3) && !repeat_launch) begin
            rep_left[acc] <= (q_rdata[31:0] == 0) ? 32'd0 : q_rdata[31:0] - 1;
            period[acc]   <= q_rdata[63:32];
          end
          if (reuse_en && is_flags_word && widx + 1'b1 < len) state <= S_VAL_RD;
          else                                                 state <= S_SEND;
        end
        S_VAL_RD: state <= S_VAL_W;
        S_VAL_W: begin
          val_word <= q_rdata;
          have_val <= 1'b1;
          state    <= S_SEND;
          if (arg_k < PW'(MAX_ARGS)) begin
            if (last_ok[arg_k][acc] && last_id[acc][arg_k] == cur_word[63:32] &&
                last_val[acc][arg_k] == q_rdata && (cur_word[7:0] & FLAG_IN_COPY) != 0) begin
              cur_word[7:0] <= (cur_word[7:0] & ~FLAG_IN_COPY) | 8'h80;
              reuse_count   <= reuse_count + 1;
            end
            last_id[acc][arg_k]  <= cur_word[63:32];
            last_val[acc][arg_k] <= q_rdata;
          end
        end
        S_SEND: begin
          if (m_tready) begin
            widx <= widx + 1'b1;
            // busy from the header onwards, so an early Finished cannot be missed
            if (widx == '0 && cmd_makes_busy(code)) busy[acc] <= 1'b1;
            if (have_val) begin
              cur_word <= val_word;
              have_val <= 1'b0;
            end else if (widx == len - 1'b1) begin
              widx  <= '0;
              state <= final_launch ? S_CLR : S_DONE;
            end else begin
              state <= S_RD;
            end
          end
        end
        S_CLR: begin
          widx <= widx + 1'b1;
          if (widx == len - 1'b1) state <= S_DONE;
        end
        S_DONE: begin
          if (final_launch) rd_ptr[acc] <= rd_ptr[acc] + len;
          if (repeat_launch && rep_left[acc] != 0) rep_left[acc] <= rep_left[acc] - 1;
          launch_us[acc] <= now_us;
          // positions beyond this task's argument count are no longer comparable
          for (int k = 0; k < int'(MAX_ARGS); k++)
            last_ok[k][acc] <= reuse_en && (k < int'(nargs_q));
          acc   <= (acc == AIW'(N_ACC - 1)) ? '0 : acc + 1'b1;
          state <= S_SCAN;
        end
        default: state <= S_SCAN;
      endcase
    end
  end
endmodule
