// fts_pkg: constants shared by the Fast Task Scheduler (FTS) blocks.
// Command codes, the valid-entry marker and the argument flag bits follow the
// command formats of the FTS queues (64-bit words; code in [7:0], number of
// arguments in [15:8], valid marker in [63:56]). Odd command codes make the
// target accelerator busy until it returns a Finished-task command.
package fts_pkg;
  localparam int unsigned WORD_W = 64;

  localparam logic [7:0] CMD_EXEC          = 8'h01;
  localparam logic [7:0] CMD_FINISHED      = 8'h03;
  localparam logic [7:0] CMD_EXEC_PERIODIC = 8'h05;

  localparam logic [7:0] ENTRY_VALID   = 8'h80;
  localparam logic [7:0] ENTRY_INVALID = 8'h00;

  // argument flag bits (argument word 0, bits [7:0])
  localparam logic [7:0] FLAG_IN_COPY  = 8'h10;  // copy input into wrapper BRAM
  localparam logic [7:0] FLAG_OUT_COPY = 8'h20;  // copy output out of wrapper BRAM
  localparam int unsigned FLAG_REUSED_BIT = 7;   // set by Cmd in when an input copy was removed

  // words before the argument list
  localparam int unsigned HDR_WORDS_EXEC     = 3;  // header, task id, parent task id
  localparam int unsigned HDR_WORDS_PERIODIC = 4;  // + repetitions / period word

  function automatic logic cmd_makes_busy(logic [7:0] code);
    return code[0];
  endfunction
endpackage
