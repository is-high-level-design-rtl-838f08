// hif_pkg: types and constants shared by the host interface controller and
// the experiment backends.
//
// The host sees three 32-bit registers. A write to REG_DATA_IN pushes a word
// into the input FIFO, a read of REG_RESULT pops the result FIFO, and a write
// to REG_CONTROL carries one of four reset commands in its two low bits. The
// register roles, the command codes, the 16-word FIFO depth and the all-ones
// "no result" word follow the original platform; the numeric register
// offsets are this design's choice, matching the offsets the host software
// used (0 = data, 1 = result, 2 = control).
package hif_pkg;

  localparam int unsigned DATA_W     = 32;
  localparam int unsigned FIFO_DEPTH = 16;

  // Value returned by a result read that finds no result waiting.
  localparam logic [DATA_W-1:0] NULL_WORD = '1;

  typedef logic [DATA_W-1:0] word_t;

  // Host-visible registers.
  typedef enum logic [1:0] {
    REG_DATA_IN = 2'd0,   // write only: push into the input FIFO
    REG_RESULT  = 2'd1,   // read only : pop from the result FIFO
    REG_CONTROL = 2'd2    // write only: reset / flush / final pop
  } reg_addr_e;

  // Commands written to REG_CONTROL, bits [1:0].
  typedef enum logic [1:0] {
    CMD_FINAL_POP    = 2'b00,  // push one padding word into the result FIFO
    CMD_RESULT_FLUSH = 2'b01,  // empty the result FIFO
    CMD_INPUT_FLUSH  = 2'b10,  // empty the input FIFO
    CMD_SYSTEM_RESET = 2'b11   // empty both FIFOs and reset the backend
  } ctrl_cmd_e;

  // Which experiment backend is connected (stands in for loading a
  // different FPGA configuration).
  typedef enum logic [1:0] {
    EXP_AVG    = 2'd0,
    EXP_TEA    = 2'd1,
    EXP_DCT    = 2'd2,
    EXP_CORDIC = 2'd3
  } exp_sel_e;

endpackage
