// idom_pkg: types and constants shared by the isolated digital output module.
//
// The module takes CAMAC commands from the crate dataway. Read, reset and
// test-status commands are answered at once; every command that changes the
// outputs is packed into a cmd_t word and queued in the command FIFO for the
// command executor. The CAMAC function codes and the bit fields of the write
// data (channel number, polarity, defer, width, transfer edge and target)
// follow the module's command list. The 3-bit opcode encoding of the queued
// word is this design's own choice.
package idom_pkg;

  // Number of output channels and of channels in each 16-bit output group.
  localparam int unsigned NCH       = 32;
  localparam int unsigned GROUP_W   = 16;

  // CAMAC function codes implemented by the module.
  localparam logic [4:0] F_READ      = 5'd0;   // read a 16-channel group + status
  localparam logic [4:0] F_STATUS    = 5'd1;   // read status only
  localparam logic [4:0] F_INIT      = 5'd9;   // clear everything, reset executor
  localparam logic [4:0] F_CLR_GROUP = 5'd10;  // clear one group (queued)
  localparam logic [4:0] F_WRITE     = 5'd16;  // overwrite a group
  localparam logic [4:0] F_PRESET    = 5'd17;  // A0: pulse width, A1: transfer
  localparam logic [4:0] F_SET       = 5'd18;  // selective set
  localparam logic [4:0] F_PULSE_ON  = 5'd19;  // selective pulse on
  localparam logic [4:0] F_CLEAR     = 5'd21;  // selective clear
  localparam logic [4:0] F_PULSE_OFF = 5'd23;  // selective pulse off
  localparam logic [4:0] F_TEST      = 5'd27;  // test status (Q only)

  // Operation carried by a queued command word.
  typedef enum logic [2:0] {
    OP_WRITE     = 3'd0,  // F16
    OP_WIDTH     = 3'd1,  // F17 A0
    OP_XFER      = 3'd2,  // F17 A1
    OP_SET       = 3'd3,  // F18
    OP_PULSE_ON  = 3'd4,  // F19
    OP_CLEAR     = 3'd5,  // F21
    OP_PULSE_OFF = 3'd6,  // F23
    OP_CLR_GROUP = 3'd7   // F10
  } op_e;

  // One FIFO word: operation, sub-address (output group) and W1-W16.
  typedef struct packed {
    op_e         op;
    logic        grp;
    logic [15:0] data;
  } cmd_t;

  localparam int unsigned CMD_W = $bits(cmd_t);

  // Source the read gates put on the R lines.
  typedef enum logic [1:0] {
    RSEL_NONE   = 2'd0,
    RSEL_GROUP0 = 2'd1,
    RSEL_GROUP1 = 2'd2,
    RSEL_STATUS = 2'd3
  } rsel_e;

  // Field positions inside W1-W16 (W1 is bit 0).
  localparam int unsigned W_CH_LSB     = 0;   // W1-W5   channel number
  localparam int unsigned W_POL_BIT    = 6;   // W7      pulse polarity (1 = on)
  localparam int unsigned W_DEFER_BIT  = 7;   // W8      1 = defer (F17 A0), 1 = start edge (F17 A1)
  localparam int unsigned W_WIDTH_LSB  = 8;   // W9-W16  width in time units
  localparam int unsigned W_TGT_LSB    = 8;   // W9-W13  channel to trigger

endpackage
