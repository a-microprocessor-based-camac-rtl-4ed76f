// idom_top: 32-channel isolated digital output module for a CAMAC crate.
//
// Data path: the CAMAC decoder answers reads, resets and status tests inside
// the dataway cycle and queues every output-changing command into a 16-word
// FIFO, so a host can load a whole sequence at full dataway speed. The
// output sequencer takes the commands one at a time at its own pace, runs
// a pulse timer per channel from the TU timebase and drives the 32 output
// latches; the read gates put latch contents and status back on the R lines.
//
// Ports:
//   CAMAC dataway (synchronous to clk): n, f, a, s1, s2, z, w (W1-W16),
//     r (R1-R20), x, q.
//   c9_ok_j1/j2: 1 when pin C9 of output connector J1/J2 is above +12 V
//     (the comparators are outside this logic).
//   out[31:0]: drive to the 32 opto-isolated switches, 1 = on; channels
//     0-15 leave through J1, 16-31 through J2.
//   rst_n: power-on reset; Z*S2 and F9 A0 clear the module as well.
// Parameters: TU_CYCLES clocks per time unit (25 ms at an assumed 12 MHz
// clock), DEFAULT_WIDTH the default pulse width in TU (250 ms / 25 ms = 10),
// FIFO_DEPTH 16 words, EXEC_CYCLES the executor's time per command.
module idom_top
  import idom_pkg::*;
#(
  parameter int unsigned TU_CYCLES     = 300000,
  parameter logic [7:0]  DEFAULT_WIDTH = 8'd10,
  parameter int unsigned FIFO_DEPTH    = 16,
  parameter int unsigned EXEC_CYCLES   = 600
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        n,
  input  logic [4:0]  f,
  input  logic [3:0]  a,
  input  logic        s1,
  input  logic        s2,
  input  logic        z,
  input  logic [15:0] w,
  output logic [19:0] r,
  output logic        x,
  output logic        q,
  input  logic        c9_ok_j1,
  input  logic        c9_ok_j2,
  output logic [31:0] out
);

  logic           fifo_full, fifo_present, fifo_wr, fifo_rd, clear_all, tick;
  cmd_t           fifo_wdata, fifo_rdata;
  rsel_e          rsel;
  logic [NCH-1:0] lvl_we, lvl_val;

  camac_decoder u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .n          (n),
    .f          (f),
    .a          (a),
    .s1         (s1),
    .s2         (s2),
    .z          (z),
    .w          (w),
    .fifo_full  (fifo_full),
    .c9_ok      (c9_ok_j1 && c9_ok_j2),
    .x          (x),
    .q          (q),
    .rsel       (rsel),
    .fifo_wr    (fifo_wr),
    .fifo_wdata (fifo_wdata),
    .clear_all  (clear_all)
  );

  cmd_fifo #(.WIDTH(CMD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .clr     (clear_all),
    .wr      (fifo_wr),
    .wdata   (fifo_wdata),
    .rd      (fifo_rd),
    .rdata   (fifo_rdata),
    .full    (fifo_full),
    .present (fifo_present)
  );

  tu_timebase #(.TU_CYCLES(TU_CYCLES)) u_tu (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (clear_all),
    .tick  (tick)
  );

  output_sequencer #(.EXEC_CYCLES(EXEC_CYCLES), .DEFAULT_WIDTH(DEFAULT_WIDTH)) u_seq (
    .clk          (clk),
    .rst_n        (rst_n),
    .clr          (clear_all),
    .tick         (tick),
    .fifo_present (fifo_present),
    .fifo_rdata   (fifo_rdata),
    .fifo_rd      (fifo_rd),
    .lvl_we       (lvl_we),
    .lvl_val      (lvl_val),
    .pulse_active ()
  );

  output_latches #(.N(NCH)) u_lat (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (clear_all),
    .we    (lvl_we),
    .d     (lvl_val),
    .q     (out)
  );

  read_gates u_rd (
    .rsel         (rsel),
    .latches      (out),
    .c9_ok_j1     (c9_ok_j1),
    .c9_ok_j2     (c9_ok_j2),
    .fifo_full    (fifo_full),
    .fifo_present (fifo_present),
    .r            (r)
  );

endmodule
