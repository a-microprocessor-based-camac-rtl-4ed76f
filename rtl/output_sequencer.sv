// output_sequencer: command executor and pulse-transfer router.
//
// This block does in logic what the module's on-board microcontroller program
// does: it takes one queued command at a time from the FIFO, applies it to the
// 32 channels, runs their pulse timers from the TU tick, and passes
// pulse-transfer triggers from channel to channel.
//
// Command handling. When the FIFO shows a word (`present`), the executor
// spends EXEC_CYCLES clocks on it (standing in for the microcontroller's
// interrupt and service time), then applies it in one clock and pops it with
// `fifo_rd`: the FIFO output is freed only once the command is complete.
//   OP_WRITE      group <- W1-W16 (DC)
//   OP_SET        W bits = 1 switch on, 0 = no change
//   OP_CLEAR      W bits = 1 switch off, 0 = no change
//   OP_CLR_GROUP  whole group off
//   OP_PULSE_ON   W bits = 1 start an "on" pulse (preset or default width)
//   OP_PULSE_OFF  W bits = 1 start an "off" pulse
//   OP_WIDTH      channel W1-W5: W8=1 store W7 polarity and W9-W16 width for
//                 its next pulse; W8=0 start that pulse now
//   OP_XFER       channel W1-W5: when its next pulse starts (W8=1) or ends
//                 (W8=0), trigger channel W9-W13
// DC commands cancel any pulse running on the channels they touch.
//
// Pulse transfer. A channel whose transfer entry fires raises its target's
// trigger one clock later (a registered trigger vector), so chains such as
// 18 -> 3 -> 7 -> 24 -> 23 advance one clock per link and cannot form a
// combinational loop. Triggers from several channels to one target merge.
//
// Outputs lvl_we/lvl_val go to the output latches. The timer tick has
// priority in that the counters step in the same clock as a command is
// applied; a command that touches a channel overrides that channel's end of
// pulse in that clock.
module output_sequencer
  import idom_pkg::*;
#(
  parameter int unsigned EXEC_CYCLES   = 600,
  parameter logic [7:0]  DEFAULT_WIDTH = 8'd10
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           tick,
  input  logic           fifo_present,
  input  cmd_t           fifo_rdata,
  output logic           fifo_rd,
  output logic [NCH-1:0] lvl_we,
  output logic [NCH-1:0] lvl_val,
  output logic [NCH-1:0] pulse_active
);

  localparam int unsigned WW = (EXEC_CYCLES > 0) ? $clog2(EXEC_CYCLES + 1) : 1;

  logic [WW-1:0]  wait_cnt;
  logic           exec;
  logic [NCH-1:0] trig_pend, trig_next;

  // per-channel strobes
  logic [NCH-1:0] dc_we, dc_val, preset_we, go, go_pol, go_wv, xfer_we, fire;
  logic [4:0]     fire_target [NCH];

  cmd_t        c;
  logic [4:0]  sel_ch;

  assign c      = fifo_rdata;
  assign sel_ch = c.data[W_CH_LSB +: 5];
  assign exec   = fifo_present && (wait_cnt == WW'(EXEC_CYCLES));
  assign fifo_rd = exec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 wait_cnt <= '0;
    else if (clr || exec)       wait_cnt <= '0;
    else if (fifo_present)      wait_cnt <= wait_cnt + 1'b1;
  end

  // Decode the command at the FIFO output into per-channel strobes.
  always_comb begin
    dc_we = '0; dc_val = '0; preset_we = '0; go = '0; go_pol = '0;
    go_wv = '0; xfer_we = '0;
    for (int i = 0; i < NCH; i++) begin
      logic in_grp;
      logic b;
      in_grp = (c.grp == 1'(i / GROUP_W));
      b      = c.data[i % GROUP_W];
      if (exec) begin
        unique case (c.op)
          OP_WRITE:     if (in_grp)      begin dc_we[i] = 1'b1; dc_val[i] = b;    end
          OP_SET:       if (in_grp && b) begin dc_we[i] = 1'b1; dc_val[i] = 1'b1; end
          OP_CLEAR:     if (in_grp && b) begin dc_we[i] = 1'b1; dc_val[i] = 1'b0; end
          OP_CLR_GROUP: if (in_grp)      begin dc_we[i] = 1'b1; dc_val[i] = 1'b0; end
          OP_PULSE_ON:  if (in_grp && b) begin go[i] = 1'b1; go_pol[i] = 1'b1; end
          OP_PULSE_OFF: if (in_grp && b) begin go[i] = 1'b1; go_pol[i] = 1'b0; end
          OP_WIDTH:
            if (sel_ch == 5'(i)) begin
              if (c.data[W_DEFER_BIT]) preset_we[i] = 1'b1;
              else begin
                go[i]     = 1'b1;
                go_pol[i] = c.data[W_POL_BIT];
                go_wv[i]  = 1'b1;
              end
            end
          OP_XFER:      if (sel_ch == 5'(i)) xfer_we[i] = 1'b1;
          default: ;
        endcase
      end
    end
  end

  // Route transfer triggers to their targets, one clock later.
  always_comb begin
    trig_next = '0;
    for (int i = 0; i < NCH; i++)
      if (fire[i]) trig_next[fire_target[i]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   trig_pend <= '0;
    else if (clr) trig_pend <= '0;
    else          trig_pend <= trig_next;
  end

  for (genvar g = 0; g < NCH; g++) begin : g_ch
    pulse_channel #(.DEFAULT_WIDTH(DEFAULT_WIDTH)) u_ch (
      .clk            (clk),
      .rst_n          (rst_n),
      .clr            (clr),
      .tick           (tick),
      .dc_we          (dc_we[g]),
      .dc_val         (dc_val[g]),
      .preset_we      (preset_we[g]),
      .preset_pol     (c.data[W_POL_BIT]),
      .preset_width   (c.data[W_WIDTH_LSB +: 8]),
      .go             (go[g]),
      .go_pol         (go_pol[g]),
      .go_width_valid (go_wv[g]),
      .go_width       (c.data[W_WIDTH_LSB +: 8]),
      .trig           (trig_pend[g]),
      .xfer_we        (xfer_we[g]),
      .xfer_edge      (c.data[W_DEFER_BIT]),
      .xfer_target    (c.data[W_TGT_LSB +: 5]),
      .lvl_we         (lvl_we[g]),
      .lvl_val        (lvl_val[g]),
      .active         (pulse_active[g]),
      .fire           (fire[g]),
      .fire_target    (fire_target[g])
    );
  end

endmodule
