// pulse_channel: pulse timer, width preset and transfer entry of one output.
//
// Each output can be held at a DC level or pulsed on or off for a whole
// number of time units (TU). Pulsing "on" drives the output to 1 at the
// start and to 0 at the end, whatever its level before; pulsing "off" is the
// mirror image. So an output that is already on and is pulsed on simply
// switches off one pulse width later (a delayed transition).
//
// Per channel this block keeps:
//   * the running pulse: remaining count, polarity, active flag;
//   * a width/polarity preset (F17 A0 with defer set). It applies to the
//     next pulse of this channel only, then the DEFAULT_WIDTH (mTU) applies;
//   * a transfer entry (F17 A1): when this channel's next pulse starts
//     (edge=1) or ends (edge=0), `fire` pulses for one clock with
//     `fire_target` naming the channel to trigger. The entry is used once.
//
// Inputs, all one-clock strobes from the executor:
//   dc_we/dc_val       force the output to a DC level; cancels a running pulse
//   preset_we          store preset_pol/preset_width for the next pulse
//   go                 start a pulse with polarity go_pol; its width is
//                      go_width if go_width_valid, else the preset if one is
//                      stored, else DEFAULT_WIDTH
//   trig               start a pulse from another channel's transfer: the
//                      preset's polarity and width, or "on" for DEFAULT_WIDTH
//   xfer_we            store a transfer entry (xfer_edge, xfer_target)
//   tick               one TU has passed: a running count is decremented and
//                      the pulse ends when it reaches zero
// Outputs: lvl_we/lvl_val tell the output latch what to write this clock.
//
// Timing: a pulse of width w started between two ticks ends on the w-th
// following tick, so it lasts between w-1 and w TU; this follows the single
// shared TU interrupt that decrements all counters. Priority inside one clock:
// clr, then dc_we, then go/trig (a restart), then the end of the pulse. A
// width of 0 is taken as the default width (the command range is 1..255).
module pulse_channel #(
  parameter logic [7:0] DEFAULT_WIDTH = 8'd10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       tick,
  input  logic       dc_we,
  input  logic       dc_val,
  input  logic       preset_we,
  input  logic       preset_pol,
  input  logic [7:0] preset_width,
  input  logic       go,
  input  logic       go_pol,
  input  logic       go_width_valid,
  input  logic [7:0] go_width,
  input  logic       trig,
  input  logic       xfer_we,
  input  logic       xfer_edge,
  input  logic [4:0] xfer_target,
  output logic       lvl_we,
  output logic       lvl_val,
  output logic       active,
  output logic       fire,
  output logic [4:0] fire_target
);

  logic [7:0] cnt;
  logic       pol;
  logic       pre_valid, pre_pol;
  logic [7:0] pre_width;
  logic       x_valid, x_edge;
  logic [4:0] x_target;

  logic       start, end_evt;
  logic       start_pol;
  logic [7:0] start_width, chosen_width;

  always_comb begin
    start = (go || trig) && !dc_we;
    if (go) begin
      start_pol = go_pol;
      if (go_width_valid)  chosen_width = go_width;
      else if (pre_valid)  chosen_width = pre_width;
      else                 chosen_width = DEFAULT_WIDTH;
    end else begin
      start_pol    = pre_valid ? pre_pol : 1'b1;
      chosen_width = pre_valid ? pre_width : DEFAULT_WIDTH;
    end
    start_width = (chosen_width == 8'd0) ? DEFAULT_WIDTH : chosen_width;
    end_evt     = active && tick && (cnt == 8'd1) && !start && !dc_we;

    lvl_we  = dc_we || start || end_evt;
    lvl_val = dc_we ? dc_val : (start ? start_pol : !pol);

    fire        = x_valid && ((start && x_edge) || (end_evt && !x_edge));
    fire_target = x_target;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      pol       <= 1'b0;
      active    <= 1'b0;
      pre_valid <= 1'b0;
      pre_pol   <= 1'b0;
      pre_width <= '0;
      x_valid   <= 1'b0;
      x_edge    <= 1'b0;
      x_target  <= '0;
    end else if (clr) begin
      cnt       <= '0;
      pol       <= 1'b0;
      active    <= 1'b0;
      pre_valid <= 1'b0;
      pre_pol   <= 1'b0;
      pre_width <= '0;
      x_valid   <= 1'b0;
      x_edge    <= 1'b0;
      x_target  <= '0;
    end else begin
      // running pulse
      if (dc_we) begin
        active <= 1'b0;
      end else if (start) begin
        active <= 1'b1;
        pol    <= start_pol;
        cnt    <= start_width;
      end else if (end_evt) begin
        active <= 1'b0;
        cnt    <= '0;
      end else if (active && tick) begin
        cnt <= cnt - 1'b1;
      end

      // width/polarity preset: consumed by the pulse that uses it
      if (preset_we) begin
        pre_valid <= 1'b1;
        pre_pol   <= preset_pol;
        pre_width <= preset_width;
      end else if (start && !(go && go_width_valid)) begin
        pre_valid <= 1'b0;
      end

      // transfer entry: used once
      if (xfer_we) begin
        x_valid  <= 1'b1;
        x_edge   <= xfer_edge;
        x_target <= xfer_target;
      end else if (fire) begin
        x_valid <= 1'b0;
      end
    end
  end

  a_no_zero_count: assert property (@(posedge clk) disable iff (!rst_n) active |-> cnt != 8'd0);

endmodule
