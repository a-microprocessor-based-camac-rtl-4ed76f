// tb_output_sequencer: drives the command executor from a modelled FIFO and
// checks the resulting output levels. Covers group write, selective set and
// clear, group clear, pulse on/off with default and preset widths, the
// delayed transition, the executor's per-command time (EXEC_CYCLES), and
// the five-channel pulse-transfer chain 18 -> 3 -> 7 -> 24 -> 23, in which
// each link must follow the previous edge by exactly one clock and each pulse
// must last its preset number of TU ticks.
module tb_output_sequencer;
  import idom_pkg::*;
  localparam int unsigned EXEC = 3;
  localparam logic [7:0]  DW   = 8'd4;
  localparam int          TUC  = 20;

  logic clk = 0, rst_n = 0, clr = 0, tick = 0;
  logic fifo_present, fifo_rd;
  cmd_t fifo_rdata;
  logic [NCH-1:0] lvl_we, lvl_val, pulse_active;
  int checks = 0, failures = 0;

  cmd_t        q[$];
  logic [31:0] lat = '0;
  longint      cycle = 0, ntick = 0;
  longint      rise_cyc[32], fall_cyc[32], rise_tick[32], fall_tick[32];
  longint      present_since = -1;

  output_sequencer #(.EXEC_CYCLES(EXEC), .DEFAULT_WIDTH(DW)) dut (.*);

  assign fifo_present = (q.size() > 0);
  assign fifo_rdata   = (q.size() > 0) ? q[0] : '0;

  always #5 clk = ~clk;

  // TU tick every TUC clocks
  always @(posedge clk) begin
    cycle <= cycle + 1;
    tick  <= (cycle % TUC == TUC - 1);
  end

  // model of the output latches, edge recorder, FIFO pop and exec timing
  always @(posedge clk) begin
    if (tick) ntick = ntick + 1;
    for (int i = 0; i < 32; i++)
      if (lvl_we[i] && lvl_val[i] != lat[i]) begin
        if (lvl_val[i]) begin rise_cyc[i] = cycle; rise_tick[i] = ntick; end
        else            begin fall_cyc[i] = cycle; fall_tick[i] = ntick; end
      end
    lat = (lat & ~lvl_we) | (lvl_val & lvl_we);
    if (fifo_present && present_since < 0) present_since = cycle;
    if (fifo_rd) begin
      checks++;
      if (cycle - present_since != EXEC) begin
        failures++;
        $display("FAIL: command took %0d clocks, expected %0d", cycle - present_since, EXEC);
      end
      void'(q.pop_front());
      present_since = -1;
    end
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic push(input op_e op, input logic grp, input logic [15:0] d);
    cmd_t c;
    c.op = op; c.grp = grp; c.data = d;
    q.push_back(c);
  endtask

  task automatic drain();
    while (q.size() > 0) @(negedge clk);
    @(negedge clk);
  endtask

  function automatic logic [15:0] wdef(int ch, logic pol, logic defer, int width);
    return 16'(ch) | (16'(pol) << W_POL_BIT) | (16'(defer) << W_DEFER_BIT) | (16'(width) << W_WIDTH_LSB);
  endfunction
  function automatic logic [15:0] wxfer(int ch, logic at_start, int target);
    return 16'(ch) | (16'(at_start) << W_DEFER_BIT) | (16'(target) << W_TGT_LSB);
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      rise_cyc[i] = -1; fall_cyc[i] = -1; rise_tick[i] = -1; fall_tick[i] = -1;
    end
    repeat (2) @(negedge clk); rst_n = 1;
    // DC commands
    push(OP_WRITE, 0, 16'hA5A5); push(OP_WRITE, 1, 16'h1234); drain();
    check(lat == 32'h1234_A5A5, $sformatf("write: %h", lat));
    push(OP_SET, 0, 16'h0F00); push(OP_CLEAR, 1, 16'h0030); drain();
    check(lat == 32'h1204_AFA5, $sformatf("set/clear: %h", lat));
    push(OP_CLR_GROUP, 0, 16'hFFFF); drain();
    check(lat == 32'h1204_0000, $sformatf("group clear: %h", lat));
    push(OP_CLR_GROUP, 1, 16'h0000); drain();
    check(lat == 32'h0, "group 1 clear");
    // pulse on channel 2 (default width), pulse off channel 20 (was on)
    push(OP_SET, 1, 16'h0010); drain();
    push(OP_PULSE_ON, 0, 16'h0004); push(OP_PULSE_OFF, 1, 16'h0010); drain();
    check(lat[2] == 1 && lat[20] == 0, "pulses started");
    repeat ((DW + 1) * TUC) @(negedge clk);
    check(lat[2] == 0 && lat[20] == 1, "pulses ended");
    check(fall_tick[2] - rise_tick[2] == longint'(DW), "default width on ch2");
    check(rise_tick[20] - fall_tick[20] == longint'(DW), "default width on ch20");
    // delayed transition: ch5 on, pulse on -> stays on, goes off after width
    push(OP_SET, 0, 16'h0020); drain();
    push(OP_WIDTH, 0, wdef(5, 1, 0, 2)); drain();
    check(lat[5] == 1, "delayed turn-off: still on");
    repeat (3 * TUC) @(negedge clk);
    check(lat[5] == 0, "delayed turn-off: off after width");

    // Pulse transfer chain: 18 -> 3 -> 7 -> 24 -> 23
    push(OP_WRITE, 0, 16'h0088);            // channels 3 and 7 on
    push(OP_WRITE, 1, 16'h0000);
    push(OP_WIDTH, 1, wdef(18, 1, 1, 2));   // A bit is ignored for F17
    push(OP_WIDTH, 0, wdef(3, 0, 1, 3));
    push(OP_WIDTH, 0, wdef(7, 0, 1, 2));
    push(OP_WIDTH, 0, wdef(24, 1, 1, 2));
    push(OP_WIDTH, 0, wdef(23, 1, 1, 2));
    push(OP_XFER, 0, wxfer(18, 0, 3));
    push(OP_XFER, 0, wxfer(3, 1, 7));
    push(OP_XFER, 0, wxfer(7, 0, 24));
    push(OP_XFER, 0, wxfer(24, 1, 23));
    drain();
    check(lat == 32'h0000_0088, "chain armed, nothing moved");
    push(OP_PULSE_ON, 1, 16'h0004);         // channel 18
    drain();
    repeat (10 * TUC) @(negedge clk);
    check(fall_tick[18] - rise_tick[18] == 2, "ch18 width 2");
    check(fall_cyc[3] == fall_cyc[18] + 1, "ch3 starts one clock after ch18 ends");
    check(fall_cyc[7] == fall_cyc[3] + 1, "ch7 starts one clock after ch3 starts");
    check(rise_tick[3] - fall_tick[3] == 3, "ch3 width 3");
    check(rise_tick[7] - fall_tick[7] == 2, "ch7 width 2");
    check(rise_cyc[24] == rise_cyc[7] + 1, "ch24 starts one clock after ch7 ends");
    check(rise_cyc[23] == rise_cyc[24] + 1, "ch23 starts one clock after ch24 starts");
    check(fall_tick[24] - rise_tick[24] == 2, "ch24 width 2");
    check(fall_tick[23] - rise_tick[23] == 2, "ch23 width 2");
    check(lat == 32'h0000_0088, "chain done: 3 and 7 back on, rest off");
    check(pulse_active == '0, "no pulse left running");
    // clear stops everything
    push(OP_PULSE_ON, 0, 16'hFFFF); drain();
    check(pulse_active[15:0] == 16'hFFFF, "16 pulses running");
    clr = 1; @(negedge clk); clr = 0;
    check(pulse_active == '0, "clr stops pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
