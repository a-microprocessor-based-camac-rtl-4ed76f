// tb_pulse_channel: directed tests of one channel's pulse timer, preset and
// transfer entry, with the TU tick driven by the testbench. Covers pulse on
// and off with the default width, a one-shot width/polarity preset used by a
// transfer trigger, an immediate width, start-edge and end-edge transfers
// (each firing once), a DC write cancelling a pulse, width 0, and clear.
module tb_pulse_channel;
  localparam logic [7:0] DW = 8'd3;
  logic clk = 0, rst_n = 0, clr = 0, tick = 0;
  logic dc_we = 0, dc_val = 0, preset_we = 0, preset_pol = 0;
  logic [7:0] preset_width = '0, go_width = '0;
  logic go = 0, go_pol = 0, go_width_valid = 0, trig = 0;
  logic xfer_we = 0, xfer_edge = 0;
  logic [4:0] xfer_target = '0;
  logic lvl_we, lvl_val, active, fire;
  logic [4:0] fire_target;
  int checks = 0, failures = 0;
  // sampled in the last cycle
  logic s_we, s_val, s_fire;
  logic [4:0] s_tgt;

  pulse_channel #(.DEFAULT_WIDTH(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Apply the strobes that are set, let one clock edge pass, clear them.
  task automatic cyc();
    #1;
    s_we = lvl_we; s_val = lvl_val; s_fire = fire; s_tgt = fire_target;
    @(negedge clk);
    {dc_we, preset_we, go, go_width_valid, trig, xfer_we, tick, clr} = '0;
  endtask

  // n ticks, each followed by idle clocks; returns the tick number on which
  // the level was written (0 if none) and whether fire was seen.
  task automatic ticks(input int n, output int wrote_at, output logic wval,
                       output int fired_at);
    wrote_at = 0; fired_at = 0; wval = 0;
    for (int k = 1; k <= n; k++) begin
      tick = 1; cyc();
      if (s_we)  begin if (wrote_at == 0) wrote_at = k; wval = s_val; end
      if (s_fire) fired_at = k;
      cyc(); cyc();
      if (s_we) check(0, "level written between ticks");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int at, fat;
  logic v;

  initial begin
    @(negedge clk); rst_n = 1; @(negedge clk);
    // 1. pulse on, default width
    go = 1; go_pol = 1; cyc();
    check(s_we && s_val == 1, "pulse on drives 1 at start");
    check(active, "active after start");
    ticks(5, at, v, fat);
    check(at == DW && v == 0, $sformatf("default pulse ends on tick %0d (got %0d)", DW, at));
    check(!active, "inactive after end");
    // 2. pulse off, default width
    go = 1; go_pol = 0; cyc();
    check(s_we && s_val == 0, "pulse off drives 0 at start");
    ticks(5, at, v, fat);
    check(at == DW && v == 1, "pulse off ends with 1");
    // 3. preset width 5, polarity off, then a transfer trigger uses it
    preset_we = 1; preset_pol = 0; preset_width = 8'd5; cyc();
    check(!s_we && !active, "preset does not start a pulse");
    trig = 1; cyc();
    check(s_we && s_val == 0, "trigger uses preset polarity");
    ticks(7, at, v, fat);
    check(at == 5 && v == 1, $sformatf("preset width 5 (got %0d)", at));
    // preset used once: next trigger is default on
    trig = 1; cyc();
    check(s_we && s_val == 1, "trigger default polarity on");
    ticks(5, at, v, fat);
    check(at == DW && v == 0, "trigger default width");
    // 4. preset width honoured by a selective pulse command, polarity from command
    preset_we = 1; preset_pol = 0; preset_width = 8'd2; cyc();
    go = 1; go_pol = 1; cyc();
    check(s_we && s_val == 1, "command polarity wins");
    ticks(4, at, v, fat);
    check(at == 2, "preset width used by command");
    // 5. immediate width
    go = 1; go_pol = 1; go_width_valid = 1; go_width = 8'd4; cyc();
    ticks(6, at, v, fat);
    check(at == 4, "immediate width 4");
    // 6. start-edge transfer fires once
    xfer_we = 1; xfer_edge = 1; xfer_target = 5'd23; cyc();
    go = 1; go_pol = 1; cyc();
    check(s_fire && s_tgt == 5'd23, "start-edge transfer fires with start");
    ticks(4, at, v, fat);
    check(fat == 0, "start-edge transfer silent at end");
    go = 1; go_pol = 1; cyc();
    check(!s_fire, "transfer used once");
    ticks(4, at, v, fat);
    // 7. end-edge transfer
    xfer_we = 1; xfer_edge = 0; xfer_target = 5'd7; cyc();
    go = 1; go_pol = 0; cyc();
    check(!s_fire, "end-edge transfer silent at start");
    ticks(4, at, v, fat);
    check(fat == DW && at == DW, "end-edge transfer fires with end");
    // 8. DC write cancels a pulse
    go = 1; go_pol = 1; cyc();
    tick = 1; cyc();
    dc_we = 1; dc_val = 1; cyc();
    check(s_we && s_val == 1 && !active, "DC write cancels pulse");
    ticks(5, at, v, fat);
    check(at == 0, "no end after cancel");
    // 9. width 0 means default
    go = 1; go_pol = 1; go_width_valid = 1; go_width = 8'd0; cyc();
    ticks(5, at, v, fat);
    check(at == DW, "width 0 -> default");
    // 10. clear drops pulse, preset and transfer
    preset_we = 1; preset_pol = 0; preset_width = 8'd9; cyc();
    xfer_we = 1; xfer_edge = 1; xfer_target = 5'd1; cyc();
    go = 1; go_pol = 1; cyc();  // consumes the start-edge entry
    check(s_fire, "fire before clear");
    xfer_we = 1; xfer_edge = 1; xfer_target = 5'd1; cyc();
    preset_we = 1; preset_pol = 0; preset_width = 8'd9; cyc();
    clr = 1; cyc();
    check(!active, "clear stops pulse");
    trig = 1; cyc();
    check(s_we && s_val == 1 && !s_fire, "after clear: no preset, no transfer");
    ticks(5, at, v, fat);
    check(at == DW, "after clear: default width");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
