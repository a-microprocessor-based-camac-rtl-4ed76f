// tu_timebase: basic time unit (TU) tick generator.
//
// All pulse widths are whole multiples of one TU, which is a fixed number of
// crystal clock counts. The nominal TU is 25 ms. This block divides the
// module clock by TU_CYCLES and raises `tick` for one clock at the end of
// every TU; the pulse counters of all channels step on that tick. The
// default TU_CYCLES = 300000 assumes a 12 MHz clock (12 MHz x 25 ms); the
// clock frequency is this design's assumption. `clr` restarts the TU.
//
// Timing: after reset or clr the first tick comes TU_CYCLES clocks later,
// then every TU_CYCLES clocks.
module tu_timebase #(
  parameter int unsigned TU_CYCLES = 300000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  output logic tick
);

  localparam int unsigned CW = (TU_CYCLES > 1) ? $clog2(TU_CYCLES) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= CW'(TU_CYCLES - 1);
      tick <= 1'b0;
    end else if (clr) begin
      cnt  <= CW'(TU_CYCLES - 1);
      tick <= 1'b0;
    end else if (cnt == '0) begin
      cnt  <= CW'(TU_CYCLES - 1);
      tick <= 1'b1;
    end else begin
      cnt  <= cnt - 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
