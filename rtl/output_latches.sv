// output_latches: the 32 output latches that drive the opto-isolators.
//
// The executor writes individual latch bits: every bit with we[i] high takes
// d[i] at the clock edge, the others hold. `clr` (dataway Z, or F9) switches
// all outputs off at once. q is read back by the read gates and drives the
// isolated output switches (1 = switch closed, "on").
// The bit-wise write enable is this design's choice; in the module the
// latches are loaded by the microcontroller's output port.
module output_latches #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic [N-1:0] we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else          q <= (q & ~we) | (d & we);
  end

endmodule
