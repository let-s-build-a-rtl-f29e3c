// sr_flip_flop: one remembered bit with set and reset inputs.
//
// The TOY-Lite design describes this element as two cross-coupled NOR gates:
// a pulse on S makes the stored bit 1, a pulse on R makes it 0, and with both
// low the feedback loop holds the value. This design samples S and R on the
// rising clock edge instead of letting the loop change at any time, so the
// element fits the synchronous rest of the CPU. S and R high together is the
// forbidden input of the NOR pair; here R wins. The CPU uses this bit as its
// RUN state: the RUN switch sets it, a halt instruction or reset clears it.
//
// Timing: q follows S or R one clock edge later.
module sr_flip_flop (
  input  logic clk,
  input  logic s,
  input  logic r,
  output logic q
);

  always_ff @(posedge clk) begin
    if (r)
      q <= 1'b0;
    else if (s)
      q <= 1'b1;
  end

endmodule
