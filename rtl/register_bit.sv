// register_bit: one stored bit with an enable-write input.
//
// The bit keeps its value and shows it on q at all times. When we is 1 the
// value on d is copied in: a 0 is written when d is 0 and we is 1, a 1 when d
// is 1 and we is 1, exactly the two write conditions of the register bit of
// the design. The design builds the bit from a cross-coupled switch pair that
// is written while the clock pulse is on; here the write happens on the rising
// edge of clk, which is this design's synchronous reading of that pulse.
// clr (synchronous, active high) forces the bit to 0; it is an addition of
// this design so that the machine starts from a known state.
//
// Timing: q changes one clock edge after we (or clr) is seen high.
module register_bit (
  input  logic clk,
  input  logic clr,
  input  logic we,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk) begin
    if (clr)
      q <= 1'b0;
    else if (we)
      q <= d;
  end

endmodule
