// incrementer: adds one to a W-bit value, wrapping from all ones to zero.
//
// The program counter uses it to step to the next instruction. The design
// names the block only by its function; a plain W-bit +1 is used.
// Purely combinational.
module incrementer #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);

  assign y = a + W'(1);

endmodule
