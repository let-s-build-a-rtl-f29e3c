// alu: arithmetic and logic unit of TOY-Lite.
//
// Computes y from the two register buses a and b for the six ALU instructions:
// add (a + b), subtract (a - b), and (a & b), xor (a ^ b), shift left (a << b)
// and shift right (a >> b). The operation set is the one of the TOY-Lite
// instruction table; the details below are this design's choices, following
// the larger TOY machine:
//   - add and subtract are two's complement and wrap modulo 2**WIDTH;
//   - the shift amount is the whole unsigned value of b; shifting by WIDTH or
//     more gives 0 for a left shift;
//   - shift right is arithmetic: it copies the sign bit of a in from the left.
// Purely combinational.
module alu
  import toy_lite_pkg::*;
#(
  parameter int unsigned WIDTH = WORD_W
) (
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_XOR: y = a ^ b;
      ALU_SHL: y = a << b;
      ALU_SHR: y = WIDTH'($signed(a) >>> b);
      default: y = '0;
    endcase
  end

endmodule
