// decoder: N-bit binary address to 2**N one-hot select lines.
//
// Exactly one output line, the one whose index equals addr, is 1. The
// memory banks use it to connect only the addressed word to the buses.
// Purely combinational.
module decoder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]      addr,
  output logic [2**N-1:0]   sel
);

  always_comb begin
    for (int i = 0; i < 2**N; i++)
      sel[i] = (addr == N'(i));
  end

endmodule
