// mux_onehot: WAYS-input multiplexer with one select line per input bus.
//
// Exactly one select line is meant to be hot; the bits of the input bus whose
// select line is on are copied to the output bus. Each output bit is the OR,
// over all inputs, of (input bit AND its select line), the AND-OR structure of
// the design's multiplexer. If no select line is on the output is all zeros.
// Purely combinational. The buses are packed as an array, bus i in din[i].
module mux_onehot #(
  parameter int unsigned WAYS  = 3,
  parameter int unsigned WIDTH = 4
) (
  input  logic [WAYS-1:0][WIDTH-1:0] din,
  input  logic [WAYS-1:0]            sel,
  output logic [WIDTH-1:0]           dout
);

  always_comb begin
    dout = '0;
    for (int i = 0; i < WAYS; i++)
      dout |= din[i] & {WIDTH{sel[i]}};
  end

endmodule
