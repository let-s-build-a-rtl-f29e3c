// program_counter: W-bit counter built from a register, an incrementer and a
// two-input multiplexer, as in the TOY-Lite program counter.
//
// The multiplexer chooses what the register is written with: the input bus
// when load is on, the register's value plus one when increment is on. load
// and increment are the multiplexer's one-hot select lines, so exactly one of
// them is expected whenever enable write (we) is on; the write happens at the
// next rising clock edge. The count is always available on the output bus q.
// clr (synchronous) sets the count to 0; the reset is this design's choice.
// Default width 4 bits (16 instruction addresses).
module program_counter #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         clr,
  input  logic [W-1:0] din,
  input  logic         load,
  input  logic         increment,
  input  logic         we,
  output logic [W-1:0] q
);

  logic [W-1:0] q_plus1;
  logic [W-1:0] next;

  incrementer #(.W(W)) u_inc (
    .a(q),
    .y(q_plus1)
  );

  mux_onehot #(.WAYS(2), .WIDTH(W)) u_mux (
    .din ({q_plus1, din}),
    .sel ({increment, load}),
    .dout(next)
  );

  processor_register #(.K(W)) u_reg (
    .clk(clk),
    .clr(clr),
    .we (we),
    .d  (next),
    .q  (q)
  );

  // A write must pick exactly one source.
  a_one_source : assert property (@(posedge clk) disable iff (clr)
                                  we |-> (load ^ increment));

endmodule
