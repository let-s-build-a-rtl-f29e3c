// processor_register: K-bit register made of K register bits.
//
// Contents are always available on the output bus q. When enable write (we)
// is asserted, the K input bits are copied into the register at the next
// rising clock edge. All bits share the enable-write line, as in the design's
// drawing of a register as a row of register bits. In TOY-Lite it holds the
// 10-bit instruction register (IR) and the 4-bit register inside the program
// counter. clr is a synchronous clear added by this design for reset.
module processor_register #(
  parameter int unsigned K = 10
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         we,
  input  logic [K-1:0] d,
  output logic [K-1:0] q
);

  for (genvar i = 0; i < K; i++) begin : g_bit
    register_bit u_bit (
      .clk(clk),
      .clr(clr),
      .we (we),
      .d  (d[i]),
      .q  (q[i])
    );
  end

endmodule
