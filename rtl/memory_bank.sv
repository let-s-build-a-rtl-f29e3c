// memory_bank: bank of WORDS registers of WIDTH bits with one address.
//
// The address is decoded into one-hot word selects. The addressed word always
// appears on the output bus: every word is ANDed with its select line and the
// results are ORed together (the "1-hot OR" of the memory-bank bit). When we is
// 1, the input bus is copied into the addressed word at the next rising clock
// edge; only that word sees its enable-write line. This follows the decoder
// plus memory-selection structure of the TOY-Lite design. TOY-Lite main memory
// is 16 words of 10 bits, the defaults here.
//
// The words are not cleared by reset: main memory is loaded from the switches
// before the machine runs.
module memory_bank #(
  parameter int unsigned WORDS = 16,
  parameter int unsigned WIDTH = 10,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  input  logic             we,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [2**AW-1:0]             sel;
  logic [WORDS-1:0][WIDTH-1:0]  word_q;

  decoder #(.N(AW)) u_dec (
    .addr(addr),
    .sel (sel)
  );

  for (genvar i = 0; i < WORDS; i++) begin : g_word
    processor_register #(.K(WIDTH)) u_word (
      .clk(clk),
      .clr(1'b0),
      .we (we & sel[i]),
      .d  (din),
      .q  (word_q[i])
    );
  end

  mux_onehot #(.WAYS(WORDS), .WIDTH(WIDTH)) u_out (
    .din (word_q),
    .sel (sel[WORDS-1:0]),
    .dout(dout)
  );

endmodule
