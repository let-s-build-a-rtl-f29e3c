// register_file: the TOY-Lite registers, NREGS words of WIDTH bits with two
// read selects and one write select.
//
// Each bit is a dual-port memory-bank bit: one enable-write line and two
// independent "select for read" lines, so two different registers can drive
// the two ALU input buses at the same time. Read port 1 shows register
// rd_addr1 on dout1, read port 2 shows register rd_addr2 on dout2, both
// combinationally. When we is 1, din is copied into register wr_addr at the
// next rising clock edge. Each address goes through its own decoder and each
// output bus is a one-hot AND-OR of the words, as in the memory bank.
//
// clr (synchronous) zeroes all registers; the reset is this design's choice.
// Defaults: 4 registers of 10 bits, as in TOY-Lite.
module register_file #(
  parameter int unsigned NREGS = 4,
  parameter int unsigned WIDTH = 10,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] din,
  input  logic [AW-1:0]    rd_addr1,
  input  logic [AW-1:0]    rd_addr2,
  output logic [WIDTH-1:0] dout1,
  output logic [WIDTH-1:0] dout2
);

  logic [2**AW-1:0]            wsel, rsel1, rsel2;
  logic [NREGS-1:0][WIDTH-1:0] reg_q;

  decoder #(.N(AW)) u_wdec  (.addr(wr_addr),  .sel(wsel));
  decoder #(.N(AW)) u_rdec1 (.addr(rd_addr1), .sel(rsel1));
  decoder #(.N(AW)) u_rdec2 (.addr(rd_addr2), .sel(rsel2));

  for (genvar i = 0; i < NREGS; i++) begin : g_reg
    processor_register #(.K(WIDTH)) u_reg (
      .clk(clk),
      .clr(clr),
      .we (we & wsel[i]),
      .d  (din),
      .q  (reg_q[i])
    );
  end

  mux_onehot #(.WAYS(NREGS), .WIDTH(WIDTH)) u_rd1 (
    .din (reg_q),
    .sel (rsel1[NREGS-1:0]),
    .dout(dout1)
  );

  mux_onehot #(.WAYS(NREGS), .WIDTH(WIDTH)) u_rd2 (
    .din (reg_q),
    .sel (rsel2[NREGS-1:0]),
    .dout(dout2)
  );

endmodule
