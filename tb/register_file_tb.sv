// register_file_tb: checks the 4 x 10 dual-ported register file. After a
// clear, random writes and two random read addresses per cycle are compared
// with a reference array; both read buses must show their own register at
// the same time.
module register_file_tb;
  localparam int NREGS = 4, WIDTH = 10;
  logic clk = 1'b0;
  logic clr, we;
  logic [1:0] wr_addr, rd_addr1, rd_addr2;
  logic [WIDTH-1:0] din, dout1, dout2;
  logic [WIDTH-1:0] ref_r [NREGS];
  int checks = 0, failures = 0;

  register_file #(.NREGS(NREGS), .WIDTH(WIDTH)) dut (
    .clk(clk), .clr(clr), .we(we), .wr_addr(wr_addr), .din(din),
    .rd_addr1(rd_addr1), .rd_addr2(rd_addr2), .dout1(dout1), .dout2(dout2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; we = 1'b0; wr_addr = '0; rd_addr1 = '0; rd_addr2 = '0; din = '0;
    @(negedge clk);
    clr = 1'b0;
    for (int r = 0; r < NREGS; r++) ref_r[r] = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we       = 1'($urandom);
      wr_addr  = 2'($urandom);
      din      = WIDTH'($urandom);
      rd_addr1 = 2'($urandom);
      rd_addr2 = 2'($urandom);
      #1;
      checks += 2;
      if (dout1 !== ref_r[rd_addr1]) begin
        failures++;
        $display("step %0d port1 R%0d: %h expected %h", i, rd_addr1, dout1, ref_r[rd_addr1]);
      end
      if (dout2 !== ref_r[rd_addr2]) begin
        failures++;
        $display("step %0d port2 R%0d: %h expected %h", i, rd_addr2, dout2, ref_r[rd_addr2]);
      end
      @(posedge clk);
      if (we) ref_r[wr_addr] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
