// register_bit_tb: self-checking test of register_bit.
// Drives random d/we/clr for many cycles and compares q with a reference bit
// kept in the testbench: q must follow d only on edges where we is high, and
// clear on clr.
module register_bit_tb;
  logic clk = 1'b0;
  logic clr, we, d, q;
  logic ref_q;
  int   checks = 0, failures = 0;

  register_bit dut (.clk(clk), .clr(clr), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; we = 1'b0; d = 1'b0;
    @(posedge clk); #1;
    ref_q = 1'b0;
    clr = 1'b0;
    for (int i = 0; i < 500; i++) begin
      we  = ($urandom_range(0, 2) == 0);
      d   = 1'($urandom);
      clr = ($urandom_range(0, 30) == 0);
      @(posedge clk); #1;
      if (clr) ref_q = 1'b0;
      else if (we) ref_q = d;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("mismatch at step %0d: q=%b expected %b", i, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
