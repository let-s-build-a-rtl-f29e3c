// sr_flip_flop_tb: checks set, reset, hold and the reset-wins rule of the
// clocked SR flip-flop with random inputs against a reference bit.
module sr_flip_flop_tb;
  logic clk = 1'b0;
  logic s, r, q, ref_q;
  int checks = 0, failures = 0;
  int n_set = 0, n_reset = 0, n_hold = 0;

  sr_flip_flop dut (.clk(clk), .s(s), .r(r), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 1'b0; r = 1'b1;
    @(posedge clk); #1;
    ref_q = 1'b0;
    for (int i = 0; i < 600; i++) begin
      s = ($urandom_range(0, 3) == 0);
      r = ($urandom_range(0, 3) == 0);
      @(posedge clk); #1;
      if (r) begin ref_q = 1'b0; n_reset++; end
      else if (s) begin ref_q = 1'b1; n_set++; end
      else n_hold++;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("step %0d s=%b r=%b: q=%b expected %b", i, s, r, q, ref_q);
      end
    end
    checks++;
    if (n_set == 0 || n_reset == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
