// incrementer_tb: exhaustive check of the 4-bit incrementer, including the
// wrap from 15 to 0.
module incrementer_tb;
  localparam int W = 4;
  logic [W-1:0] a, y;
  int checks = 0, failures = 0;

  incrementer #(.W(W)) dut (.a(a), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**W; i++) begin
      a = W'(i);
      #1;
      checks++;
      if (int'(y) != (i + 1) % (2**W)) begin
        failures++;
        $display("a=%0d y=%0d", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
