// processor_register_tb: self-checking test of the 10-bit processor register
// (the IR size). Random writes with and without enable write; the output must
// always equal the last value written, and the output must stay unchanged
// between edges.
module processor_register_tb;
  localparam int K = 10;
  logic clk = 1'b0;
  logic clr, we;
  logic [K-1:0] d, q, ref_q;
  int checks = 0, failures = 0;

  processor_register #(.K(K)) dut (.clk(clk), .clr(clr), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; we = 1'b0; d = '0;
    @(posedge clk); #1;
    clr = 1'b0;
    ref_q = '0;
    checks++;
    if (q !== '0) begin failures++; $display("clear failed: %h", q); end
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom);
      d  = K'($urandom);
      #2;
      checks++;  // no change before the edge
      if (q !== ref_q) begin failures++; $display("early change at %0d", i); end
      @(posedge clk); #1;
      if (we) ref_q = d;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("mismatch at step %0d: q=%h expected %h", i, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
