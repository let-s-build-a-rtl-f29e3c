// program_counter_tb: checks the 4-bit program counter: load from the input
// bus, increment (with wrap from 15 to 0), and hold when enable write is off.
// Each operation takes effect at the next clock edge.
module program_counter_tb;
  localparam int W = 4;
  logic clk = 1'b0;
  logic clr, load, increment, we;
  logic [W-1:0] din, q, ref_q;
  int checks = 0, failures = 0;
  int n_load = 0, n_inc = 0, n_wrap = 0, n_hold = 0;

  program_counter #(.W(W)) dut (
    .clk(clk), .clr(clr), .din(din), .load(load), .increment(increment),
    .we(we), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; load = 1'b0; increment = 1'b1; we = 1'b0; din = '0;
    @(negedge clk);
    clr = 1'b0;
    ref_q = '0;
    checks++;
    if (q !== '0) begin failures++; $display("clear failed"); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      load      = ($urandom_range(0, 3) == 0);
      increment = !load;
      we        = ($urandom_range(0, 4) != 0);
      din       = W'($urandom);
      @(posedge clk);
      if (!we) n_hold++;
      else if (load) begin ref_q = din; n_load++; end
      else begin
        if (ref_q == '1) n_wrap++;
        ref_q = ref_q + 1'b1;
        n_inc++;
      end
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("step %0d: q=%0d expected %0d", i, q, ref_q);
      end
    end
    checks++;
    if (n_load == 0 || n_inc == 0 || n_wrap == 0 || n_hold == 0) begin
      failures++;
      $display("not every case was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
