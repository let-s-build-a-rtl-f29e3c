// decoder_tb: exhaustive check of the 4-to-16 decoder: for every address
// exactly the line with that index is 1.
module decoder_tb;
  localparam int N = 4;
  logic [N-1:0]    addr;
  logic [2**N-1:0] sel;
  int checks = 0, failures = 0;

  decoder #(.N(N)) dut (.addr(addr), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**N; a++) begin
      addr = N'(a);
      #1;
      for (int j = 0; j < 2**N; j++) begin
        checks++;
        if (sel[j] !== (j == a)) begin
          failures++;
          $display("addr %0d: line %0d is %b", a, j, sel[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
