// mux_onehot_tb: checks the 3-way, 4-bit multiplexer (the size of the
// example multiplexer of the design) with random buses: each select line
// alone copies its own bus, and no select line gives zero.
module mux_onehot_tb;
  localparam int WAYS = 3, WIDTH = 4;
  logic [WAYS-1:0][WIDTH-1:0] din;
  logic [WAYS-1:0]            sel;
  logic [WIDTH-1:0]           dout;
  int checks = 0, failures = 0;

  mux_onehot #(.WAYS(WAYS), .WIDTH(WIDTH)) dut (.din(din), .sel(sel), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int w = 0; w < WAYS; w++) din[w] = WIDTH'($urandom);
      for (int s = 0; s < WAYS; s++) begin
        sel = WAYS'(1) << s;
        #1;
        checks++;
        if (dout !== din[s]) begin
          failures++;
          $display("select %0d: out %h expected %h", s, dout, din[s]);
        end
      end
      sel = '0;
      #1;
      checks++;
      if (dout !== '0) begin failures++; $display("no select: out %h", dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
