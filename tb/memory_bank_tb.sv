// memory_bank_tb: checks the 16 x 10 main memory, and a second instance at
// four 6-bit words (the small example memory of the TOY-Lite lecture). Fills
// every word, then runs random reads and writes against a reference array. A read is
// combinational: the addressed word must be on the output bus in the same
// cycle; a write shows up after the next clock edge and touches only the
// addressed word.
module memory_bank_tb;
  localparam int WORDS = 16, WIDTH = 10;
  logic clk = 1'b0;
  logic [3:0]       addr;
  logic             we;
  logic [WIDTH-1:0] din, dout;
  logic [WIDTH-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  memory_bank #(.WORDS(WORDS), .WIDTH(WIDTH)) dut (
    .clk(clk), .addr(addr), .we(we), .din(din), .dout(dout));

  // Four 6-bit words.
  logic [1:0] s_addr;
  logic       s_we;
  logic [5:0] s_din, s_dout;
  logic [5:0] s_ref [4];

  memory_bank #(.WORDS(4), .WIDTH(6)) dut_small (
    .clk(clk), .addr(s_addr), .we(s_we), .din(s_din), .dout(s_dout));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    we = 1'b0;
    for (int a = 0; a < WORDS; a++) begin
      addr = 4'(a);
      #1;
      checks++;
      if (dout !== ref_mem[a]) begin
        failures++;
        $display("word %0d: read %h expected %h", a, dout, ref_mem[a]);
      end
    end
  endtask

  initial begin
    we = 1'b0; addr = '0; din = '0;
    s_we = 1'b0; s_addr = '0; s_din = '0;
    @(negedge clk);
    for (int a = 0; a < WORDS; a++) begin
      addr = 4'(a); din = WIDTH'($urandom); we = 1'b1;
      ref_mem[a] = din;
      @(negedge clk);
    end
    check_all();
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      addr = 4'($urandom);
      din  = WIDTH'($urandom);
      we   = 1'($urandom);
      #1;
      checks++;  // addressed word visible before the edge
      if (dout !== ref_mem[addr]) begin
        failures++;
        $display("step %0d addr %0d: read %h expected %h", i, addr, dout, ref_mem[addr]);
      end
      @(posedge clk);
      if (we) ref_mem[addr] = din;
    end
    @(negedge clk);
    check_all();
    // Small memory: fill, then random traffic.
    @(negedge clk);
    for (int a = 0; a < 4; a++) begin
      s_addr = 2'(a); s_din = 6'($urandom); s_we = 1'b1;
      s_ref[a] = s_din;
      @(negedge clk);
    end
    for (int i = 0; i < 400; i++) begin
      s_addr = 2'($urandom);
      s_din  = 6'($urandom);
      s_we   = 1'($urandom);
      #1;
      checks++;
      if (s_dout !== s_ref[s_addr]) begin
        failures++;
        $display("4x6 step %0d addr %0d: read %h expected %h", i, s_addr, s_dout, s_ref[s_addr]);
      end
      @(posedge clk);
      if (s_we) s_ref[s_addr] = s_din;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
