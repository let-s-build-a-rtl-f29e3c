// alu_tb: checks all six ALU operations on random and corner-case 10-bit
// operands against results computed here from integer arithmetic.
module alu_tb;
  import toy_lite_pkg::*;
  localparam int WIDTH = 10;
  alu_op_e op;
  logic [WIDTH-1:0] a, b, y;
  int checks = 0, failures = 0;

  alu #(.WIDTH(WIDTH)) dut (.op(op), .a(a), .b(b), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] model(alu_op_e o, int unsigned x, int unsigned z);
    int sx;
    int unsigned r;
    sx = (x >= 512) ? int'(x) - 1024 : int'(x);
    case (o)
      ALU_ADD: r = (x + z) % 1024;
      ALU_SUB: r = (x + 1024 - z) % 1024;
      ALU_AND: r = x & z;
      ALU_XOR: r = x ^ z;
      ALU_SHL: r = (z >= 10) ? 0 : (x * (2 ** z)) % 1024;
      default: begin  // arithmetic shift right
        if (z >= 10) r = (sx < 0) ? 1023 : 0;
        else begin
          // floor division by 2**z
          int q;
          q = (sx >= 0) ? sx / (2 ** z) : -(((-sx) + (2 ** z) - 1) / (2 ** z));
          r = (q < 0) ? int'(q + 1024) : q;
        end
      end
    endcase
    return WIDTH'(r);
  endfunction

  initial begin
    alu_op_e ops [6] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_XOR, ALU_SHL, ALU_SHR};
    for (int t = 0; t < 3000; t++) begin
      op = ops[t % 6];
      a  = WIDTH'($urandom);
      case (t % 5)
        0:       b = WIDTH'($urandom_range(0, 12));
        1:       b = '1;
        default: b = WIDTH'($urandom);
      endcase
      if (t % 7 == 0) a = 10'h200;  // most negative value
      #1;
      checks++;
      if (y !== model(op, a, b)) begin
        failures++;
        $display("%s a=%h b=%h: y=%h expected %h", op.name(), a, b, y, model(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
