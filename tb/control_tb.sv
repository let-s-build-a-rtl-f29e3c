// control_tb: checks the control block on its own.
// The testbench plays the IR and the first register read bus and compares the
// control word in every cycle with the expected lines, written here as a
// table of what each phase and opcode must do. It also checks that the phase
// alternates fetch/execute (two cycles per instruction), that RUN is set by
// the run switch and cleared by halt, and that the switches drive the
// datapath only while the machine is stopped.
module control_tb;
  import toy_lite_pkg::*;

  logic  clk = 1'b0;
  logic  rst, run, deposit, load_pc;
  word_t ir, rd1_val;
  logic  running, execute;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  int n_op [16];
  int n_taken = 0, n_not_taken = 0, n_panel = 0;

  control dut (
    .clk(clk), .rst(rst), .run(run), .deposit(deposit), .load_pc(load_pc),
    .op(opcode_e'(ir[9:6])), .rd1_val(rd1_val), .running(running), .execute(execute), .ctrl(ctrl));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0h expected %0h (ir=%h)", $time, what, got, exp, ir);
    end
  endtask

  // Expected lines during execute, per opcode.
  task automatic check_execute();
    int op;
    logic zero, pos, taken;
    op    = int'(ir[9:6]);
    zero  = (rd1_val == 0);
    pos   = (rd1_val != 0) && !rd1_val[9];
    taken = (op == 'hC && zero) || (op == 'hD && pos);
    expect_eq("ir_we", ctrl.ir_we, 0);
    expect_eq("reg_we", ctrl.reg_we, (op >= 1 && op <= 8) || op == 'hA || op == 'hF);
    expect_eq("mem_we", ctrl.mem_we, op == 9 || op == 'hB);
    expect_eq("pc_we", ctrl.pc_we, taken || op == 'hE || op == 'hF);
    if (ctrl.pc_we) begin
      expect_eq("pc_load", ctrl.pc_load, 1);
      expect_eq("pc_in_sel", ctrl.pc_in_sel, (op == 'hE) ? 3'b010 : 3'b001);
    end
    if (op == 8 || op == 9) expect_eq("addr_sel", ctrl.addr_sel, 4'b0010);
    if (op == 'hA || op == 'hB) expect_eq("addr_sel", ctrl.addr_sel, 4'b0100);
    if (op == 9 || op == 'hB) expect_eq("mem_din_sel", ctrl.mem_din_sel, 2'b01);
    if (ctrl.reg_we)
      expect_eq("reg_in_sel", ctrl.reg_in_sel,
                (op <= 6) ? 4'b0001 : (op == 7) ? 4'b0100 : (op == 'hF) ? 4'b1000 : 4'b0010);
    if (op == 9 || op == 'hB || op == 'hC || op == 'hD || op == 'hE)
      expect_eq("rd1_sel", ctrl.rd1_sel, 2'b10);
    if (op >= 1 && op <= 6) begin
      expect_eq("rd1_sel", ctrl.rd1_sel, 2'b01);
      expect_eq("alu_op", int'(ctrl.alu_op), op - 1);
    end
    if (op == 'hC || op == 'hD) begin
      if (taken) n_taken++; else n_not_taken++;
    end
    n_op[op]++;
  endtask

  initial begin
    rst = 1'b1; run = 1'b0; deposit = 1'b0; load_pc = 1'b0; ir = '0; rd1_val = '0;
    @(negedge clk);
    rst = 1'b0;
    for (int prog = 0; prog < 60; prog++) begin
      // Stopped: switches own the datapath.
      for (int k = 0; k < 4; k++) begin
        deposit = 1'($urandom);
        load_pc = 1'($urandom);
        #1;
        expect_eq("running", running, 0);
        expect_eq("panel addr_sel", ctrl.addr_sel, 4'b1000);
        expect_eq("panel mem_din_sel", ctrl.mem_din_sel, 2'b10);
        expect_eq("panel mem_we", ctrl.mem_we, deposit);
        expect_eq("panel pc_we", ctrl.pc_we, load_pc);
        expect_eq("panel pc_load", ctrl.pc_load, load_pc);
        expect_eq("panel pc_in_sel", ctrl.pc_in_sel, 3'b100);
        expect_eq("panel reg_we", ctrl.reg_we, 0);
        expect_eq("panel ir_we", ctrl.ir_we, 0);
        n_panel++;
        @(negedge clk);
      end
      deposit = 1'b0; load_pc = 1'b0;
      run = 1'b1;
      @(negedge clk);
      run = 1'b0;
      // Run instructions until a halt, at most 40.
      for (int n = 0; n < 40; n++) begin
        // Fetch cycle.
        deposit = 1'($urandom);  // switches are ignored while running
        load_pc = 1'($urandom);
        #1;
        expect_eq("running", running, 1);
        expect_eq("phase fetch", execute, 0);
        expect_eq("fetch addr_sel", ctrl.addr_sel, 4'b0001);
        expect_eq("fetch ir_we", ctrl.ir_we, 1);
        expect_eq("fetch pc_we", ctrl.pc_we, 1);
        expect_eq("fetch pc_inc", ctrl.pc_inc, 1);
        expect_eq("fetch reg_we", ctrl.reg_we, 0);
        expect_eq("fetch mem_we", ctrl.mem_we, 0);
        @(negedge clk);
        // Execute cycle: the IR now holds a new instruction.
        ir = word_t'($urandom);
        if (n == 0 && ir[9:6] == 4'h0) ir[9:6] = 4'h1;
        case ($urandom_range(0, 3))
          0:       rd1_val = '0;
          1:       rd1_val = 10'h200;
          default: rd1_val = word_t'($urandom);
        endcase
        #1;
        expect_eq("phase execute", execute, 1);
        check_execute();
        @(negedge clk);
        if (ir[9:6] == 4'h0) begin
          expect_eq("halted", running, 0);
          break;
        end
      end
      if (running) begin
        rst = 1'b1;
        @(negedge clk);
        rst = 1'b0;
        expect_eq("reset stops", running, 0);
      end
      deposit = 1'b0; load_pc = 1'b0;
    end
    for (int op = 0; op < 16; op++) begin
      checks++;
      if (n_op[op] == 0) begin failures++; $display("opcode %h never executed", op); end
    end
    checks++;
    if (n_taken == 0 || n_not_taken == 0 || n_panel == 0) begin
      failures++;
      $display("branch outcome or front-panel cycle missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
