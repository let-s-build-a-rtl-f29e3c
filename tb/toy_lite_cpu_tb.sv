// toy_lite_cpu_tb: end-to-end test of the TOY-Lite CPU at its default size.
//
// Programs are loaded through the switches (deposit, load_pc), started with
// run, and followed instruction by instruction against an instruction-level
// model of TOY-Lite kept in this testbench. After every fetch the IR and PC
// are compared; after every execute the PC, the RUN light and the four
// registers are compared. Each instruction must take exactly two clock
// cycles. When the machine halts (or is stopped by reset after a cap on the
// number of instructions) the whole memory is read back through the switches
// and the memory light and compared with the model.
//
// The first program is a fixed multiply-by-repeated-addition loop whose result
// (3 * 5 = 15) is also checked as a literal. The rest are random 16-word
// programs. The testbench counts how often each mechanism happened (every
// opcode, taken and untaken branches, deposit, PC load, run, halt, stop by
// reset) and counts a failure for any that never did.
module toy_lite_cpu_tb;
  import toy_lite_pkg::*;

  localparam int NPROG     = 400;
  localparam int MAX_STEPS = 60;

  logic  clk = 1'b0;
  logic  rst, deposit, load_pc, run;
  addr_t sw_addr;
  word_t sw_data;
  logic  running, execute;
  addr_t pc;
  word_t ir, mem_out;

  toy_lite_cpu dut (
    .clk(clk), .rst(rst), .sw_addr(sw_addr), .sw_data(sw_data),
    .deposit(deposit), .load_pc(load_pc), .run(run),
    .running(running), .execute(execute), .pc(pc), .ir(ir), .mem_out(mem_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_op [16];
  int n_bz_taken = 0, n_bz_not = 0, n_bp_taken = 0, n_bp_not = 0;
  int n_deposit = 0, n_load_pc = 0, n_run = 0, n_halt = 0, n_reset_stop = 0;
  longint cycles = 0;

  always @(posedge clk) cycles++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- instruction-level model ----------------
  logic [9:0] m_mem [16];
  logic [9:0] m_r   [4];
  logic [3:0] m_pc;
  logic [9:0] m_ir;
  logic       m_running;

  function automatic logic [9:0] sext_shr(logic [9:0] a, logic [9:0] s);
    logic [9:0] r;
    r = a;
    for (int i = 0; i < int'(s) && i < 10; i++) r = {r[9], r[9:1]};
    return r;
  endfunction

  function automatic logic [9:0] shl(logic [9:0] a, logic [9:0] s);
    logic [9:0] r;
    r = a;
    for (int i = 0; i < int'(s) && i < 10; i++) r = {r[8:0], 1'b0};
    return r;
  endfunction

  // Fetch part of one model step.
  task automatic model_fetch();
    m_ir = m_mem[m_pc];
    m_pc = m_pc + 4'd1;
  endtask

  // Execute part of one model step.
  task automatic model_execute();
    int op, d, s, t;
    logic [3:0] a;
    op = int'(m_ir[9:6]); d = int'(m_ir[5:4]); s = int'(m_ir[3:2]); t = int'(m_ir[1:0]);
    a  = m_ir[3:0];
    n_op[op]++;
    case (op)
      'h0: begin m_running = 1'b0; n_halt++; end
      'h1: m_r[d] = m_r[s] + m_r[t];
      'h2: m_r[d] = m_r[s] - m_r[t];
      'h3: m_r[d] = m_r[s] & m_r[t];
      'h4: m_r[d] = m_r[s] ^ m_r[t];
      'h5: m_r[d] = shl(m_r[s], m_r[t]);
      'h6: m_r[d] = sext_shr(m_r[s], m_r[t]);
      'h7: m_r[d] = {6'd0, a};
      'h8: m_r[d] = m_mem[a];
      'h9: m_mem[a] = m_r[d];
      'hA: m_r[d] = m_mem[m_r[t][3:0]];
      'hB: m_mem[m_r[t][3:0]] = m_r[d];
      'hC: if (m_r[d] == 0) begin m_pc = a; n_bz_taken++; end else n_bz_not++;
      'hD: if ($signed(m_r[d]) > 0) begin m_pc = a; n_bp_taken++; end else n_bp_not++;
      'hE: m_pc = m_r[d][3:0];
      'hF: begin m_r[d] = {6'd0, m_pc}; m_pc = a; end
      default: ;
    endcase
  endtask

  // ---------------- front-panel operations ----------------
  task automatic do_deposit(int a, logic [9:0] v);
    sw_addr = 4'(a); sw_data = v; deposit = 1'b1;
    @(negedge clk);
    deposit = 1'b0;
    m_mem[a] = v;
    n_deposit++;
  endtask

  task automatic do_load_pc(int a);
    sw_addr = 4'(a); load_pc = 1'b1;
    @(negedge clk);
    load_pc = 1'b0;
    m_pc = 4'(a);
    n_load_pc++;
  endtask

  function automatic void expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endfunction

  task automatic check_regs();
    expect_eq("R0", int'(dut.u_registers.g_reg[0].u_reg.q), int'(m_r[0]));
    expect_eq("R1", int'(dut.u_registers.g_reg[1].u_reg.q), int'(m_r[1]));
    expect_eq("R2", int'(dut.u_registers.g_reg[2].u_reg.q), int'(m_r[2]));
    expect_eq("R3", int'(dut.u_registers.g_reg[3].u_reg.q), int'(m_r[3]));
  endtask

  task automatic examine_all();
    for (int a = 0; a < 16; a++) begin
      sw_addr = 4'(a);
      #1;
      expect_eq($sformatf("M[%0h]", a), int'(mem_out), int'(m_mem[a]));
    end
    @(negedge clk);
  endtask

  // Press run and follow the program; returns with the machine stopped.
  task automatic run_program();
    longint start;
    int steps;
    run = 1'b1;
    @(negedge clk);
    run = 1'b0;
    n_run++;
    m_running = 1'b1;
    expect_eq("running after run", running, 1);
    steps = 0;
    while (m_running && steps < MAX_STEPS) begin
      start = cycles;
      expect_eq("fetch phase", execute, 0);
      @(negedge clk);  // fetch edge
      model_fetch();
      expect_eq("IR after fetch", int'(ir), int'(m_ir));
      expect_eq("PC after fetch", int'(pc), int'(m_pc));
      expect_eq("execute phase", execute, 1);
      @(negedge clk);  // execute edge
      model_execute();
      expect_eq("PC after execute", int'(pc), int'(m_pc));
      expect_eq("running", running, int'(m_running));
      expect_eq("cycles per instruction", int'(cycles - start), 2);
      check_regs();
      steps++;
    end
    if (m_running) begin
      rst = 1'b1;
      @(negedge clk);
      rst = 1'b0;
      n_reset_stop++;
      m_running = 1'b0;
      m_pc = '0;
      for (int i = 0; i < 4; i++) m_r[i] = '0;
      expect_eq("stopped by reset", running, 0);
      expect_eq("PC after reset", int'(pc), 0);
      check_regs();
    end
  endtask

  // Multiply M[E] by M[F] into M[D] by repeated addition.
  localparam logic [9:0] MUL_PROG [10] = '{
    10'h20E,  // 0: LD  R0, E
    10'h21F,  // 1: LD  R1, F
    10'h1E0,  // 2: LDA R2, 0
    10'h1F1,  // 3: LDA R3, 1
    10'h318,  // 4: BZ  R1, 8
    10'h068,  // 5: ADD R2, R2, R0
    10'h097,  // 6: SUB R1, R1, R3
    10'h355,  // 7: BP  R1, 5
    10'h26D,  // 8: ST  R2, D
    10'h000   // 9: HALT
  };

  initial begin
    rst = 1'b1; deposit = 1'b0; load_pc = 1'b0; run = 1'b0;
    sw_addr = '0; sw_data = '0;
    @(negedge clk);
    rst = 1'b0;
    m_pc = '0; m_ir = '0; m_running = 1'b0;
    for (int i = 0; i < 4; i++) m_r[i] = '0;

    // Directed program.
    for (int a = 0; a < 16; a++) do_deposit(a, (a < 10) ? MUL_PROG[a] : 10'h000);
    do_deposit('hE, 10'd3);
    do_deposit('hF, 10'd5);
    do_load_pc(0);
    run_program();
    sw_addr = 4'hD;
    #1;
    expect_eq("3 * 5", int'(mem_out), 15);
    examine_all();

    // Random programs.
    for (int p = 0; p < NPROG; p++) begin
      for (int a = 0; a < 16; a++) do_deposit(a, 10'($urandom));
      do_load_pc($urandom_range(0, 15));
      run_program();
      examine_all();
    end

    for (int op = 0; op < 16; op++) begin
      checks++;
      if (n_op[op] == 0) begin failures++; $display("opcode %h never executed", op); end
    end
    checks++;
    if (n_bz_taken == 0 || n_bz_not == 0 || n_bp_taken == 0 || n_bp_not == 0) begin
      failures++;
      $display("a branch outcome never happened");
    end
    checks++;
    if (n_deposit == 0 || n_load_pc == 0 || n_run == 0 || n_halt == 0 || n_reset_stop == 0) begin
      failures++;
      $display("a front-panel mechanism never happened");
    end
    for (int op = 0; op < 16; op++) $display("opcode %h executed %0d times", op, n_op[op]);
    $display("branches: bz %0d/%0d bp %0d/%0d (taken/not); halts %0d, reset stops %0d, runs %0d",
             n_bz_taken, n_bz_not, n_bp_taken, n_bp_not, n_halt, n_reset_stop, n_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
