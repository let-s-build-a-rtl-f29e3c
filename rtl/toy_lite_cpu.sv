// toy_lite_cpu: the complete TOY-Lite computer.
//
// Datapath: a 16-word x 10-bit main memory, four 10-bit registers with two
// read ports, an ALU, a 4-bit program counter (register + incrementer + MUX),
// a 10-bit instruction register and four input multiplexers:
//   address MUX   memory address   <- PC | IR addr | R[Rd2] | sw_addr
//   register MUX  register input   <- ALU | memory | IR addr | PC
//   PC input MUX  PC load value    <- IR addr | R[Rs] | sw_addr
//   memory MUX    memory input     <- R[Rs] | sw_data
// plus a two-way select on the first register read address (Rd1 or Rs). The
// memory output bus feeds both the IR and the register MUX; the register
// write address is always the IR's Rs field and the second read address its
// Rd2 field. The control block drives all select and write lines.
//
// Operation: with RUN off, the switches load memory (sw_addr, sw_data,
// deposit) and the PC (sw_addr, load_pc); mem_out then shows the memory word
// at sw_addr. A pulse on run starts the fetch/execute loop: each instruction
// takes two clock cycles, fetch then execute, until a halt instruction clears
// RUN. rst (synchronous, active high) stops the machine and clears the PC,
// IR and registers; it leaves memory alone. All inputs are sampled on the
// rising edge of clk; run, deposit and load_pc act in every cycle they are
// high.
//
// Outputs (the lights): running, execute (phase), pc, ir and mem_out, the
// memory output bus.
module toy_lite_cpu
  import toy_lite_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  addr_t sw_addr,
  input  word_t sw_data,
  input  logic  deposit,
  input  logic  load_pc,
  input  logic  run,
  output logic  running,
  output logic  execute,
  output addr_t pc,
  output word_t ir,
  output word_t mem_out
);

  ctrl_t   ctrl;
  regsel_t ir_rs, ir_rd1, ir_rd2;
  addr_t   ir_addr;
  addr_t   mem_addr;
  addr_t   pc_in;
  word_t   mem_din;
  word_t   reg_din;
  word_t   rd1_val, rd2_val;
  word_t   alu_y;
  regsel_t rd1_addr;

  // Register fields of the IR; the address format reuses the low 4 bits.
  assign {ir_rs, ir_rd1, ir_rd2} = ir[5:0];
  assign ir_addr = {ir_rd1, ir_rd2};

  control u_control (
    .clk    (clk),
    .rst    (rst),
    .run    (run),
    .deposit(deposit),
    .load_pc(load_pc),
    .op     (opcode_e'(ir[9:6])),
    .rd1_val(rd1_val),
    .running(running),
    .execute(execute),
    .ctrl   (ctrl)
  );

  // ---- Fetch side: address MUX, memory, IR, PC ----
  mux_onehot #(.WAYS(AMUX_N), .WIDTH(ADDR_W)) u_addr_mux (
    .din ({sw_addr, rd2_val[ADDR_W-1:0], ir_addr, pc}),
    .sel (ctrl.addr_sel),
    .dout(mem_addr)
  );

  mux_onehot #(.WAYS(DMUX_N), .WIDTH(WORD_W)) u_mem_din_mux (
    .din ({sw_data, rd1_val}),
    .sel (ctrl.mem_din_sel),
    .dout(mem_din)
  );

  memory_bank #(.WORDS(MEM_WORDS), .WIDTH(WORD_W)) u_memory (
    .clk (clk),
    .addr(mem_addr),
    .we  (ctrl.mem_we),
    .din (mem_din),
    .dout(mem_out)
  );

  processor_register #(.K(WORD_W)) u_ir (
    .clk(clk),
    .clr(rst),
    .we (ctrl.ir_we),
    .d  (mem_out),
    .q  (ir)
  );

  mux_onehot #(.WAYS(PMUX_N), .WIDTH(ADDR_W)) u_pc_mux (
    .din ({sw_addr, rd1_val[ADDR_W-1:0], ir_addr}),
    .sel (ctrl.pc_in_sel),
    .dout(pc_in)
  );

  program_counter #(.W(ADDR_W)) u_pc (
    .clk      (clk),
    .clr      (rst),
    .din      (pc_in),
    .load     (ctrl.pc_load),
    .increment(ctrl.pc_inc),
    .we       (ctrl.pc_we),
    .q        (pc)
  );

  // ---- Execute side: registers, ALU, register MUX ----
  mux_onehot #(.WAYS(SMUX_N), .WIDTH(REG_SEL_W)) u_rd1_sel_mux (
    .din ({ir_rs, ir_rd1}),
    .sel (ctrl.rd1_sel),
    .dout(rd1_addr)
  );

  register_file #(.NREGS(NUM_REGS), .WIDTH(WORD_W)) u_registers (
    .clk     (clk),
    .clr     (rst),
    .we      (ctrl.reg_we),
    .wr_addr (ir_rs),
    .din     (reg_din),
    .rd_addr1(rd1_addr),
    .rd_addr2(ir_rd2),
    .dout1   (rd1_val),
    .dout2   (rd2_val)
  );

  alu #(.WIDTH(WORD_W)) u_alu (
    .op(ctrl.alu_op),
    .a (rd1_val),
    .b (rd2_val),
    .y (alu_y)
  );

  mux_onehot #(.WAYS(RMUX_N), .WIDTH(WORD_W)) u_reg_mux (
    .din ({WORD_W'(pc), WORD_W'(ir_addr), mem_out, alu_y}),
    .sel (ctrl.reg_in_sel),
    .dout(reg_din)
  );

endmodule
