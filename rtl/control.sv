// control: sequences the TOY-Lite datapath, one instruction per two clock
// cycles.
//
// The machine alternates between a fetch phase and an execute phase, one
// clock cycle each (the two-cycle clocking of TOY-Lite). Every control line
// is set up during its phase and takes effect at the clock edge that ends the
// phase.
//   fetch   : memory address from the PC, memory word written into the IR,
//             PC incremented.
//   execute : lines depend on the IR opcode:
//     1-6  add/sub/and/xor/shl/shr  R[Rs] <- R[Rd1] op R[Rd2]  (ALU to register MUX)
//     7    load address             R[Rs] <- addr
//     8    load                     R[Rs] <- M[addr]
//     9    store                    M[addr] <- R[Rs]
//     A    load indirect            R[Rs] <- M[R[Rd2]]
//     B    store indirect           M[R[Rd2]] <- R[Rs]
//     C    branch zero              if R[Rs] == 0 then PC <- addr
//     D    branch positive          if R[Rs] >  0 (signed) then PC <- addr
//     E    jump register            PC <- R[Rs]
//     F    jump and link            R[Rs] <- PC, PC <- addr
//     0    halt                     clear RUN
// The opcode list is the TOY-Lite one; the exact semantics of each
// instruction, the field roles and the control-line grouping are this
// design's choices (they follow the larger TOY machine).
//
// The RUN state is an sr_flip_flop: the run switch sets it (and starts in the
// fetch phase), halt or rst clears it. While RUN is off the control hands the
// datapath to the switches: the address MUX takes sw_addr, deposit writes the
// switch data into memory and load_pc loads the PC from sw_addr. The switch
// functions are the ones listed for the TOY-Lite front panel; how they are
// wired in is this design's choice.
//
// Interface: op is the opcode field of the instruction register, rd1_val the
// first register read bus (it carries R[Rs] during execute of the instructions
// that test or move R[Rs]). ctrl is combinational from the inputs and the two
// state bits (RUN and phase).
module control
  import toy_lite_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  run,
  input  logic  deposit,
  input  logic  load_pc,
  input  opcode_e op,
  input  word_t rd1_val,
  output logic  running,
  output logic  execute,
  output ctrl_t ctrl
);

  logic   halt_now;
  logic   take_branch;

  // RUN / HALT state.
  assign halt_now = running && execute && (op == OP_HALT);

  sr_flip_flop u_run (
    .clk(clk),
    .s  (run),
    .r  (rst || halt_now),
    .q  (running)
  );

  // Phase: 0 = fetch, 1 = execute. Toggles every clock while running.
  always_ff @(posedge clk) begin
    if (rst || !running)
      execute <= 1'b0;
    else
      execute <= !execute;
  end

  always_comb begin
    unique case (op)
      OP_BZ:   take_branch = (rd1_val == '0);
      OP_BP:   take_branch = !rd1_val[WORD_W-1] && (rd1_val != '0);
      default: take_branch = 1'b0;
    endcase
  end

  always_comb begin
    // Defaults: nothing written, every MUX on its first input.
    ctrl             = '0;
    ctrl.addr_sel    = AMUX_N'(1) << AMUX_PC;
    ctrl.mem_din_sel = DMUX_N'(1) << DMUX_REG;
    ctrl.pc_in_sel   = PMUX_N'(1) << PMUX_IR;
    ctrl.rd1_sel     = SMUX_N'(1) << SMUX_RD1;
    ctrl.reg_in_sel  = RMUX_N'(1) << RMUX_ALU;
    ctrl.pc_inc      = 1'b1;
    ctrl.alu_op      = ALU_ADD;

    if (!running) begin
      // Front panel.
      ctrl.addr_sel    = AMUX_N'(1) << AMUX_SW;
      ctrl.mem_din_sel = DMUX_N'(1) << DMUX_SW;
      ctrl.pc_in_sel   = PMUX_N'(1) << PMUX_SW;
      ctrl.mem_we      = deposit;
      ctrl.pc_load     = load_pc;
      ctrl.pc_inc      = !load_pc;
      ctrl.pc_we       = load_pc;
    end else if (!execute) begin
      // Fetch: Memory[PC] to IR, increment PC.
      ctrl.ir_we = 1'b1;
      ctrl.pc_we = 1'b1;
    end else begin
      unique case (op)
        OP_HALT: ;
        OP_ADD, OP_SUB, OP_AND, OP_XOR, OP_SHL, OP_SHR: begin
          ctrl.reg_we = 1'b1;
          unique case (op)
            OP_ADD:  ctrl.alu_op = ALU_ADD;
            OP_SUB:  ctrl.alu_op = ALU_SUB;
            OP_AND:  ctrl.alu_op = ALU_AND;
            OP_XOR:  ctrl.alu_op = ALU_XOR;
            OP_SHL:  ctrl.alu_op = ALU_SHL;
            default: ctrl.alu_op = ALU_SHR;
          endcase
        end
        OP_LDA: begin
          ctrl.reg_in_sel = RMUX_N'(1) << RMUX_IR;
          ctrl.reg_we     = 1'b1;
        end
        OP_LD, OP_LDI: begin
          ctrl.addr_sel   = AMUX_N'(1) << (op == OP_LD ? AMUX_IR : AMUX_REG);
          ctrl.reg_in_sel = RMUX_N'(1) << RMUX_MEM;
          ctrl.reg_we     = 1'b1;
        end
        OP_ST, OP_STI: begin
          ctrl.addr_sel = AMUX_N'(1) << (op == OP_ST ? AMUX_IR : AMUX_REG);
          ctrl.rd1_sel  = SMUX_N'(1) << SMUX_RS;
          ctrl.mem_we   = 1'b1;
        end
        OP_BZ, OP_BP: begin
          ctrl.rd1_sel = SMUX_N'(1) << SMUX_RS;
          ctrl.pc_load = take_branch;
          ctrl.pc_inc  = !take_branch;
          ctrl.pc_we   = take_branch;
        end
        OP_JR: begin
          ctrl.rd1_sel   = SMUX_N'(1) << SMUX_RS;
          ctrl.pc_in_sel = PMUX_N'(1) << PMUX_REG;
          ctrl.pc_load   = 1'b1;
          ctrl.pc_inc    = 1'b0;
          ctrl.pc_we     = 1'b1;
        end
        OP_JL: begin
          ctrl.reg_in_sel = RMUX_N'(1) << RMUX_PC;
          ctrl.reg_we     = 1'b1;
          ctrl.pc_load    = 1'b1;
          ctrl.pc_inc     = 1'b0;
          ctrl.pc_we      = 1'b1;
        end
        default: ;
      endcase
    end
  end

  // Every multiplexer gets exactly one hot select line.
  a_addr_onehot : assert property (@(posedge clk) $onehot(ctrl.addr_sel));
  a_din_onehot  : assert property (@(posedge clk) $onehot(ctrl.mem_din_sel));
  a_pc_onehot   : assert property (@(posedge clk) $onehot(ctrl.pc_in_sel));
  a_rd1_onehot  : assert property (@(posedge clk) $onehot(ctrl.rd1_sel));
  a_reg_onehot  : assert property (@(posedge clk) $onehot(ctrl.reg_in_sel));
  a_pc_src      : assert property (@(posedge clk) $onehot({ctrl.pc_load, ctrl.pc_inc}));

endmodule
