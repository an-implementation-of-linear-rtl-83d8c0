// tb_bzk_control: self-checking test of the hardwired control unit.
// Every opcode is placed in IR and run through one instruction cycle from
// reset. The testbench checks the number of cycles to instr_done (4 for
// register/ALU/branch instructions, 5 for STA and JMP, 6 for LDA, LDD and
// RTS), the fetch control words, the ALU operation and load enables issued in
// EXEC, that branches load PC only when their flag is set, the memory write
// in MEM_W, and that HLT parks the unit in HALT.
module tb_bzk_control;
  import bzk_pkg::*;

  logic   clk = 0, rst_n = 0;
  instr_t ir;
  flags_t flags;
  ctrl_t  ctrl;
  state_e state;
  logic   instr_done, halted;
  int checks = 0, failures = 0;

  bzk_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (op %s)", what, ir.op.name()); end
  endtask

  function automatic int exp_cycles(opcode_e op);
    case (op)
      OP_LDA, OP_LDD, OP_RTS: return 6;
      OP_STA, OP_JMP:         return 5;
      default:                return 4;
    endcase
  endfunction

  function automatic logic is_alu(opcode_e op, output alu_op_e a);
    case (op)
      OP_ADD: a = ALU_ADD;  OP_SUB: a = ALU_SUB;  OP_AND: a = ALU_AND;
      OP_OR:  a = ALU_OR;   OP_XOR: a = ALU_XOR;  OP_SHR: a = ALU_SHR;
      OP_SHL: a = ALU_SHL;  OP_INC: a = ALU_INC;  OP_NEG: a = ALU_NEG;
      OP_MUL: a = ALU_MUL;  OP_DIV: a = ALU_DIV;
      default: begin a = ALU_ADD; return 0; end
    endcase
    return 1;
  endfunction

  task automatic run_one(input opcode_e op, input flags_t f);
    int cyc;
    logic saw_we, saw_pc_ea, saw_ar_ea;
    alu_op_e aop;
    ir = '{op: op, x: 1'b0, offset: 10'd5};
    flags = f;
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    cyc = 0; saw_we = 0; saw_pc_ea = 0; saw_ar_ea = 0;
    forever begin
      cyc++;
      if (state == ST_FETCH_A) expect_true(ctrl.ar_ld && ctrl.bus_src == BUS_PC, "fetch AR <- PC");
      if (state == ST_DECODE)  expect_true(ctrl.ir_ld && ctrl.pc_inc && ctrl.bus_src == BUS_MEM, "decode IR <- M");
      if (state == ST_EXEC && is_alu(op, aop))
        expect_true(ctrl.alu_ld && ctrl.alu_op == aop &&
                    ctrl.tr_ld == (op == OP_MUL || op == OP_DIV), "ALU control");
      if (ctrl.mem_we) saw_we = 1;
      if (ctrl.pc_ea) saw_pc_ea = 1;
      if (ctrl.ar_ld && ctrl.bus_src == BUS_EA) saw_ar_ea = 1;
      if (op == OP_HLT && state == ST_EXEC) break;
      if (instr_done) break;
      if (cyc > 10) break;
      @(negedge clk);
    end
    if (op == OP_HLT) begin
      @(negedge clk);
      @(negedge clk);
      expect_true(halted && state == ST_HALT, "HLT halts");
    end else begin
      checks++;
      if (cyc != exp_cycles(op)) begin
        failures++; $display("FAIL %s took %0d cycles, expected %0d", op.name(), cyc, exp_cycles(op));
      end
      expect_true(saw_we == (op == OP_STA || op == OP_JMP), "memory write");
      expect_true(saw_pc_ea == (op == OP_BRA || op == OP_JMP ||
                                (op == OP_BZR && f.z) || (op == OP_BMI && f.n)), "PC <- EA");
      expect_true(saw_ar_ea == (op == OP_LDA || op == OP_LDD || op == OP_STA), "AR <- EA");
    end
  endtask

  opcode_e ops[] = '{OP_NOP, OP_LDA, OP_STA, OP_LDD, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR,
                     OP_SHR, OP_SHL, OP_INC, OP_NEG, OP_MUL, OP_DIV, OP_BRA, OP_BZR, OP_BMI,
                     OP_JMP, OP_RTS, OP_LDI, OP_TDR, OP_TRA, OP_TAX, OP_TXA, OP_TAS, OP_HLT};

  initial begin
    ir = '0; flags = '0;
    repeat (2) @(posedge clk);
    foreach (ops[i]) begin
      run_one(ops[i], 4'b0000);
      run_one(ops[i], 4'b0001);   // Z
      run_one(ops[i], 4'b0010);   // N
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
