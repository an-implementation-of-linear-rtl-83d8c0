// bzk_control: hardwired control unit of the BZK.SAU.FPGA CPU.
//
// A non-pipelined state machine that fetches, decodes and executes one
// instruction at a time and issues a control word (ctrl_t) every cycle:
// which register drives the common bus, which registers load from it, and
// what the ALU does. The memory is always addressed by AR.
//
//   FETCH_A  AR <- PC
//   FETCH_R  memory reads M[AR]
//   DECODE   IR <- M[AR], PC <- PC + 2
//   EXEC     register and ALU instructions finish here; LDA/LDD load AR <- EA
//            and go to MEM_R; STA loads AR <- EA and goes to MEM_W; JMP loads
//            AR <- SP and goes to MEM_W; RTS does SP <- SP + 2, AR <- SP + 2
//            and goes to MEM_R; HLT goes to HALT
//   MEM_R    memory reads M[AR]
//   MEM_WB   AC, DR or PC <- M[AR]
//   MEM_W    M[AR] <- AC (STA) or PC (JMP; also SP <- SP - 2, PC <- EA)
//
// Cycles per instruction: 4 for register, ALU and branch instructions, 6 for
// LDA, LDD and RTS, 5 for STA and JMP. A taken branch loads PC <- EA in EXEC.
// Hardwired, non-pipelined control is what the architecture summary states;
// the state sequence and cycle counts are this design's. Reset (synchronous,
// active low) starts a fetch; halted stays high in HALT until reset.
module bzk_control
  import bzk_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  instr_t ir,
  input  flags_t flags,
  output ctrl_t  ctrl,
  output state_e state,
  output logic   instr_done,
  output logic   halted
);

  state_e next;

  always_comb begin
    ctrl       = '0;
    ctrl.bus_src = BUS_AC;
    ctrl.alu_op  = ALU_ADD;
    next       = state;
    instr_done = 1'b0;
    unique case (state)
      ST_FETCH_A: begin
        ctrl.bus_src = BUS_PC;
        ctrl.ar_ld   = 1'b1;
        next         = ST_FETCH_R;
      end
      ST_FETCH_R: next = ST_DECODE;
      ST_DECODE: begin
        ctrl.bus_src = BUS_MEM;
        ctrl.ir_ld   = 1'b1;
        ctrl.pc_inc  = 1'b1;
        next         = ST_EXEC;
      end
      ST_EXEC: begin
        next       = ST_FETCH_A;
        instr_done = 1'b1;
        unique case (ir.op)
          OP_LDA, OP_LDD: begin
            ctrl.bus_src = BUS_EA;
            ctrl.ar_ld   = 1'b1;
            next         = ST_MEM_R;
            instr_done   = 1'b0;
          end
          OP_STA: begin
            ctrl.bus_src = BUS_EA;
            ctrl.ar_ld   = 1'b1;
            next         = ST_MEM_W;
            instr_done   = 1'b0;
          end
          OP_JMP: begin
            ctrl.bus_src = BUS_SP;
            ctrl.ar_ld   = 1'b1;
            next         = ST_MEM_W;
            instr_done   = 1'b0;
          end
          OP_RTS: begin
            ctrl.bus_src = BUS_SP_INC;
            ctrl.ar_ld   = 1'b1;
            ctrl.sp_ld   = 1'b1;
            next         = ST_MEM_R;
            instr_done   = 1'b0;
          end
          OP_ADD: begin ctrl.alu_ld = 1'b1; ctrl.alu_op = ALU_ADD; end
          OP_SUB: begin ctrl.alu_ld = 1'b1; ctrl.alu_op = ALU_SUB; end
          OP_AND: begin ctrl.alu_ld = 1'b1; ctrl.alu_op = ALU_AND; end
          OP_OR:  begin ctrl.alu_ld = 1'b1; ctrl.alu_op = ALU_OR;  end
          OP_XOR: begin ctrl.alu_ld = 1'b1; ctrl.alu_op = ALU_XOR; end
          OP_SHR: begin ctrl.alu_ld = 1'b1; ctrl.alu_op = ALU_SHR; end
          OP_SHL: begin ctrl.alu_ld = 1'b1; ctrl.alu_op = ALU_SHL; end
          OP_INC: begin ctrl.alu_ld = 1'b1; ctrl.alu_op = ALU_INC; end
          OP_NEG: begin ctrl.alu_ld = 1'b1; ctrl.alu_op = ALU_NEG; end
          OP_MUL: begin ctrl.alu_ld = 1'b1; ctrl.tr_ld = 1'b1; ctrl.alu_op = ALU_MUL; end
          OP_DIV: begin ctrl.alu_ld = 1'b1; ctrl.tr_ld = 1'b1; ctrl.alu_op = ALU_DIV; end
          OP_BRA: ctrl.pc_ea = 1'b1;
          OP_BZR: ctrl.pc_ea = flags.z;
          OP_BMI: ctrl.pc_ea = flags.n;
          OP_LDI: begin ctrl.bus_src = BUS_IMM; ctrl.ac_ld = 1'b1; end
          OP_TDR: begin ctrl.bus_src = BUS_AC;  ctrl.dr_ld = 1'b1; end
          OP_TRA: begin ctrl.bus_src = BUS_TR;  ctrl.ac_ld = 1'b1; end
          OP_TAX: begin ctrl.bus_src = BUS_AC;  ctrl.ix_ld = 1'b1; end
          OP_TXA: begin ctrl.bus_src = BUS_IX;  ctrl.ac_ld = 1'b1; end
          OP_TAS: begin ctrl.bus_src = BUS_AC;  ctrl.sp_ld = 1'b1; end
          OP_HLT: begin next = ST_HALT; end
          default: ;                         // NOP and unused opcodes
        endcase
      end
      ST_MEM_R: next = ST_MEM_WB;
      ST_MEM_WB: begin
        ctrl.bus_src = BUS_MEM;
        ctrl.ac_ld   = (ir.op == OP_LDA);
        ctrl.dr_ld   = (ir.op == OP_LDD);
        ctrl.pc_ld   = (ir.op == OP_RTS);
        next         = ST_FETCH_A;
        instr_done   = 1'b1;
      end
      ST_MEM_W: begin
        ctrl.mem_we = 1'b1;
        if (ir.op == OP_JMP) begin
          ctrl.bus_src = BUS_PC;
          ctrl.sp_dec  = 1'b1;
          ctrl.pc_ea   = 1'b1;
        end else begin
          ctrl.bus_src = BUS_AC;
        end
        next       = ST_FETCH_A;
        instr_done = 1'b1;
      end
      default: next = ST_HALT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= ST_FETCH_A;
    else        state <= next;
  end

  assign halted = (state == ST_HALT);

endmodule
