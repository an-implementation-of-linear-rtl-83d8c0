// bzk_cpu: the 16-bit CPU of the BZK.SAU.FPGA microcomputer.
//
// An accumulator machine built around one common bus, as in the published
// block diagram: AC, DR, AR, PC, IR, SP, IX, TR and CCR, a 16-bit integer ALU
// whose result returns to AC (and whose flags go to CCR), an effective
// address calculating unit, and the hardwired control unit. Each cycle the
// control word selects one bus source (a register, the memory read data, the
// effective address, the literal of LDI, or SP + 2) and the registers that
// load from the bus. Memory is addressed only by AR.
//
// Interface: mem_addr/mem_we/mem_wdata/mem_rdata connect to a synchronous RAM
// with one cycle of read latency (bzk_memory). halted goes high after HLT;
// instr_done pulses in the last cycle of every instruction. ac, pc, ccr are
// observation outputs. Reset (synchronous, active low) sets PC to 0 and SP to
// 16'hFFFE, the top word of memory; the stack grows downwards, one word per
// call. Loading AC from the bus (LDA, LDI, TRA, TXA) updates the Z and N
// flags; ALU instructions update all four flags. Register set and bus follow
// the block diagram; reset values and flag rules are this design's choices.
module bzk_cpu
  import bzk_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] mem_addr,
  output logic        mem_we,
  output logic [15:0] mem_wdata,
  input  logic [15:0] mem_rdata,
  output logic        halted,
  output logic        instr_done,
  output logic [15:0] ac,
  output logic [15:0] pc,
  output flags_t      ccr
);

  logic [15:0] dr, ar, sp, ix, tr;
  instr_t      ir;
  ctrl_t       ctrl;
  state_e      state;
  logic [15:0] bus, ea, alu_y, alu_hi;
  flags_t      alu_flags;

  bzk_control u_ctrl (
    .clk, .rst_n, .ir, .flags(ccr), .ctrl, .state, .instr_done, .halted
  );

  bzk_alu u_alu (
    .op(ctrl.alu_op), .a(ac), .b(dr), .y(alu_y), .y_hi(alu_hi), .flags(alu_flags)
  );

  bzk_ea_unit u_ea (
    .pc, .ix, .x(ir.x), .offset(ir.offset), .ea
  );

  always_comb begin
    unique case (ctrl.bus_src)
      BUS_AC:     bus = ac;
      BUS_DR:     bus = dr;
      BUS_PC:     bus = pc;
      BUS_SP:     bus = sp;
      BUS_IX:     bus = ix;
      BUS_TR:     bus = tr;
      BUS_MEM:    bus = mem_rdata;
      BUS_EA:     bus = ea;
      BUS_IMM:    bus = {{5{ir.x}}, ir.x, ir.offset};
      BUS_SP_INC: bus = sp + 16'd2;
      default:    bus = '0;
    endcase
  end

  assign mem_addr  = ar;
  assign mem_we    = ctrl.mem_we;
  assign mem_wdata = bus;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ac  <= '0;
      dr  <= '0;
      ar  <= '0;
      pc  <= '0;
      ir  <= instr_t'('0);
      sp  <= 16'hFFFE;
      ix  <= '0;
      tr  <= '0;
      ccr <= '0;
    end else begin
      if (ctrl.ar_ld) ar <= bus;
      if (ctrl.ir_ld) ir <= instr_t'(bus);
      if (ctrl.dr_ld) dr <= bus;
      if (ctrl.ix_ld) ix <= bus;
      if (ctrl.tr_ld) tr <= alu_hi;

      if (ctrl.pc_inc)     pc <= pc + 16'd2;
      else if (ctrl.pc_ea) pc <= ea;
      else if (ctrl.pc_ld) pc <= bus;

      if (ctrl.sp_ld)       sp <= bus;
      else if (ctrl.sp_dec) sp <= sp - 16'd2;

      if (ctrl.alu_ld) begin
        ac  <= alu_y;
        ccr <= alu_flags;
      end else if (ctrl.ac_ld) begin
        ac    <= bus;
        ccr.z <= (bus == '0);
        ccr.n <= bus[15];
      end
    end
  end

  // Rules of the control word: one PC update and one AC update per cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({ctrl.pc_inc, ctrl.pc_ea, ctrl.pc_ld}));
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(ctrl.alu_ld && ctrl.ac_ld));
  assert property (@(posedge clk) disable iff (!rst_n)
                   ctrl.mem_we |-> (state == ST_MEM_W));

endmodule
