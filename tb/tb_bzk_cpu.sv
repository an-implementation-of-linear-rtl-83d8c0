// tb_bzk_cpu: self-checking test of the CPU with its RAM.
//
// A program that uses every instruction (loads and stores through IX, all
// ALU operations, taken and untaken BZR/BMI, BRA, a subroutine call with
// JMP/RTS on a stack moved by TAS, the register transfers and a counted
// loop) is assembled here and placed in RAM through the testbench. After HLT
// the results it stored are compared with values computed in the testbench
// with integer arithmetic. The cycle count of every instruction is checked
// against the control unit's schedule (4, 5 or 6 cycles).
module tb_bzk_cpu;
  import bzk_pkg::*;
  import bzk_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [15:0] mem_addr, mem_wdata, mem_rdata, ac, pc;
  logic mem_we, halted, instr_done;
  flags_t ccr;
  int checks = 0, failures = 0;

  // RAM as seen by the CPU, plus a testbench write port used before reset ends
  logic        tb_we = 0;
  logic [15:0] tb_addr = 0, tb_data = 0;

  bzk_cpu dut (.*);
  bzk_memory u_mem (.clk, .addr(rst_n ? mem_addr : tb_addr), .we(rst_n ? mem_we : tb_we),
                    .wdata(rst_n ? mem_wdata : tb_data), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int BASE = 16'hFC00;
  function automatic int wa(int w); return (BASE + 2 * w) & 16'hFFFF; endfunction

  // operands
  localparam logic [15:0] VA = 16'd1234, VB = -16'sd567, VM1 = 16'd300, VM2 = -16'sd250,
                          VD1 = -16'sd1001, VD2 = 16'd7;

  function automatic void prog(bzk_asm a);
    a.org(0);
    a.li(-1024); a.op0(OP_TAX);
    a.ix(OP_LDA, 0); a.ix(OP_LDD, 1); a.op0(OP_ADD); a.ix(OP_STA, 10);
    a.ix(OP_LDA, 0); a.op0(OP_SUB); a.ix(OP_STA, 11);
    a.ix(OP_LDA, 0); a.op0(OP_AND); a.ix(OP_STA, 12);
    a.ix(OP_LDA, 0); a.op0(OP_OR);  a.ix(OP_STA, 13);
    a.ix(OP_LDA, 0); a.op0(OP_XOR); a.ix(OP_STA, 14);
    a.ix(OP_LDA, 1); a.op0(OP_SHR); a.ix(OP_STA, 15);
    a.ix(OP_LDA, 1); a.op0(OP_SHL); a.ix(OP_STA, 16);
    a.ix(OP_LDA, 1); a.op0(OP_INC); a.ix(OP_STA, 17);
    a.ix(OP_LDA, 0); a.op0(OP_NEG); a.ix(OP_STA, 18);
    a.ix(OP_LDA, 2); a.ix(OP_LDD, 3); a.op0(OP_MUL); a.ix(OP_STA, 19); a.op0(OP_TRA); a.ix(OP_STA, 20);
    a.ix(OP_LDA, 4); a.ix(OP_LDD, 5); a.op0(OP_DIV); a.ix(OP_STA, 21); a.op0(OP_TRA); a.ix(OP_STA, 22);
    // branches
    a.li(0);  a.br(OP_BZR, "L1"); a.li(5); a.ix(OP_STA, 23);
    a.label("L1");
    a.li(-3); a.br(OP_BMI, "L2"); a.li(7); a.ix(OP_STA, 23);
    a.label("L2");
    a.li(1);  a.br(OP_BZR, "L3"); a.br(OP_BMI, "L3"); a.li(9); a.ix(OP_STA, 24);
    a.label("L3");
    a.br(OP_BRA, "L4"); a.li(11); a.ix(OP_STA, 24);
    a.label("L4");
    // subroutine on a moved stack
    a.li(-64); a.op0(OP_TAS);
    a.br(OP_JMP, "SUB1");
    a.label("RET1");
    a.ix(OP_STA, 25);
    a.op0(OP_TXA); a.ix(OP_STA, 26);
    // loop: sum 1..10
    a.li(10); a.ix(OP_STA, 30); a.li(0); a.ix(OP_STA, 31); a.li(-1); a.op0(OP_TDR);
    a.label("LP");
    a.ix(OP_LDA, 31); a.ix(OP_LDD, 30); a.op0(OP_ADD); a.ix(OP_STA, 31);
    a.li(1); a.op0(OP_TDR); a.ix(OP_LDA, 30); a.op0(OP_SUB); a.ix(OP_STA, 30);
    a.br(OP_BZR, "LPEND"); a.br(OP_BRA, "LP");
    a.label("LPEND");
    a.op0(OP_NOP);
    a.op0(OP_HLT);
    a.label("SUB1");
    a.li(42); a.op0(OP_RTS);
    // data
    a.org(wa(0)); a.word(VA); a.word(VB); a.word(VM1); a.word(VM2); a.word(VD1); a.word(VD2);
    a.org(wa(23)); a.word(16'hEEEE); a.word(16'hEEEE);
  endfunction

  function automatic int exp_cycles(opcode_e op);
    case (op)
      OP_LDA, OP_LDD, OP_RTS: return 6;
      OP_STA, OP_JMP:         return 5;
      default:                return 4;
    endcase
  endfunction

  task automatic expect_word(input int w, input logic [15:0] v, input string what);
    logic [15:0] got;
    got = u_mem.mem[wa(w) >> 1];
    checks++;
    if (got !== v) begin failures++; $display("FAIL %s: %h expected %h", what, got, v); end
  endtask

  initial begin
    bzk_asm a;
    int last, n_instr, n_taken;
    int sa, sb, p;
    opcode_e cur;
    a = new();
    a.start_pass(0); prog(a); a.start_pass(1); prog(a);
    checks++;
    if (a.errors != 0) begin failures++; $display("FAIL assembly"); end
    foreach (a.img[ad]) begin
      @(negedge clk); tb_we = 1; tb_addr = 16'(ad); tb_data = a.img[ad];
    end
    @(negedge clk); tb_we = 0; rst_n = 1;
    // rst_n rises at a falling edge: the cycle now running is the first fetch
    // the opcode of each instruction is looked up in the image at the PC
    // seen in its first cycle
    last = 0; n_instr = 0;
    cur = opcode_e'(a.img[0][15:11]);
    for (int c = 1; !halted && c < 20000; c++) begin
      if (instr_done) begin
        n_instr++;
        checks++;
        if (c - last != exp_cycles(cur)) begin
          failures++; $display("FAIL %s took %0d cycles", cur.name(), c - last);
        end
        last = c;
        @(negedge clk);
        cur = a.img.exists(int'(pc)) ? opcode_e'(a.img[int'(pc)][15:11]) : OP_NOP;
      end else begin
        @(negedge clk);
      end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (!halted) begin failures++; $display("FAIL no halt"); end
    sa = int'($signed(VA)); sb = int'($signed(VB));
    expect_word(10, 16'(sa + sb), "ADD");
    expect_word(11, 16'(sa - sb), "SUB");
    expect_word(12, VA & VB, "AND");
    expect_word(13, VA | VB, "OR");
    expect_word(14, VA ^ VB, "XOR");
    expect_word(15, 16'(int'(VB) / 2), "SHR");
    expect_word(16, 16'(int'(VB) * 2), "SHL");
    expect_word(17, 16'(sb + 1), "INC");
    expect_word(18, 16'(-sa), "NEG");
    p = int'($signed(VM1)) * int'($signed(VM2));
    expect_word(19, 16'(p), "MUL low");
    expect_word(20, 16'(p >>> 16), "MUL high");
    expect_word(21, 16'(int'($signed(VD1)) / int'($signed(VD2))), "DIV quotient");
    expect_word(22, 16'(int'($signed(VD1)) % int'($signed(VD2))), "DIV remainder");
    expect_word(23, 16'hEEEE, "taken branches skip");
    expect_word(24, 16'd9, "untaken branches fall through, BRA skips");
    expect_word(25, 16'd42, "JMP/RTS");
    expect_word(26, 16'hFC00, "TXA");
    expect_word(31, 16'd55, "loop sum");
    checks++;
    if (u_mem.mem[16'hFFC0 >> 1] !== 16'(a.labels["RET1"])) begin
      failures++; $display("FAIL return address on the stack");
    end
    $display("%0d instructions executed", n_instr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
