// bzk_asm_pkg: a small two-pass assembler for BZK.SAU.FPGA programs, used by
// the testbenches to build machine code without any external tool.
//
// A program is written as a task that calls the methods of a bzk_asm object;
// the task is run twice. The first pass only records label addresses, the
// second emits words into the image (an associative array from byte address
// to word). Operand forms:
//   ix(op, w)   X = 1, EA = IX + 2*w   (data reached through the index register)
//   br(op, l)   X = 0, EA = PC + 2*off (branches and JMP to label l)
//   li(v)       LDI with an 11-bit signed literal
//   op0(op)     instructions without operand
//   word(v)     a data word at the current address
package bzk_asm_pkg;
  import bzk_pkg::*;

  class bzk_asm;
    logic [15:0] img[int];
    int          labels[string];
    int          loc;
    bit          final_pass;
    int          errors;

    function new();
      loc = 0;
      final_pass = 0;
      errors = 0;
    endfunction

    function void start_pass(bit last);
      final_pass = last;
      loc = 0;
      if (last) img.delete();
    endfunction

    function void org(int addr);
      loc = addr;
    endfunction

    function void label(string name);
      if (!final_pass) labels[name] = loc;
    endfunction

    function void put(logic [15:0] w);
      if (final_pass) img[loc & 16'hFFFF] = w;
      loc += 2;
    endfunction

    function void word(logic [15:0] v);
      put(v);
    endfunction

    function void op0(opcode_e op);
      put({op, 11'd0});
    endfunction

    function void ix(opcode_e op, int w);
      if (w < -512 || w > 511) errors++;
      put({op, 1'b1, 10'(w)});
    endfunction

    function void li(int v);
      if (v < -1024 || v > 1023) errors++;
      put({OP_LDI, 11'(v)});
    endfunction

    function void br(opcode_e op, string target);
      int off;
      off = 0;
      if (final_pass) begin
        if (!labels.exists(target)) errors++;
        else off = (labels[target] - (loc + 2)) / 2;
        if (off < -512 || off > 511) errors++;
      end
      put({op, 1'b0, 10'(off)});
    endfunction
  endclass

endpackage
