// tb_bzk_alu: self-checking test of the BZK.SAU.FPGA ALU.
// Every operation is driven with random and edge-case operands; result, high
// word and flags are compared with values computed here with wider integer
// arithmetic.
module tb_bzk_alu;
  import bzk_pkg::*;

  alu_op_e     op;
  logic [15:0] a, b, y, y_hi;
  flags_t      flags;
  int checks = 0, failures = 0;

  bzk_alu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int sa, sb, r;
    logic [15:0] ey, eh;
    logic ec, ev;
    sa = int'($signed(a)); sb = int'($signed(b));
    eh = 0; ec = 0; ev = 0;
    case (op)
      ALU_ADD: begin r = int'(a) + int'(b); ey = 16'(r); ec = r > 65535;
                     ev = (sa + sb > 32767) || (sa + sb < -32768); end
      ALU_SUB: begin r = int'(a) - int'(b); ey = 16'(r); ec = r < 0;
                     ev = (sa - sb > 32767) || (sa - sb < -32768); end
      ALU_AND: ey = a & b;
      ALU_OR:  ey = a | b;
      ALU_XOR: ey = a ^ b;
      ALU_SHR: begin ey = 16'(int'(a) / 2); ec = a[0]; end
      ALU_SHL: begin ey = 16'(int'(a) * 2); ec = a[15]; end
      ALU_INC: begin ey = 16'(int'(a) + 1); ec = (a == 16'hFFFF); ev = (sa == 32767); end
      ALU_NEG: begin ey = 16'(-sa); ev = (sa == -32768); end
      ALU_MUL: begin r = sa * sb; ey = 16'(r); eh = 16'(r >>> 16); end
      ALU_DIV: begin
        if (sb == 0) begin ey = 16'hFFFF; eh = a; ev = 1; end
        else if (sa == -32768 && sb == -1) begin ey = 16'h8000; ev = 1; end
        else begin ey = 16'(sa / sb); eh = 16'(sa % sb); end
      end
      default: ey = 0;
    endcase
    #1;
    checks++;
    if (y !== ey || y_hi !== eh || flags.c !== ec || flags.v !== ev ||
        flags.z !== (ey == 0) || flags.n !== ey[15]) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h: y=%h hi=%h f=%b, expected y=%h hi=%h c=%b v=%b",
                 op.name(), a, b, y, y_hi, flags, ey, eh, ec, ev);
    end
  endtask

  logic [15:0] edge_v[8] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h0400, 16'h3C00, 16'hFC00};

  initial begin
    for (int o = 0; o <= int'(ALU_DIV); o++) begin
      op = alu_op_e'(o);
      foreach (edge_v[i]) foreach (edge_v[j]) begin
        a = edge_v[i]; b = edge_v[j]; check_one();
      end
      repeat (500) begin
        a = 16'($urandom); b = 16'($urandom); check_one();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
