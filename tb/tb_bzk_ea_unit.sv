// tb_bzk_ea_unit: self-checking test of the effective address unit.
// Random PC, IX and offsets, both addressing modes, checked against
// base + 2*offset computed here with integers.
module tb_bzk_ea_unit;
  logic [15:0] pc, ix, ea;
  logic        x;
  logic [9:0]  offset;
  int checks = 0, failures = 0;

  bzk_ea_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) begin
      int off, exp_ea;
      pc = 16'($urandom); ix = 16'($urandom); x = 1'($urandom);
      off = int'($urandom % 1024) - 512;
      offset = 10'(off);
      exp_ea = ((x ? int'(ix) : int'(pc)) + 2 * off) & 16'hFFFF;
      #1;
      checks++;
      if (int'(ea) != exp_ea) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b pc=%h ix=%h off=%0d ea=%h expected %h", x, pc, ix, off, ea, exp_ea);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
