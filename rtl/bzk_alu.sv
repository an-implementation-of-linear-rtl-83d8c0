// bzk_alu: 16-bit integer ALU of the BZK.SAU.FPGA CPU.
//
// Combinational. Operand a is the accumulator AC, operand b the data register
// DR; numbers are two's complement. Besides the 16-bit result it returns a
// high word for the two wide operations, which the CPU writes into TR: the
// upper half of the signed 32-bit product for MUL, the remainder for DIV. The
// flags are Z (result zero), N (result bit 15), C (carry out of ADD and INC,
// borrow of SUB, bit shifted out by SHR/SHL) and V (signed overflow of
// ADD/SUB/INC/NEG, or division by zero). A division by zero returns
// 16'hFFFF with the dividend as remainder. The operation set follows the
// published instruction summary; the flag rules, the choice of a logical right
// shift and the use of TR for the high word are this design's.
module bzk_alu
  import bzk_pkg::*;
(
  input  alu_op_e     op,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] y,
  output logic [15:0] y_hi,
  output flags_t      flags
);

  logic [16:0] wide;
  logic [31:0] prod;

  always_comb begin
    wide  = '0;
    prod  = 32'($signed(a) * $signed(b));
    y_hi  = '0;
    flags = '0;
    unique case (op)
      ALU_ADD: begin
        wide    = {1'b0, a} + {1'b0, b};
        flags.c = wide[16];
        flags.v = (a[15] == b[15]) && (wide[15] != a[15]);
      end
      ALU_SUB: begin
        wide    = {1'b0, a} - {1'b0, b};
        flags.c = wide[16];
        flags.v = (a[15] != b[15]) && (wide[15] != a[15]);
      end
      ALU_AND: wide = {1'b0, a & b};
      ALU_OR:  wide = {1'b0, a | b};
      ALU_XOR: wide = {1'b0, a ^ b};
      ALU_SHR: begin
        wide    = {1'b0, 1'b0, a[15:1]};
        flags.c = a[0];
      end
      ALU_SHL: begin
        wide    = {1'b0, a[14:0], 1'b0};
        flags.c = a[15];
      end
      ALU_INC: begin
        wide    = {1'b0, a} + 17'd1;
        flags.c = wide[16];
        flags.v = (a == 16'h7FFF);
      end
      ALU_NEG: begin
        wide    = {1'b0, ~a} + 17'd1;
        flags.v = (a == 16'h8000);
      end
      ALU_MUL: begin
        wide = {1'b0, prod[15:0]};
        y_hi = prod[31:16];
      end
      ALU_DIV: begin
        if (b == '0) begin
          wide    = {1'b0, 16'hFFFF};
          y_hi    = a;
          flags.v = 1'b1;
        end else if (a == 16'h8000 && b == 16'hFFFF) begin
          wide    = {1'b0, 16'h8000};      // -32768 / -1 overflows
          flags.v = 1'b1;
        end else begin
          wide = {1'b0, 16'($signed(a) / $signed(b))};
          y_hi = 16'($signed(a) % $signed(b));
        end
      end
      default: wide = '0;
    endcase
    y       = wide[15:0];
    flags.z = (y == '0);
    flags.n = y[15];
  end

endmodule
