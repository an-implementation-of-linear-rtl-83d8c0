// bzk_ea_unit: effective address calculating unit of the BZK.SAU.FPGA CPU.
//
// Combinational. Adds the sign-extended 10-bit word offset of the
// instruction, doubled into a byte offset, to a base register: the program
// counter (which already points past the current instruction) for
// PC-relative addressing, or the index register IX when the instruction's
// X bit is set. The PC-relative form is the one the
// instruction summary gives (EA = PC + Offset); the IX-relative form and the
// field widths are this design's choice for reaching data through IX.
module bzk_ea_unit (
  input  logic [15:0] pc,
  input  logic [15:0] ix,
  input  logic        x,
  input  logic [9:0]  offset,
  output logic [15:0] ea
);

  logic [15:0] base;

  assign base = x ? ix : pc;
  assign ea   = base + {{5{offset[9]}}, offset, 1'b0};

endmodule
