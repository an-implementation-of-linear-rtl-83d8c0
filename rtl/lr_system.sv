// lr_system: both linear-regression platforms side by side.
//
// The design computes simple linear regression, y = a2 + a1*x, by ordinary
// least squares in IEEE 754 half precision in two independent ways, which
// share no signals:
//   * lr_fp16 - a dedicated floating-point engine (adder, multiplier and
//     divider around a small register file) that takes one sample (N, x, y)
//     at a time and returns the refined a1, a2 after every sample. Its
//     ports carry the lr_ prefix.
//   * bzk_microcomputer - the 16-bit BZK.SAU.FPGA microcomputer (integer-only
//     CPU and 64 KB RAM) on which the same computation runs as a program with
//     a software half-precision library. Its ports carry the bzk_ prefix; the
//     program and data are written through the loader port while
//     bzk_load_en holds the CPU in reset.
// The ROM, keyboard and display of the microcomputer are not part of this RTL.
// One clock and one synchronous active-low reset drive both.
module lr_system
  import bzk_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // floating-point regression engine
  input  logic        lr_clear,
  input  logic        lr_in_valid,
  output logic        lr_in_ready,
  input  logic [15:0] lr_n,
  input  logic [15:0] lr_x,
  input  logic [15:0] lr_y,
  output logic        lr_out_valid,
  output logic [15:0] lr_a1,
  output logic [15:0] lr_a2,
  // BZK.SAU.FPGA microcomputer
  input  logic        bzk_load_en,
  input  logic        bzk_load_we,
  input  logic [15:0] bzk_load_addr,
  input  logic [15:0] bzk_load_data,
  output logic [15:0] bzk_load_rdata,
  output logic        bzk_halted,
  output logic        bzk_instr_done,
  output logic [15:0] bzk_ac,
  output logic [15:0] bzk_pc,
  output flags_t      bzk_ccr
);

  lr_fp16 u_lr (
    .clk, .rst_n,
    .clear(lr_clear), .in_valid(lr_in_valid), .in_ready(lr_in_ready),
    .n_in(lr_n), .x_in(lr_x), .y_in(lr_y),
    .out_valid(lr_out_valid), .a1(lr_a1), .a2(lr_a2)
  );

  bzk_microcomputer u_bzk (
    .clk, .rst_n,
    .load_en(bzk_load_en), .load_we(bzk_load_we), .load_addr(bzk_load_addr),
    .load_data(bzk_load_data), .load_rdata(bzk_load_rdata),
    .halted(bzk_halted), .instr_done(bzk_instr_done),
    .ac(bzk_ac), .pc(bzk_pc), .ccr(bzk_ccr)
  );

endmodule
