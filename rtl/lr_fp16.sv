// lr_fp16: simple linear-regression engine in half-precision floating point.
//
// Fits y = a2 + a1*x to the samples seen so far by ordinary least squares,
// using the closed form of the 2x2 normal equations:
//   den = N*Sxx - Sx*Sx
//   a1  = (1/den) * (N*Sxy - Sx*Sy)
//   a2  = (1/den) * (Sxx*Sy - Sx*Sxy)
// where Sx, Sxx, Sy and Sxy are the running sums of x, x^2, y and x*y and N is
// a binary16 value supplied by the caller with every sample. Every accepted
// sample updates the four sums and produces a fresh (a1, a2), so the
// coefficients are refined sample by sample. The published per-iteration
// results are obtained with N held at the size of the whole data set (8.0 for
// eight points) while the sums grow; feeding the running count 1.0, 2.0, ...
// instead gives the exact least-squares fit of the samples seen so far.
//
// When the determinant is zero (with N = 1 after one sample, or whenever
// N*Sxx = Sx^2) the system is singular and 1/den would be infinite. The
// engine then fits a line through the origin, a1 = Sxy/Sxx and a2 = 0, in 11
// cycles instead of 18. This fallback is this design's own choice; nothing is
// published about the singular case.
//
// The datapath holds one adder/subtracter, one multiplier and one divider
// (fp16_addsub, fp16_mul, fp16_div) and a small register file. A fixed
// 18-step sequence, one operation per clock, moves operands from the
// registers through one of the units and back; the step table below is the
// whole control program. The arithmetic follows the published closed-form
// method; sharing the units and the schedule are this design's choices.
//
// Interface (valid/ready): a sample (n_in, x_in, y_in) is accepted on a clock
// edge with in_valid && in_ready. in_ready is low while the sequence runs.
// out_valid is high for one cycle, 18 cycles after the accepting edge (11 for
// a zero determinant), with a1 and a2 valid from then until the next result.
// clear (sampled while idle) zeroes the sums to start a new data set.
// Reset is synchronous to clk and active low.
module lr_fp16
  import fp16_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [15:0] n_in,
  input  logic [15:0] x_in,
  input  logic [15:0] y_in,
  output logic        out_valid,
  output logic [15:0] a1,
  output logic [15:0] a2
);

  typedef enum logic [1:0] {OP_MUL, OP_ADD, OP_SUB, OP_DIV} op_e;
  typedef enum logic [3:0] {
    R_X, R_Y, R_N, R_SX, R_SXX, R_SY, R_SXY, R_T0, R_T1, R_INV, R_A1, R_A2, R_ONE, R_ZERO
  } reg_e;
  typedef struct packed {
    op_e  op;
    reg_e dst;
    reg_e src_a;
    reg_e src_b;
  } step_t;

  localparam int NSTEPS   = 18;  // normal sequence, also its latency in cycles
  localparam int STEP_DEN = 8;   // the step that forms the determinant
  localparam int STEP_SGL = 18;  // first step of the single-point fit
  localparam int NREGS    = 12;  // R_X .. R_A2; R_ONE and R_ZERO are constants

  function automatic step_t step_rom(input logic [4:0] s);
    case (s)
      5'd0:    return '{OP_MUL, R_T0,  R_X,   R_X};    // x*x
      5'd1:    return '{OP_ADD, R_SX,  R_SX,  R_X};    // Sx  += x
      5'd2:    return '{OP_ADD, R_SXX, R_SXX, R_T0};   // Sxx += x*x
      5'd3:    return '{OP_MUL, R_T0,  R_X,   R_Y};    // x*y
      5'd4:    return '{OP_ADD, R_SY,  R_SY,  R_Y};    // Sy  += y
      5'd5:    return '{OP_ADD, R_SXY, R_SXY, R_T0};   // Sxy += x*y
      5'd6:    return '{OP_MUL, R_T0,  R_N,   R_SXX};  // N*Sxx
      5'd7:    return '{OP_MUL, R_T1,  R_SX,  R_SX};   // Sx*Sx
      5'd8:    return '{OP_SUB, R_T0,  R_T0,  R_T1};   // den
      5'd9:    return '{OP_DIV, R_INV, R_ONE, R_T0};   // 1/den
      5'd10:   return '{OP_MUL, R_T0,  R_N,   R_SXY};  // N*Sxy
      5'd11:   return '{OP_MUL, R_T1,  R_SX,  R_SY};   // Sx*Sy
      5'd12:   return '{OP_SUB, R_T0,  R_T0,  R_T1};   // numerator of a1
      5'd13:   return '{OP_MUL, R_A1,  R_INV, R_T0};   // a1
      5'd14:   return '{OP_MUL, R_T0,  R_SXX, R_SY};   // Sxx*Sy
      5'd15:   return '{OP_MUL, R_T1,  R_SX,  R_SXY};  // Sx*Sxy
      5'd16:   return '{OP_SUB, R_T0,  R_T0,  R_T1};   // numerator of a2
      5'd17:   return '{OP_MUL, R_A2,  R_INV, R_T0};   // a2
      // determinant zero: line through the origin
      5'd18:   return '{OP_DIV, R_A1,  R_SXY, R_SXX};  // a1 = Sxy/Sxx
      default: return '{OP_MUL, R_A2,  R_ZERO, R_ONE}; // a2 = 0
    endcase
  endfunction

  logic [15:0] regs [NREGS];
  logic        busy;
  logic [4:0]  step;
  step_t       cur;
  logic [15:0] opa, opb, mul_y, add_y, div_y, res;

  function automatic logic [15:0] rd(input reg_e r, input logic [15:0] rf [NREGS]);
    if (r == R_ONE)  return FP16_ONE;
    if (r == R_ZERO) return 16'h0000;
    return rf[int'(r)];
  endfunction

  assign cur = step_rom(step);
  assign opa = rd(cur.src_a, regs);
  assign opb = rd(cur.src_b, regs);

  fp16_mul    u_mul (.a(opa), .b(opb), .y(mul_y));
  fp16_addsub u_add (.a(opa), .b(opb), .sub(cur.op == OP_SUB), .y(add_y));
  fp16_div    u_div (.a(opa), .b(opb), .y(div_y));

  always_comb begin
    unique case (cur.op)
      OP_MUL:         res = mul_y;
      OP_ADD, OP_SUB: res = add_y;
      default:        res = div_y;
    endcase
  end

  assign in_ready = !busy;
  assign a1       = regs[R_A1];
  assign a2       = regs[R_A2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      step      <= '0;
      out_valid <= 1'b0;
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (clear) begin
          regs[R_SX]  <= '0;
          regs[R_SXX] <= '0;
          regs[R_SY]  <= '0;
          regs[R_SXY] <= '0;
        end
        if (in_valid) begin
          regs[R_X] <= x_in;
          regs[R_Y] <= y_in;
          regs[R_N] <= n_in;
          busy      <= 1'b1;
          step      <= '0;
        end
      end else begin
        regs[int'(cur.dst)] <= res;
        if (step == 5'(NSTEPS - 1) || step == 5'(STEP_SGL + 1)) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end else if (step == 5'(STEP_DEN) && res[14:0] == '0) begin
          step <= 5'(STEP_SGL);
        end else begin
          step <= step + 5'd1;
        end
      end
    end
  end

  // A result is only announced once the sequence has finished.
  assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> !busy);

endmodule
