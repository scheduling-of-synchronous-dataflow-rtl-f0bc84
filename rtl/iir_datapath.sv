// iir_datapath: datapath of the time-multiplexed second-order IIR filter.
//
// One pipelined multiplier (pipe_mult, two cycles) and one adder
// (addsub_pu, one cycle, its register is the accumulator) compute
//   u_i = x_i - a*u_{i-1} - c*u_{i-2},   y_i = u_i + b*u_{i-1} + d*u_{i-2}
// under a control word per cycle from iir_ctrl. Around the two units sit
//   - a 4-input coefficient multiplexor (a, b, c, d) and a 2-input data
//     multiplexor (u_{i-1}, u_{i-2}) at the multiplier,
//   - a 2-input multiplexor (input register, accumulator) at the adder's
//     first operand; the second operand is always the product,
//   - the input register x, the state registers u_{i-1} and u_{i-2}, which
//     take the adder result when load_u is set, and the output register y.
// Data are DATA_W-bit two's complement integers; coefficients are signed
// fixed-point numbers with COEF_FRAC fraction bits (Q2.14 by default, so
// |a|, |c| < 2 fit). All arithmetic wraps; products are truncated toward
// minus infinity. Word widths, number format and the reset to zero state are
// this design's choices; the document does not fix them.
module iir_datapath
  import iir_pkg::*;
#(
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned COEF_W    = 16,
  parameter int unsigned COEF_FRAC = 14
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  ctrl_t                    ctrl_i,
  input  logic signed [COEF_W-1:0] coef_a_i,
  input  logic signed [COEF_W-1:0] coef_b_i,
  input  logic signed [COEF_W-1:0] coef_c_i,
  input  logic signed [COEF_W-1:0] coef_d_i,
  input  logic signed [DATA_W-1:0] x_i,
  output logic signed [DATA_W-1:0] y_o,
  output logic                     y_valid_o
);

  logic signed [DATA_W-1:0] x_q, u1_q, u2_q;
  logic signed [COEF_W-1:0] mul_c;
  logic signed [DATA_W-1:0] mul_d, prod;
  logic signed [DATA_W-1:0] add_a, sum, acc;

  // multiplier operand multiplexors
  always_comb begin
    unique case (ctrl_i.coef_sel)
      COEF_A: mul_c = coef_a_i;
      COEF_B: mul_c = coef_b_i;
      COEF_C: mul_c = coef_c_i;
      COEF_D: mul_c = coef_d_i;
      default: mul_c = coef_a_i;
    endcase
    mul_d = ctrl_i.mul_u2 ? u2_q : u1_q;
  end

  pipe_mult #(
    .DATA_W   (DATA_W),
    .COEF_W   (COEF_W),
    .COEF_FRAC(COEF_FRAC)
  ) u_mult (
    .clk  (clk),
    .rst_n(rst_n),
    .d_i  (mul_d),
    .c_i  (mul_c),
    .p_o  (prod)
  );

  // adder operand multiplexor
  assign add_a = ctrl_i.add_x ? x_q : acc;

  addsub_pu #(
    .W(DATA_W)
  ) u_add (
    .clk      (clk),
    .rst_n    (rst_n),
    .a_i      (add_a),
    .b_i      (prod),
    .add_sub_i(ctrl_i.add_sub),
    .sum_o    (sum),
    .s_o      (acc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q       <= '0;
      u1_q      <= '0;
      u2_q      <= '0;
      y_o       <= '0;
      y_valid_o <= 1'b0;
    end else begin
      if (ctrl_i.load_x) x_q <= x_i;
      if (ctrl_i.load_u) begin
        u1_q <= sum;
        u2_q <= u1_q;
      end
      if (ctrl_i.load_y) y_o <= sum;
      y_valid_o <= ctrl_i.y_valid;
    end
  end

  // The input register feeds the adder only in the first, subtracting step.
  a_x_only_subtracted: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl_i.add_x |-> ctrl_i.add_sub);

endmodule
