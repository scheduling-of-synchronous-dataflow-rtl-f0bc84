// iir2_filter: second-order IIR filter on a single pipelined multiplier.
//
// Implements H(z) = (1 + b z^-1 + d z^-2) / (1 + a z^-1 + c z^-2) as
//   u_i = x_i - a*u_{i-1} - c*u_{i-2},   y_i = u_i + b*u_{i-1} + d*u_{i-2}
// with one input sample accepted every L clock cycles. The four products
// share one two-stage pipelined multiplier and the four sums share one adder,
// so the longest register-to-register path is half a multiplier or one adder.
// iir_ctrl holds the schedule (a modulo-L counter and a control word per
// cycle) and iir_datapath the multiplexors, units and registers.
//
// Interface and timing:
//   x_take_o  is high in the one cycle per period at whose end x_i is sampled;
//             x_i only has to be valid then.
//   y_valid_o pulses for one cycle when y_o takes a new output sample; y_o
//             holds it until the next one. y_valid_o rises 5 cycles after the
//             cycle in which x_take_o was high (4 clock edges of processing).
//   coef_*_i  are static signed Q(COEF_W-COEF_FRAC).COEF_FRAC coefficients.
//   rst_n     asynchronous, active low; clears the filter state to zero.
// Period L = 4 and the multiplier and adder latencies (2 and 1 cycles) follow
// the document; widths, number format and the handshake are this design's.
module iir2_filter
  import iir_pkg::*;
#(
  parameter int unsigned L         = 4,
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned COEF_W    = 16,
  parameter int unsigned COEF_FRAC = 14
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [COEF_W-1:0] coef_a_i,
  input  logic signed [COEF_W-1:0] coef_b_i,
  input  logic signed [COEF_W-1:0] coef_c_i,
  input  logic signed [COEF_W-1:0] coef_d_i,
  input  logic signed [DATA_W-1:0] x_i,
  output logic                     x_take_o,
  output logic signed [DATA_W-1:0] y_o,
  output logic                     y_valid_o
);

  ctrl_t ctrl;
  logic [$clog2(L)-1:0] phase;

  iir_ctrl #(
    .L(L)
  ) u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .ctrl_o (ctrl),
    .phase_o(phase)
  );

  iir_datapath #(
    .DATA_W   (DATA_W),
    .COEF_W   (COEF_W),
    .COEF_FRAC(COEF_FRAC)
  ) u_dp (
    .clk      (clk),
    .rst_n    (rst_n),
    .ctrl_i   (ctrl),
    .coef_a_i (coef_a_i),
    .coef_b_i (coef_b_i),
    .coef_c_i (coef_c_i),
    .coef_d_i (coef_d_i),
    .x_i      (x_i),
    .y_o      (y_o),
    .y_valid_o(y_valid_o)
  );

  assign x_take_o = ctrl.load_x;

  // One sample is taken per period, in the cycle the schedule gives it.
  a_take_phase: assert property (@(posedge clk) disable iff (!rst_n)
    x_take_o == (32'(phase) == 1));

endmodule
