// iir_pkg: types shared by the time-multiplexed second-order IIR filter.
//
// The filter computes, once every L clock cycles,
//   u_i = x_i - a*u_{i-1} - c*u_{i-2}
//   y_i = u_i + b*u_{i-1} + d*u_{i-2}
// on one two-stage pipelined multiplier and one single-cycle adder. The
// control unit (iir_ctrl) sends the datapath (iir_datapath) one control word
// per clock cycle; this package defines that word and the coefficient select.
package iir_pkg;

  // Which coefficient the multiplier takes in a given cycle.
  typedef enum logic [1:0] {
    COEF_A = 2'd0,
    COEF_B = 2'd1,
    COEF_C = 2'd2,
    COEF_D = 2'd3
  } coef_sel_e;

  // Control word of one clock cycle.
  typedef struct packed {
    coef_sel_e coef_sel;  // multiplier coefficient operand
    logic      mul_u2;    // multiplier data operand: 1 = u_{i-2}, 0 = u_{i-1}
    logic      add_x;     // adder first operand: 1 = input register x, 0 = accumulator
    logic      add_sub;   // adder: 1 = subtract the product, 0 = add it
    logic      load_x;    // input register takes x_i at the end of this cycle
    logic      load_u;    // u_{i-1} <= adder result, u_{i-2} <= u_{i-1}
    logic      load_y;    // output register takes the adder result
    logic      y_valid;   // load_y carries a real sample (not the start-up cycle)
  } ctrl_t;

endpackage
