// iir_ctrl: control unit of the time-multiplexed second-order IIR filter.
//
// A modulo-L cycle counter walks through one algorithm period; each cycle the
// unit presents a registered control word (iir_pkg::ctrl_t) that sets the
// datapath multiplexors and register load enables. The schedule below places
// every operation of one filter iteration at a fixed cycle n, relative to the
// start of its period, and the counter repeats it every L cycles (n mod L):
//
//   n  multiplier issues        adder (result in the accumulator at n+1)
//   0  c * u_{i-2}              -
//   1  a * u_{i-1}  (x_i taken) -
//   2  b * u_{i-1}              s1  = x_i - c*u_{i-2}
//   3  d * u_{i-2}              u_i = s1 - a*u_{i-1}      (u registers shift)
//   4  -                        s2  = u_i + b*u_{i-1}
//   5  -                        y_i = s2 + d*u_{i-2}      (output register)
//
// The multiplier has two pipeline stages, so a product issued at n is added
// at n+2; the adder has one. The four products on one multiplier need
// L >= 4; the recursion u_{i-1} -> a*u_{i-1} -> u_i takes 3 of those cycles.
// At L = 4 the multiplier and the adder are both busy in every cycle and the
// operations at n = 4, 5 of one iteration overlap n = 0, 1 of the next. For L > 4 the extra
// cycles are idle. L = 4 and the single multiplier follow the document; the
// order of operations is this design's own schedule, found with the
// document's rules (a shared unit is used once per cycle modulo L, and no
// operation starts before its operands are ready).
//
// y_valid is withheld for the output slot that precedes the first u update
// after reset, which would carry no sample.
module iir_ctrl
  import iir_pkg::*;
#(
  parameter int unsigned L = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  output ctrl_t ctrl_o,    // control word of the current cycle
  output logic [$clog2(L)-1:0] phase_o  // cycle within the period, 0 .. L-1
);

  localparam int unsigned PW      = $clog2(L);
  localparam int unsigned SLOT_Y  = 5 % L;   // y_i = s2 + d*u_{i-2}

  if (L < 4) begin : g_l_check
    $error("iir_ctrl: four products on one multiplier need a period of at least 4 cycles");
  end

  // Control word of the cycle with phase p.
  function automatic ctrl_t decode(input logic [PW-1:0] p);
    ctrl_t w;
    w = '0;
    w.coef_sel = COEF_A;
    unique case (32'(p))
      0: begin w.coef_sel = COEF_C; w.mul_u2 = 1'b1; end
      1: begin w.coef_sel = COEF_A; w.mul_u2 = 1'b0; w.load_x = 1'b1; end
      2: begin w.coef_sel = COEF_B; w.mul_u2 = 1'b0; end
      3: begin w.coef_sel = COEF_D; w.mul_u2 = 1'b1; end
      default: ;
    endcase
    if (32'(p) == 2) begin w.add_x = 1'b1; w.add_sub = 1'b1; end
    if (32'(p) == 3) begin w.add_sub = 1'b1; w.load_u = 1'b1; end
    if (32'(p) == SLOT_Y) w.load_y = 1'b1;
    return w;
  endfunction

  logic [PW-1:0] ph_q, ph_d;
  logic          primed_q;   // a u update has happened since reset
  ctrl_t         ctrl_d;

  always_comb begin
    ph_d = (32'(ph_q) == L - 1) ? '0 : ph_q + 1'b1;
    ctrl_d = decode(ph_d);
    ctrl_d.y_valid = ctrl_d.load_y & (primed_q | ctrl_o.load_u);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q     <= '0;
      primed_q <= 1'b0;
      ctrl_o   <= decode('0);
    end else begin
      ph_q     <= ph_d;
      primed_q <= primed_q | ctrl_o.load_u;
      ctrl_o   <= ctrl_d;
    end
  end

  assign phase_o = ph_q;

  // The registered word always belongs to the counter's phase.
  a_word_matches_phase: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl_o.load_x == (32'(ph_q) == 1) && ctrl_o.load_y == (32'(ph_q) == SLOT_Y));

endmodule
