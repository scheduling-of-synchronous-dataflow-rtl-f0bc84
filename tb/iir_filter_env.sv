// iir_filter_env: stimulus and scoreboard for the complete IIR filter.
//
// Drives the filter's reset, coefficients and input, and checks its outputs
// against a sample-by-sample model of
//   u_i = x_i - a*u_{i-1} - c*u_{i-2},   y_i = u_i + b*u_{i-1} + d*u_{i-2}
// in the same fixed-point format (products shifted right by FRAC bits, all
// words wrapped to DW bits). It runs four segments, each started by a reset
// asserted in the middle of operation:
//   0  impulse response of a stable filter; also compared with the ideal
//      real-valued response, within a few LSBs of quantisation error
//   1  random input through a random stable filter
//   2  random input with random full-range coefficients (wrap-around)
//   3  a = b = c = d = 0, so y_i = x_i
// Timing checks: x_take is high once every L cycles, and each y_valid pulse
// comes exactly LAT cycles after the x_take of its sample. x is changed to a
// random value in every cycle, so only the value in the x_take cycle counts.
// done rises when all segments have been run; checks and failures are the
// running totals.
module iir_filter_env #(
  parameter int L   = 4,
  parameter int DW  = 16,
  parameter int CW  = 16,
  parameter int CF  = 14,
  parameter int NS  = 400,     // samples per segment
  parameter int LAT = 5        // x_take cycle to y_valid cycle
) (
  input  logic                 clk,
  output logic                 rst_n,
  output logic signed [CW-1:0] ca,
  output logic signed [CW-1:0] cb,
  output logic signed [CW-1:0] cc,
  output logic signed [CW-1:0] cd,
  output logic signed [DW-1:0] x,
  input  logic                 x_take,
  input  logic signed [DW-1:0] y,
  input  logic                 y_valid,
  output logic                 done,
  output int                   checks,
  output int                   failures,
  output int                   resets
);

  typedef struct {
    logic signed [DW-1:0] y;
    longint               take_cycle;
  } exp_t;

  exp_t exp_q [$];
  logic signed [DW-1:0] m_u1, m_u2;
  longint cycle, last_take;
  int taken;
  bit check_ideal;
  real id_u1, id_u2, ra, rb, rc, rd;
  real ideal_q [$];

  function automatic logic signed [DW-1:0] mulq(longint dv, longint cv);
    return DW'((dv * cv) >>> CF);
  endfunction

  function automatic logic signed [DW-1:0] wrap(longint v);
    return DW'(v);
  endfunction

  function automatic logic signed [CW-1:0] to_coef(real r);
    return CW'($rtoi(r * real'(1 << CF)));
  endfunction

  function automatic real from_coef(logic signed [CW-1:0] c);
    return real'(c) / real'(1 << CF);
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL at cycle %0d: %s", cycle, msg);
  endtask

  // model step for one input sample
  function automatic logic signed [DW-1:0] model_step(logic signed [DW-1:0] xv);
    logic signed [DW-1:0] s1, u, s2, yv;
    s1 = wrap(longint'(xv) - longint'(mulq(m_u2, cc)));
    u  = wrap(longint'(s1) - longint'(mulq(m_u1, ca)));
    s2 = wrap(longint'(u)  + longint'(mulq(m_u1, cb)));
    yv = wrap(longint'(s2) + longint'(mulq(m_u2, cd)));
    m_u2 = m_u1;
    m_u1 = u;
    return yv;
  endfunction

  function automatic real ideal_step(real xv);
    real u, yv;
    u  = xv - ra * id_u1 - rc * id_u2;
    yv = u + rb * id_u1 + rd * id_u2;
    id_u2 = id_u1;
    id_u1 = u;
    return yv;
  endfunction

  // monitor, in the middle of each cycle
  always @(negedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      if (y_valid) fail("y_valid during reset");
    end else begin
      if (x_take) begin
        exp_t e;
        if (taken > 0 && cycle - last_take != longint'(L)) fail($sformatf("x_take spacing %0d", cycle - last_take));
        last_take = cycle;
        taken++;
        e.y = model_step(x);
        e.take_cycle = cycle;
        exp_q.push_back(e);
        if (check_ideal) ideal_q.push_back(ideal_step(real'(x)));
      end
      if (y_valid) begin
        if (exp_q.size() == 0) fail("y_valid without a pending sample");
        else begin
          exp_t e;
          e = exp_q.pop_front();
          checks++;
          if (y !== e.y) fail($sformatf("y = %0d, expected %0d", y, e.y));
          checks++;
          if (cycle - e.take_cycle != longint'(LAT)) fail($sformatf("latency %0d", cycle - e.take_cycle));
          if (check_ideal) begin
            real r;
            r = ideal_q.pop_front();
            checks++;
            if (r - real'(y) > 8.0 || real'(y) - r > 8.0) fail($sformatf("y = %0d, ideal %f", y, r));
          end
        end
      end
    end
  end

  task automatic do_reset();
    @(negedge clk);
    #1 rst_n = 1'b0;
    resets++;
    repeat (2) @(negedge clk);
    exp_q.delete();
    ideal_q.delete();
    m_u1 = '0; m_u2 = '0;
    id_u1 = 0.0; id_u2 = 0.0;
    taken = 0;
    #1 rst_n = 1'b1;
  endtask

  initial begin
    real r, th;
    rst_n = 1'b0; done = 1'b0; checks = 0; failures = 0; resets = 0;
    cycle = 0; last_take = 0; taken = 0; check_ideal = 0;
    m_u1 = '0; m_u2 = '0; id_u1 = 0.0; id_u2 = 0.0;
    ca = '0; cb = '0; cc = '0; cd = '0; x = '0;
    for (int seg = 0; seg < 4; seg++) begin
      case (seg)
        0, 1: begin
          // poles at r*exp(+-j th): a = -2 r cos th, c = r^2
          r  = 0.5 + 0.45 * real'($urandom % 1000) / 1000.0;
          th = 3.1 * real'($urandom % 1000) / 1000.0;
          ca = to_coef(-2.0 * r * $cos(th));
          cc = to_coef(r * r);
          cb = to_coef(1.6 * real'($urandom % 1000) / 1000.0 - 0.8);
          cd = to_coef(0.8 * real'($urandom % 1000) / 1000.0 - 0.4);
        end
        2: begin ca = CW'($urandom); cb = CW'($urandom); cc = CW'($urandom); cd = CW'($urandom); end
        default: begin ca = '0; cb = '0; cc = '0; cd = '0; end
      endcase
      ra = from_coef(ca); rb = from_coef(cb); rc = from_coef(cc); rd = from_coef(cd);
      check_ideal = (seg == 0);
      do_reset();
      while (taken < NS) begin
        @(posedge clk);
        #1;
        if (seg == 0) x = (taken == 0) ? DW'(8192) : '0;
        else if (seg == 1) x = DW'(int'($urandom % 16384) - 8192);
        else x = DW'($urandom);
      end
      // let the last outputs come out
      repeat (LAT + L + 2) @(negedge clk);
      // the filter keeps taking samples; only overdue outputs are missing
      checks++;
      foreach (exp_q[k])
        if (cycle - exp_q[k].take_cycle > longint'(LAT)) fail("output missing");
    end
    done = 1'b1;
  end

endmodule
