// tb_iir2_filter: end-to-end test of the IIR filter at its default sizes
// (period L = 4, 16-bit data, Q2.14 coefficients).
//
// iir_filter_env supplies input, coefficients and resets and checks every
// output value and its timing against a model of the filter equations. This
// bench also watches the control word inside the filter and counts how often
// each mechanism of the time-multiplexed schedule occurred; one that never
// occurs is a failure:
//   - each of the four coefficients issued to the shared multiplier
//   - adder subtracting and adding
//   - the u_{i-1}/u_{i-2} state shift
//   - overlap: the output of iteration i written in the cycle in which
//     sample i+1 is taken (both units busy every cycle at L = 4)
//   - the output slot before the first state update withheld after reset
//   - reset in the middle of operation
module tb_iir2_filter;
  import iir_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic signed [15:0] ca, cb, cc, cd, x, y;
  logic x_take, y_valid, done;
  int checks, failures, resets;
  int n_coef [4];
  int n_sub = 0, n_add = 0, n_shift = 0, n_overlap = 0, n_startup = 0, n_busy = 0, n_cycles = 0;

  iir2_filter dut (
    .clk(clk), .rst_n(rst_n),
    .coef_a_i(ca), .coef_b_i(cb), .coef_c_i(cc), .coef_d_i(cd),
    .x_i(x), .x_take_o(x_take), .y_o(y), .y_valid_o(y_valid));

  iir_filter_env #(.L(4)) env (
    .clk(clk), .rst_n(rst_n), .ca(ca), .cb(cb), .cc(cc), .cd(cd), .x(x),
    .x_take(x_take), .y(y), .y_valid(y_valid),
    .done(done), .checks(checks), .failures(failures), .resets(resets));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n) begin
      ctrl_t w;
      w = dut.u_ctrl.ctrl_o;
      n_cycles++;
      if (32'(dut.u_ctrl.phase_o) <= 3) n_coef[w.coef_sel]++;
      if (w.add_sub) n_sub++; else n_add++;
      if (w.load_u) n_shift++;
      if (w.load_y && w.y_valid && w.load_x) n_overlap++;
      if (w.load_y && !w.y_valid) n_startup++;
      // at L = 4 every cycle issues a product and uses the adder
      if (32'(dut.u_ctrl.phase_o) <= 3) n_busy++;
    end
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic need(string what, int n);
    $display("  %-34s %0d", what, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never occurred: %s", what);
    end
  endtask

  initial begin
    foreach (n_coef[i]) n_coef[i] = 0;
    wait (done);
    $display("mechanism counts:");
    need("multiplier issues coefficient a", n_coef[COEF_A]);
    need("multiplier issues coefficient b", n_coef[COEF_B]);
    need("multiplier issues coefficient c", n_coef[COEF_C]);
    need("multiplier issues coefficient d", n_coef[COEF_D]);
    need("adder subtracts", n_sub);
    need("adder adds", n_add);
    need("state shift u1 -> u2", n_shift);
    need("overlapped iterations", n_overlap);
    need("start-up output slot withheld", n_startup);
    need("reset during operation", resets);
    checks++;
    if (n_busy != n_cycles) begin
      failures++;
      $display("FAIL: multiplier idle in %0d of %0d cycles", n_cycles - n_busy, n_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
