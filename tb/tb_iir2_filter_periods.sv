// tb_iir2_filter_periods: end-to-end test of the IIR filter with periods
// longer than the minimum, L = 5 and L = 6.
//
// Each filter has its own iir_filter_env, which checks every output value,
// the sample spacing of L cycles and the input-to-output latency. Beyond
// that, the bench counts cycles in which the shared multiplier idles (there
// are L - 4 per period) and, for L = 5, output slots that fall into the next
// period (cycle 5 of an iteration is cycle 0 of the next); a count of zero
// is a failure.
module tb_iir2_filter_periods;
  import iir_pkg::*;

  logic clk = 1'b0;
  logic rst5, rst6;
  logic signed [15:0] ca5, cb5, cc5, cd5, x5, y5;
  logic signed [15:0] ca6, cb6, cc6, cd6, x6, y6;
  logic take5, yv5, done5, take6, yv6, done6;
  int checks5, failures5, resets5, checks6, failures6, resets6;
  int idle5 = 0, idle6 = 0, wrap5 = 0;

  iir2_filter #(.L(5)) dut5 (
    .clk(clk), .rst_n(rst5), .coef_a_i(ca5), .coef_b_i(cb5), .coef_c_i(cc5), .coef_d_i(cd5),
    .x_i(x5), .x_take_o(take5), .y_o(y5), .y_valid_o(yv5));
  iir_filter_env #(.L(5), .NS(200)) env5 (
    .clk(clk), .rst_n(rst5), .ca(ca5), .cb(cb5), .cc(cc5), .cd(cd5), .x(x5),
    .x_take(take5), .y(y5), .y_valid(yv5),
    .done(done5), .checks(checks5), .failures(failures5), .resets(resets5));

  iir2_filter #(.L(6)) dut6 (
    .clk(clk), .rst_n(rst6), .coef_a_i(ca6), .coef_b_i(cb6), .coef_c_i(cc6), .coef_d_i(cd6),
    .x_i(x6), .x_take_o(take6), .y_o(y6), .y_valid_o(yv6));
  iir_filter_env #(.L(6), .NS(200)) env6 (
    .clk(clk), .rst_n(rst6), .ca(ca6), .cb(cb6), .cc(cc6), .cd(cd6), .x(x6),
    .x_take(take6), .y(y6), .y_valid(yv6),
    .done(done6), .checks(checks6), .failures(failures6), .resets(resets6));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst5 && 32'(dut5.u_ctrl.phase_o) > 3) idle5++;
    if (rst6 && 32'(dut6.u_ctrl.phase_o) > 3) idle6++;
    if (rst5 && dut5.u_ctrl.ctrl_o.y_valid && 32'(dut5.u_ctrl.phase_o) == 0) wrap5++;
  end

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks5 + checks6, failures5 + failures6 + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    wait (done5 && done6);
    checks = checks5 + checks6 + 3;
    failures = failures5 + failures6;
    $display("idle multiplier cycles: L=5 %0d, L=6 %0d; output slots wrapped (L=5) %0d", idle5, idle6, wrap5);
    if (idle5 == 0) failures++;
    if (idle6 == 0) failures++;
    if (wrap5 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
