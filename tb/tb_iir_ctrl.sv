// tb_iir_ctrl: self-checking test of the filter control unit.
//
// Runs the unit at L = 4 and at L = 6 side by side. For every cycle it
// compares the control word with the schedule table written out here, and
// checks that the phase counts 0 .. L-1, that each period issues every
// coefficient, the input load, the u update and the output load exactly
// once, and that y_valid is withheld only for the first output slot.
module tb_iir_ctrl;
  import iir_pkg::*;
  localparam int PERIODS = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  ctrl_t w4, w6;
  logic [1:0] ph4;
  logic [2:0] ph6;
  int checks = 0, failures = 0;

  iir_ctrl #(.L(4)) dut4 (.clk(clk), .rst_n(rst_n), .ctrl_o(w4), .phase_o(ph4));
  iir_ctrl #(.L(6)) dut6 (.clk(clk), .rst_n(rst_n), .ctrl_o(w6), .phase_o(ph6));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (PERIODS * 6 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, want);
    end
  endtask

  // Expected word of the cycle n = p of a period of length l (fields that are
  // don't-care in idle cycles are not compared).
  task automatic check_word(string tag, ctrl_t w, int p, int l, bit first_y);
    int slot_y;
    slot_y = 5 % l;
    if (p <= 3) begin
      case (p)
        0: begin expect_eq({tag, " coef"}, int'(w.coef_sel), int'(COEF_C)); expect_eq({tag, " u2"}, int'(w.mul_u2), 1); end
        1: begin expect_eq({tag, " coef"}, int'(w.coef_sel), int'(COEF_A)); expect_eq({tag, " u2"}, int'(w.mul_u2), 0); end
        2: begin expect_eq({tag, " coef"}, int'(w.coef_sel), int'(COEF_B)); expect_eq({tag, " u2"}, int'(w.mul_u2), 0); end
        3: begin expect_eq({tag, " coef"}, int'(w.coef_sel), int'(COEF_D)); expect_eq({tag, " u2"}, int'(w.mul_u2), 1); end
        default: ;
      endcase
    end
    expect_eq({tag, " load_x"}, int'(w.load_x), int'(p == 1));
    expect_eq({tag, " add_x"},  int'(w.add_x),  int'(p == 2));
    expect_eq({tag, " sub"},    int'(w.add_sub), int'(p == 2 || p == 3));
    expect_eq({tag, " load_u"}, int'(w.load_u), int'(p == 3));
    expect_eq({tag, " load_y"}, int'(w.load_y), int'(p == slot_y));
    expect_eq({tag, " y_valid"}, int'(w.y_valid), int'(p == slot_y && !first_y));
  endtask

  initial begin
    int p4, p6;
    bit seen_u4, seen_u6;
    int first_suppressed4, first_suppressed6;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    p4 = 0; p6 = 0; seen_u4 = 0; seen_u6 = 0;
    first_suppressed4 = 0; first_suppressed6 = 0;
    for (int cyc = 0; cyc < PERIODS * 6; cyc++) begin
      // check the word of the current cycle
      expect_eq("phase4", int'(ph4), p4);
      expect_eq("phase6", int'(ph6), p6);
      check_word("L4", w4, p4, 4, !seen_u4);
      check_word("L6", w6, p6, 6, !seen_u6);
      if (w4.load_y && !w4.y_valid) first_suppressed4++;
      if (w6.load_y && !w6.y_valid) first_suppressed6++;
      if (w4.load_u) seen_u4 = 1;
      if (w6.load_u) seen_u6 = 1;
      @(posedge clk); #1;
      p4 = (p4 + 1) % 4;
      p6 = (p6 + 1) % 6;
    end
    // start-up slot is suppressed once at L = 4; at L = 6 the first output
    // slot already follows the first u update
    expect_eq("suppressed L4", first_suppressed4, 1);
    expect_eq("suppressed L6", first_suppressed6, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
