// tb_iir_datapath: self-checking test of the filter datapath on its own.
//
// Drives the datapath with random control words (every multiplexor setting
// and load enable, in any order, not only the filter schedule) and random
// inputs, and steps a register-level model of the same structure written
// here: x, u_{i-1}, u_{i-2}, accumulator, output register and a two-deep
// product pipeline. After every clock edge the output, the valid flag, the
// state registers and the accumulator are compared with the model.
module tb_iir_datapath;
  import iir_pkg::*;
  localparam int DW = 16, CW = 16, CF = 14;
  localparam int N  = 5000;

  logic clk = 1'b0, rst_n = 1'b0;
  ctrl_t w;
  logic signed [CW-1:0] ca, cb, cc, cd;
  logic signed [DW-1:0] x, y;
  logic yv;
  int checks = 0, failures = 0;

  iir_datapath #(.DATA_W(DW), .COEF_W(CW), .COEF_FRAC(CF)) dut (
    .clk(clk), .rst_n(rst_n), .ctrl_i(w),
    .coef_a_i(ca), .coef_b_i(cb), .coef_c_i(cc), .coef_d_i(cd),
    .x_i(x), .y_o(y), .y_valid_o(yv));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [DW-1:0] mulq(longint dv, longint cv);
    return DW'((dv * cv) >>> CF);
  endfunction

  task automatic expect_eq(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, want);
    end
  endtask

  // model state
  logic signed [DW-1:0] m_x, m_u1, m_u2, m_acc, m_y, m_p_mid, m_p_out;
  logic m_yv;

  initial begin
    logic signed [CW-1:0] coef;
    logic signed [DW-1:0] a_op, sum, d_op;
    w = '0; x = '0;
    ca = CW'($urandom); cb = CW'($urandom); cc = CW'($urandom); cd = CW'($urandom);
    m_x = '0; m_u1 = '0; m_u2 = '0; m_acc = '0; m_y = '0; m_p_mid = '0; m_p_out = '0; m_yv = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      if (i % 500 == 499) begin
        ca = CW'($urandom); cb = CW'($urandom); cc = CW'($urandom); cd = CW'($urandom);
      end
      w = ctrl_t'($urandom);
      w.add_sub = w.add_sub | w.add_x;   // the datapath requires this pairing
      x = DW'($urandom);
      // model step for the coming edge, from the current model state
      unique case (w.coef_sel)
        COEF_A: coef = ca;
        COEF_B: coef = cb;
        COEF_C: coef = cc;
        default: coef = cd;
      endcase
      d_op = w.mul_u2 ? m_u2 : m_u1;
      a_op = w.add_x ? m_x : m_acc;
      sum  = DW'(w.add_sub ? longint'(a_op) - longint'(m_p_out) : longint'(a_op) + longint'(m_p_out));
      @(posedge clk);
      m_acc = sum;
      if (w.load_x) m_x = x;
      if (w.load_u) begin m_u2 = m_u1; m_u1 = sum; end
      if (w.load_y) m_y = sum;
      m_yv = w.y_valid;
      m_p_out = m_p_mid;
      m_p_mid = mulq(longint'(d_op), longint'(coef));
      #1;
      expect_eq("y", y, m_y);
      expect_eq("y_valid", yv, m_yv);
      expect_eq("u1", dut.u1_q, m_u1);
      expect_eq("u2", dut.u2_q, m_u2);
      expect_eq("acc", dut.acc, m_acc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
