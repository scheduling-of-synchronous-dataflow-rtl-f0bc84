// tb_pipe_mult: self-checking test of the two-stage pipelined multiplier.
//
// Presents a new random operand pair every cycle (plus the corner values)
// and checks that p_o two cycles later equals the product computed here with
// 64-bit integers, shifted right by the fraction bits and wrapped to the data
// width. The comparison is made exactly two clock edges after the pair was
// applied, so a wrong pipeline depth fails as well as a wrong product.
module tb_pipe_mult;
  localparam int DW = 16, CW = 16, CF = 14;
  localparam int N  = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [DW-1:0] d;
  logic signed [CW-1:0] c;
  logic signed [DW-1:0] p;
  int checks = 0, failures = 0;

  pipe_mult #(.DATA_W(DW), .COEF_W(CW), .COEF_FRAC(CF)) dut (
    .clk(clk), .rst_n(rst_n), .d_i(d), .c_i(c), .p_o(p));

  always #5 clk = ~clk;

  function automatic logic signed [DW-1:0] ref_mul(longint dv, longint cv);
    longint full = dv * cv;
    return DW'(full >>> CF);
  endfunction

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [DW-1:0] exp_q [$];
  logic signed [DW-1:0] e;
  initial begin
    d = '0; c = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      case (i)
        0: begin d = 16'sh8000; c = 16'sh8000; end
        1: begin d = 16'sh7fff; c = 16'sh7fff; end
        2: begin d = 16'sh8000; c = 16'sh7fff; end
        3: begin d = -16'sd1;   c = -16'sd1;   end
        4: begin d = 16'sd1234; c = 16'sh4000; end   // times 1.0
        default: begin d = DW'($urandom); c = CW'($urandom); end
      endcase
      exp_q.push_back(ref_mul(longint'(d), longint'(c)));
      @(posedge clk); #1;
      // two edges after it was presented, pair i-1 must be on the output
      if (exp_q.size() == 2) begin
        e = exp_q.pop_front();
        checks++;
        if (p !== e) begin
          failures++;
          if (failures < 10) $display("mismatch: got %0d expected %0d", p, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
