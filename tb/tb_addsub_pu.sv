// tb_addsub_pu: self-checking test of the single-cycle adder unit.
//
// Applies random and corner operands with a random add/subtract control,
// checks the unregistered result in the same cycle and the registered result
// after the next clock edge against sums computed here and wrapped to W bits.
module tb_addsub_pu;
  localparam int W = 16;
  localparam int N = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] a, b, sum, s;
  logic sub;
  logic signed [W-1:0] exp_now, exp_prev;
  int checks = 0, failures = 0;

  addsub_pu #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .a_i(a), .b_i(b), .add_sub_i(sub), .sum_o(sum), .s_o(s));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic signed [W-1:0] got, logic signed [W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, want);
    end
  endtask

  initial begin
    a = '0; b = '0; sub = 1'b0;
    repeat (2) @(posedge clk);
    #1 check("reset", s, '0);
    rst_n = 1'b1;
    exp_prev = '0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      case (i)
        0: begin a = 16'sh7fff; b = 16'sd1; sub = 1'b0; end   // wraps
        1: begin a = 16'sh8000; b = 16'sd1; sub = 1'b1; end   // wraps
        default: begin a = W'($urandom); b = W'($urandom); sub = 1'($urandom); end
      endcase
      exp_now = W'(sub ? (longint'(a) - longint'(b)) : (longint'(a) + longint'(b)));
      #1 check("sum_o", sum, exp_now);
      @(posedge clk); #1;
      check("s_o", s, exp_now);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
