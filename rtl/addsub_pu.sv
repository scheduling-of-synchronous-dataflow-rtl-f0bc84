// addsub_pu: single-cycle adder processing unit with a registered result.
//
// s_o takes a_i + b_i (add_sub_i = 0) or a_i - b_i (add_sub_i = 1) at every
// rising clock edge, wrapping in W-bit two's complement, so a result is
// available one cycle after its operands. The register is the accumulator of
// the filter datapath. sum_o is the unregistered result of the current cycle,
// for registers that take the result at the same edge as the accumulator. The document gives the adder a one-cycle delay; the
// subtract control, needed for the minus signs of the recursion, and the
// asynchronous reset to zero are this design's choices.
module addsub_pu #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] a_i,
  input  logic signed [W-1:0] b_i,
  input  logic                add_sub_i,  // 1: a - b, 0: a + b
  output logic signed [W-1:0] sum_o,      // result of this cycle, unregistered
  output logic signed [W-1:0] s_o         // result of the previous cycle, registered
);

  always_comb begin
    if (add_sub_i) sum_o = a_i - b_i;
    else           sum_o = a_i + b_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_o <= '0;
    else        s_o <= sum_o;
  end

endmodule
