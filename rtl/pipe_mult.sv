// pipe_mult: two-stage pipelined signed multiplier processing unit.
//
// Multiplies a signed data word by a signed fixed-point coefficient with
// COEF_FRAC fraction bits and returns the product scaled back to the data
// format (arithmetic shift right by COEF_FRAC, then truncated to DATA_W bits,
// two's-complement wrap). The product of the operands presented in cycle t is
// on p_o in cycle t+2; a new pair can be presented every cycle.
//
// The two stages split the multiplier so that each holds about half of its
// delay, which is what gives the filter a clock period of max(t_M/2, t_A):
//   stage 1: the coefficient is split into a signed upper half and an unsigned
//            lower half, and both partial products with the data word are
//            registered;
//   stage 2: the partial products are aligned, summed, scaled and registered.
// The split into halves is this design's choice; the document only fixes the
// two-cycle latency of a pipelined multiplier with single-cycle stages.
module pipe_mult #(
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned COEF_W    = 16,
  parameter int unsigned COEF_FRAC = 14
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] d_i,   // data operand
  input  logic signed [COEF_W-1:0] c_i,   // coefficient operand
  output logic signed [DATA_W-1:0] p_o    // (d_i * c_i) >>> COEF_FRAC, two cycles later
);

  localparam int unsigned LO_W   = COEF_W / 2;        // width of the unsigned lower half
  localparam int unsigned HI_W   = COEF_W - LO_W;     // width of the signed upper half
  localparam int unsigned FULL_W = DATA_W + COEF_W;   // full product width

  logic signed [HI_W-1:0]          c_hi;
  logic signed [LO_W:0]            c_lo;              // zero-extended, so positive
  logic signed [DATA_W+HI_W-1:0]   pp_hi_d, pp_hi_q;
  logic signed [DATA_W+LO_W:0]     pp_lo_d, pp_lo_q;
  logic signed [FULL_W-1:0]        full;

  assign c_hi    = c_i[COEF_W-1:LO_W];
  assign c_lo    = {1'b0, c_i[LO_W-1:0]};
  assign pp_hi_d = d_i * c_hi;
  assign pp_lo_d = d_i * c_lo;

  // stage 1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pp_hi_q <= '0;
      pp_lo_q <= '0;
    end else begin
      pp_hi_q <= pp_hi_d;
      pp_lo_q <= pp_lo_d;
    end
  end

  always_comb begin
    full = (FULL_W'(pp_hi_q) <<< LO_W) + FULL_W'(pp_lo_q);
  end

  // stage 2
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p_o <= '0;
    else        p_o <= DATA_W'(full >>> COEF_FRAC);
  end

endmodule
