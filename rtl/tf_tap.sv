// tf_tap: one stage of a transposed-form FIR filter.
//
// Each stage adds the product of its own coefficient with the current sample
// to the partial sum handed on by the stage after it, and stores the result
// in its delay register. Since the partial sum gathers more terms the closer
// a stage is to the output, the register (and its adder) is made as wide as
// that stage's sum can get: OUT_W is chosen per stage by the instantiating
// filter, so the register widths grow along the chain as in the transposed
// structure. Operands are sign-extended to OUT_W before the addition.
//
// Interface: prod is this tap's signed product, z_in the signed partial sum
// from the next stage (tie to zero for the last stage), z_out this stage's
// registered partial sum. en advances the stage (one sample per enabled
// cycle). An assertion flags a partial sum that would not fit in OUT_W bits.
// Timing: z_out is updated on the rising clock edge when en is high;
// synchronous active-low reset clears it. The enable and the reset are this
// design's choices.
module tf_tap #(
  parameter int unsigned PROD_W = 17,
  parameter int unsigned IN_W   = 18,
  parameter int unsigned OUT_W  = 19
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [PROD_W-1:0] prod,
  input  logic signed [IN_W-1:0]   z_in,
  output logic signed [OUT_W-1:0]  z_out
);

  logic signed [OUT_W-1:0] sum;
  logic signed [OUT_W:0]   sum_wide;   // one bit more, for the overflow check

  assign sum      = OUT_W'(prod) + OUT_W'(z_in);
  assign sum_wide = (OUT_W + 1)'(prod) + (OUT_W + 1)'(z_in);

  // The filter sizes OUT_W so that the partial sum always fits.
  always_ff @(posedge clk) begin
    if (rst_n && en)
      assert (sum_wide == (OUT_W + 1)'(sum))
        else $error("tf_tap: partial sum %0d does not fit in %0d bits", sum_wide, OUT_W);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  z_out <= '0;
    else if (en) z_out <= sum;
  end

endmodule
