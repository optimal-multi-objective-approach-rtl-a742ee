// mcm_block: multiplierless multiple-constant multiplier (MCM).
//
// Multiplies one signed sample x by NUM_C positive constants C[0..NUM_C-1]
// using only shifts (wires), additions and one subtraction. Each constant is
// split into octal digits; a digit d at position k contributes (d*x) << 3k.
// The odd digit multiples 3x = x + 2x, 5x = x + 4x and 7x = 8x - x are built
// once and shared by every constant (even digits are shifted copies of x or
// 3x), so a constant with m non-zero octal digits costs m-1 adders on top of
// the shared ones. For the two constants 29 (octal 35) and 43 (octal 53) this
// gives 3x, 5x, 29x = (3x << 3) + 5x and 43x = (5x << 3) + 3x: four adders
// instead of six, which is the partial-product sharing this design is built
// around. Writing every constant in octal digits over the fundamentals
// {x, 3x, 5x, 7x} is this design's general rule for any constant set; a
// shared fundamental is only built when some constant uses it.
//
// Interface: x is a signed DATA_W-bit sample; prod[k] is the signed product
// x*C[k], PROD_W bits wide (wide enough that it never overflows).
// Timing: purely combinational.
module mcm_block
  import fir_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned NUM_C  = 2,
  parameter cvec_t       C      = EXAMPLE_COEF,
  parameter int unsigned PROD_W = DATA_W + ubits(max_coef(C, NUM_C))
) (
  input  logic signed [DATA_W-1:0]            x,
  output logic        [NUM_C-1:0][PROD_W-1:0] prod
);

  localparam int unsigned NDIG = (COEF_W + 2) / 3;   // octal digits of a coefficient
  localparam bit NEED3 = uses_digit(C, NUM_C, 3);
  localparam bit NEED5 = uses_digit(C, NUM_C, 5);
  localparam bit NEED7 = uses_digit(C, NUM_C, 7);

  // Shared fundamentals, sign-extended to the product width.
  logic signed [PROD_W-1:0] f1, f3, f5, f7;

  assign f1 = PROD_W'(x);

  if (NEED3) begin : g_f3
    assign f3 = f1 + (f1 <<< 1);
  end else begin : g_no_f3
    assign f3 = '0;
  end
  if (NEED5) begin : g_f5
    assign f5 = f1 + (f1 <<< 2);
  end else begin : g_no_f5
    assign f5 = '0;
  end
  if (NEED7) begin : g_f7
    assign f7 = (f1 <<< 3) - f1;
  end else begin : g_no_f7
    assign f7 = '0;
  end

  // d*x for one octal digit d: a shared fundamental or a shifted copy of one.
  function automatic logic signed [PROD_W-1:0] digit_term(
      int unsigned dg,
      logic signed [PROD_W-1:0] a1, a3, a5, a7);
    case (dg)
      1:       return a1;
      2:       return a1 <<< 1;
      3:       return a3;
      4:       return a1 <<< 2;
      5:       return a5;
      6:       return a3 <<< 1;
      7:       return a7;
      default: return '0;
    endcase
  endfunction

  for (genvar k = 0; k < NUM_C; k++) begin : g_const
    // ps[d] holds the sum of the terms of digits 0 .. d-1.
    logic signed [PROD_W-1:0] ps [NDIG+1];
    assign ps[0] = '0;

    for (genvar d = 0; d < NDIG; d++) begin : g_digit
      localparam int unsigned DG = octal_digit(C[k], d);
      // No lower digit is non-zero: the term starts the sum, no adder.
      localparam bit FIRST = ((32'(C[k]) & ((32'd1 << (3 * d)) - 32'd1)) == 32'd0);
      if (DG == 0) begin : g_zero
        assign ps[d+1] = ps[d];
      end else if (FIRST) begin : g_first
        assign ps[d+1] = digit_term(DG, f1, f3, f5, f7) <<< (3 * d);
      end else begin : g_add
        assign ps[d+1] = ps[d] + (digit_term(DG, f1, f3, f5, f7) <<< (3 * d));
      end
    end

    assign prod[k] = ps[NDIG];
  end

endmodule
