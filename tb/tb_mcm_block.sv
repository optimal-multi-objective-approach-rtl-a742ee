// tb_mcm_block: exhaustive self-checking test of the shift-and-add multiple
// constant multiplier.
//
// Two instances are checked against plain integer multiplication for every
// 8-bit signed input: the default one with the constants 29 and 43 (the
// partial-product sharing example), and one built with the distinct
// coefficients of the default low-pass filter (16, 25, 34, 149, 614), which
// uses the shared fundamentals 3x and 5x. A third instance with the
// constants 7, 57 and 1000 (octal 7, 71 and 1750) exercises 7x = 8x - x.
// The block is combinational; each input is held for 1 ns before checking.
module tb_mcm_block;
  import fir_pkg::*;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned NF     = num_distinct(FIR_COEF, FIR_TAPS);
  localparam cvec_t       DF     = distinct_set(FIR_COEF, FIR_TAPS);
  localparam int unsigned PW_F   = DATA_W + ubits(max_coef(DF, NF));
  localparam int unsigned PW_E   = DATA_W + ubits(43);

  // Expected constants, written out independently of the package helpers.
  localparam int EXP_E [2] = '{29, 43};
  localparam int EXP_F [5] = '{16, 25, 34, 149, 614};
  localparam int EXP_S [3] = '{7, 57, 1000};

  function automatic cvec_t make_seven_set();
    cvec_t c;
    c = '0;
    c[0] = 16'd7;
    c[1] = 16'd57;
    c[2] = 16'd1000;
    return c;
  endfunction

  localparam cvec_t       DS   = make_seven_set();
  localparam int unsigned PW_S = DATA_W + ubits(1000);

  logic signed [DATA_W-1:0]   x;
  logic [1:0][PW_E-1:0]       prod_e;
  logic [NF-1:0][PW_F-1:0]    prod_f;
  logic [2:0][PW_S-1:0]       prod_s;

  int checks = 0;
  int failures = 0;

  mcm_block dut_e (
    .x    (x),
    .prod (prod_e)
  );

  mcm_block #(
    .DATA_W (DATA_W),
    .NUM_C  (NF),
    .C      (DF)
  ) dut_f (
    .x    (x),
    .prod (prod_f)
  );

  mcm_block #(
    .DATA_W (DATA_W),
    .NUM_C  (3),
    .C      (DS)
  ) dut_s (
    .x    (x),
    .prod (prod_s)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d got %0d expected %0d", what, x, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (NF != 5) begin
      failures++;
      $display("FAIL expected 5 distinct filter coefficients, got %0d", NF);
    end
    for (int v = -(2 ** (DATA_W - 1)); v < 2 ** (DATA_W - 1); v++) begin
      x = DATA_W'(v);
      #1;
      for (int k = 0; k < 2; k++)
        check("29/43", int'($signed(prod_e[k])), v * EXP_E[k]);
      for (int k = 0; k < 5; k++)
        check("filter set", int'($signed(prod_f[k])), v * EXP_F[k]);
      for (int k = 0; k < 3; k++)
        check("7x set", int'($signed(prod_s[k])), v * EXP_S[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
