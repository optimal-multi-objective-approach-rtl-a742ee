// fir_opt_top: low-pass FIR filter built from one shared shift-and-add
// multiple-constant multiplier, with coefficient reuse, in transposed form.
//
// The filter computes y[n] = sum_{i=0}^{N_TAPS-1} COEF[i] * x[n-i] with fixed
// positive integer coefficients (by default an order-17 low-pass scaled by
// 1000, see fir_pkg). Three ideas keep it small and fast:
//  * Transposed form: every tap multiplies the same current sample, and the
//    delays sit between the adders, so the longest path is one constant
//    multiplication plus one addition, whatever the filter length.
//  * Coefficient reuse: taps that share a coefficient value share one
//    product. The set of distinct non-zero coefficients is found while the
//    design elaborates, and only that many constant products are formed.
//  * Multiplierless products: mcm_block forms all distinct products from the
//    one sample with shifts and adders, sharing the partial products 3x, 5x
//    and 7x among the constants.
// Each tap from 1 to N_TAPS-1 is a tf_tap register whose width is that of the
// largest partial sum it can hold, so the registers grow towards the output.
//
// Interface: x_in is a signed DATA_W-bit sample, taken when in_valid is high.
// y_out is the signed Y_W-bit filter output, exact (no rounding or
// overflow), valid while out_valid is high. Between valid samples the filter
// holds its state, so in_valid may be low for any number of cycles.
// Timing: one sample per clock at most; the sample is registered on the first
// edge and its output appears after the second edge (latency 2 cycles).
// The input register, the valid/hold handshake, the synchronous active-low
// reset and the output register are this design's choices; the structure
// (transposed form, coefficient reuse, shared shift-and-add products) follows
// the filter it implements.
module fir_opt_top
  import fir_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned N_TAPS = FIR_TAPS,
  parameter cvec_t       COEF   = FIR_COEF,
  localparam int unsigned Y_W   = DATA_W + clog2u(sum_coef(COEF, 0, N_TAPS))
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [DATA_W-1:0] x_in,
  output logic                    out_valid,
  output logic signed [Y_W-1:0]   y_out
);

  // Distinct non-zero coefficients: one constant product each.
  localparam int unsigned NUM_D  = num_distinct(COEF, N_TAPS);
  localparam cvec_t       DIST   = distinct_set(COEF, N_TAPS);
  localparam int unsigned PROD_W = DATA_W + ubits(max_coef(COEF, N_TAPS));

  // Register width needed to hold sum_{i>=k} COEF[i] * x exactly.
  function automatic int unsigned stage_w(int unsigned k);
    int unsigned s;
    s = sum_coef(COEF, k, N_TAPS);
    return DATA_W + clog2u(s == 0 ? 1 : s);
  endfunction

  // ---- input register --------------------------------------------------
  logic signed [DATA_W-1:0] x_r;
  logic                     v_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_r <= '0;
      v_r <= 1'b0;
    end else begin
      v_r <= in_valid;
      if (in_valid) x_r <= x_in;
    end
  end

  // ---- shared constant products ----------------------------------------
  logic [NUM_D-1:0][PROD_W-1:0] dprod;

  mcm_block #(
    .DATA_W (DATA_W),
    .NUM_C  (NUM_D),
    .C      (DIST),
    .PROD_W (PROD_W)
  ) u_mcm (
    .x    (x_r),
    .prod (dprod)
  );

  // Product of each tap: the shared product of its coefficient value.
  logic signed [PROD_W-1:0] tap_prod [N_TAPS];

  for (genvar i = 0; i < N_TAPS; i++) begin : g_reuse
    if (COEF[i] == '0) begin : g_zero
      assign tap_prod[i] = '0;
    end else begin : g_use
      assign tap_prod[i] = dprod[index_of(DIST, NUM_D, COEF[i])];
    end
  end

  // ---- transposed-form chain -------------------------------------------
  // z[k] is stage k's registered partial sum, sign-extended to Y_W bits;
  // z[N_TAPS] is the zero fed into the last stage.
  logic signed [Y_W-1:0] z [N_TAPS+1];

  assign z[N_TAPS] = '0;

  for (genvar k = 1; k < N_TAPS; k++) begin : g_tap
    localparam int unsigned OUT_W = stage_w(k);
    localparam int unsigned IN_W  = (k == N_TAPS - 1) ? 1 : stage_w(k + 1);
    // A product never exceeds the stage's own sum, so near the end of the
    // chain it is cut to the stage width without loss.
    localparam int unsigned PW_K  = (PROD_W < OUT_W) ? PROD_W : OUT_W;
    logic signed [OUT_W-1:0] zk;

    tf_tap #(
      .PROD_W (PW_K),
      .IN_W   (IN_W),
      .OUT_W  (OUT_W)
    ) u_tap (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (v_r),
      .prod  (PW_K'(tap_prod[k])),
      .z_in  (IN_W'(z[k+1])),
      .z_out (zk)
    );

    assign z[k] = Y_W'(zk);
  end

  // ---- output stage: tap 0 plus the chain ------------------------------
  logic signed [Y_W-1:0] y_next;

  assign y_next = Y_W'(tap_prod[0]) + z[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_out     <= '0;
    end else begin
      out_valid <= v_r;
      if (v_r) y_out <= y_next;
    end
  end

endmodule
