// tb_tf_tap: self-checking test of one transposed-form stage.
//
// Drives random signed products and partial sums, including the extreme
// values of both, with the enable toggling at random, and checks every cycle
// that the register holds prod + z_in (sign-extended, no overflow) when
// enabled, keeps its value when not, and clears on reset.
module tb_tf_tap;

  localparam int unsigned PROD_W = 17;
  localparam int unsigned IN_W   = 18;
  localparam int unsigned OUT_W  = 19;

  logic                     clk = 1'b0;
  logic                     rst_n;
  logic                     en;
  logic signed [PROD_W-1:0] prod;
  logic signed [IN_W-1:0]   z_in;
  logic signed [OUT_W-1:0]  z_out;

  int checks = 0;
  int failures = 0;
  int expected;
  int holds = 0;

  tf_tap #(
    .PROD_W (PROD_W),
    .IN_W   (IN_W),
    .OUT_W  (OUT_W)
  ) dut (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .prod  (prod),
    .z_in  (z_in),
    .z_out (z_out)
  );

  always #5 clk = ~clk;

  task automatic check(int exp);
    checks++;
    if (int'(z_out) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t got %0d expected %0d", $time, z_out, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    en    = 1'b1;
    prod  = 17'sd1000;
    z_in  = 18'sd1000;
    @(posedge clk);
    #1 check(0);
    rst_n    = 1'b1;
    expected = 0;
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 7))
        0:       begin prod = -(2 ** (PROD_W - 1)); z_in = -(2 ** (IN_W - 1)); end
        1:       begin prod = 2 ** (PROD_W - 1) - 1; z_in = 2 ** (IN_W - 1) - 1; end
        default: begin prod = PROD_W'($urandom); z_in = IN_W'($urandom); end
      endcase
      if (en) expected = int'(prod) + int'(z_in);
      else    holds++;
      @(posedge clk);
      #1 check(expected);
    end
    rst_n = 1'b0;
    @(posedge clk);
    #1 check(0);
    checks++;
    if (holds == 0) begin
      failures++;
      $display("FAIL the enable was never low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
