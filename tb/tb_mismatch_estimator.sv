// tb_mismatch_estimator: closed-loop test of the coefficient estimator.
//
// The testbench plays the corrector: it builds the corrected stream of a
// four-channel converter with known gain and timing patterns from the
// estimator's current coefficients,
//   y_c(n) = x(n) + sum_k (eg_k - w_gk) T_k[i] x(n) + sum_k (er_k - w_rk) T_k[i] x'(n)
// with x a sine at omega_0 (x' exact, in units of Ts) and i = n mod 4, and
// feeds it to the estimator one sample per clock. The loops must drive every
// coefficient to the programmed value (where y_c = x holds no image), and
// all coefficients must have moved from their reset value of 0.
module tb_mismatch_estimator;
  import tiadc_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int  NS = 80000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  logic                  in_valid = 1'b0;
  logic [CH_W-1:0]       in_ch = '0;
  logic signed [DW-1:0]  y_c = '0;
  logic signed [DW:0]    notch_c;
  logic signed [W_W-1:0] wg [M-1];
  logic signed [W_W-1:0] wr [M-1];

  mismatch_estimator dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // T[k][i] for k = 1..3 (index k-1), i = 0..3
  int  T [3][4] = '{'{1, -1, 1, -1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}};
  real eg [3] = '{0.010, -0.020, 0.015};
  real er [3] = '{0.0005, -0.0003, 0.0002};

  real w0;
  assign w0 = 2.0 * PI * 613.0 / 4096.0;
  assign notch_c = (DW+1)'($rtoi(2.0 * $cos(2.0 * PI * 613.0 / 4096.0) * real'(1 << DFRAC)));

  int  n_moved_g = 0, n_moved_r = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < NS; n++) begin
      real x, xd, v;
      int  i;
      i  = n % M;
      x  = 0.8 * $sin(w0 * real'(n) + 0.3);
      xd = 0.8 * w0 * $cos(w0 * real'(n) + 0.3);
      v  = x;
      for (int k = 0; k < 3; k++) begin
        v += (eg[k] - real'(wg[k]) / real'(1 << W_FRAC)) * real'(T[k][i]) * x;
        v += (er[k] - real'(wr[k]) / real'(1 << W_FRAC)) * real'(T[k][i]) * xd;
      end
      in_valid <= 1'b1;
      in_ch    <= CH_W'(i);
      y_c      <= DW'($rtoi(v * real'(1 << DFRAC)));
      @(posedge clk);
      for (int k = 0; k < 3; k++) begin
        if (n == 200 && wg[k] != '0) n_moved_g++;
        if (n == 200 && wr[k] != '0) n_moved_r++;
      end
    end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    check(n_moved_g == 3, "all gain coefficients adapting");
    check(n_moved_r == 3, "all timing coefficients adapting");
    for (int k = 0; k < 3; k++) begin
      real g, r;
      g = real'(wg[k]) / real'(1 << W_FRAC);
      r = real'(wr[k]) / real'(1 << W_FRAC);
      $display("k=%0d  w_g %f (target %f)  w_r %f (target %f)", k + 1, g, eg[k], r, er[k]);
      check(g - eg[k] < 5.0e-5 && eg[k] - g < 5.0e-5, $sformatf("w_g%0d converged", k + 1));
      check(r - er[k] < 2.0e-5 && er[k] - r < 2.0e-5, $sformatf("w_r%0d converged", k + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
