// tb_lms_correlator: checks the LMS coefficient update.
//
// Part 1 compares w after every input with a bit-exact model of the
// integrator (acc += (e*p) >>> MU_SHIFT, saturating, w = acc without its
// lowest 2*DFRAC-W_FRAC bits) for random inputs with valid gaps, including
// long runs of same-sign products that drive it into both saturation limits.
// Part 2 closes a loop around it: e = p * (target - w), as the corrector
// would leave it, and w must settle at target (within 4e-5: e is quantized
// to 2^-DFRAC, so a smaller residual no longer moves w).
module tb_lms_correlator;
  import tiadc_pkg::*;

  localparam int XF    = 2 * DFRAC - W_FRAC;
  localparam int ACC_W = W_W + XF;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  logic                  in_valid = 1'b0;
  logic signed [DW-1:0]  e = '0;
  logic signed [DW-1:0]  p = '0;
  logic signed [W_W-1:0] w;

  lms_correlator dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  longint ref_acc = 0;
  bit     exact = 1'b1;
  int     n_hi = 0, n_lo = 0;
  localparam longint AMAX = (longint'(1) <<< (ACC_W - 1)) - 1;

  always @(negedge clk) begin
    if (rst_n) begin
      if (exact) check(longint'(w) == (ref_acc >>> XF), $sformatf("w %0d, expected %0d", w, ref_acc >>> XF));
      if (in_valid) begin
        ref_acc += (longint'(e) * longint'(p)) >>> MU_G_SHIFT;
        if (ref_acc > AMAX) ref_acc = AMAX;
        if (ref_acc < -AMAX - 1) ref_acc = -AMAX - 1;
        if (ref_acc == AMAX) n_hi++;
        if (ref_acc == -AMAX - 1) n_lo++;
      end
    end
  end

  initial begin
    real target, wr;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // part 1: random, then pushes to both limits
    for (int n = 0; n < 6000; n++) begin
      int s;
      logic signed [DW-1:0] pv;
      s  = (n < 2000) ? 0 : ((n < 4000) ? 1 : -1);
      pv = DW'($signed($urandom_range(0, 2 ** DW - 1)) - (2 ** (DW - 1)));
      in_valid <= ($urandom_range(0, 3) != 0);
      p <= pv;
      if (s == 0) e <= DW'($signed($urandom_range(0, 2 ** DW - 1)) - (2 ** (DW - 1)));
      else e <= (pv[DW-1] ^ (s < 0)) ? -DW'(30000) : DW'(30000);   // product sign s
      @(posedge clk);
    end
    in_valid <= 1'b0;
    @(posedge clk);
    check(n_hi > 0 && n_lo > 0, "both saturation limits reached");
    // part 2: closed loop
    exact = 1'b0;
    rst_n <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    ref_acc = 0;
    target = 0.0123;
    for (int n = 0; n < 20000; n++) begin
      real pv, ev;
      pv = 0.7 * $sin(0.37 * real'(n));
      ev = pv * (target - real'(w) / real'(1 << W_FRAC));
      in_valid <= 1'b1;
      p <= DW'($rtoi(pv * real'(1 << DFRAC)));
      e <= DW'($rtoi(ev * real'(1 << DFRAC)));
      @(posedge clk);
    end
    in_valid <= 1'b0;
    @(posedge clk);
    wr = real'(w) / real'(1 << W_FRAC);
    $display("closed loop: w = %f, target %f", wr, target);
    check(wr - target < 4.0e-5 && target - wr < 4.0e-5, "closed loop settles at the target");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
