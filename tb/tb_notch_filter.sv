// tb_notch_filter: checks the notch filter.
//
// Part 1 compares every output with a bit-exact model,
//   floor((x(n)*2^DFRAC - c*x(n-1) + x(n-2)*2^DFRAC) / 2^(DFRAC+2)),
// for random inputs, random notch settings and valid gaps, then a burst that
// drives the output into saturation. Part 2 programs
// the notch at omega_0 and feeds sines: at omega_0 the output must vanish
// (below 1e-3 of the input amplitude after two samples); at other frequencies
// the amplitude must match |2cos(omega) - c| / 4.
module tb_notch_filter;
  import tiadc_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  logic                 in_valid = 1'b0;
  logic signed [DW-1:0] in_data = '0;
  logic signed [DW:0]   notch_c = '0;
  logic                 out_valid;
  logic signed [DW-1:0] out_data;

  notch_filter dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic   exp_v = 1'b0;
  longint exp_d = 0;
  longint x1 = 0, x2 = 0;
  bit     exact = 1'b1;
  int     n_sat = 0;
  real    outs [$];

  always @(negedge clk) begin
    if (rst_n) begin
      check(out_valid == exp_v, "valid, one-clock latency");
      if (exp_v) begin
        if (exact) check(longint'(out_data) == exp_d, $sformatf("out %0d, expected %0d", out_data, exp_d));
        outs.push_back(real'(out_data) / real'(1 << DFRAC));
      end
      exp_v = in_valid;
      if (in_valid) begin
        longint s;
        s = (longint'(in_data) <<< DFRAC) - longint'(notch_c) * x1 + (x2 <<< DFRAC);
        exp_d = s >>> (DFRAC + 2);
        if (exp_d > (longint'(1) <<< (DW - 1)) - 1) begin
          exp_d = (longint'(1) <<< (DW - 1)) - 1;
          n_sat++;
        end else if (exp_d < -(longint'(1) <<< (DW - 1))) begin
          exp_d = -(longint'(1) <<< (DW - 1));
          n_sat++;
        end
        x2 = x1;
        x1 = longint'(in_data);
      end
    end
  end

  task automatic restart();
    rst_n <= 1'b0;
    @(posedge clk);
    x1 = 0;
    x2 = 0;
    exp_v = 1'b0;
    outs.delete();
    rst_n <= 1'b1;
    @(posedge clk);
  endtask

  // amplitude of a sine of known frequency in outs[from ..]
  function automatic real amp_at(input real om, input int from);
    real re, im;
    int  n;
    re = 0.0;
    im = 0.0;
    n = 0;
    for (int j = from; j < outs.size(); j++) begin
      re += outs[j] * $cos(om * real'(j));
      im += outs[j] * $sin(om * real'(j));
      n++;
    end
    return 2.0 * $sqrt(re * re + im * im) / real'(n);
  endfunction

  initial begin
    real w0, c, freqs [4];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // part 1: bit-exact, random
    for (int n = 0; n < 2000; n++) begin
      if (n % 500 == 0) notch_c <= (DW+1)'($signed($urandom_range(0, 2 ** (DW + 1) - 2)) - (2 ** DW) + 1);
      in_valid <= ($urandom_range(0, 3) != 0);
      in_data  <= DW'($signed($urandom_range(0, 2 ** DW - 1)) - (2 ** (DW - 1)));
      @(posedge clk);
    end
    // a burst that must saturate: c = -4, constant full-scale input of each sign
    notch_c <= -(DW+1)'(2 ** DW - 1);
    for (int n = 0; n < 16; n++) begin
      in_valid <= 1'b1;
      in_data  <= (n < 8) ? DW'(2 ** (DW - 1) - 1) : -DW'(2 ** (DW - 1) - 1);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    @(posedge clk);
    check(n_sat > 0, "output saturation exercised");
    // part 2: frequency response
    w0 = 2.0 * PI * 613.0 / 4096.0;
    c  = 2.0 * $cos(w0);
    notch_c <= (DW+1)'($rtoi(c * real'(1 << DFRAC)));
    freqs = '{w0, 0.2 * PI, 0.5 * PI, 0.8 * PI};
    exact = 1'b0;
    foreach (freqs[f]) begin
      real a, want;
      restart();
      for (int n = 0; n < 1024; n++) begin
        in_valid <= 1'b1;
        in_data  <= DW'($rtoi(0.9 * $sin(freqs[f] * real'(n)) * real'(1 << DFRAC)));
        @(posedge clk);
      end
      in_valid <= 1'b0;
      repeat (2) @(posedge clk);
      a    = amp_at(freqs[f], 2) / 0.9;
      want = (2.0 * $cos(freqs[f]) - c) / 4.0;
      if (want < 0.0) want = -want;
      $display("omega = %f pi: gain %f, expected %f", freqs[f] / PI, a, want);
      check(a - want < 1.0e-3 && want - a < 1.0e-3, $sformatf("gain at omega = %f pi", freqs[f] / PI));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
