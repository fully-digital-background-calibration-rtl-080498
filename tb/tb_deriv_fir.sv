// tb_deriv_fir: checks the derivative FIR against the analytic derivative.
//
// Feeds sines of several frequencies (with gaps in the valid stream) and
// compares, after the line has filled, the centre-sample output with the
// input sample (NTAPS-1)/2 earlier and the derivative output with
// A*omega*cos(omega*n + phi) for that sample. Also checks the taps' symmetry
// (h[c+k] = -h[c-k], h[c] = 0), the two-clock latency and the channel tags.
module tb_deriv_fir;
  import tiadc_pkg::*;

  localparam real PI  = 3.14159265358979323846;
  localparam int  CTR = (NTAPS - 1) / 2;
  localparam int  NS  = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  logic                  in_valid = 1'b0;
  logic [CH_W-1:0]       in_ch = '0;
  logic signed [DW-1:0]  in_data = '0;
  logic                  out_valid;
  logic [CH_W-1:0]       out_ch;
  logic signed [DW-1:0]  out_data;
  logic signed [DW:0]    out_deriv;

  deriv_fir dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  real     omega, amp, phi;
  int      n_in, n_out;
  longint  cyc, in_cyc [$];

  // Monitor at the falling edge, outside reset: inputs are those the next
  // rising edge takes, outputs show the last rising edge.
  always @(negedge clk) begin
    cyc++;
    if (rst_n && in_valid) in_cyc.push_back(cyc);
    if (rst_n && out_valid) begin
      int  j;
      real d_ref, x_ref, d_got;
      j = n_out - CTR;              // index of the centre sample
      check(cyc - in_cyc[n_out] == 2, "two-clock latency");
      if (j >= CTR) begin
        x_ref = amp * $sin(omega * real'(j) + phi);
        d_ref = amp * omega * $cos(omega * real'(j) + phi);
        d_got = real'(out_deriv) / real'(1 << DFRAC);
        check(out_ch == CH_W'(j % M), "channel tag of centre sample");
        check((real'(out_data) / real'(1 << DFRAC) - x_ref) < 1.0e-4 &&
              (x_ref - real'(out_data) / real'(1 << DFRAC)) < 1.0e-4, "centre sample");
        // windowed 33-tap differentiator: error well below 1 % up to 0.6*pi
        if ((d_got - d_ref) > 0.004 * amp * omega + 2.0e-4 || (d_ref - d_got) > 0.004 * amp * omega + 2.0e-4) begin
          check(0, $sformatf("omega=%f n=%0d deriv %f expected %f", omega, j, d_got, d_ref));
        end else check(1, "");
      end
      n_out++;
    end
  end

  initial begin
    static real freqs [4] = '{0.05, 0.15, 0.3, 0.6};
    // tap symmetry
    check(deriv_tap(CTR, NTAPS, CFRAC) == 0, "centre tap is zero");
    for (int k = 1; k <= CTR; k++)
      check(deriv_tap(CTR + k, NTAPS, CFRAC) == -deriv_tap(CTR - k, NTAPS, CFRAC), "antisymmetric taps");
    check(deriv_tap(CTR + 1, NTAPS, CFRAC) < 0, "h[1] = -1 (times window)");
    cyc = 0;
    foreach (freqs[f]) begin
      omega = PI * freqs[f];
      amp   = 0.9;
      phi   = 0.4 * real'(f);
      n_in  = 0;
      n_out = 0;
      in_cyc.delete();
      rst_n = 1'b0;
      repeat (2) @(posedge clk);
      rst_n <= 1'b1;
      @(posedge clk);
      while (n_in < NS) begin
        if ($urandom_range(0, 3) != 0) begin
          in_valid <= 1'b1;
          in_ch    <= CH_W'(n_in % M);
          in_data  <= DW'($rtoi(amp * $sin(omega * real'(n_in) + phi) * real'(1 << DFRAC)));
          n_in++;
        end else in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b0;
      repeat (4) @(posedge clk);
      check(n_out == NS, "one output per input");
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
