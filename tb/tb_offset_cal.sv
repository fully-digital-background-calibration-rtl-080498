// tb_offset_cal: checks offset estimation and removal against a reference
// model.
//
// Uses a short averaging block (N = 16) so that many estimate updates occur.
// Every channel gets its own constant offset plus random noise; channel order
// and valid gaps are random. A reference model in the testbench keeps the
// per-channel sums and estimates, computed the same way (sum of N samples,
// divided by N with rounding), and every output sample, estimate and update
// pulse is compared with it. The final estimates must also lie near the
// programmed offsets.
module tb_offset_cal;
  import tiadc_pkg::*;

  localparam int LN  = 4;
  localparam int NB  = 1 << LN;
  localparam int SH  = DFRAC - (ADC_W - 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  logic                    in_valid = 1'b0;
  logic [CH_W-1:0]         in_ch = '0;
  logic signed [ADC_W-1:0] in_data = '0;
  logic                    out_valid;
  logic [CH_W-1:0]         out_ch;
  logic signed [DW-1:0]    out_data;
  logic signed [DW-1:0]    offset_est [M];
  logic                    est_update;

  offset_cal #(.LOG2_NAVG(LN)) dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference model state
  longint ref_sum [M];
  int     ref_cnt [M];
  longint ref_est [M];
  int     n_upd = 0;

  // expectation for the next clock
  logic   exp_v = 1'b0, exp_upd = 1'b0;
  int     exp_ch = 0;
  longint exp_d = 0;

  function automatic longint rdiv(input longint s);
    // s * 2^SH / N, rounded to nearest (ties toward +inf)
    return ((s <<< SH) + (longint'(1) <<< (LN - 1))) >>> LN;
  endfunction

  // Checked at the falling edge: outputs then show the previous rising edge,
  // inputs are those the next rising edge will take.
  always @(negedge clk) begin
    if (rst_n) begin
      // compare outputs of the previous input
      check(out_valid == exp_v, "valid");
      check(est_update == exp_upd, "est_update pulse");
      if (exp_v && out_valid)
        check(out_ch == CH_W'(exp_ch) && longint'(out_data) == exp_d,
              $sformatf("ch %0d out %0d, expected ch %0d out %0d", out_ch, out_data, exp_ch, exp_d));
      for (int i = 0; i < M; i++)
        check(longint'(offset_est[i]) == ref_est[i], $sformatf("estimate %0d", i));
      // model the current input
      exp_v   = in_valid;
      exp_upd = 1'b0;
      if (in_valid) begin
        int c;
        c      = int'(in_ch);
        exp_ch = c;
        exp_d  = (longint'(in_data) <<< SH) - ref_est[c];
        ref_sum[c] += longint'(in_data);
        ref_cnt[c]++;
        if (ref_cnt[c] == NB) begin
          ref_est[c] = rdiv(ref_sum[c]);
          ref_sum[c] = 0;
          ref_cnt[c] = 0;
          exp_upd    = 1'b1;
          n_upd++;
        end
      end
    end
  end

  int offs [M] = '{-219, 155, 92, 43};     // about -0.107, 0.075, 0.045, 0.021

  initial begin
    for (int i = 0; i < M; i++) begin
      ref_sum[i] = 0;
      ref_cnt[i] = 0;
      ref_est[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 4000; n++) begin
      int c;
      if ($urandom_range(0, 4) == 0) begin
        in_valid <= 1'b0;
      end else begin
        c = (n < 2000) ? (n % M) : $urandom_range(0, M - 1);
        in_valid <= 1'b1;
        in_ch    <= CH_W'(c);
        in_data  <= ADC_W'(offs[c] + $signed($urandom_range(0, 200)) - 100);
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    check(n_upd > 4 * M, $sformatf("%0d estimate updates", n_upd));
    for (int i = 0; i < M; i++) begin
      longint target;
      target = longint'(offs[i]) <<< SH;
      check(ref_est[i] - target < (longint'(40) <<< SH) && target - ref_est[i] < (longint'(40) <<< SH),
            $sformatf("estimate %0d near programmed offset", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
