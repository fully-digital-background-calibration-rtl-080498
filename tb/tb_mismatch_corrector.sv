// tb_mismatch_corrector: checks the correction arithmetic.
//
// Random samples, pseudo aliasing signals and coefficients (coefficients in
// the range expected in use, plus a few large ones to reach saturation) are
// applied; the output must equal
//   round((y * 2^W_FRAC - sum_k wg_k * ye_k - sum_k wr_k * yd_e_k) / 2^W_FRAC)
// saturated to DW bits, computed here in 64-bit integers, one clock later.
// A real-valued check (y_c close to y - sum w*p) guards the scaling.
module tb_mismatch_corrector;
  import tiadc_pkg::*;

  localparam int DDW = DW + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  logic                  in_valid = 1'b0;
  logic [CH_W-1:0]       in_ch = '0;
  logic signed [DW-1:0]  in_y = '0;
  logic signed [DW-1:0]  in_ye   [M-1];
  logic signed [DDW-1:0] in_yd_e [M-1];
  logic signed [W_W-1:0] wg [M-1];
  logic signed [W_W-1:0] wr [M-1];
  logic                  out_valid;
  logic [CH_W-1:0]       out_ch;
  logic signed [DW-1:0]  y_c;

  mismatch_corrector dut (.*);

  int checks = 0;
  int failures = 0;
  int n_sat = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic   exp_v = 1'b0;
  int     exp_ch = 0;
  longint exp_yc = 0;
  real    exp_r = 0.0;

  always @(negedge clk) begin
    if (rst_n) begin
      check(out_valid == exp_v, "valid, one-clock latency");
      if (exp_v) begin
        real got;
        got = real'(y_c) / real'(1 << DFRAC);
        check(out_ch == CH_W'(exp_ch) && longint'(y_c) == exp_yc,
              $sformatf("y_c %0d, expected %0d", y_c, exp_yc));
        if (exp_yc < (longint'(1) <<< (DW - 1)) - 1 && exp_yc > -(longint'(1) <<< (DW - 1)))
          check(got - exp_r < 2.0 ** -DFRAC && exp_r - got < 2.0 ** -DFRAC, "real-valued correction");
      end
      exp_v = in_valid;
      if (in_valid) begin
        longint acc, lim;
        exp_ch = int'(in_ch);
        acc    = longint'(in_y) <<< W_FRAC;
        exp_r  = real'(in_y) / real'(1 << DFRAC);
        for (int k = 0; k < M - 1; k++) begin
          acc   -= longint'(wg[k]) * longint'(in_ye[k]) + longint'(wr[k]) * longint'(in_yd_e[k]);
          exp_r -= (real'(wg[k]) * real'(in_ye[k]) + real'(wr[k]) * real'(in_yd_e[k])) /
                   real'(1 << W_FRAC) / real'(1 << DFRAC);
        end
        acc = (acc + (longint'(1) <<< (W_FRAC - 1))) >>> W_FRAC;
        lim = (longint'(1) <<< (DW - 1)) - 1;
        if (acc > lim) begin
          acc = lim;
          n_sat++;
        end else if (acc < -lim - 1) begin
          acc = -lim - 1;
          n_sat++;
        end
        exp_yc = acc;
      end
    end
  end

  initial begin
    for (int k = 0; k < M - 1; k++) begin
      in_ye[k] = '0;
      in_yd_e[k] = '0;
      wg[k] = '0;
      wr[k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      bit big;
      big = (n > 2500);
      in_valid <= ($urandom_range(0, 3) != 0);
      in_ch    <= CH_W'(n % M);
      in_y     <= DW'($signed($urandom_range(0, 2 ** DW - 1)) - (2 ** (DW - 1)));
      for (int k = 0; k < M - 1; k++) begin
        in_ye[k]   <= DW'($signed($urandom_range(0, 2 ** DW - 1)) - (2 ** (DW - 1)));
        in_yd_e[k] <= DDW'($signed($urandom_range(0, 2 ** DDW - 1)) - (2 ** (DW)));
        if (big) begin
          wg[k] <= W_W'($urandom);
          wr[k] <= W_W'($urandom);
        end else begin
          wg[k] <= W_W'($signed($urandom_range(0, 40000)) - 20000);   // about +-0.04
          wr[k] <= W_W'($signed($urandom_range(0, 2000)) - 1000);     // about +-0.002
        end
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (2) @(posedge clk);
    check(n_sat > 0, "saturation exercised");
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
