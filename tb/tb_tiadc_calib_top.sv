// tb_tiadc_calib_top: end-to-end test of the TIADC calibrator at its default
// parameters.
//
// A behavioural four-channel front end (tiadc_frontend_model) converts a
// coherent sine with per-channel offset, gain and timing errors and feeds the
// calibrator one frame every M clocks. The test checks:
//   * latency: the first corrected sample leaves 6 clocks after the first
//     frame, and early outputs equal the raw samples (NTAPS-1)/2 earlier
//     (coefficients still near zero);
//   * offset estimates against the model's offsets;
//   * gain coefficients against the exact fixed point of the gain loop and
//     timing coefficients against w_rk = (1/M) sum_i T_k[i] r_i;
//   * the spectrum: single-bin DFTs of the raw stream and of the corrected
//     stream (last NF samples) at the offset tones k*fs/M and the images
//     +-f_in + k*fs/M; every spur must be above -40 dBc before and below
//     SPUR_MAX_DB after calibration;
//   * convergence: gain coefficients within 3e-4 of their final values by
//     sample 25000, timing ones within 6e-5 by sample 40000;
//   * that each mechanism occurred: offset estimate updates, gain and
//     timing coefficient adaptation, and a nonzero correction.
module tb_tiadc_calib_top;
  import tiadc_pkg::*;

  localparam int  NF          = 4096;
  localparam int  FBIN        = 613;
  localparam int  NSAMP       = 100000;         // corrected samples to run
  localparam real SPUR_MAX_DB = -90.0;
  localparam real PI          = 3.14159265358979323846;
  localparam int  CTR         = (NTAPS - 1) / 2;
  localparam int  SH          = DFRAC - (ADC_W - 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  always #1 clk = ~clk;

  logic                    adc_valid;
  logic signed [ADC_W-1:0] adc_data [M];
  longint                  frame_no;
  logic                    out_valid;
  logic [CH_W-1:0]         out_ch;
  logic signed [DW-1:0]    out_data;
  logic signed [DW-1:0]    offset_est [M];
  logic                    offset_update;
  logic signed [W_W-1:0]   wg [M-1];
  logic signed [W_W-1:0]   wr [M-1];
  // notch at the input frequency: 2*cos(2*pi*FBIN/NF)
  logic signed [DW:0]      notch_c;
  assign notch_c = (DW+1)'($rtoi(2.0 * $cos(2.0 * 3.14159265358979323846 * real'(FBIN) / real'(NF)) * real'(1 << DFRAC)));

  tiadc_frontend_model #(.M(M), .ADC_W(ADC_W), .NF(NF), .FBIN(FBIN)) u_fe (
    .clk, .rst_n, .en, .adc_valid, .adc_data, .frame_no
  );

  tiadc_calib_top dut (
    .clk, .rst_n, .adc_valid, .adc_data, .notch_c,
    .out_valid, .out_ch, .out_data,
    .offset_est, .offset_update, .wg, .wr
  );

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- raw stream
  // All monitors run at the falling edge, outside reset.
  real raw [$];
  always @(negedge clk) begin
    if (rst_n && adc_valid)
      for (int i = 0; i < M; i++) raw.push_back(real'(adc_data[i]) / real'(1 << (ADC_W - 1)));
  end

  // ---------------------------------------------------------------- outputs
  real    outs [$];
  int     n_out = 0;
  longint cyc = 0, first_frame_cyc = -1, first_out_cyc = -1;
  int     n_offs_upd = 0, n_wg_chg = 0, n_wr_chg = 0, n_corr = 0;
  logic signed [W_W-1:0] wg_q [M-1];
  logic signed [W_W-1:0] wr_q [M-1];
  int     ch_errs = 0;
  logic signed [W_W-1:0] wg_25k [M-1];
  logic signed [W_W-1:0] wr_40k [M-1];

  always @(negedge clk) begin
    cyc++;
    if (rst_n && adc_valid && first_frame_cyc < 0) first_frame_cyc = cyc;
    if (rst_n && offset_update) n_offs_upd++;
    for (int k = 0; k < M - 1; k++) begin
      if (wg[k] != wg_q[k]) n_wg_chg++;
      if (wr[k] != wr_q[k]) n_wr_chg++;
      wg_q[k] = wg[k];
      wr_q[k] = wr[k];
    end
    if (rst_n && out_valid) begin
      if (first_out_cyc < 0) first_out_cyc = cyc;
      // Channel tag of output j is that of raw sample j - CTR.
      if (n_out >= CTR && out_ch != CH_W'((n_out - CTR) % M)) ch_errs++;
      outs.push_back(real'(out_data) / real'(1 << DFRAC));
      n_out++;
      if (n_out == 25000) wg_25k = wg;
      if (n_out == 40000) wr_40k = wr;
      // Count corrections: output differs from the offset-corrected raw sample.
      if (n_out > 2 * CTR && n_out - 1 - CTR < raw.size()) begin
        real r, o;
        int  j;
        j = n_out - 1 - CTR;
        r = raw[j] - real'(offset_est[j % M]) / real'(1 << DFRAC);
        o = real'(out_data) / real'(1 << DFRAC);
        if ((r - o) > 2.0 ** -14 || (o - r) > 2.0 ** -14) n_corr++;
      end
    end
  end

  // ---------------------------------------------------------------- spectrum
  function automatic real bin_amp(ref real s [$], input int start, input int b);
    real re, im, a;
    re = 0.0;
    im = 0.0;
    for (int n = 0; n < NF; n++) begin
      a = 2.0 * PI * real'(b) * real'(n) / real'(NF);
      re += s[start + n] * $cos(a);
      im -= s[start + n] * $sin(a);
    end
    a = $sqrt(re * re + im * im) / real'(NF);
    return (b == 0 || b == NF / 2) ? a : 2.0 * a;
  endfunction

  function automatic int fold(input int b);
    int f;
    f = ((b % NF) + NF) % NF;
    return (f > NF / 2) ? NF - f : f;
  endfunction

  // worst spur relative to the signal, in dB
  function automatic real worst_spur_db(ref real s [$], input int start, output int worst_bin);
    real sig, spur, a;
    sig  = bin_amp(s, start, FBIN);
    spur = 0.0;
    worst_bin = -1;
    for (int k = 1; k < M; k++) begin
      int bl [3];
      bl[0] = fold(k * NF / M);
      bl[1] = fold(FBIN + k * NF / M);
      bl[2] = fold(-FBIN + k * NF / M);
      for (int q = 0; q < 3; q++) begin
        a = bin_amp(s, start, bl[q]);
        if (a > spur) begin
          spur = a;
          worst_bin = bl[q];
        end
      end
    end
    return 20.0 * $log10(spur / sig + 1.0e-12);
  endfunction

  // ---------------------------------------------------------------- expected
  function automatic real g_of(input int i);
    case (i % 4) 0: return 0.0; 1: return 0.007622; 2: return -0.018279; default: return -0.036089; endcase
  endfunction
  function automatic real r_of(input int i);
    case (i % 4) 0: return 0.0; 1: return -0.0009263; 2: return -0.000096028; default: return 0.00029001; endcase
  endfunction
  function automatic real o_of(input int i);
    case (i % 4) 0: return -0.10675; 1: return 0.075462; 2: return 0.044737; default: return 0.021234; endcase
  endfunction

  initial begin
    real    before_db, after_db, v, e;
    int     wb;
    for (int k = 0; k < M - 1; k++) begin
      wg_q[k] = '0;
      wr_q[k] = '0;
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    en = 1'b1;
    wait (n_out == NSAMP);
    @(posedge clk);

    // latency and alignment
    check(first_out_cyc - first_frame_cyc == 6,
          $sformatf("latency frame->first output %0d clocks, expected 6", first_out_cyc - first_frame_cyc));
    check(ch_errs == 0, $sformatf("%0d outputs with wrong channel tag", ch_errs));
    for (int j = CTR; j < CTR + 32; j++) begin
      e = outs[j] - raw[j - CTR];
      check(e < 0.02 && e > -0.02,
            $sformatf("output %0d = %f, raw sample %0d = %f", j, outs[j], j - CTR, raw[j - CTR]));
    end

    // offsets
    for (int i = 0; i < M; i++) begin
      v = real'(offset_est[i]) / real'(1 << DFRAC);
      $display("offset %0d: est %f  model %f", i, v, o_of(i));
      check(v - o_of(i) < 2.0 ** -10 && o_of(i) - v < 2.0 ** -10, $sformatf("offset estimate %0d", i));
    end

    // Coefficients. Gain: exact fixed point, where (1+g_i)(1 - sum_k w_gk T_k[i])
    // is the same for every channel: w_gk = -(C/M) sum_i T_k[i] / (1+g_i) with
    // C = M / sum_i 1/(1+g_i). Timing: first order, w_rk = (1/M) sum_i T_k[i] r_i.
    begin
      real csum, cc;
      csum = 0.0;
      for (int i = 0; i < M; i++) csum += 1.0 / (1.0 + g_of(i));
      cc = real'(M) / csum;
      for (int k = 1; k < M; k++) begin
        real eg, er, gw, rw;
        eg = 0.0;
        er = 0.0;
        for (int i = 0; i < M; i++) begin
          eg -= (hadamard_neg(k, i) ? -1.0 : 1.0) * cc / (1.0 + g_of(i)) / real'(M);
          er += (hadamard_neg(k, i) ? -1.0 : 1.0) * r_of(i) / real'(M);
        end
        gw = real'(wg[k-1]) / real'(1 << W_FRAC);
        rw = real'(wr[k-1]) / real'(1 << W_FRAC);
        $display("k=%0d  w_g %f (expected %f)   w_r %f (expected %f)", k, gw, eg, rw, er);
        check(gw - eg < 5.0e-5 && eg - gw < 5.0e-5, $sformatf("w_g%0d", k));
        check(rw - er < 4.0e-5 && er - rw < 4.0e-5, $sformatf("w_r%0d", k));
      end
    end

    // convergence speed
    for (int k = 0; k < M - 1; k++) begin
      v = real'(wg_25k[k] - wg[k]) / real'(1 << W_FRAC);
      check(v < 3.0e-4 && v > -3.0e-4, $sformatf("w_g%0d settled by sample 25000 (off by %f)", k + 1, v));
      v = real'(wr_40k[k] - wr[k]) / real'(1 << W_FRAC);
      check(v < 6.0e-5 && v > -6.0e-5, $sformatf("w_r%0d settled by sample 40000 (off by %f)", k + 1, v));
    end

    // spectrum before and after
    before_db = worst_spur_db(raw, 0, wb);
    $display("worst spur before calibration: %0.2f dBc at bin %0d", before_db, wb);
    after_db = worst_spur_db(outs, NSAMP - NF, wb);
    $display("worst spur after calibration:  %0.2f dBc at bin %0d", after_db, wb);
    check(before_db > -40.0, "mismatch spurs present before calibration");
    check(after_db < SPUR_MAX_DB, $sformatf("spurs after calibration %0.2f dBc", after_db));

    // mechanisms
    $display("offset updates %0d, w_g changes %0d, w_r changes %0d, corrected samples %0d",
             n_offs_upd, n_wg_chg, n_wr_chg, n_corr);
    check(n_offs_upd > 0, "offset estimate update happened");
    check(n_wg_chg > 0, "gain coefficient adaptation happened");
    check(n_wr_chg > 0, "timing coefficient adaptation happened");
    check(n_corr > 0, "gain/timing correction happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMP * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
