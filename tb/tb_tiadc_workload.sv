// tb_tiadc_workload: the four-channel evaluation case with a noisy input.
//
// Same converter as tb_tiadc_calib_top (offset, gain and timing errors of the
// four-channel example, a 0.8 full-scale tone at bin 613 of 4096), but with
// white input noise of rms NOISE_RMS added before 12-bit quantization, which
// sets the converter's signal-to-noise ratio near 60 dB. The calibrator runs
// at its default parameters for NSAMP samples. Measured over NF-sample
// coherent windows:
//   * SNDR of the raw stream (first window) and of the corrected stream (last
//     window): signal power from the signal bin, noise and distortion as the
//     rest of the window's power;
//   * the worst mismatch spur (offset tones and images) after calibration.
// Checks: SNDR before below 25 dB; SNDR after within 1.5 dB of the SNR of
// the noisy input alone (computed from the same noise level); worst spur
// after calibration below -80 dBc; gain coefficients within 3e-4 and timing
// coefficients within 1.5e-4 of their noise-free values (the noise makes
// them wander by several 1e-5); each mechanism (offset update, gain and timing
// adaptation, correction) seen at least once.
module tb_tiadc_workload;
  import tiadc_pkg::*;

  localparam int  NF        = 4096;
  localparam int  FBIN      = 613;
  localparam int  NSAMP     = 120000;
  localparam real AMP       = 0.8;
  localparam real NOISE_RMS = 5.5e-4;
  localparam real PI        = 3.14159265358979323846;

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
  logic signed [DW:0]      notch_c;
  assign notch_c = (DW+1)'($rtoi(2.0 * $cos(2.0 * PI * real'(FBIN) / real'(NF)) * real'(1 << DFRAC)));

  tiadc_frontend_model #(.M(M), .ADC_W(ADC_W), .NF(NF), .FBIN(FBIN), .AMP(AMP),
                         .NOISE_RMS(NOISE_RMS)) u_fe (
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

  real raw [$];
  real outs [$];
  int  n_out = 0, n_offs_upd = 0, n_wg_chg = 0, n_wr_chg = 0;
  logic signed [W_W-1:0] wg_q [M-1];
  logic signed [W_W-1:0] wr_q [M-1];

  // Monitors at the falling edge, outside reset.
  always @(negedge clk) begin
    if (rst_n) begin
      if (adc_valid)
        for (int i = 0; i < M; i++) raw.push_back(real'(adc_data[i]) / real'(1 << (ADC_W - 1)));
      if (offset_update) n_offs_upd++;
      for (int k = 0; k < M - 1; k++) begin
        if (wg[k] != wg_q[k]) n_wg_chg++;
        if (wr[k] != wr_q[k]) n_wr_chg++;
        wg_q[k] = wg[k];
        wr_q[k] = wr[k];
      end
      if (out_valid) begin
        outs.push_back(real'(out_data) / real'(1 << DFRAC));
        n_out++;
      end
    end
  end

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

  function automatic real sndr_db(ref real s [$], input int start);
    real ps, pt, a;
    a  = bin_amp(s, start, FBIN);
    ps = a * a / 2.0;
    pt = 0.0;
    for (int n = 0; n < NF; n++) pt += s[start + n] * s[start + n];
    pt /= real'(NF);
    return 10.0 * $log10(ps / (pt - ps));
  endfunction

  function automatic real worst_spur_db(ref real s [$], input int start);
    real sig, spur, a;
    sig  = bin_amp(s, start, FBIN);
    spur = 0.0;
    for (int k = 1; k < M; k++) begin
      int bl [3];
      bl[0] = fold(k * NF / M);
      bl[1] = fold(FBIN + k * NF / M);
      bl[2] = fold(-FBIN + k * NF / M);
      for (int q = 0; q < 3; q++) begin
        a = bin_amp(s, start, bl[q]);
        if (a > spur) spur = a;
      end
    end
    return 20.0 * $log10(spur / sig + 1.0e-12);
  endfunction

  function automatic real g_of(input int i);
    case (i % 4) 0: return 0.0; 1: return 0.007622; 2: return -0.018279; default: return -0.036089; endcase
  endfunction
  function automatic real r_of(input int i);
    case (i % 4) 0: return 0.0; 1: return -0.0009263; 2: return -0.000096028; default: return 0.00029001; endcase
  endfunction

  initial begin
    real sndr_raw, sndr_cal, spur, snr_in, qn, csum, cc;
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

    // SNR of the noisy, quantized input alone
    qn     = 1.0 / real'(1 << (ADC_W - 1));
    snr_in = 10.0 * $log10((AMP * AMP / 2.0) / (NOISE_RMS * NOISE_RMS + qn * qn / 12.0));
    sndr_raw = sndr_db(raw, 0);
    sndr_cal = sndr_db(outs, NSAMP - NF);
    spur   = worst_spur_db(outs, NSAMP - NF);
    $display("input SNR %0.2f dB; SNDR before %0.2f dB, after %0.2f dB; worst spur after %0.2f dBc",
             snr_in, sndr_raw, sndr_cal, spur);
    check(sndr_raw < 25.0, "mismatch limits the SNDR before calibration");
    check(sndr_cal > snr_in - 1.5, $sformatf("SNDR after calibration %0.2f dB", sndr_cal));
    check(spur < -80.0, $sformatf("worst spur after calibration %0.2f dBc", spur));

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
      check(gw - eg < 3.0e-4 && eg - gw < 3.0e-4, $sformatf("w_g%0d with noise", k));
      check(rw - er < 1.5e-4 && er - rw < 1.5e-4, $sformatf("w_r%0d with noise", k));
    end

    check(n_offs_upd > 0, "offset estimate update happened");
    check(n_wg_chg > 0, "gain coefficient adaptation happened");
    check(n_wr_chg > 0, "timing coefficient adaptation happened");

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
