// mismatch_estimator: background estimation of the gain and timing
// coefficients.
//
// The estimator works on the corrected output y_c only. Its own derivative
// filter gives y_c' and the centre sample y_c aligned with it; a pseudo
// aliasing generator forms T_k * y_c and T_k * y_c' (k = 1 .. M-1); the notch
// filter removes the input signal from the centre sample, giving y_n, which
// then holds (mainly) the residual mismatch images. 2(M-1) correlators
// integrate y_n * T_k * y_c into w_gk and y_n * T_k * y_c' into w_rk (LMS).
// The coefficients feed back to the corrector, so the loops settle where the
// output holds no image of any Hadamard pattern. This structure (notch
// filter, pseudo aliasing generator, correlators with LMS update, one FIR
// filter for the estimation) follows the design description.
//
// This implementation's own choices:
//   * The pseudo aliasing signals are built from the corrected output rather
//     than reused from the correction path. Signals built from the
//     uncorrected stream carry the mismatch images themselves; their
//     correlation with y_n would settle the gain coefficients near twice
//     their value and bias the timing ones by several times theirs.
//   * The notch is a programmable three-tap FIR notch at the input frequency
//     (see notch_filter). With the signal left in y_n, the term
//     signal x signal-image dominates the timing correlation and the timing
//     loop has no restoring force; removing the signal leaves image x signal,
//     which gives clean convergence.
//   * Power-of-two step sizes, a separate one for the timing loop.
//
// Interface: the corrected stream y_c with its channel index and valid, and
// notch_c = 2*cos(omega_0) of the notch (DFRAC fraction bits). Timing: a
// coefficient changes (NTAPS-1)/2 samples plus 4 clocks after the sample that
// moved it; all coefficients start at 0 after reset.
//
// Lint notes: the channel and sample outputs of the pseudo aliasing
// generator are left open on purpose (only the modulated signals are needed
// here), which lint reports as empty pin connections. The reset also appears
// in the disable condition of the alignment assertion, which lint reports as
// a reset used both synchronously and asynchronously; the assertion is not
// part of the circuit.
module mismatch_estimator #(
  parameter int M          = tiadc_pkg::M,
  parameter int DW         = tiadc_pkg::DW,
  parameter int DFRAC      = tiadc_pkg::DFRAC,
  parameter int W_W        = tiadc_pkg::W_W,
  parameter int W_FRAC     = tiadc_pkg::W_FRAC,
  parameter int NTAPS      = tiadc_pkg::NTAPS,
  parameter int CW         = tiadc_pkg::CW,
  parameter int CFRAC      = tiadc_pkg::CFRAC,
  parameter int MU_G_SHIFT = tiadc_pkg::MU_G_SHIFT,
  parameter int MU_R_SHIFT = tiadc_pkg::MU_R_SHIFT,
  localparam int CH_W      = (M > 1) ? $clog2(M) : 1,
  localparam int DDW       = DW + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [CH_W-1:0]       in_ch,
  input  logic signed [DW-1:0]  y_c,
  input  logic signed [DW:0]    notch_c,       // 2*cos(omega_0) of the notch
  output logic signed [W_W-1:0] wg [M-1],
  output logic signed [W_W-1:0] wr [M-1]
);

  // derivative filter -> pseudo aliasing generator and notch
  logic                  df_valid;
  logic [CH_W-1:0]       df_ch;
  logic signed [DW-1:0]  df_y;
  logic signed [DDW-1:0] df_yd;
  // pseudo aliasing signals of the corrected output
  logic                  pa_valid;
  logic signed [DW-1:0]  pa_ye   [M-1];
  logic signed [DDW-1:0] pa_yd_e [M-1];
  // notch output, aligned with the pseudo aliasing signals
  logic                  yn_valid;
  logic signed [DW-1:0]  yn;

  deriv_fir #(.M(M), .DW(DW), .NTAPS(NTAPS), .CW(CW), .CFRAC(CFRAC)) u_deriv (
    .clk, .rst_n,
    .in_valid, .in_ch, .in_data(y_c),
    .out_valid(df_valid), .out_ch(df_ch), .out_data(df_y), .out_deriv(df_yd)
  );

  pseudo_alias_gen #(.M(M), .DW(DW)) u_pag (
    .clk, .rst_n,
    .in_valid(df_valid), .in_ch(df_ch), .in_y(df_y), .in_yd(df_yd),
    .out_valid(pa_valid), .out_ch(), .out_y(),
    .ye(pa_ye), .yd_e(pa_yd_e)
  );

  notch_filter #(.DW(DW), .DFRAC(DFRAC)) u_notch (
    .clk, .rst_n,
    .in_valid(df_valid), .in_data(df_y), .notch_c,
    .out_valid(yn_valid), .out_data(yn)
  );

  for (genvar k = 0; k < M - 1; k++) begin : g_corr
    lms_correlator #(
      .DW(DW), .PW(DW), .DFRAC(DFRAC), .W_W(W_W), .W_FRAC(W_FRAC), .MU_SHIFT(MU_G_SHIFT)
    ) u_gain (
      .clk, .rst_n, .in_valid(yn_valid), .e(yn), .p(pa_ye[k]), .w(wg[k])
    );
    lms_correlator #(
      .DW(DW), .PW(DDW), .DFRAC(DFRAC), .W_W(W_W), .W_FRAC(W_FRAC), .MU_SHIFT(MU_R_SHIFT)
    ) u_timing (
      .clk, .rst_n, .in_valid(yn_valid), .e(yn), .p(pa_yd_e[k]), .w(wr[k])
    );
  end

  // Both branches have one clock of latency from the filter output.
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n) pa_valid == yn_valid)
    else $error("mismatch_estimator: notch and pseudo aliasing outputs misaligned");

endmodule
