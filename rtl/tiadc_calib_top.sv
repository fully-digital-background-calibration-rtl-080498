// tiadc_calib_top: fully digital background calibration of an M-channel
// time-interleaved ADC for offset, gain and timing mismatch.
//
// Data path, one interleaved sample per clock:
//   sub-ADC frames -> tiadc_mux -> offset_cal -> deriv_fir -> pseudo_alias_gen
//                  -> mismatch_corrector -> corrected output y_c
// Feedback: y_c -> mismatch_estimator (own derivative filter, pseudo aliasing
//           generator, notch filter, LMS correlators)
//                  -> coefficients w_gk, w_rk -> mismatch_corrector
// Offsets are removed first, by per-channel averaging, so that the
// correlators of the gain/timing loops see no offset tones. The derivative
// filter supplies y' for the timing error; the Hadamard rows T_1..T_{M-1}
// modulate y and y' into pseudo aliasing signals, which the corrector
// subtracts with weights w_gk, w_rk. The estimator forms the same kind of
// signals from the corrected output and correlates them with its
// notch-filtered version to adapt the weights. This structure follows the
// design description; widths, step sizes, the averaging length, the notch
// being a programmable FIR notch at the input frequency, and the estimator
// working on the corrected output are this implementation's choices (see
// tiadc_pkg, notch_filter and mismatch_estimator).
//
// Interface: adc_data[i] is the ADC_W-bit word of sub-ADC i (full scale
// +-1), one frame per adc_valid, at most one frame every M clocks. y_c leaves
// with its channel index in the internal format (DW bits, DFRAC fraction
// bits). The current estimates are outputs too: offset_est[i] (internal
// format), wg[k-1] = w_gk and wr[k-1] = w_rk (W_W bits, W_FRAC fraction bits,
// w_rk in units of the sample period Ts). notch_c = 2*cos(omega_0), with
// DFRAC fraction bits, places the estimator's notch on the input frequency
// omega_0 (radians per sample); it is a static setting for a given input.
// Latency from a sample leaving the multiplexer to its corrected value:
// (NTAPS-1)/2 further samples plus 5 clocks. All estimates start at zero
// after reset and adapt in the background.
module tiadc_calib_top #(
  parameter int M          = tiadc_pkg::M,
  parameter int ADC_W      = tiadc_pkg::ADC_W,
  parameter int DW         = tiadc_pkg::DW,
  parameter int DFRAC      = tiadc_pkg::DFRAC,
  parameter int W_W        = tiadc_pkg::W_W,
  parameter int W_FRAC     = tiadc_pkg::W_FRAC,
  parameter int NTAPS      = tiadc_pkg::NTAPS,
  parameter int CW         = tiadc_pkg::CW,
  parameter int CFRAC      = tiadc_pkg::CFRAC,
  parameter int LOG2_NAVG  = tiadc_pkg::LOG2_NAVG,
  parameter int MU_G_SHIFT = tiadc_pkg::MU_G_SHIFT,
  parameter int MU_R_SHIFT = tiadc_pkg::MU_R_SHIFT,
  localparam int CH_W      = (M > 1) ? $clog2(M) : 1,
  localparam int DDW       = DW + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    adc_valid,
  input  logic signed [ADC_W-1:0] adc_data [M],
  input  logic signed [DW:0]      notch_c,
  output logic                    out_valid,
  output logic [CH_W-1:0]         out_ch,
  output logic signed [DW-1:0]    out_data,
  output logic signed [DW-1:0]    offset_est [M],
  output logic                    offset_update,
  output logic signed [W_W-1:0]   wg [M-1],
  output logic signed [W_W-1:0]   wr [M-1]
);

  // multiplexer -> offset calibration
  logic                    mx_valid;
  logic [CH_W-1:0]         mx_ch;
  logic signed [ADC_W-1:0] mx_data;
  // offset calibration -> derivative filter
  logic                    oc_valid;
  logic [CH_W-1:0]         oc_ch;
  logic signed [DW-1:0]    oc_data;
  // derivative filter -> pseudo aliasing generator
  logic                    df_valid;
  logic [CH_W-1:0]         df_ch;
  logic signed [DW-1:0]    df_y;
  logic signed [DDW-1:0]   df_yd;
  // pseudo aliasing generator -> corrector
  logic                    pa_valid;
  logic [CH_W-1:0]         pa_ch;
  logic signed [DW-1:0]    pa_y;
  logic signed [DW-1:0]    pa_ye   [M-1];
  logic signed [DDW-1:0]   pa_yd_e [M-1];

  tiadc_mux #(.M(M), .ADC_W(ADC_W)) u_mux (
    .clk, .rst_n,
    .adc_valid, .adc_data,
    .y_valid(mx_valid), .y_ch(mx_ch), .y_data(mx_data)
  );

  offset_cal #(.M(M), .ADC_W(ADC_W), .DW(DW), .DFRAC(DFRAC), .LOG2_NAVG(LOG2_NAVG)) u_offset (
    .clk, .rst_n,
    .in_valid(mx_valid), .in_ch(mx_ch), .in_data(mx_data),
    .out_valid(oc_valid), .out_ch(oc_ch), .out_data(oc_data),
    .offset_est, .est_update(offset_update)
  );

  deriv_fir #(.M(M), .DW(DW), .NTAPS(NTAPS), .CW(CW), .CFRAC(CFRAC)) u_deriv (
    .clk, .rst_n,
    .in_valid(oc_valid), .in_ch(oc_ch), .in_data(oc_data),
    .out_valid(df_valid), .out_ch(df_ch), .out_data(df_y), .out_deriv(df_yd)
  );

  pseudo_alias_gen #(.M(M), .DW(DW)) u_pag (
    .clk, .rst_n,
    .in_valid(df_valid), .in_ch(df_ch), .in_y(df_y), .in_yd(df_yd),
    .out_valid(pa_valid), .out_ch(pa_ch), .out_y(pa_y),
    .ye(pa_ye), .yd_e(pa_yd_e)
  );

  mismatch_corrector #(.M(M), .DW(DW), .W_W(W_W), .W_FRAC(W_FRAC)) u_corr (
    .clk, .rst_n,
    .in_valid(pa_valid), .in_ch(pa_ch), .in_y(pa_y),
    .in_ye(pa_ye), .in_yd_e(pa_yd_e),
    .wg, .wr,
    .out_valid, .out_ch, .y_c(out_data)
  );

  mismatch_estimator #(
    .M(M), .DW(DW), .DFRAC(DFRAC), .W_W(W_W), .W_FRAC(W_FRAC),
    .NTAPS(NTAPS), .CW(CW), .CFRAC(CFRAC),
    .MU_G_SHIFT(MU_G_SHIFT), .MU_R_SHIFT(MU_R_SHIFT)
  ) u_est (
    .clk, .rst_n,
    .in_valid(out_valid), .in_ch(out_ch), .y_c(out_data), .notch_c,
    .wg, .wr
  );

endmodule
