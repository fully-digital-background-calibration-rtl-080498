// offset_cal: per-channel offset estimation and removal.
//
// Each sub-ADC adds its own constant offset O_i. With a zero-mean input, the
// mean of a channel's own samples is that offset, so every channel sums N =
// 2**LOG2_NAVG of its samples, divides by N (an arithmetic shift with rounding)
// and keeps the result as its estimate; the estimate is subtracted from every
// later sample of that channel. Estimation runs continuously in the
// background: a new estimate replaces the old one after every N samples of
// the channel. Until a channel's first block is complete its estimate is 0.
// The block average and the subtraction follow the design description; N,
// the rounding and the widths are this implementation's choices.
//
// Interface: the interleaved stream from the multiplexer (ADC_W-bit words,
// full scale +-1) with its channel index. The output is the same stream in
// the internal format (DW bits, DFRAC fraction bits) with the offset removed.
// Latency: one clock. offset_est[i] is the current estimate of channel i in
// the internal format; est_update pulses when any estimate is replaced.
//
// Lint note: the division is done at the full width of the sum, and only the
// low DW bits of the result are kept (a mean cannot exceed the sample
// range), so lint reports the upper bits of mean_ext as unused.
module offset_cal #(
  parameter int M         = tiadc_pkg::M,
  parameter int ADC_W     = tiadc_pkg::ADC_W,
  parameter int DW        = tiadc_pkg::DW,
  parameter int DFRAC     = tiadc_pkg::DFRAC,
  parameter int LOG2_NAVG = tiadc_pkg::LOG2_NAVG,
  localparam int CH_W     = (M > 1) ? $clog2(M) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [CH_W-1:0]         in_ch,
  input  logic signed [ADC_W-1:0] in_data,
  output logic                    out_valid,
  output logic [CH_W-1:0]         out_ch,
  output logic signed [DW-1:0]    out_data,
  output logic signed [DW-1:0]    offset_est [M],
  output logic                    est_update
);

  localparam int SH    = DFRAC - (ADC_W - 1);      // ADC word -> internal format
  localparam int ACC_W = ADC_W + LOG2_NAVG + 1;
  localparam int EXT_W = ACC_W + SH + 1;

  logic signed [ACC_W-1:0]     acc [M];
  logic [LOG2_NAVG-1:0]        cnt [M];
  logic signed [DW-1:0]        x_int;
  logic signed [ACC_W-1:0]     sum_now;
  logic signed [EXT_W-1:0]     sum_ext;
  logic signed [EXT_W-1:0]     mean_ext;

  assign x_int   = DW'(in_data) <<< SH;
  assign sum_now = acc[in_ch] + ACC_W'(in_data);
  assign sum_ext = EXT_W'(sum_now) <<< SH;
  // Divide by N with rounding to nearest.
  assign mean_ext = (sum_ext + (EXT_W'(1) <<< (LOG2_NAVG - 1))) >>> LOG2_NAVG;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++) begin
        acc[i]        <= '0;
        cnt[i]        <= '0;
        offset_est[i] <= '0;
      end
      est_update <= 1'b0;
      out_valid  <= 1'b0;
      out_ch     <= '0;
      out_data   <= '0;
    end else begin
      est_update <= 1'b0;
      out_valid  <= in_valid;
      if (in_valid) begin
        out_ch   <= in_ch;
        out_data <= x_int - offset_est[in_ch];
        cnt[in_ch] <= cnt[in_ch] + 1'b1;
        if (cnt[in_ch] == '1) begin
          acc[in_ch]        <= '0;
          offset_est[in_ch] <= DW'(mean_ext);
          est_update        <= 1'b1;
        end else begin
          acc[in_ch] <= sum_now;
        end
      end
    end
  end

endmodule
