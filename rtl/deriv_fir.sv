// deriv_fir: fixed FIR differentiator with the matching delayed sample.
//
// The timing-skew error of a channel is proportional to the slope of the
// input at its sampling instant, so the calibrator needs y'(n), the derivative
// of the stream in units of one sample period Ts. This block convolves the
// stream with NTAPS fixed taps: the ideal differentiator (-1)^k / k windowed
// by a Hanning window (see tiadc_pkg::deriv_tap). The filter is linear phase
// and antisymmetric, so y' refers to the centre sample, (NTAPS-1)/2 samples
// back; that sample and its channel index leave beside y' so both stay
// aligned. The 33 taps and the Hanning window follow the design description;
// the word widths and the rounding are this implementation's choices.
//
// Interface: in_* is the offset-corrected stream (DW bits, DFRAC fraction
// bits). out_data is the centre sample (same format), out_deriv the derivative
// (DW+1 bits, DFRAC fraction bits, saturated: |y'| can reach pi times the
// amplitude). Timing: the tap line advances once per valid input; two clocks
// after a valid input the outputs hold the result for the sample
// (NTAPS-1)/2 valid inputs earlier. Before NTAPS samples have arrived the line
// holds zeros.
module deriv_fir #(
  parameter int M     = tiadc_pkg::M,
  parameter int DW    = tiadc_pkg::DW,
  parameter int NTAPS = tiadc_pkg::NTAPS,
  parameter int CW    = tiadc_pkg::CW,
  parameter int CFRAC = tiadc_pkg::CFRAC,
  localparam int CH_W = (M > 1) ? $clog2(M) : 1,
  localparam int DDW  = DW + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [CH_W-1:0]        in_ch,
  input  logic signed [DW-1:0]   in_data,
  output logic                   out_valid,
  output logic [CH_W-1:0]        out_ch,
  output logic signed [DW-1:0]   out_data,
  output logic signed [DDW-1:0]  out_deriv
);

  localparam int CTR   = (NTAPS - 1) / 2;
  localparam int PW    = DW + CW;
  localparam int SUM_W = PW + $clog2(NTAPS) + 1;

  logic signed [DW-1:0]   line    [NTAPS];
  logic [CH_W-1:0]        ch_line [NTAPS];
  logic signed [CW-1:0]   taps    [NTAPS];
  logic signed [SUM_W-1:0] sum;
  logic signed [SUM_W-1:0] scaled;
  logic                    shifted;      // line advanced at the last edge

  for (genvar j = 0; j < NTAPS; j++) begin : g_tap
    localparam int TAP = tiadc_pkg::deriv_tap(j, NTAPS, CFRAC);
    assign taps[j] = CW'(TAP);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NTAPS; j++) begin
        line[j]    <= '0;
        ch_line[j] <= '0;
      end
    end else if (in_valid) begin
      line[0]    <= in_data;
      ch_line[0] <= in_ch;
      for (int j = 1; j < NTAPS; j++) begin
        line[j]    <= line[j-1];
        ch_line[j] <= ch_line[j-1];
      end
    end
  end

  always_comb begin
    sum = '0;
    for (int j = 0; j < NTAPS; j++) sum += SUM_W'(line[j]) * SUM_W'(taps[j]);
    scaled = (sum + (SUM_W'(1) <<< (CFRAC - 1))) >>> CFRAC;
  end

  localparam logic signed [SUM_W-1:0] DMAX = SUM_W'({1'b0, {(DDW-1){1'b1}}});
  localparam logic signed [SUM_W-1:0] DMIN = -DMAX - 1;

  // Stage 2: the line now holds the newest sample in tap 0; compute y' for
  // the centre sample and register it with that sample.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shifted   <= 1'b0;
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_data  <= '0;
      out_deriv <= '0;
    end else begin
      shifted   <= in_valid;
      out_valid <= shifted;
      if (shifted) begin
        out_ch   <= ch_line[CTR];
        out_data <= line[CTR];
        if (scaled > DMAX)      out_deriv <= DMAX[DDW-1:0];
        else if (scaled < DMIN) out_deriv <= DMIN[DDW-1:0];
        else                    out_deriv <= scaled[DDW-1:0];
      end
    end
  end

endmodule
