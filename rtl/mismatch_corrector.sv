// mismatch_corrector: removes gain and timing mismatch from the stream.
//
// With the channel gains and skews expanded on the Hadamard rows,
// g_i = sum_k w_gk T_k[i] and r_i = sum_k w_rk T_k[i] (r_i in units of Ts),
// the mismatch error in a sample of channel i is, to first order,
// sum_k (w_gk T_k[i] y(n) + w_rk T_k[i] y'(n)). The corrector subtracts
// exactly that, built from the pseudo aliasing signals:
//   y_c(n) = y(n) - sum_{k=1}^{M-1} w_gk * y_ek(n) - sum_{k=1}^{M-1} w_rk * y'_ek(n)
// The subtraction follows the design description; the coefficient format
// (W_W bits, W_FRAC fraction bits), the rounding and the saturation of the
// result are this implementation's choices.
//
// Interface: y, ye and yd_e from pseudo_alias_gen; wg[k-1] = w_gk and
// wr[k-1] = w_rk are the current coefficients. y_c is the corrected output in
// the internal format (DW bits, DFRAC fraction bits). Latency: one clock.
module mismatch_corrector #(
  parameter int M      = tiadc_pkg::M,
  parameter int DW     = tiadc_pkg::DW,
  parameter int W_W    = tiadc_pkg::W_W,
  parameter int W_FRAC = tiadc_pkg::W_FRAC,
  localparam int CH_W  = (M > 1) ? $clog2(M) : 1,
  localparam int DDW   = DW + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [CH_W-1:0]       in_ch,
  input  logic signed [DW-1:0]  in_y,
  input  logic signed [DW-1:0]  in_ye   [M-1],
  input  logic signed [DDW-1:0] in_yd_e [M-1],
  input  logic signed [W_W-1:0] wg [M-1],      // w_gk, k = 1 .. M-1
  input  logic signed [W_W-1:0] wr [M-1],      // w_rk, k = 1 .. M-1
  output logic                  out_valid,
  output logic [CH_W-1:0]       out_ch,
  output logic signed [DW-1:0]  y_c
);

  localparam int AW = DDW + W_W + $clog2(2 * M) + 2;

  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] res;

  always_comb begin
    acc = AW'(in_y) <<< W_FRAC;
    for (int k = 0; k < M - 1; k++) begin
      acc -= AW'(wg[k]) * AW'(in_ye[k]);
      acc -= AW'(wr[k]) * AW'(in_yd_e[k]);
    end
    res = (acc + (AW'(1) <<< (W_FRAC - 1))) >>> W_FRAC;
  end

  localparam logic signed [AW-1:0] YMAX = AW'({1'b0, {(DW-1){1'b1}}});
  localparam logic signed [AW-1:0] YMIN = -YMAX - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_ch    <= '0;
      y_c       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_ch <= in_ch;
        if (res > YMAX)      y_c <= YMAX[DW-1:0];
        else if (res < YMIN) y_c <= YMIN[DW-1:0];
        else                 y_c <= res[DW-1:0];
      end
    end
  end

endmodule
