// pseudo_alias_gen: Hadamard modulation that builds pseudo aliasing signals.
//
// A gain or timing mismatch that follows the channel pattern T_k (row k of the
// order-M Hadamard matrix) turns the signal into an image of itself modulated
// by T_k. Multiplying the stream by T_k[ch] = +-1 therefore builds a replica of
// that image, the pseudo aliasing signal y_ek(n) = T_k[ch(n)] * y(n), and from
// the derivative y'_ek(n) = T_k[ch(n)] * y'(n), for k = 1 .. M-1 (row 0, all
// ones, carries no mismatch information). Since T_k is +-1 the multiplication
// is a conditional negation. This follows the design description; the
// Sylvester ordering of the rows matches the four-channel coefficient
// equations given for the design. The design uses one instance in the
// correction path and one in the estimator.
//
// Interface: y and yd are an aligned sample and derivative (from deriv_fir);
// ye[k-1] = y_ek and yd_e[k-1] = y'_ek. The sample and its channel travel
// along so that everything leaves aligned. Latency: one clock. The inputs
// never reach the most negative code (|y| < 2, |y'| < 4 full scale), so
// negation does not overflow.
module pseudo_alias_gen #(
  parameter int M     = tiadc_pkg::M,
  parameter int DW    = tiadc_pkg::DW,
  localparam int CH_W = (M > 1) ? $clog2(M) : 1,
  localparam int DDW  = DW + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [CH_W-1:0]       in_ch,
  input  logic signed [DW-1:0]  in_y,
  input  logic signed [DDW-1:0] in_yd,
  output logic                  out_valid,
  output logic [CH_W-1:0]       out_ch,
  output logic signed [DW-1:0]  out_y,
  output logic signed [DW-1:0]  ye   [M-1],   // y_ek,  k = 1 .. M-1
  output logic signed [DDW-1:0] yd_e [M-1]    // y'_ek, k = 1 .. M-1
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_y     <= '0;
      for (int k = 0; k < M - 1; k++) begin
        ye[k]   <= '0;
        yd_e[k] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_ch <= in_ch;
        out_y  <= in_y;
        for (int k = 1; k < M; k++) begin
          if (tiadc_pkg::hadamard_neg(k, 32'(in_ch))) begin
            ye[k-1]   <= -in_y;
            yd_e[k-1] <= -in_yd;
          end else begin
            ye[k-1]   <= in_y;
            yd_e[k-1] <= in_yd;
          end
        end
      end
    end
  end

endmodule
