// lms_correlator: one correlator with its LMS coefficient update.
//
// When the corrected output still holds a residual of the image that the
// pseudo aliasing signal p(n) replicates, the product e(n) * p(n) has a mean
// proportional to that residual and of the same sign. Integrating the product
// drives the coefficient to the value at which the residual vanishes:
//   w(n+1) = w(n) + mu * e(n) * p(n),   mu = 2**-MU_SHIFT
// where e is the notch filter output. One instance serves one gain
// coefficient w_gk or one timing coefficient w_rk. The update rule follows
// the design description; the power-of-two step size, the word widths and the
// saturation of the integrator are this implementation's choices.
//
// Interface: e (DW bits) and p (PW bits) share the DFRAC fraction bits of the
// internal format; w has W_W bits with W_FRAC fraction bits (truncated from
// the integrator, which keeps 2*DFRAC fraction bits). Timing: w changes one
// clock after each valid input; it starts at 0 after reset.
module lms_correlator #(
  parameter int DW       = tiadc_pkg::DW,
  parameter int PW       = tiadc_pkg::DW,
  parameter int DFRAC    = tiadc_pkg::DFRAC,
  parameter int W_W      = tiadc_pkg::W_W,
  parameter int W_FRAC   = tiadc_pkg::W_FRAC,
  parameter int MU_SHIFT = tiadc_pkg::MU_G_SHIFT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [DW-1:0]  e,
  input  logic signed [PW-1:0]  p,
  output logic signed [W_W-1:0] w
);

  localparam int XF    = 2 * DFRAC - W_FRAC;        // integrator bits below w's LSB
  localparam int ACC_W = W_W + XF;
  localparam int PRD_W = DW + PW;
  localparam int SUM_W = ((ACC_W > PRD_W) ? ACC_W : PRD_W) + 2;

  logic signed [ACC_W-1:0] acc;
  logic signed [PRD_W-1:0] prod;
  logic signed [SUM_W-1:0] nxt;

  localparam logic signed [SUM_W-1:0] AMAX = SUM_W'({1'b0, {(ACC_W-1){1'b1}}});
  localparam logic signed [SUM_W-1:0] AMIN = -AMAX - 1;

  assign prod = PRD_W'(e) * PRD_W'(p);
  assign nxt  = SUM_W'(acc) + (SUM_W'(prod) >>> MU_SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (in_valid) begin
      if (nxt > AMAX)      acc <= AMAX[ACC_W-1:0];
      else if (nxt < AMIN) acc <= AMIN[ACC_W-1:0];
      else                 acc <= nxt[ACC_W-1:0];
    end
  end

  assign w = acc[ACC_W-1:XF];

endmodule
