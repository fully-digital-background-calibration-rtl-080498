// notch_filter: removes the input signal from the corrected output before
// correlation.
//
// The correlators must see the mismatch images, not the input signal itself:
// the signal is correlated with the pseudo aliasing signals through the
// mismatch terms they carry, and that would bias the coefficients (or, for
// the timing loop, cancel its restoring force). This block is the FIR notch
//   y_n(n) = (y(n) - c * y(n-1) + y(n-2)) / 4,   c = 2*cos(omega_0)
// with a double zero pair on the unit circle at +-omega_0, so a signal at
// omega_0 is removed completely while images elsewhere pass. The notch
// frequency is a run-time input. That the notch removes the signal follows
// the design description; the three-tap structure, the programmable
// frequency, the gain of 1/4, the truncation and the output saturation
// (reached only with inputs near full scale at both ends of the delay line)
// are this implementation's choices.
//
// Interface: a stream in the internal format (DW bits, DFRAC fraction bits)
// with valid; notch_c = 2*cos(omega_0) with DFRAC fraction bits (range
// -2 .. +2). The delay line advances once per valid input and starts at
// zero. Latency: one clock.
module notch_filter #(
  parameter int DW    = tiadc_pkg::DW,
  parameter int DFRAC = tiadc_pkg::DFRAC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_data,
  input  logic signed [DW:0]   notch_c,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_data
);

  localparam int SW = 2 * DW + 4;

  logic signed [DW-1:0] d1, d2;
  logic signed [SW-1:0] sum;
  logic signed [SW-1:0] q;

  localparam logic signed [SW-1:0] YMAX = SW'({1'b0, {(DW-1){1'b1}}});
  localparam logic signed [SW-1:0] YMIN = -YMAX - 1;

  always_comb begin
    sum = (SW'(in_data) <<< DFRAC) - SW'(notch_c) * SW'(d1) + (SW'(d2) <<< DFRAC);
    q   = sum >>> (DFRAC + 2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1        <= '0;
      d2        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        d1       <= in_data;
        d2       <= d1;
        if (q > YMAX)      out_data <= YMAX[DW-1:0];
        else if (q < YMIN) out_data <= YMIN[DW-1:0];
        else               out_data <= q[DW-1:0];
      end
    end
  end

endmodule
