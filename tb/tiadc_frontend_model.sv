// tiadc_frontend_model: behavioural model of the analog front end of an
// M-channel time-interleaved ADC (not synthesizable, testbench use only).
//
// Sub-ADC i converts sample n = k*M + i of the input
//   x(t) = AMP * sin(2*pi*FBIN/NF * t/Ts + PHASE)
// with its own gain, timing and offset error,
//   y_i[k] = (1 + g_i) * x((k*M + i)*Ts + r_i) + O_i,
// and rounds the result to ADC_W bits (full scale +-1, saturating). The
// mismatch values are those of a four-channel example converter:
//   O = -0.10675, 0.075462, 0.044737, 0.021234
//   g =  0,       0.007622, -0.018279, -0.036089
//   r =  0,      -0.0009263, -0.000096028, 0.00029001   (units of Ts)
// scaled by MIS_SCALE and by O_SCALE, G_SCALE, R_SCALE for each kind
// (1.0 reproduces them). Channels beyond 3 repeat them. NOISE_RMS adds
// white, approximately Gaussian noise (sum of twelve uniform variables) of
// that rms to every sample before quantization; 0 gives a noise-free input.
// One frame of M words is offered every M clocks while en is high.
module tiadc_frontend_model #(
  parameter int  M         = 4,
  parameter int  ADC_W     = 12,
  parameter int  NF        = 4096,
  parameter int  FBIN      = 613,
  parameter real AMP       = 0.8,
  parameter real PHASE     = 0.3,
  parameter real MIS_SCALE = 1.0,
  parameter real O_SCALE   = 1.0,
  parameter real G_SCALE   = 1.0,
  parameter real R_SCALE   = 1.0,
  parameter real NOISE_RMS = 0.0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  output logic                    adc_valid,
  output logic signed [ADC_W-1:0] adc_data [M],
  output longint                  frame_no
);

  localparam real PI = 3.14159265358979323846;

  function automatic real offs(input int i);
    case (i % 4)
      0: return -0.10675;
      1: return 0.075462;
      2: return 0.044737;
      default: return 0.021234;
    endcase
  endfunction

  function automatic real gain(input int i);
    case (i % 4)
      0: return 0.0;
      1: return 0.007622;
      2: return -0.018279;
      default: return -0.036089;
    endcase
  endfunction

  function automatic real skew(input int i);
    case (i % 4)
      0: return 0.0;
      1: return -0.0009263;
      2: return -0.000096028;
      default: return 0.00029001;
    endcase
  endfunction

  // Ideal input at time t (in units of Ts).
  function automatic real xin(input real t);
    return AMP * $sin(2.0 * PI * real'(FBIN) / real'(NF) * t + PHASE);
  endfunction

  function automatic logic signed [ADC_W-1:0] quant(input real v);
    real s, lim;
    s   = v * real'(1 << (ADC_W - 1));
    lim = real'((1 << (ADC_W - 1)) - 1);
    if (s > lim) s = lim;
    if (s < -lim - 1.0) s = -lim - 1.0;
    return ADC_W'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  function automatic real noise();
    real u;
    u = 0.0;
    for (int j = 0; j < 12; j++) u += real'($urandom) / 4294967296.0;
    return NOISE_RMS * (u - 6.0);
  endfunction

  int unsigned phase_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_cnt <= 0;
      frame_no  <= 0;
      adc_valid <= 1'b0;
      for (int i = 0; i < M; i++) adc_data[i] <= '0;
    end else begin
      adc_valid <= 1'b0;
      if (en) begin
        phase_cnt <= (phase_cnt == M - 1) ? 0 : phase_cnt + 1;
        if (phase_cnt == 0) begin
          adc_valid <= 1'b1;
          frame_no  <= frame_no + 1;
          for (int i = 0; i < M; i++) begin
            real t;
            t = real'(frame_no * longint'(M) + longint'(i)) + MIS_SCALE * R_SCALE * skew(i);
            adc_data[i] <= quant((1.0 + MIS_SCALE * G_SCALE * gain(i)) * xin(t)
                               + MIS_SCALE * O_SCALE * offs(i)
                               + ((NOISE_RMS > 0.0) ? noise() : 0.0));
          end
        end
      end
    end
  end

endmodule
