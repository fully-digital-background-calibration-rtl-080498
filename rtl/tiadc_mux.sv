// tiadc_mux: output multiplexer of the time-interleaved ADC.
//
// The M sub-ADCs convert in turn, each at fs/M. This block takes one word from
// every sub-ADC at once (a "frame", adc_valid high for one cycle) and emits
// them one per clock in channel order 0, 1, .., M-1, so that the stream y[n]
// leaves at one sample per clock (clock = fs) with the channel index of every
// sample beside it. Interleaving the sub-ADC streams into one output follows
// the design description; the frame interface and the hold register are this
// implementation's choices.
//
// Timing: a frame accepted at clock edge t appears as y_valid samples in the
// M cycles after t. A new frame may be offered at the latest in the cycle that
// shows the previous frame's last word, so frames can arrive back to back
// every M cycles; an earlier frame is a protocol error (assertion).
//
// Lint note: the reset appears in the disable condition of that assertion as
// well as in the asynchronous reset of the registers, which lint reports as
// a reset used both ways; the assertion is not part of the circuit.
module tiadc_mux #(
  parameter int M     = tiadc_pkg::M,
  parameter int ADC_W = tiadc_pkg::ADC_W,
  localparam int CH_W = (M > 1) ? $clog2(M) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    adc_valid,        // one frame of M words
  input  logic signed [ADC_W-1:0] adc_data [M],     // adc_data[i] from sub-ADC i
  output logic                    y_valid,
  output logic [CH_W-1:0]         y_ch,             // channel of y_data
  output logic signed [ADC_W-1:0] y_data            // interleaved stream y[n]
);

  logic signed [ADC_W-1:0] hold [M];
  logic [CH_W-1:0]         idx;
  logic                    busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
      for (int i = 0; i < M; i++) hold[i] <= '0;
    end else if (adc_valid) begin
      busy <= 1'b1;
      idx  <= '0;
      for (int i = 0; i < M; i++) hold[i] <= adc_data[i];
    end else if (busy) begin
      idx <= idx + 1'b1;
      if (idx == CH_W'(M - 1)) busy <= 1'b0;
    end
  end

  assign y_valid = busy;
  assign y_ch    = idx;
  assign y_data  = hold[idx];

  // A frame must not overwrite words that have not been sent yet.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    adc_valid |-> (!busy || idx == CH_W'(M - 1)))
    else $error("tiadc_mux: frame arrived before the previous one was sent");

endmodule
