// tb_tiadc_mux: checks the output multiplexer.
//
// Offers random frames, back to back (every M clocks) and with random gaps,
// and checks that every frame leaves as M samples in channel order, one per
// clock, starting the clock after the frame was accepted, with the right
// data and channel index, and that nothing leaves between frames.
module tb_tiadc_mux;
  import tiadc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  logic                    adc_valid = 1'b0;
  logic signed [ADC_W-1:0] adc_data [M];
  logic                    y_valid;
  logic [CH_W-1:0]         y_ch;
  logic signed [ADC_W-1:0] y_data;

  tiadc_mux dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected output per clock, checked at the falling edge (outputs are
  // settled there): queue of (valid, ch, data).
  typedef struct {
    logic                    v;
    logic [CH_W-1:0]         ch;
    logic signed [ADC_W-1:0] d;
  } exp_t;
  exp_t exp_q [$];
  int   n_words = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      exp_t e;
      if (exp_q.size() > 0) e = exp_q.pop_front();
      else e = '{v: 1'b0, ch: '0, d: '0};
      check(y_valid == e.v, $sformatf("valid %0b expected %0b", y_valid, e.v));
      if (e.v) begin
        check(y_ch == e.ch && y_data == e.d,
              $sformatf("ch %0d data %0d, expected ch %0d data %0d", y_ch, y_data, e.ch, e.d));
        n_words++;
      end
    end
  end

  initial begin
    for (int i = 0; i < M; i++) adc_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < 200; f++) begin
      int gap;
      gap = ($urandom_range(0, 1) == 0) ? 0 : $urandom_range(1, 5);
      adc_valid <= 1'b1;
      for (int i = 0; i < M; i++) adc_data[i] <= ADC_W'($urandom);
      @(posedge clk);
      // the frame as sampled by the DUT at this edge
      for (int i = 0; i < M; i++) exp_q.push_back('{v: 1'b1, ch: CH_W'(i), d: adc_data[i]});
      adc_valid <= 1'b0;
      repeat (M - 1) @(posedge clk);
      for (int g = 0; g < gap; g++) begin
        exp_q.push_back('{v: 1'b0, ch: '0, d: '0});
        @(posedge clk);
      end
    end
    repeat (M + 2) @(posedge clk);
    check(n_words == 200 * M, $sformatf("%0d words out, expected %0d", n_words, 200 * M));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
