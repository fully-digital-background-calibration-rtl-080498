// tb_pseudo_alias_gen: checks the Hadamard modulation.
//
// Drives random samples, derivatives and channel indices (with valid gaps)
// and compares every output with T_k[ch] * input, where the four-channel
// sequences T_1 = (1,-1,1,-1), T_2 = (1,1,-1,-1), T_3 = (1,-1,-1,1) are
// written out here independently of the design's sign function. Also checks
// the one-clock latency and that sample and channel travel along unchanged.
module tb_pseudo_alias_gen;
  import tiadc_pkg::*;

  localparam int DDW = DW + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  logic                  in_valid = 1'b0;
  logic [CH_W-1:0]       in_ch = '0;
  logic signed [DW-1:0]  in_y = '0;
  logic signed [DDW-1:0] in_yd = '0;
  logic                  out_valid;
  logic [CH_W-1:0]       out_ch;
  logic signed [DW-1:0]  out_y;
  logic signed [DW-1:0]  ye   [M-1];
  logic signed [DDW-1:0] yd_e [M-1];

  pseudo_alias_gen dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // T[k][i] for k = 1..3 (index k-1), i = 0..3
  int T [3][4] = '{'{1, -1, 1, -1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}};

  logic   exp_v = 1'b0;
  int     exp_ch = 0;
  longint exp_y = 0, exp_yd = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      check(out_valid == exp_v, "valid, one-clock latency");
      if (exp_v) begin
        check(out_ch == CH_W'(exp_ch) && longint'(out_y) == exp_y, "channel and sample pass through");
        for (int k = 0; k < 3; k++) begin
          check(longint'(ye[k]) == T[k][exp_ch] * exp_y,
                $sformatf("y_e%0d ch %0d: %0d, expected %0d", k + 1, exp_ch, ye[k], T[k][exp_ch] * exp_y));
          check(longint'(yd_e[k]) == T[k][exp_ch] * exp_yd,
                $sformatf("y'_e%0d ch %0d: %0d, expected %0d", k + 1, exp_ch, yd_e[k], T[k][exp_ch] * exp_yd));
        end
      end
      exp_v = in_valid;
      if (in_valid) begin
        exp_ch = int'(in_ch);
        exp_y  = longint'(in_y);
        exp_yd = longint'(in_yd);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      in_valid <= ($urandom_range(0, 3) != 0);
      in_ch    <= CH_W'($urandom_range(0, M - 1));
      in_y     <= DW'($signed($urandom_range(0, 2 ** (DW - 1) - 2)) - (2 ** (DW - 2)));
      in_yd    <= DDW'($signed($urandom_range(0, 2 ** DW - 2)) - (2 ** (DW - 1)) + 1);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
