// Self-checking testbench for psch_sub_matched_filter: random +/-1
// coefficients and samples; the output is compared with a tap sum computed
// here from the sample history, in both short (signed) and long (|g|)
// modes, and the delay-line output with the sample TAPS*K positions back.
module tb_psch_sub_matched_filter;
  localparam int TAPS = 64, K = 4, W = 8, OW = W + 7;
  logic clk = 0, rst_n = 0, en = 0, long_mode = 0;
  logic signed [W-1:0] din = '0;
  logic [TAPS-1:0] pg;
  logic signed [OW-1:0] g;
  logic signed [W-1:0] dly_out;
  int checks = 0, failures = 0;
  int hist [$];
  int exp_g, exp_d;

  psch_sub_matched_filter #(.TAPS(TAPS), .K(K), .W(W), .OW(OW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < TAPS; j++) pg[j] = 1'($urandom);
    for (int i = 0; i < TAPS * K; i++) hist.push_front(0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      din = W'($urandom);
      if (n > 1500) long_mode = 1;
      if (n > 2500 && n < 2800) din = pg[0] ? W'(-128) : W'(127);
      if (en) begin
        hist.push_front(int'(din));
        void'(hist.pop_back());
      end
      @(posedge clk); #1;
      exp_g = 0;
      for (int j = 0; j < TAPS; j++) exp_g += pg[j] ? -hist[j*K] : hist[j*K];
      if (long_mode && exp_g < 0) exp_g = -exp_g;
      exp_d = hist[TAPS*K-1];
      checks++;
      if (int'(g) != exp_g || int'(dly_out) != exp_d) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d g=%0d exp %0d d=%0d exp %0d", n, g, exp_g, dly_out, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
