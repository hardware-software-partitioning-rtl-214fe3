// Self-checking testbench for rx_pulse_shaping_fir: loads random 10-bit
// coefficients, streams random samples with gaps and compares every output
// with a convolution computed here from a history of the inputs. Also
// checks the one-clock latency.
module tb_rx_pulse_shaping_fir;
  localparam int TAPS = 65, CW = 10, DW = 8;
  localparam int OW = DW + CW + $clog2(TAPS);
  logic clk = 0, rst_n = 0;
  logic coef_we = 0;
  logic [$clog2(TAPS)-1:0] coef_addr = '0;
  logic signed [CW-1:0] coef_wdata = '0;
  logic in_valid = 0;
  logic signed [DW-1:0] din_i = '0, din_q = '0;
  logic out_valid;
  logic signed [OW-1:0] dout_i, dout_q;
  int checks = 0, failures = 0;
  int coefs [TAPS];
  int hist_i [$], hist_q [$];
  longint exp_i, exp_q;

  rx_pulse_shaping_fir #(.TAPS(TAPS), .COEF_W(CW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < TAPS; k++) begin
      coefs[k] = $signed($urandom_range(0, 1023)) - 512;
      @(negedge clk);
      coef_we = 1; coef_addr = k[$clog2(TAPS)-1:0]; coef_wdata = CW'(coefs[k]);
    end
    @(negedge clk) coef_we = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      din_i = DW'($urandom);
      din_q = DW'($urandom);
      if (n < 5) begin din_i = -128; din_q = 127; end
      if (in_valid) begin
        hist_i.push_front(int'(din_i));
        hist_q.push_front(int'(din_q));
        exp_i = 0; exp_q = 0;
        for (int k = 0; k < TAPS && k < hist_i.size(); k++) begin
          exp_i += longint'(hist_i[k]) * coefs[k];
          exp_q += longint'(hist_q[k]) * coefs[k];
        end
        @(posedge clk); #1;
        checks++;
        if (!out_valid || longint'(dout_i) != exp_i || longint'(dout_q) != exp_q) begin
          failures++;
          $display("FAIL n=%0d valid=%0b got %0d/%0d exp %0d/%0d", n, out_valid, dout_i, dout_q, exp_i, exp_q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
