// Self-checking testbench for ce_correlator: random samples and training
// chips with random enable and clear; the accumulators are compared with a
// running sum kept here after every clock.
module tb_ce_correlator;
  localparam int W = 8, ACC_W = 20;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, coef = 0;
  logic signed [W-1:0] din_i = '0, din_q = '0;
  logic signed [ACC_W-1:0] acc_i, acc_q;
  int checks = 0, failures = 0;
  int ri = 0, rq = 0;

  ce_correlator #(.W(W), .ACC_W(ACC_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      clear = ($urandom_range(0, 99) == 0);
      coef = 1'($urandom);
      din_i = W'($urandom); din_q = W'($urandom);
      if (clear) begin ri = 0; rq = 0; end
      if (en) begin
        ri += coef ? -int'(din_i) : int'(din_i);
        rq += coef ? -int'(din_q) : int'(din_q);
      end
      @(posedge clk); #1;
      checks++;
      if (int'(acc_i) != ri || int'(acc_q) != rq) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d %0d/%0d exp %0d/%0d", n, acc_i, acc_q, ri, rq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
