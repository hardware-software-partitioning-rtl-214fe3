// Self-checking testbench for ssch_correlator (K = 2 samples per chip).
// The 16 secondary synchronisation codes are built here from the
// sequences x, b, z and a Sylvester Hadamard matrix; a burst of code k
// with a complex amplitude plus noise is sent, and the 16 results are
// compared with direct 256-chip correlations computed here and projected
// on the phase reference. The detected code and the result latency are
// checked as well, for several bursts back to back.
module tb_ssch_correlator;
  localparam int K = 2, W = 8, NC = 16, PW = W + 9, ACC_W = W + 9, RES_W = ACC_W + PW + 1;
  logic clk = 0, rst_n = 0, start = 0, smp_valid = 0;
  logic signed [W-1:0] din_i = '0, din_q = '0;
  logic signed [PW-1:0] ph_i = '0, ph_q = '0;
  logic busy, done;
  logic signed [RES_W-1:0] result [NC];
  int checks = 0, failures = 0;
  int code [NC][256];
  int hsyl [16][16];
  int xs [16] = '{1,1,1,1,1,1,-1,-1,1,-1,1,-1,1,-1,-1,1};
  int zp [16] = '{1,1,1,-1,1,1,-1,-1,1,-1,1,-1,-1,-1,-1,-1};
  longint ci [NC], cq [NC];

  ssch_correlator #(.K(K), .W(W), .NCODES(NC), .PW(PW), .ACC_W(ACC_W), .RES_W(RES_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hsyl[0][0] = 1;
    for (int sz = 1; sz < 16; sz *= 2)
      for (int r = 0; r < sz; r++)
        for (int c = 0; c < sz; c++) begin
          hsyl[r][c+sz] = hsyl[r][c];
          hsyl[r+sz][c] = hsyl[r][c];
          hsyl[r+sz][c+sz] = -hsyl[r][c];
        end
    for (int k = 0; k < NC; k++)
      for (int n = 0; n < 256; n++) begin
        int b;
        b = (n % 16 < 8) ? xs[n % 16] : -xs[n % 16];
        code[k][n] = hsyl[k][n / 16] * b * zp[n / 16];
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int burst = 0; burst < 4; burst++) begin
      int kt, a, bq, best, cyc_last, cyc_done;
      longint bestv, e;
      kt = $urandom_range(0, NC - 1);
      a = $urandom_range(8, 15) * ($urandom_range(0, 1) ? 1 : -1);
      bq = $urandom_range(8, 15) * ($urandom_range(0, 1) ? 1 : -1);
      ph_i = PW'(a * 50); ph_q = PW'(bq * 50);
      for (int k = 0; k < NC; k++) begin ci[k] = 0; cq[k] = 0; end
      for (int n = 0; n < 256 * K; n++) begin
        int si, sq;
        @(negedge clk);
        start = (n == 0);
        smp_valid = 1;
        si = code[kt][n / K] * a + $urandom_range(0, 40) - 20;
        sq = code[kt][n / K] * bq + $urandom_range(0, 40) - 20;
        din_i = W'(si); din_q = W'(sq);
        if (n % K == 0)
          for (int k = 0; k < NC; k++) begin
            ci[k] += code[k][n / K] * si;
            cq[k] += code[k][n / K] * sq;
          end
        // idle sample now and then
        if (n == 100) begin
          @(negedge clk) smp_valid = 0; start = 0;
        end
      end
      cyc_last = 0;
      @(negedge clk) smp_valid = 0; start = 0;
      while (!done && cyc_last < 10) begin @(negedge clk); cyc_last++; end
      checks++;
      // chip 255 is the second-last sample at K = 2
      if (cyc_last != 1) begin failures++; $display("FAIL latency %0d", cyc_last); end
      best = 0; bestv = 0;
      for (int k = 0; k < NC; k++) begin
        e = ci[k] * longint'(a * 50) + cq[k] * longint'(bq * 50);
        checks++;
        if (longint'(result[k]) != e) begin
          failures++;
          $display("FAIL burst %0d code %0d: %0d exp %0d", burst, k, result[k], e);
        end
        if (longint'(result[k]) > bestv) begin bestv = longint'(result[k]); best = k; end
      end
      checks++;
      if (best != kt) begin failures++; $display("FAIL detected %0d sent %0d", best, kt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
