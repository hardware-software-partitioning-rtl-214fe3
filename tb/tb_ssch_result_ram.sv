// Self-checking testbench for ssch_result_ram: random rows are written
// several times; a reference array here holds the first-write / accumulate
// behaviour. Every cell is read back with two scale factors and compared,
// and clear is checked to restart accumulation.
module tb_ssch_result_ram;
  localparam int ROWS = 15, NC = 16, DW = 20, ACC_W = DW + 4;
  logic clk = 0, rst_n = 0, clear = 0, wr = 0, rd_en = 0;
  logic [3:0] wr_row = '0, rd_row = '0, rd_code = '0;
  logic signed [DW-1:0] wr_data [NC];
  logic [16:0] rd_scale = 17'd65536;
  logic signed [ACC_W-1:0] rd_data;
  int checks = 0, failures = 0;
  longint refm [ROWS][NC];
  bit      refw [ROWS];

  ssch_result_ram #(.ROWS(ROWS), .NCODES(NC), .DW(DW), .ACC_W(ACC_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic readall(input int scale);
    rd_scale = 17'(scale);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < NC; c++) begin
        longint e;
        @(negedge clk);
        rd_en = 1; rd_row = 4'(r); rd_code = 4'(c);
        @(negedge clk);
        rd_en = 0;
        e = refw[r] ? ((refm[r][c] * scale) >>> 16) : 0;
        checks++;
        if (longint'(rd_data) != e) begin
          failures++;
          if (failures < 10) $display("FAIL r%0d c%0d got %0d exp %0d", r, c, rd_data, e);
        end
      end
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++) refw[r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int n = 0; n < 40; n++) begin
        int r;
        @(negedge clk);
        r = $urandom_range(0, ROWS - 1);
        wr = 1; wr_row = 4'(r);
        for (int c = 0; c < NC; c++) begin
          wr_data[c] = DW'($urandom_range(0, 200000) - 100000);
          refm[r][c] = refw[r] ? refm[r][c] + longint'(wr_data[c]) : longint'(wr_data[c]);
        end
        refw[r] = 1;
      end
      @(negedge clk) wr = 0;
      readall(65536);
      readall(21845);
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      for (int r = 0; r < ROWS; r++) refw[r] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
