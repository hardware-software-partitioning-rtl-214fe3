// ssch_result_ram: storage of the S-SCH correlation results of the cell
// searcher, with averaging over frames.
//
// ROWS rows of NCODES results. In FDD a row is one slot (15 slots x 16
// codes = 240 cells, as in the reference study); in TDD a row is one (candidate,
// burst) pair, a subset of the same area. A row is written whole: the
// first write to a row after clear stores the results, later writes add
// them (accumulation over frames). The read port returns one cell scaled
// by rd_scale / 2^16, the averaging multiplier; software sets rd_scale to
// 2^16 divided by the number of accumulated frames.
//
// Timing: write in one clock; read data is registered, valid one clock
// after rd_en.
module ssch_result_ram #(
  parameter int unsigned ROWS   = 15,
  parameter int unsigned NCODES = 16,
  parameter int unsigned DW     = 34,
  parameter int unsigned ACC_W  = DW + 4,
  parameter int unsigned ROW_W  = $clog2(ROWS),
  parameter int unsigned CODE_W = $clog2(NCODES)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    wr,
  input  logic [ROW_W-1:0]        wr_row,
  input  logic signed [DW-1:0]    wr_data [NCODES],
  input  logic                    rd_en,
  input  logic [ROW_W-1:0]        rd_row,
  input  logic [CODE_W-1:0]       rd_code,
  input  logic [16:0]             rd_scale,
  output logic signed [ACC_W-1:0] rd_data
);

  logic [NCODES-1:0][ACC_W-1:0] mem [ROWS];
  logic [ROWS-1:0]              written;
  logic [NCODES-1:0][ACC_W-1:0] new_row;

  always_comb begin
    for (int k = 0; k < NCODES; k++)
      new_row[k] = written[wr_row] ? ACC_W'($signed(mem[wr_row][k]) + ACC_W'(wr_data[k]))
                                   : ACC_W'(wr_data[k]);
  end

  always_ff @(posedge clk) begin
    if (wr && 32'(wr_row) < ROWS) mem[wr_row] <= new_row;
  end

  logic signed [ACC_W+17:0] prod;
  assign prod = $signed(mem[rd_row][rd_code]) * $signed({1'b0, rd_scale});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      written <= '0;
      rd_data <= '0;
    end else begin
      if (clear) written <= '0;
      else if (wr && 32'(wr_row) < ROWS) written[wr_row] <= 1'b1;
      if (rd_en) rd_data <= written[rd_row] ? ACC_W'(prod >>> 16) : '0;
    end
  end

endmodule
