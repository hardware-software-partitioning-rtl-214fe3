// ssch_correlator: three-stage correlator for the secondary synchronisation
// codes (SSC) of the cell searcher.
//
// Every SSC is the product of a 256-chip sequence z common to all codes and
// a Hadamard row that is constant over blocks of 16 chips. That lets the
// 16 correlations share work:
//   stage 1 (1 adder per rail): accumulate 16 chips multiplied by the signs
//           of z into one partial sum;
//   stage 2 (16 adders per rail): add or subtract that partial sum into the
//           16 code accumulators according to the Hadamard sign of the
//           block;
//   stage 3 (16 x 2 multipliers and 2 adders): project every code result
//           onto the phase reference taken from the P-SCH correlation,
//           Re{acc_k * conj(ph)} = acc_i*ph_i + acc_q*ph_q, which removes
//           the phase rotation caused by a carrier frequency error.
// The stage structure and operator counts follow the reference study; the code
// construction (z and Hadamard rows) comes from the UMTS standard.
//
// Chip enabling: the input runs at K samples per chip. start marks the
// sample that carries chip 0; after it every K-th valid sample is a chip.
// start is ignored while a correlation is running.
// Timing: result and done appear two clocks after the clock edge that
// takes chip 255; ph_i/ph_q are sampled at that second edge, which gives
// the P-SCH matched filter time to deliver the correlation of the same burst.
module ssch_correlator
  import mumor_pkg::*;
#(
  parameter int unsigned K      = 4,
  parameter int unsigned W      = 8,
  parameter int unsigned NCODES = 16,
  parameter int unsigned PW     = W + 9,
  parameter int unsigned ACC_W  = W + 9,
  parameter int unsigned RES_W  = ACC_W + PW + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    smp_valid,
  input  logic signed [W-1:0]     din_i,
  input  logic signed [W-1:0]     din_q,
  input  logic signed [PW-1:0]    ph_i,
  input  logic signed [PW-1:0]    ph_q,
  output logic                    busy,
  output logic                    done,
  output logic signed [RES_W-1:0] result [NCODES]
);

  localparam int unsigned S1_W = W + 5;
  localparam int unsigned KC_W = (K > 1) ? $clog2(K) : 1;

  logic [KC_W-1:0]        kcnt;
  logic [7:0]             chip;
  logic signed [S1_W-1:0] s1_i, s1_q;
  logic signed [ACC_W-1:0] acc_i [NCODES];
  logic signed [ACC_W-1:0] acc_q [NCODES];
  logic                   take, first, stage2_end, stage3;
  logic signed [S1_W-1:0] zi, zq, p_i, p_q;

  assign first = start && !busy;
  assign take  = smp_valid && (first || (busy && kcnt == '0));

  // stage 1: chip times sign of z, summed over a block of 16 chips
  always_comb begin
    zi  = ssc_z(chip) ? -S1_W'(din_i) : S1_W'(din_i);
    zq  = ssc_z(chip) ? -S1_W'(din_q) : S1_W'(din_q);
    p_i = (chip[3:0] == 4'd0 ? '0 : s1_i) + zi;
    p_q = (chip[3:0] == 4'd0 ? '0 : s1_q) + zq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      kcnt <= '0;
      chip <= '0;
      s1_i <= '0;
      s1_q <= '0;
      stage2_end <= 1'b0;
      stage3 <= 1'b0;
      done <= 1'b0;
      for (int k = 0; k < NCODES; k++) begin
        acc_i[k] <= '0;
        acc_q[k] <= '0;
        result[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      stage2_end <= 1'b0;
      stage3 <= stage2_end;
      if (first && smp_valid) begin
        busy <= 1'b1;
        chip <= '0;
      end
      if (smp_valid && first)
        kcnt <= (K > 1) ? KC_W'(1) : '0;
      else if (smp_valid && busy)
        kcnt <= (kcnt == KC_W'(K - 1)) ? '0 : kcnt + 1'b1;
      if (take) begin
        s1_i <= p_i;
        s1_q <= p_q;
        chip <= chip + 8'd1;
        if (chip[3:0] == 4'd15) begin
          // stage 2: block sum into the code accumulators
          for (int k = 0; k < NCODES; k++) begin
            if (hadamard16(4'(k), chip[7:4])) begin
              acc_i[k] <= (chip[7:4] == 4'd0 ? '0 : acc_i[k]) - ACC_W'(p_i);
              acc_q[k] <= (chip[7:4] == 4'd0 ? '0 : acc_q[k]) - ACC_W'(p_q);
            end else begin
              acc_i[k] <= (chip[7:4] == 4'd0 ? '0 : acc_i[k]) + ACC_W'(p_i);
              acc_q[k] <= (chip[7:4] == 4'd0 ? '0 : acc_q[k]) + ACC_W'(p_q);
            end
          end
          if (chip == 8'd255) begin
            busy <= 1'b0;
            stage2_end <= 1'b1;
          end
        end
      end
      if (stage3) begin
        // stage 3: de-rotation by the P-SCH phase reference
        for (int k = 0; k < NCODES; k++)
          result[k] <= RES_W'(acc_i[k]) * RES_W'(ph_i) + RES_W'(acc_q[k]) * RES_W'(ph_q);
        done <= 1'b1;
      end
    end
  end

endmodule
