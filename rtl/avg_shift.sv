// AVG & Shift unit: derives the automatic detection threshold
//   T_D = c_D * (1/N) * sum psi
// from the NEO stream. It sums N = 2^LOG2N consecutive NEO values (all
// channels together), divides by N with an arithmetic right shift, and
// multiplies by c_D = 2^CSHIFT with a left shift (c_D = 8 in the main
// configuration). The threshold is updated after every block of N values and
// held in between; thr_ok rises with the first completed block and stays high.
// The block length N is a choice of this design; the averaging window of the
// equation is the whole record.
// Timing: thr changes on the clock after the N-th value of a block.
// The low CSHIFT bits of thr are always zero (the shift by c_D).
module avg_shift #(
  parameter int unsigned NW     = 33,
  parameter int unsigned LOG2N  = 14,
  parameter int unsigned CSHIFT = 3,
  localparam int unsigned TW    = NW + CSHIFT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 neo_valid,
  input  logic signed [NW-1:0] neo_value,
  output logic signed [TW-1:0] thr,
  output logic                 thr_ok,
  output logic                 thr_update
);
  localparam int unsigned SW = NW + LOG2N;
  logic signed [SW-1:0] sum, sum_next;
  logic [LOG2N-1:0]     cnt;
  logic signed [NW-1:0] mean;

  always_comb begin
    sum_next = sum + SW'(neo_value);
    mean     = NW'(sum_next >>> LOG2N);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum        <= '0;
      cnt        <= '0;
      thr        <= '0;
      thr_ok     <= 1'b0;
      thr_update <= 1'b0;
    end else begin
      thr_update <= 1'b0;
      if (neo_valid) begin
        cnt <= cnt + 1'b1;
        if (cnt == '1) begin
          sum        <= '0;
          thr        <= TW'(mean) <<< CSHIFT;
          thr_ok     <= 1'b1;
          thr_update <= 1'b1;
        end else begin
          sum <= sum_next;
        end
      end
    end
  end
endmodule
