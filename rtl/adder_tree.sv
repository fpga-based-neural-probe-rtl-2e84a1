// Adder Tree: sums the N lane results of one time sample. Pairs are added
// level by level (a balanced binary tree of N-1 adders); the sum is
// registered, so inputs on clock t give 'sum' on clock t+1. A valid flag and
// a tag travel alongside with the same latency.
module adder_tree #(
  parameter int unsigned N   = 20,
  parameter int unsigned IW  = 37,
  parameter int unsigned TGW = 9,
  localparam int unsigned OW = IW + ((N > 1) ? $clog2(N) : 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [TGW-1:0] in_tag,
  input  logic [IW-1:0]  in [N],
  output logic           out_valid,
  output logic [TGW-1:0] out_tag,
  output logic [OW-1:0]  sum
);
  // Level L holds ceil(N / 2^L) partial sums; level 0 is the input.
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;
  logic [OW-1:0] lvl [LEVELS+1][N];

  always_comb begin
    for (int i = 0; i < N; i++) lvl[0][i] = OW'(in[i]);
    for (int l = 1; l <= LEVELS; l++) begin
      for (int i = 0; i < N; i++) begin
        if (2*i + 1 < ((N + (1 << (l-1)) - 1) >> (l-1)))
          lvl[l][i] = lvl[l-1][2*i] + lvl[l-1][2*i+1];
        else if (2*i < ((N + (1 << (l-1)) - 1) >> (l-1)))
          lvl[l][i] = lvl[l-1][2*i];
        else
          lvl[l][i] = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      sum       <= '0;
    end else begin
      out_valid <= in_valid;
      out_tag   <= in_tag;
      sum       <= lvl[LEVELS][0];
    end
  end
endmodule
