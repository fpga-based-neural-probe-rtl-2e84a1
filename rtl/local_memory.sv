// Local Memory of the Cluster Module: one record per cluster slot with
//   alive      - the slot holds a cluster
//   count      - number of spikes in the cluster (n)
//   weight     - precomputed 1/(n+1) for the next spike, WF fractional bits
//   merged     - the merge table: the slot was merged into cluster 'merged_to'
// Two asynchronous read ports (a, b) and one record write port. The alive
// flags are also output as a vector, together with the lowest free slot
// (priority encoder), which the controller uses for a new cluster. Reset
// empties the alive flags and the merge table; counts and weights are only
// read for live slots and are not reset.
module local_memory #(
  parameter int unsigned CLUSTERS = 128,
  parameter int unsigned CNT_W    = 20,
  parameter int unsigned WF       = 16,
  localparam int unsigned CIW     = (CLUSTERS > 1) ? $clog2(CLUSTERS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CIW-1:0]       rd_a_addr,
  output logic [CNT_W-1:0]     rd_a_count,
  output logic [WF:0]          rd_a_weight,
  input  logic [CIW-1:0]       rd_b_addr,
  output logic [CNT_W-1:0]     rd_b_count,
  output logic [WF:0]          rd_b_weight,
  input  logic                 wr_en,
  input  logic [CIW-1:0]       wr_addr,
  input  logic                 wr_alive,
  input  logic [CNT_W-1:0]     wr_count,
  input  logic [WF:0]          wr_weight,
  input  logic                 wr_merged,
  input  logic [CIW-1:0]       wr_merged_to,
  output logic [CLUSTERS-1:0]  alive,
  output logic [CLUSTERS-1:0]  merged,
  output logic [CIW-1:0]       merged_to [CLUSTERS],
  output logic [CIW-1:0]       free_idx,
  output logic                 any_free
);
  logic [CNT_W-1:0] count  [CLUSTERS];
  logic [WF:0]      weight [CLUSTERS];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      count[wr_addr]  <= wr_count;
      weight[wr_addr] <= wr_weight;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alive  <= '0;
      merged <= '0;
      for (int i = 0; i < CLUSTERS; i++) merged_to[i] <= '0;
    end else if (wr_en) begin
      alive[wr_addr]     <= wr_alive;
      merged[wr_addr]    <= wr_merged;
      merged_to[wr_addr] <= wr_merged_to;
    end
  end

  assign rd_a_count  = count[rd_a_addr];
  assign rd_a_weight = weight[rd_a_addr];
  assign rd_b_count  = count[rd_b_addr];
  assign rd_b_weight = weight[rd_b_addr];

  always_comb begin
    free_idx = '0;
    any_free = 1'b0;
    for (int i = CLUSTERS - 1; i >= 0; i--) begin
      if (!alive[i]) begin
        free_idx = CIW'(i);
        any_free = 1'b1;
      end
    end
  end
endmodule
