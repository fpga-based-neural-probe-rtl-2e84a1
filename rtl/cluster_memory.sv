// Cluster Memory: the means of up to CLUSTERS clusters, each SAMPLES rows of
// LANES values of MW bits (18-bit fixed point, 2 fractional bits, in the main
// configuration). Row address = cluster * SAMPLES + time sample. DIN is one
// write port, DOUT one synchronous read port with one clock of latency; both
// can be used on the same clock at different rows. At the default size it is
// 8192 rows of 360 bits (2.95 Mbit), the capacity the 80 BRAMs of the
// document's budget hold.
// SAMPLES must be a power of two (the row address is {cluster, sample}).
module cluster_memory #(
  parameter int unsigned CLUSTERS = 128,
  parameter int unsigned LANES    = 20,
  parameter int unsigned SAMPLES  = 64,
  parameter int unsigned MW       = 18,
  localparam int unsigned CIW     = (CLUSTERS > 1) ? $clog2(CLUSTERS) : 1,
  localparam int unsigned RW      = (SAMPLES > 1) ? $clog2(SAMPLES) : 1
) (
  input  logic                clk,
  input  logic                wr_en,
  input  logic [CIW-1:0]      wr_cluster,
  input  logic [RW-1:0]       wr_row,
  input  logic [LANES*MW-1:0] wr_data,
  input  logic                rd_en,
  input  logic [CIW-1:0]      rd_cluster,
  input  logic [RW-1:0]       rd_row,
  output logic [LANES*MW-1:0] rd_data
);
  logic [LANES*MW-1:0] mem [CLUSTERS*SAMPLES];
  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_cluster, wr_row}] <= wr_data;
    if (rd_en) rd_data <= mem[{rd_cluster, rd_row}];
  end
endmodule
