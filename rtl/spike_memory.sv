// Spike memory of the Cluster Module: SAMPLES rows, each holding LANES values
// of MW bits (one time sample of every channel). It first holds the incoming
// spike; stage 2 overwrites it with the updated cluster mean, which stage 3
// reads back. One write port and one synchronous read port (rd_data holds
// while rd_en is low).
module spike_memory #(
  parameter int unsigned LANES   = 20,
  parameter int unsigned SAMPLES = 64,
  parameter int unsigned MW      = 18,
  localparam int unsigned RW     = (SAMPLES > 1) ? $clog2(SAMPLES) : 1
) (
  input  logic                clk,
  input  logic                wr_en,
  input  logic [RW-1:0]       wr_addr,
  input  logic [LANES*MW-1:0] wr_data,
  input  logic                rd_en,
  input  logic [RW-1:0]       rd_addr,
  output logic [LANES*MW-1:0] rd_data
);
  logic [LANES*MW-1:0] mem [SAMPLES];
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
