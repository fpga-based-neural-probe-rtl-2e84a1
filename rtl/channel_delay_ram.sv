// One-sample-per-channel delay memory (BRAM1 / BRAM2 of the NEO detector).
// Entry c holds the most recent sample of channel c written to it. Read is
// synchronous: rd_data shows the entry addressed on the previous clock on
// which rd_en was high, and holds otherwise. Design choice: an entry that has
// not been written since reset reads as zero, so the first frames after reset
// see a quiet signal history.
module channel_delay_ram #(
  parameter int unsigned DEPTH = 20,
  parameter int unsigned W     = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rd_en,
  input  logic [AW-1:0]       rd_addr,
  output logic signed [W-1:0] rd_data,
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_addr,
  input  logic signed [W-1:0] wr_data
);
  logic signed [W-1:0] mem [DEPTH];
  logic [DEPTH-1:0]    written;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      written <= '0;
      rd_data <= '0;
    end else begin
      if (wr_en) written[wr_addr] <= 1'b1;
      if (rd_en) rd_data <= written[rd_addr] ? mem[rd_addr] : '0;
    end
  end
endmodule
