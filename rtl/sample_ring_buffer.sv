// Sample store of the spike detector: a ring of the last FRAMES frames of
// original samples, M channels each, addressed by (frame slot, channel). It
// plays the part of the external sample memory for the window that the
// Threshold Module has to re-read after a detection. The frame slot is the
// frame number modulo FRAMES; the writer and reader keep the frame numbers.
// Read is synchronous (one clock) and rd_data holds while rd_en is low.
module sample_ring_buffer #(
  parameter int unsigned M      = 20,
  parameter int unsigned W      = 16,
  parameter int unsigned FRAMES = 128,
  localparam int unsigned CW    = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned FW    = (FRAMES > 1) ? $clog2(FRAMES) : 1
) (
  input  logic                clk,
  input  logic                wr_en,
  input  logic [FW-1:0]       wr_frame,
  input  logic [CW-1:0]       wr_chan,
  input  logic signed [W-1:0] wr_data,
  input  logic                rd_en,
  input  logic [FW-1:0]       rd_frame,
  input  logic [CW-1:0]       rd_chan,
  output logic signed [W-1:0] rd_data
);
  localparam int unsigned DEPTH = FRAMES * M;
  localparam int unsigned AW    = $clog2(DEPTH);
  logic signed [W-1:0] mem [DEPTH];

  function automatic logic [AW-1:0] addr(input logic [FW-1:0] f, input logic [CW-1:0] c);
    return AW'(f) * AW'(M) + AW'(c);
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[addr(wr_frame, wr_chan)] <= wr_data;
    if (rd_en) rd_data <= mem[addr(rd_frame, rd_chan)];
  end
endmodule
