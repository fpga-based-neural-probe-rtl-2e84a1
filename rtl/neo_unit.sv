// Non-linear energy operator for a channel-interleaved sample stream:
//   psi[x(n)] = x(n)^2 - x(n+1) * x(n-1)
// The incoming sample of channel c is x(n+1). BRAM1 holds the previous sample
// x(n) of every channel and BRAM2 the one before, x(n-1). On each input both
// memories are read at c; on the next clock psi is computed and the history
// shifts: BRAM1[c] <= x(n+1), BRAM2[c] <= x(n). The NEO value therefore
// belongs to the frame before the one being received.
// Timing: psi for an input on clock t is valid on clock t+2 (neo_valid), with
// the channel and last-channel tags carried along. The result is exact:
// 2W+1 bits signed (a design choice; no rounding).
module neo_unit #(
  parameter int unsigned M  = 20,
  parameter int unsigned W  = 16,
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NW = 2*W + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 s_valid,
  input  logic signed [W-1:0]  s_data,
  input  logic [CW-1:0]        s_chan,
  input  logic                 s_last,
  output logic                 neo_valid,
  output logic signed [NW-1:0] neo_value,
  output logic [CW-1:0]        neo_chan,
  output logic                 neo_last
);
  logic                p_valid, p_last;
  logic signed [W-1:0] p_next;   // x(n+1)
  logic [CW-1:0]       p_chan;
  logic signed [W-1:0] x_n, x_nm1;

  channel_delay_ram #(.DEPTH(M), .W(W)) u_bram1 (
    .clk, .rst_n,
    .rd_en(s_valid), .rd_addr(s_chan), .rd_data(x_n),
    .wr_en(p_valid), .wr_addr(p_chan), .wr_data(p_next)
  );
  channel_delay_ram #(.DEPTH(M), .W(W)) u_bram2 (
    .clk, .rst_n,
    .rd_en(s_valid), .rd_addr(s_chan), .rd_data(x_nm1),
    .wr_en(p_valid), .wr_addr(p_chan), .wr_data(x_n)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid   <= 1'b0;
      p_last    <= 1'b0;
      p_next    <= '0;
      p_chan    <= '0;
      neo_valid <= 1'b0;
      neo_value <= '0;
      neo_chan  <= '0;
      neo_last  <= 1'b0;
    end else begin
      p_valid <= s_valid;
      p_last  <= s_last;
      p_next  <= s_data;
      p_chan  <= s_chan;
      neo_valid <= p_valid;
      neo_chan  <= p_chan;
      neo_last  <= p_last;
      if (p_valid) neo_value <= NW'(x_n * x_n) - NW'(p_next * x_nm1);
    end
  end
endmodule
