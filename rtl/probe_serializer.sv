// Serializer of the spike detector: takes one frame (one sample of each of the
// M channels, all captured at the same instant) and sends the samples out one
// per clock in channel order 0..M-1, tagging each with its channel index and
// the last one with s_last. This channel-interleaved stream feeds the NEO
// datapath and the sample store, as in the detection architecture.
// Timing: a frame accepted on clock t appears on clocks t+1 .. t+M.
// Design choice: there is no back-pressure on the input; a frame that arrives
// while the previous one is still being sent is dropped and flagged with a
// one-clock 'overrun' pulse. At 20 kHz sampling and a 200 MHz clock a frame
// arrives every 10,000 clocks, so this only matters in simulation.
module probe_serializer #(
  parameter int unsigned M = 20,
  parameter int unsigned W = 16,
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                frame_valid,
  input  logic signed [W-1:0] frame_data [M],
  output logic                s_valid,
  output logic signed [W-1:0] s_data,
  output logic [CW-1:0]       s_chan,
  output logic                s_last,
  output logic                overrun
);
  logic signed [W-1:0] hold [M];
  logic [CW-1:0]       idx;
  logic                busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      idx     <= '0;
      overrun <= 1'b0;
    end else begin
      overrun <= frame_valid && busy && !(idx == CW'(M-1));
      if (busy && idx == CW'(M-1)) begin
        busy <= 1'b0;
        idx  <= '0;
      end else if (busy) begin
        idx <= idx + 1'b1;
      end
      if (frame_valid && (!busy || idx == CW'(M-1))) begin
        busy <= 1'b1;
        idx  <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (frame_valid && (!busy || idx == CW'(M-1))) hold <= frame_data;
  end

  assign s_valid = busy;
  assign s_data  = hold[idx];
  assign s_chan  = idx;
  assign s_last  = busy && idx == CW'(M-1);
endmodule
