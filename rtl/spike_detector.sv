// NEO spike detector for M channels. The Serializer interleaves the channels;
// the NEO unit (with its two per-channel history memories) computes
// psi = x(n)^2 - x(n+1)x(n-1); AVG & Shift turns the mean NEO value into the
// detection threshold; the Threshold Module stores the samples, detects and
// sends each 64-frame spike window over AXI-Stream. Frames enter on
// frame_valid (one sample per channel); see the sub-blocks for timing and for
// which choices are this design's own.
module spike_detector #(
  parameter int unsigned M      = 20,
  parameter int unsigned W      = 16,
  parameter int unsigned LOG2N  = 14,
  parameter int unsigned CSHIFT = 3,
  parameter int unsigned PRE    = 20,
  parameter int unsigned WIN    = 64,
  parameter int unsigned FRAMES = 128,
  localparam int unsigned NW    = 2*W + 1,
  localparam int unsigned TW    = NW + CSHIFT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 frame_valid,
  input  logic signed [W-1:0]  frame_data [M],
  output logic                 m_axis_tvalid,
  input  logic                 m_axis_tready,
  output logic [W-1:0]         m_axis_tdata,
  output logic                 m_axis_tlast,
  output logic signed [TW-1:0] det_threshold,
  output logic                 det_threshold_ok,
  output logic                 detect,
  output logic [31:0]          detect_count,
  output logic                 overrun
);
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;
  logic                 s_valid, s_last, neo_valid, neo_last;
  logic signed [W-1:0]  s_data;
  logic [CW-1:0]        s_chan;
  logic signed [NW-1:0] neo_value;

  probe_serializer #(.M(M), .W(W)) u_ser (
    .clk, .rst_n, .frame_valid, .frame_data,
    .s_valid, .s_data, .s_chan, .s_last, .overrun
  );
  neo_unit #(.M(M), .W(W)) u_neo (
    .clk, .rst_n, .s_valid, .s_data, .s_chan, .s_last,
    .neo_valid, .neo_value, .neo_chan(), .neo_last
  );
  avg_shift #(.NW(NW), .LOG2N(LOG2N), .CSHIFT(CSHIFT)) u_avg (
    .clk, .rst_n, .neo_valid, .neo_value,
    .thr(det_threshold), .thr_ok(det_threshold_ok), .thr_update()
  );
  threshold_module #(.M(M), .W(W), .NW(NW), .TW(TW), .PRE(PRE), .WIN(WIN), .FRAMES(FRAMES)) u_thr (
    .clk, .rst_n, .s_valid, .s_data, .s_chan, .s_last,
    .neo_valid, .neo_value, .neo_last,
    .thr(det_threshold), .thr_ok(det_threshold_ok),
    .m_axis_tvalid, .m_axis_tready, .m_axis_tdata, .m_axis_tlast,
    .detect, .detect_count
  );
endmodule
