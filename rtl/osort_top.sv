// Top level of the 20-channel spike detection and OSort clustering system.
// Frames of M = 20 channel samples (a 5x4 electrode window, 16-bit, one frame
// per sampling instant) enter on ch_valid/ch_data. The NEO spike detector
// finds spikes against its automatically derived threshold and sends each
// 64-sample window of all channels through the spike buffer to the Cluster
// Module, which assigns it to a cluster (creating and merging clusters as
// needed) and emits the cluster number on m_id. The clustering and merging
// thresholds are written over AXI-Lite by the host. The amplifiers, host
// processor and external memory are outside this design.
module osort_top
  import osort_pkg::*;
#(
  parameter int unsigned M        = 20,
  parameter int unsigned SAMPLES  = 64,
  parameter int unsigned CLUSTERS = 128,
  parameter int unsigned LOG2N    = 14,
  parameter int unsigned PRE      = 20,
  parameter int unsigned FIFO_DEPTH = 2048,
  localparam int unsigned W       = 16,
  localparam int unsigned TW      = 2*W + 1 + 3,
  localparam int unsigned FAW     = $clog2(FIFO_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ch_valid,
  input  logic signed [W-1:0]  ch_data [M],
  input  logic                 s_axil_awvalid,
  output logic                 s_axil_awready,
  input  logic [3:0]           s_axil_awaddr,
  input  logic                 s_axil_wvalid,
  output logic                 s_axil_wready,
  input  logic [31:0]          s_axil_wdata,
  input  logic [3:0]           s_axil_wstrb,
  output logic                 s_axil_bvalid,
  input  logic                 s_axil_bready,
  output logic [1:0]           s_axil_bresp,
  input  logic                 s_axil_arvalid,
  output logic                 s_axil_arready,
  input  logic [3:0]           s_axil_araddr,
  output logic                 s_axil_rvalid,
  input  logic                 s_axil_rready,
  output logic [31:0]          s_axil_rdata,
  output logic [1:0]           s_axil_rresp,
  output logic                 m_id_tvalid,
  input  logic                 m_id_tready,
  output logic [7:0]           m_id_tdata,
  output logic signed [TW-1:0] det_threshold,
  output logic                 det_threshold_ok,
  output logic                 detect,
  output logic [31:0]          detect_count,
  output logic                 overrun,
  output logic [FAW:0]         fifo_level,   // words waiting in the spike buffer
  output stage_e               stage,
  output logic                 ev_new,
  output logic                 ev_update,
  output logic                 ev_merge,
  output logic                 ev_full
);
  logic         d_tvalid, d_tready, d_tlast, c_tvalid, c_tready, c_tlast;
  logic [W-1:0] d_tdata, c_tdata;

  spike_detector #(.M(M), .W(W), .LOG2N(LOG2N), .CSHIFT(3), .PRE(PRE), .WIN(SAMPLES),
                   .FRAMES(2*SAMPLES)) u_det (
    .clk, .rst_n, .frame_valid(ch_valid), .frame_data(ch_data),
    .m_axis_tvalid(d_tvalid), .m_axis_tready(d_tready), .m_axis_tdata(d_tdata), .m_axis_tlast(d_tlast),
    .det_threshold, .det_threshold_ok, .detect, .detect_count, .overrun
  );

  spike_stream_buffer #(.W(W), .DEPTH(FIFO_DEPTH)) u_buf (
    .clk, .rst_n,
    .s_axis_tvalid(d_tvalid), .s_axis_tready(d_tready), .s_axis_tdata(d_tdata), .s_axis_tlast(d_tlast),
    .m_axis_tvalid(c_tvalid), .m_axis_tready(c_tready), .m_axis_tdata(c_tdata), .m_axis_tlast(c_tlast),
    .level(fifo_level)
  );

  cluster_module #(.LANES(M), .SAMPLES(SAMPLES), .CLUSTERS(CLUSTERS), .SW(W)) u_clu (
    .clk, .rst_n,
    .s_axis_tvalid(c_tvalid), .s_axis_tready(c_tready), .s_axis_tdata(c_tdata), .s_axis_tlast(c_tlast),
    .s_axil_awvalid, .s_axil_awready, .s_axil_awaddr, .s_axil_wvalid, .s_axil_wready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_bvalid, .s_axil_bready, .s_axil_bresp,
    .s_axil_arvalid, .s_axil_arready, .s_axil_araddr, .s_axil_rvalid, .s_axil_rready,
    .s_axil_rdata, .s_axil_rresp,
    .m_id_tvalid, .m_id_tready, .m_id_tdata,
    .stage, .ev_new, .ev_update, .ev_merge, .ev_full
  );
endmodule
