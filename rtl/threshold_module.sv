// Threshold Module of the spike detector. It writes every original sample into
// the sample store and compares every NEO value with the detection threshold
// T_D. When a NEO value of frame d exceeds T_D, the spike window is frames
// d-PRE .. d-PRE+WIN-1 of all M channels. The module waits until the last frame
// of the window has been stored, then streams the window out over AXI-Stream,
// frame by frame and channel by channel (M*WIN beats, tlast on the last beat).
// Design choices (the document fixes only the window size, 64 samples, and the
// 5x4 channel set):
//  * NEO values are compared as they are produced, against the threshold of
//    the previous averaging block, instead of being re-read from memory;
//  * the window starts PRE frames before the detected frame;
//  * detections are ignored while a window is pending or being sent, and
//    inside the last window sent, so a spike is sent once;
//  * one beat every two clocks (read, then present); the sample store must
//    not be overwritten while a window is sent, which holds when frames come
//    at least 2*M clocks apart and the stream is not stalled for long.
// Frame numbers are 32-bit counters since reset.
module threshold_module #(
  parameter int unsigned M      = 20,
  parameter int unsigned W      = 16,
  parameter int unsigned NW     = 33,
  parameter int unsigned TW     = 36,
  parameter int unsigned PRE    = 20,
  parameter int unsigned WIN    = 64,
  parameter int unsigned FRAMES = 128,
  localparam int unsigned CW    = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned FW    = (FRAMES > 1) ? $clog2(FRAMES) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // original samples (from the serializer)
  input  logic                 s_valid,
  input  logic signed [W-1:0]  s_data,
  input  logic [CW-1:0]        s_chan,
  input  logic                 s_last,
  // NEO values
  input  logic                 neo_valid,
  input  logic signed [NW-1:0] neo_value,
  input  logic                 neo_last,
  // detection threshold
  input  logic signed [TW-1:0] thr,
  input  logic                 thr_ok,
  // spike window stream
  output logic                 m_axis_tvalid,
  input  logic                 m_axis_tready,
  output logic [W-1:0]         m_axis_tdata,
  output logic                 m_axis_tlast,
  // status
  output logic                 detect,       // one clock per accepted detection
  output logic [31:0]          detect_count
);
  typedef enum logic [1:0] {T_IDLE, T_WAIT, T_RD, T_OUT} tstate_e;
  tstate_e state;

  logic [31:0] wr_cnt;      // frames fully stored
  logic [31:0] neo_cnt;     // NEO frames completed
  logic [31:0] win_start;   // first frame of the window
  logic [31:0] next_free;   // first frame a new window may start at
  logic [31:0] rd_f;
  logic [CW-1:0] rd_c;
  logic signed [W-1:0] rd_data;
  logic        over, frame_ok;
  logic [31:0] det_frame;

  sample_ring_buffer #(.M(M), .W(W), .FRAMES(FRAMES)) u_store (
    .clk,
    .wr_en(s_valid), .wr_frame(wr_cnt[FW-1:0]), .wr_chan(s_chan), .wr_data(s_data),
    .rd_en(state == T_RD), .rd_frame(rd_f[FW-1:0]), .rd_chan(rd_c), .rd_data
  );

  // NEO values seen while neo_cnt = k belong to frame k-1.
  assign det_frame = neo_cnt - 32'd1;
  assign over      = neo_valid && thr_ok && (TW'(neo_value) > thr);
  assign frame_ok  = (neo_cnt >= 32'(PRE + 1)) && (det_frame - 32'(PRE) >= next_free);
  assign detect    = (state == T_IDLE) && over && frame_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= T_IDLE;
      wr_cnt       <= '0;
      neo_cnt      <= '0;
      win_start    <= '0;
      next_free    <= '0;
      rd_f         <= '0;
      rd_c         <= '0;
      detect_count <= '0;
    end else begin
      if (s_valid && s_last)     wr_cnt  <= wr_cnt + 1;
      if (neo_valid && neo_last) neo_cnt <= neo_cnt + 1;
      unique case (state)
        T_IDLE: if (detect) begin
          state        <= T_WAIT;
          win_start    <= det_frame - 32'(PRE);
          detect_count <= detect_count + 1;
        end
        T_WAIT: if (wr_cnt >= win_start + 32'(WIN)) begin
          state <= T_RD;
          rd_f  <= win_start;
          rd_c  <= '0;
        end
        T_RD: state <= T_OUT;
        T_OUT: if (m_axis_tready) begin
          if (m_axis_tlast) begin
            state     <= T_IDLE;
            next_free <= win_start + 32'(WIN);
          end else begin
            state <= T_RD;
            if (rd_c == CW'(M-1)) begin
              rd_c <= '0;
              rd_f <= rd_f + 1;
            end else begin
              rd_c <= rd_c + 1'b1;
            end
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  assign m_axis_tvalid = (state == T_OUT);
  assign m_axis_tdata  = rd_data;
  assign m_axis_tlast  = (state == T_OUT) && (rd_c == CW'(M-1)) && (rd_f == win_start + 32'(WIN-1));
endmodule
