// Testbench of the Threshold Module (M=3 channels, window WIN=8 frames
// starting PRE=2 frames before the detected one). Frames of random samples
// are streamed with chosen NEO values; NEO values above the threshold are
// placed so that: one comes too early to have PRE frames before it, one
// opens a window, two fall inside or during that window and must be ignored,
// one opens a second window, and one arrives before the threshold is valid.
// Each window sent must hold exactly the stored samples, in frame/channel
// order, with tlast on its last beat; the output is randomly stalled.
module tb_threshold_module;
  localparam int M = 3, W = 16, NW = 33, TW = 36, PRE = 2, WIN = 8, F = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_valid = 0, s_last = 0, neo_valid = 0, neo_last = 0;
  logic signed [W-1:0] s_data = 0;
  logic [1:0] s_chan = 0;
  logic signed [NW-1:0] neo_value = 0;
  logic signed [TW-1:0] thr = 36'sd1000;
  logic thr_ok = 0;
  logic m_axis_tvalid, m_axis_tready = 0, m_axis_tlast, detect;
  logic [W-1:0] m_axis_tdata;
  logic [31:0] detect_count;
  threshold_module #(.M(M), .W(W), .NW(NW), .TW(TW), .PRE(PRE), .WIN(WIN), .FRAMES(F)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int NF = 70;
  logic signed [W-1:0] hist [NF][M];
  int big [int];            // NEO frame -> channel with a large value
  int starts [$] = '{8, 38};
  int beat = 0, win = 0;

  always @(posedge clk) begin
    m_axis_tready <= $urandom_range(1);
    if (rst_n && m_axis_tvalid && m_axis_tready) begin
      int f, c;
      f = starts[win] + beat / M; c = beat % M;
      check(m_axis_tdata == W'(hist[f][c]), $sformatf("window %0d frame %0d ch %0d", win, f, c));
      check(m_axis_tlast == (beat == WIN*M - 1), "tlast position");
      beat++;
      if (beat == WIN*M) begin beat = 0; win++; end
    end
  end

  initial begin
    big[0] = 1; big[1] = 0; big[10] = 2; big[14] = 1; big[17] = 0; big[40] = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < NF; k++) begin
      thr_ok = (k > 1);
      for (int c = 0; c < M; c++) begin
        @(negedge clk);
        hist[k][c] = W'($urandom);
        s_valid = 1; s_data = hist[k][c]; s_chan = 2'(c); s_last = (c == M-1);
        // NEO values that arrive with frame k belong to frame k-1
        neo_valid = 1; neo_last = (c == M-1);
        neo_value = (big.exists(k-1) && big[k-1] == c) ? 33'sd5000 : 33'sd999;
      end
      @(negedge clk); s_valid = 0; neo_valid = 0;
      repeat (17) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    check(win == 2, $sformatf("windows sent %0d", win));
    check(detect_count == 2, $sformatf("detections %0d", detect_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
