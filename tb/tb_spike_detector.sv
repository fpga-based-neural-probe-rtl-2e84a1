// Testbench of the NEO spike detector (4 channels, threshold blocks of 64 NEO
// values, windows of 8 frames starting 2 frames before the detection). Frames
// of low noise with a few large spikes are applied every 24 clocks. The
// testbench computes the NEO values, the block thresholds (mean * 8) and the
// expected detections itself, and checks every window that leaves the
// detector sample by sample, the number of windows and the final threshold.
module tb_spike_detector;
  localparam int M = 4, W = 16, LOG2N = 6, PRE = 2, WIN = 8, F = 16;
  localparam int NF = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic frame_valid = 0;
  logic signed [W-1:0] frame_data [M];
  logic m_axis_tvalid, m_axis_tready = 1, m_axis_tlast, det_threshold_ok, detect, overrun;
  logic [W-1:0] m_axis_tdata;
  logic signed [2*W+3:0] det_threshold;
  logic [31:0] detect_count;
  spike_detector #(.M(M), .W(W), .LOG2N(LOG2N), .CSHIFT(3), .PRE(PRE), .WIN(WIN), .FRAMES(F)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  longint hist [NF][M];
  int starts [$];
  longint last_thr;
  int beat = 0, win = 0;

  always @(posedge clk) begin
    m_axis_tready <= ($urandom_range(3) != 0);
    if (rst_n && m_axis_tvalid && m_axis_tready) begin
      int f, c;
      f = starts[win] + beat / M; c = beat % M;
      check(m_axis_tdata == W'(hist[f][c]), $sformatf("window %0d frame %0d ch %0d", win, f, c));
      check(m_axis_tlast == (beat == WIN*M - 1), "tlast");
      beat++;
      if (beat == WIN*M) begin beat = 0; win++; end
    end
  end

  // reference: NEO stream, block thresholds, detections
  task automatic build_reference();
    longint h1 [M], h2 [M], sum, thr, psi;
    bit ok;
    int idx, next_free;
    foreach (h1[c]) begin h1[c] = 0; h2[c] = 0; end
    sum = 0; thr = 0; ok = 0; idx = 0; next_free = 0;
    for (int k = 0; k < NF; k++) begin
      for (int c = 0; c < M; c++) begin
        int d;
        psi = h1[c] * h1[c] - hist[k][c] * h2[c];   // NEO of frame k-1
        h2[c] = h1[c]; h1[c] = hist[k][c];
        d = k - 1;
        if (ok && psi > thr && d >= PRE && d - PRE >= next_free) begin
          starts.push_back(d - PRE);
          next_free = d - PRE + WIN;
        end
        sum += psi; idx++;
        if (idx % (1 << LOG2N) == 0) begin
          thr = (sum >>> LOG2N) <<< 3; ok = 1; sum = 0;
        end
      end
    end
    last_thr = thr;
  endtask

  initial begin
    int spikes [$] = '{40, 75, 76, 130, 190, 230, 262};
    for (int k = 0; k < NF; k++)
      for (int c = 0; c < M; c++) hist[k][c] = longint'($urandom_range(60)) - 30;
    foreach (spikes[i]) begin
      int c;
      c = i % M;
      hist[spikes[i]][c] = 6000 + 1000 * i; hist[spikes[i] + 1][c] = -4000;
      hist[spikes[i]][(c + 1) % M] = -3000;
    end
    build_reference();
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < NF; k++) begin
      @(negedge clk);
      foreach (frame_data[c]) frame_data[c] = W'(hist[k][c]);
      frame_valid = 1;
      @(negedge clk); frame_valid = 0;
      repeat (22) @(negedge clk);
    end
    repeat (300) @(negedge clk);
    check(starts.size() >= 5, "reference detects the spikes");
    check(win == starts.size(), $sformatf("windows %0d expected %0d", win, starts.size()));
    check(int'(detect_count) == starts.size(), "detection count");
    check(det_threshold_ok && longint'(det_threshold) == last_thr,
          $sformatf("threshold %0d expected %0d", det_threshold, last_thr));
    $display("windows=%0d", win);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
