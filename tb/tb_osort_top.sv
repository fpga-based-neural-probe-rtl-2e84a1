// End-to-end testbench of the spike detection and clustering system at a
// reduced size (4 channels, 8-sample windows, 8 cluster slots, threshold
// blocks of 64 NEO values).
// Neural-like data is generated here: low noise on every channel, and spikes
// from a number of synthetic neurons, each with its own amplitude profile
// across the channels and a common waveform in time, preceded by three quiet
// frames so that the detection frame is exact. The testbench computes on its
// own the NEO values, the block thresholds, the detected windows, and then
// the OSort result of each window (same fixed-point rules as the hardware),
// and compares every cluster number the system emits. The sequence first
// creates two clusters from one neuron at amplitudes 1.0 and 2.0 and then
// adds a spike at 1.4, which joins the first and makes it merge with the
// second; then spikes of many neurons follow, more neurons than cluster
// slots in the reduced configuration. Some spikes follow their predecessor
// closely, so their window waits while the previous spike is sorted. It counts detections, threshold
// updates, new clusters, updates, merges, full-table assignments, spike
// buffer back-pressure and a serializer overrun, and fails if any of them
// (except full-table assignments at full size) never happened.
module tb_osort_top;
  import osort_pkg::*;
  localparam int M = 4, WIN = 8, C = 8, LOG2N = 6, PRE = 2, FSP = 24, GAP = 30, NFAM = 20, NEXTRA = 40;
  localparam int W = 16, N = M * WIN;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ch_valid = 0;
  logic signed [W-1:0] ch_data [M];
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 1;
  logic [3:0] awaddr = '0, araddr = '0, wstrb = 4'hF;
  logic [31:0] wdata = '0, rdata;
  logic arvalid = 0, arready, rvalid, rready = 1;
  logic [1:0] bresp, rresp;
  logic id_tvalid, id_tready;
  logic [7:0] id_tdata;
  logic signed [2*W+3:0] det_threshold;
  logic det_threshold_ok, detect, overrun;
  logic [31:0] detect_count;
  stage_e stage;
  logic ev_new, ev_update, ev_merge, ev_full;

  osort_top #(.M(M), .SAMPLES(WIN), .CLUSTERS(C), .LOG2N(LOG2N), .PRE(PRE), .FIFO_DEPTH(16)) dut (
    .clk, .rst_n, .ch_valid, .ch_data,
    .s_axil_awvalid(awvalid), .s_axil_awready(awready), .s_axil_awaddr(awaddr),
    .s_axil_wvalid(wvalid), .s_axil_wready(wready), .s_axil_wdata(wdata), .s_axil_wstrb(wstrb),
    .s_axil_bvalid(bvalid), .s_axil_bready(bready), .s_axil_bresp(bresp),
    .s_axil_arvalid(arvalid), .s_axil_arready(arready), .s_axil_araddr(araddr),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .m_id_tvalid(id_tvalid), .m_id_tready(id_tready), .m_id_tdata(id_tdata),
    .det_threshold, .det_threshold_ok, .detect, .detect_count, .overrun, .fifo_level(),
    .stage, .ev_new, .ev_update, .ev_merge, .ev_full
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- stimulus ----------------
  localparam int NSP = 3 + NFAM + NEXTRA;
  // the detector takes no new spike until its window has been sent (2 clocks
  // per sample), so spikes closer than BUSY frames would be missed
  localparam int BUSY = WIN + (2 * M * WIN + FSP - 1) / FSP + 2;
  localparam int CLOSE = (WIN + 1 > BUSY) ? WIN + 1 : BUSY;
  int nf;
  int sp_frame [NSP];
  int sp_fam [NSP];
  real sp_amp [NSP];
  int prof [NFAM][M];
  int wave [8] = '{1000, -600, 300, 100, 0, 0, 0, 0};
  int hist [][M];

  // ---------------- reference model ----------------
  int starts [$];
  longint r_mean [C][N];
  int r_cnt [C];
  longint r_w [C];
  bit r_alive [C];
  longint r_tc;
  int n_new = 0, n_upd = 0, n_merge = 0, n_full = 0;
  int exp_ids [$];

  function automatic longint blend(input longint m, input longint x, input longint w);
    return m + (((x - m) * w + 32768) >>> 16);
  endfunction
  function automatic longint dist_to(input longint v [N], input int c);
    longint d;
    d = 0;
    for (int i = 0; i < N; i++) d += (v[i] - r_mean[c][i]) * (v[i] - r_mean[c][i]);
    return d;
  endfunction

  function automatic int ref_spike(input longint xm [N]);
    longint best, d, u [N];
    int bc, tgt, nfree, b;
    bit found;
    found = 0; best = 0; bc = 0;
    for (int c = 0; c < C; c++) if (r_alive[c]) begin
      d = dist_to(xm, c);
      if (!found || d < best) begin best = d; bc = c; found = 1; end
    end
    nfree = -1;
    for (int c = C - 1; c >= 0; c--) if (!r_alive[c]) nfree = c;
    if (found && (best < r_tc || nfree < 0)) begin
      tgt = bc; n_upd++;
      if (!(best < r_tc)) n_full++;
      for (int i = 0; i < N; i++) r_mean[tgt][i] = blend(r_mean[tgt][i], xm[i], r_w[tgt]);
      r_cnt[tgt]++;
    end else begin
      tgt = nfree; n_new++;
      for (int i = 0; i < N; i++) r_mean[tgt][i] = xm[i];
      r_cnt[tgt] = 1; r_alive[tgt] = 1;
    end
    r_w[tgt] = (longint'(1) << 16) / (r_cnt[tgt] + 1);
    for (int i = 0; i < N; i++) u[i] = r_mean[tgt][i];
    found = 0; best = 0; b = 0;
    for (int c = 0; c < C; c++) if (r_alive[c] && c != tgt) begin
      d = dist_to(u, c);
      if (!found || d < best) begin best = d; b = c; found = 1; end
    end
    if (found && best < r_tc) begin
      longint w;
      w = (longint'(r_cnt[tgt]) << 16) / (r_cnt[tgt] + r_cnt[b]);
      for (int i = 0; i < N; i++) r_mean[b][i] = blend(r_mean[b][i], u[i], w);
      r_alive[tgt] = 0;
      r_cnt[b] += r_cnt[tgt];
      r_w[b] = (longint'(1) << 16) / (r_cnt[b] + 1);
      n_merge++;
      return b;
    end
    return tgt;
  endfunction

  task automatic build_reference();
    longint h1 [M], h2 [M], sum, thr, psi;
    bit ok;
    int idx, next_free;
    foreach (h1[c]) begin h1[c] = 0; h2[c] = 0; end
    sum = 0; thr = 0; ok = 0; idx = 0; next_free = 0;
    for (int k = 0; k < nf; k++) begin
      for (int c = 0; c < M; c++) begin
        int d;
        psi = h1[c] * h1[c] - longint'(hist[k][c]) * h2[c];
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
    foreach (r_alive[c]) begin r_alive[c] = 0; r_cnt[c] = 0; r_w[c] = 0; end
    foreach (starts[k]) begin
      longint xm [N];
      for (int s = 0; s < WIN; s++)
        for (int c = 0; c < M; c++) xm[s*M + c] = 4 * longint'(hist[starts[k] + s][c]);
      exp_ids.push_back(ref_spike(xm));
    end
  endtask

  // ---------------- bus ----------------
  task automatic axil_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); awvalid = 1; wvalid = 1; awaddr = a; wdata = d;
    do @(posedge clk); while (!awready);
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
  endtask

  // ---------------- monitors ----------------
  int got = 0, n_detect = 0, n_thr_upd = 0, n_bp = 0, n_over = 0;
  int m_new = 0, m_upd = 0, m_merge = 0, m_full = 0;
  logic signed [2*W+3:0] thr_prev;
  // the result stream is slow to accept (about one clock in 40)
  always @(negedge clk) id_tready = ($urandom_range(39) == 0);
  always @(posedge clk) if (rst_n) begin
    if (id_tvalid && id_tready) begin
      if (got < exp_ids.size())
        check(int'(id_tdata) == exp_ids[got], $sformatf("spike %0d cluster %0d expected %0d", got, id_tdata, exp_ids[got]));
      got++;
    end
    n_detect += int'(detect);
    if (det_threshold != thr_prev) n_thr_upd++;
    thr_prev <= det_threshold;
    if (dut.u_buf.s_axis_tvalid && !dut.u_buf.s_axis_tready) n_bp++;
    n_over += int'(overrun);
    m_new += int'(ev_new); m_upd += int'(ev_update); m_merge += int'(ev_merge); m_full += int'(ev_full);
  end

  initial begin
    int f, quiet;
    longint unit2, tc;
    thr_prev = '0;
    // neurons: random amplitude profile over the channels
    for (int p = 0; p < NFAM; p++)
    begin
      for (int c = 0; c < M; c++) prof[p][c] = (p == 0) ? 6 + 2 * (c % 3) : int'($urandom_range(24)) - 12;
      if (p > 0) prof[p][p % M] = 12;
    end
    // spike list: neuron 0 at 1.0, 2.0, 1.4, then the others, then random ones
    for (int i = 0; i < NSP; i++) begin
      sp_fam[i] = (i < 3) ? 0 : (i < 3 + NFAM ? i - 3 : int'($urandom_range(NFAM - 1)));
      sp_amp[i] = (i == 0) ? 1.0 : (i == 1) ? 2.0 : (i == 2) ? 1.4 : 1.0 + 0.1 * $urandom_range(3);
    end
    quiet = (1 << LOG2N) / M + 20;                 // first threshold block
    // every fourth spike after the first three follows its predecessor
    // closely, so that its window waits in the spike buffer
    sp_frame[0] = quiet;
    for (int i = 1; i < NSP; i++) sp_frame[i] = sp_frame[i-1] + ((i > 3 && i % 4 == 0) ? CLOSE : GAP);
    nf = sp_frame[NSP-1] + GAP + WIN;
    hist = new[nf];
    for (int k = 0; k < nf; k++) for (int c = 0; c < M; c++) hist[k][c] = int'($urandom_range(40)) - 20;
    for (int i = 0; i < NSP; i++) begin
      for (int k = sp_frame[i] - 3; k < sp_frame[i] + WIN; k++)
        for (int c = 0; c < M; c++) hist[k][c] = (k < sp_frame[i]) ? 0 : hist[k][c] / 4;
      for (int s = 0; s < 8; s++)
        for (int c = 0; c < M; c++)
          hist[sp_frame[i] + s][c] += int'(sp_amp[i] * real'(wave[s] * prof[sp_fam[i]][c]) / 2.0);
    end
    // threshold: 0.85 of the distance between neuron 0 at amplitudes 1 and 2
    unit2 = 0;
    for (int s = 0; s < 8; s++) for (int c = 0; c < M; c++)
      unit2 += longint'(wave[s] * prof[0][c] / 2) * longint'(wave[s] * prof[0][c] / 2);
    tc = unit2 * 16 * 7225 / 10000;
    r_tc = tc;
    build_reference();
    repeat (3) @(negedge clk); rst_n = 1;
    axil_write(4'h0, tc[31:0]); axil_write(4'h4, tc[63:32]);
    axil_write(4'h8, tc[31:0]); axil_write(4'hC, tc[63:32]);
    for (int k = 0; k < nf; k++) begin
      @(negedge clk);
      for (int c = 0; c < M; c++) ch_data[c] = W'(hist[k][c]);
      ch_valid = 1;
      @(negedge clk); ch_valid = 0;
      // one frame too early, near the end: must be dropped with an overrun
      if (k == nf - 5) begin @(negedge clk); ch_valid = 1; @(negedge clk); ch_valid = 0; end
      repeat (FSP - 2) @(negedge clk);
    end
    f = 0;
    while (got < exp_ids.size() && f < 400000) begin @(negedge clk); f++; end
    repeat (10) @(negedge clk);
    check(got == exp_ids.size(), $sformatf("cluster numbers %0d expected %0d", got, exp_ids.size()));
    foreach (sp_frame[i]) if (!(sp_frame[i] - PRE inside {starts})) $display("note: spike %0d frame %0d family %0d not detected", i, sp_frame[i], sp_fam[i]);
    // a weak spike may stay under a threshold raised by its neighbours, and a
    // long tail may trigger again; the reference decides, within reason
    check(starts.size() >= NSP - NSP / 10 && starts.size() <= NSP + NSP / 10,
          $sformatf("reference windows %0d spikes %0d", starts.size(), NSP));
    check(n_detect == starts.size(), "detections");
    check(m_new == n_new && m_upd == n_upd && m_merge == n_merge && m_full == n_full,
          $sformatf("events dut %0d/%0d/%0d/%0d ref %0d/%0d/%0d/%0d", m_new, m_upd, m_merge, m_full, n_new, n_upd, n_merge, n_full));
    $display("detections=%0d threshold_updates=%0d new=%0d update=%0d merge=%0d full=%0d backpressure=%0d overrun=%0d",
             n_detect, n_thr_upd, m_new, m_upd, m_merge, m_full, n_bp, n_over);
    check(n_detect > 0, "mechanism: detection");
    check(n_thr_upd > 0, "mechanism: threshold update");
    check(m_new > 0, "mechanism: new cluster");
    check(m_upd > 0, "mechanism: cluster update");
    check(m_merge > 0, "mechanism: merge");
    check(C > 8 || m_full > 0, "mechanism: all slots used");
    check(C > 8 || n_bp > 0, "mechanism: spike buffer back-pressure");
    check(n_over == 1, "mechanism: serializer overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
