// Self-checking testbench of the OSort Cluster Module (and its controller).
// A reference model of the multi-channel OSort algorithm, written here with
// plain integers and the same fixed-point rules (means with 2 fractional bits,
// weights floor(num*2^16/den), products rounded half-up), predicts the cluster
// number of every spike. Three phases: a directed sequence that creates two
// clusters and then merges them; random spikes from 12 prototypes, which fill
// all cluster slots and force assignments to the closest cluster; random
// spikes with stream gaps and output back-pressure. It also checks the
// AXI-Lite threshold registers, and the clock counts of stages 1 and 2
// (live*SAMPLES + 5 and SAMPLES + 3).
module tb_cluster_module;
  import osort_pkg::*;
  localparam int L = 4, S = 8, C = 8;
  localparam int N = L * S;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_tvalid = 0, s_tready, s_tlast = 0;
  logic [15:0] s_tdata = '0;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 1;
  logic [3:0] awaddr = '0, araddr = '0, wstrb = 4'hF;
  logic [31:0] wdata = '0, rdata;
  logic arvalid = 0, arready, rvalid, rready = 1;
  logic [1:0] bresp, rresp;
  logic id_tvalid, id_tready = 1;
  logic [7:0] id_tdata;
  stage_e stage;
  logic ev_new, ev_update, ev_merge, ev_full;

  cluster_module #(.LANES(L), .SAMPLES(S), .CLUSTERS(C)) dut (
    .clk, .rst_n,
    .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tdata(s_tdata), .s_axis_tlast(s_tlast),
    .s_axil_awvalid(awvalid), .s_axil_awready(awready), .s_axil_awaddr(awaddr),
    .s_axil_wvalid(wvalid), .s_axil_wready(wready), .s_axil_wdata(wdata), .s_axil_wstrb(wstrb),
    .s_axil_bvalid(bvalid), .s_axil_bready(bready), .s_axil_bresp(bresp),
    .s_axil_arvalid(arvalid), .s_axil_arready(arready), .s_axil_araddr(araddr),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .m_id_tvalid(id_tvalid), .m_id_tready(id_tready), .m_id_tdata(id_tdata),
    .stage, .ev_new, .ev_update, .ev_merge, .ev_full
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // ---------------- reference model ----------------
  longint r_mean [C][N];
  int     r_cnt  [C];
  longint r_w    [C];
  bit     r_alive[C];
  longint r_tc, r_tm;
  int     r_live_s1;
  int     n_new = 0, n_upd = 0, n_merge = 0, n_full = 0;

  function automatic longint dist2(input longint a [N], input longint b [N]);
    longint d = 0;
    for (int i = 0; i < N; i++) d += (a[i] - b[i]) * (a[i] - b[i]);
    return d;
  endfunction
  function automatic longint blend(input longint m, input longint x, input longint w);
    return m + (((x - m) * w + 32768) >>> 16);
  endfunction

  function automatic int ref_spike(input int x [N]);
    longint xm [N], best, d, u [N], mb [N];
    int bc, tgt, nfree, b;
    bit found;
    for (int i = 0; i < N; i++) xm[i] = 4 * x[i];
    found = 0; best = 0; bc = 0; r_live_s1 = 0;
    for (int c = 0; c < C; c++) if (r_alive[c]) begin
      r_live_s1++;
      for (int i = 0; i < N; i++) u[i] = r_mean[c][i];
      d = dist2(xm, u);
      if (!found || d < best) begin best = d; bc = c; found = 1; end
    end
    nfree = -1;
    for (int c = C - 1; c >= 0; c--) if (!r_alive[c]) nfree = c;
    if (found && (best < r_tc || nfree < 0)) begin
      tgt = bc;
      if (!(best < r_tc)) n_full++;
      n_upd++;
      for (int i = 0; i < N; i++) r_mean[tgt][i] = blend(r_mean[tgt][i], xm[i], r_w[tgt]);
      r_cnt[tgt]++;
    end else begin
      tgt = nfree;
      n_new++;
      for (int i = 0; i < N; i++) r_mean[tgt][i] = xm[i];
      r_cnt[tgt] = 1;
      r_alive[tgt] = 1;
    end
    r_w[tgt] = (longint'(1) << 16) / (r_cnt[tgt] + 1);
    // stage 3
    for (int i = 0; i < N; i++) u[i] = r_mean[tgt][i];
    found = 0; best = 0; b = 0;
    for (int c = 0; c < C; c++) if (r_alive[c] && c != tgt) begin
      for (int i = 0; i < N; i++) mb[i] = r_mean[c][i];
      d = dist2(u, mb);
      if (!found || d < best) begin best = d; b = c; found = 1; end
    end
    if (found && best < r_tm) begin
      longint w = (longint'(r_cnt[tgt]) << 16) / (r_cnt[tgt] + r_cnt[b]);
      for (int i = 0; i < N; i++) r_mean[b][i] = blend(r_mean[b][i], u[i], w);
      r_alive[tgt] = 0;
      r_cnt[b] += r_cnt[tgt];
      r_w[b] = (longint'(1) << 16) / (r_cnt[b] + 1);
      n_merge++;
      return b;
    end
    return tgt;
  endfunction

  // ---------------- bus helpers ----------------
  task automatic axil_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); awvalid = 1; wvalid = 1; awaddr = a; wdata = d;
    do @(posedge clk); while (!awready);
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
  endtask
  task automatic axil_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); arvalid = 1; araddr = a;
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
  endtask
  task automatic set_thr(input longint tc, input longint tm);
    logic [31:0] rd;
    axil_write(4'h0, tc[31:0]); axil_write(4'h4, tc[63:32]);
    axil_write(4'h8, tm[31:0]); axil_write(4'hC, tm[63:32]);
    r_tc = tc; r_tm = tm;
    axil_read(4'h0, rd); check(rd == tc[31:0], "T_C low readback");
    axil_read(4'hC, rd); check(rd == tm[31:0+32], "T_M high readback");
  endtask

  // Per-spike stage timing, measured from the stage port.
  int cyc_s1, cyc_s2, cyc_load;
  stage_e prev_stage;
  always @(posedge clk) if (rst_n) begin
    if (stage == ST_S1) cyc_s1++;
    if (stage == ST_S2) cyc_s2++;
    if (stage == ST_LOAD) cyc_load++;
  end

  int gap_pct = 0, bp_pct = 0;
  task automatic send_spike(input int x [N], input bit timing);
    int exp_id, live;
    exp_id = ref_spike(x);
    live = r_live_s1;
    cyc_s1 = 0; cyc_s2 = 0; cyc_load = 0;
    for (int s = 0; s < S; s++)
      for (int l = 0; l < L; l++) begin
        @(negedge clk);
        while ($urandom_range(99) < gap_pct) begin s_tvalid = 0; @(negedge clk); end
        s_tvalid = 1; s_tdata = 16'(x[s*L + l]); s_tlast = (s == S-1) && (l == L-1);
        do @(posedge clk); while (!s_tready);
      end
    @(negedge clk); s_tvalid = 0; s_tlast = 0;
    forever begin
      id_tready = ($urandom_range(99) >= bp_pct);
      @(posedge clk);
      if (id_tvalid && id_tready) break;
      @(negedge clk);
    end
    check(id_tdata == 8'(exp_id), $sformatf("cluster id got %0d expected %0d", id_tdata, exp_id));
    if (timing) begin
      check(cyc_s1 == live * S + 5, $sformatf("stage 1 took %0d clocks, expected %0d", cyc_s1, live*S+5));
      check(cyc_s2 == S + 3, $sformatf("stage 2 took %0d clocks, expected %0d", cyc_s2, S+3));
      check(cyc_load == N + 2, $sformatf("load took %0d clocks, expected %0d", cyc_load, N+2));
    end
    @(negedge clk); id_tready = 1;
  endtask

  // event counters from the DUT
  int d_new = 0, d_upd = 0, d_merge = 0, d_full = 0;
  always @(posedge clk) if (rst_n) begin
    d_new += int'(ev_new); d_upd += int'(ev_update); d_merge += int'(ev_merge); d_full += int'(ev_full);
  end

  initial begin
    int x [N];
    int proto [12][N];
    for (int c = 0; c < C; c++) begin r_alive[c] = 0; r_cnt[c] = 0; r_w[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Phase 1: two clusters, then a spike that pulls the first towards the
    // second until they merge. Distance unit: 16 per squared ADC count.
    set_thr(longint'(85*85) * 16 * N, longint'(85*85) * 16 * N);
    foreach (x[i]) x[i] = 0;   send_spike(x, 1);
    foreach (x[i]) x[i] = 100; send_spike(x, 1);
    foreach (x[i]) x[i] = 40;  send_spike(x, 1);
    check(d_merge == 1, "directed sequence merges once");
    // Phase 2: 12 prototypes, more than the 8 slots.
    for (int p = 0; p < 12; p++) for (int i = 0; i < N; i++) proto[p][i] = int'($urandom_range(4000)) - 2000;
    set_thr(longint'(60*60) * 16 * N, longint'(60*60) * 16 * N);
    for (int k = 0; k < 40; k++) begin
      int p;
      p = $urandom_range(11);
      foreach (x[i]) x[i] = proto[p][i] + int'($urandom_range(40)) - 20;
      send_spike(x, 1);
    end
    // Phase 3: closer prototypes, gaps in the stream, output back-pressure.
    gap_pct = 20; bp_pct = 50;
    for (int p = 0; p < 12; p++) for (int i = 0; i < N; i++) proto[p][i] = int'($urandom_range(400)) - 200;
    set_thr(longint'(150*150) * 16 * N, longint'(120*120) * 16 * N);
    for (int k = 0; k < 40; k++) begin
      int p;
      p = $urandom_range(11);
      foreach (x[i]) x[i] = proto[p][i] + int'($urandom_range(100)) - 50;
      send_spike(x, 0);
    end
    check(d_new == n_new && d_upd == n_upd && d_merge == n_merge && d_full == n_full,
          $sformatf("event counts dut %0d/%0d/%0d/%0d ref %0d/%0d/%0d/%0d",
                    d_new, d_upd, d_merge, d_full, n_new, n_upd, n_merge, n_full));
    check(n_new > 0 && n_upd > 0 && n_merge > 0 && n_full > 0, "every mechanism exercised");
    $display("new=%0d update=%0d merge=%0d forced=%0d", n_new, n_upd, n_merge, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
