// Worst-case clustering latency of the Cluster Module at its default size
// (20 lanes, 64 samples, 128 cluster slots). With T_C = T_M = 0 every spike
// opens a new cluster, so 128 random spikes fill all slots; each must come
// back with the next slot number. Then T_M is raised to its maximum and one
// more spike is sent: no slot is free, so it is forced into the closest
// cluster, and the updated mean is merged with its closest neighbour. This is
// the longest path through the engine. The testbench measures the clocks from
// the first accepted input word to the cluster number and the length of each
// stage, and checks them against the expected counts:
//   load 1282, stage 1 128*64+5, stage 2 64+3, stage 3 127*64+5,
//   stage 4 64+3, each division stage 16+3 (start, 17 quotient
//   steps, result), total at most 18,127 clocks
// (the published worst case for this configuration).
module tb_cluster_latency;
  import osort_pkg::*;
  localparam int L = 20, S = 64, C = 128, N = L * S;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

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

  cluster_module dut (
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

  task automatic axil_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); awvalid = 1; wvalid = 1; awaddr = a; wdata = d;
    do @(posedge clk); while (!awready);
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
  endtask

  // clocks spent in each stage during the current spike
  int stage_clk [16];
  int total, n_new = 0, n_full = 0, n_merge = 0;
  bit timing;
  always @(posedge clk) if (rst_n) begin
    stage_clk[int'(stage)]++;
    if (timing) total++;
    n_new   += int'(ev_new);
    n_full  += int'(ev_full);
    n_merge += int'(ev_merge);
  end

  // one spike at one word per clock; returns the cluster number
  task automatic send_spike(output int id);
    foreach (stage_clk[i]) stage_clk[i] = 0;
    total = 0;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      s_tvalid = 1; s_tdata = 16'(int'($urandom_range(4000)) - 2000); s_tlast = (k == N - 1);
      do begin
        @(posedge clk);
        if (s_tready && k == 0) timing = 1;
      end while (!s_tready);
    end
    @(negedge clk); s_tvalid = 0; s_tlast = 0;
    while (!id_tvalid) @(negedge clk);
    timing = 0;
    id = int'(id_tdata);
    @(posedge clk);
  endtask

  initial begin
    int id, n_merge0;
    timing = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    axil_write(4'h0, 32'h0); axil_write(4'h4, 32'h0);
    axil_write(4'h8, 32'h0); axil_write(4'hC, 32'h0);
    // fill every slot
    for (int c = 0; c < C; c++) begin
      send_spike(id);
      check(id == c, $sformatf("spike %0d got cluster %0d", c, id));
    end
    check(n_new == C && n_full == 0 && n_merge == 0,
          $sformatf("filling: new %0d full %0d merge %0d", n_new, n_full, n_merge));
    // worst case: forced assignment, full stage 3, merge
    axil_write(4'h8, 32'hFFFF_FFFF); axil_write(4'hC, 32'hFFFF_FFFF);
    n_merge0 = n_merge;
    send_spike(id);
    check(n_full == 1, "last spike forced into the closest cluster");
    check(n_merge == n_merge0 + 1, "last spike caused a merge");
    check(stage_clk[ST_LOAD] == N + 2, $sformatf("load %0d expected %0d", stage_clk[ST_LOAD], N + 2));
    check(stage_clk[ST_S1] == C * S + 5, $sformatf("stage 1 %0d expected %0d", stage_clk[ST_S1], C * S + 5));
    check(stage_clk[ST_S2] == S + 3, $sformatf("stage 2 %0d expected %0d", stage_clk[ST_S2], S + 3));
    check(stage_clk[ST_S3] == (C - 1) * S + 5, $sformatf("stage 3 %0d expected %0d", stage_clk[ST_S3], (C - 1) * S + 5));
    check(stage_clk[ST_S4] == S + 3, $sformatf("stage 4 %0d expected %0d", stage_clk[ST_S4], S + 3));
    check(stage_clk[ST_UPD] == 19 && stage_clk[ST_MDIV] == 19 && stage_clk[ST_MUPD] == 19,
          $sformatf("divisions %0d %0d %0d expected 19", stage_clk[ST_UPD], stage_clk[ST_MDIV], stage_clk[ST_MUPD]));
    check(total <= 18127, $sformatf("worst case %0d clocks, above 18127", total));
    $display("worst case: %0d clocks (load %0d, stage1 %0d, stage2 %0d, stage3 %0d, stage4 %0d, divisions %0d)",
             total, stage_clk[ST_LOAD], stage_clk[ST_S1], stage_clk[ST_S2], stage_clk[ST_S3], stage_clk[ST_S4],
             stage_clk[ST_UPD] + stage_clk[ST_MDIV] + stage_clk[ST_MUPD]);
    $display("at 200 MHz: %0d ns per spike, %0d spikes/s", total * 5, 200_000_000 / total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
