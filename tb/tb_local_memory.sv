// Testbench of the Local Memory (8 slots): random record writes; both read
// ports, the alive vector, the merge table and the lowest free slot are
// compared with a model after every write.
module tb_local_memory;
  localparam int C = 8, CNT_W = 20, WF = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] rd_a_addr = 0, rd_b_addr = 0, wr_addr = 0, wr_merged_to = 0, free_idx;
  logic [CNT_W-1:0] rd_a_count, rd_b_count, wr_count = 0;
  logic [WF:0] rd_a_weight, rd_b_weight, wr_weight = 0;
  logic wr_en = 0, wr_alive = 0, wr_merged = 0, any_free;
  logic [C-1:0] alive, merged;
  logic [2:0] merged_to [C];
  local_memory #(.CLUSTERS(C), .CNT_W(CNT_W), .WF(WF)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  int m_cnt [C], m_w [C], m_to [C];
  bit m_alive [C], m_merged [C];
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    check(alive == '0 && merged == '0 && any_free && free_idx == 0, "reset state");
    for (int i = 0; i < 300; i++) begin
      int ef;
      @(negedge clk);
      wr_en = 1; wr_addr = 3'($urandom); wr_alive = ($urandom_range(3) != 0);
      wr_count = CNT_W'($urandom); wr_weight = (WF+1)'($urandom); wr_merged = $urandom_range(1);
      wr_merged_to = 3'($urandom);
      m_cnt[wr_addr] = int'(wr_count); m_w[wr_addr] = int'(wr_weight); m_alive[wr_addr] = wr_alive;
      m_merged[wr_addr] = wr_merged; m_to[wr_addr] = int'(wr_merged_to);
      @(negedge clk); wr_en = 0;
      rd_a_addr = 3'($urandom); rd_b_addr = 3'($urandom); #1;
      if (m_alive[rd_a_addr]) check(int'(rd_a_count) == m_cnt[rd_a_addr] && int'(rd_a_weight) == m_w[rd_a_addr], "port a");
      if (m_alive[rd_b_addr]) check(int'(rd_b_count) == m_cnt[rd_b_addr], "port b");
      ef = -1;
      for (int c = C - 1; c >= 0; c--) begin
        if (!m_alive[c]) ef = c;
        check(alive[c] == m_alive[c] && merged[c] == m_merged[c], "flags");
        if (m_merged[c]) check(int'(merged_to[c]) == m_to[c], "merge table");
      end
      check(any_free == (ef >= 0), "any_free");
      if (ef >= 0) check(int'(free_idx) == ef, $sformatf("free slot %0d expected %0d", free_idx, ef));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
