// Testbench of the spike buffer FIFO (depth 16): random pushes and pops with
// back-pressure on both sides; the output order and tlast flags must match a
// queue model, tready must drop exactly when 16 beats are held.
module tb_spike_stream_buffer;
  localparam int W = 16, D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  logic [W-1:0] s_axis_tdata = 0, m_axis_tdata;
  logic m_axis_tvalid, m_axis_tready = 0, m_axis_tlast;
  logic [4:0] level;
  spike_stream_buffer #(.W(W), .DEPTH(D)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [W:0] q [$];
  int n_full = 0;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      s_axis_tvalid = ($urandom_range(99) < ((i / 250) % 2 ? 80 : 30));
      s_axis_tdata = W'($urandom); s_axis_tlast = ($urandom_range(7) == 0);
      m_axis_tready = ($urandom_range(99) < ((i / 250) % 2 ? 30 : 80));
      @(posedge clk);
      check(s_axis_tready == (q.size() < D), "tready follows the fill level");
      check(m_axis_tvalid == (q.size() > 0), "tvalid follows the fill level");
      if (q.size() == D) n_full++;
      if (m_axis_tvalid && m_axis_tready) begin
        logic [W:0] e;
        e = q.pop_front();
        check({m_axis_tlast, m_axis_tdata} == e, "data order");
      end
      if (s_axis_tvalid && s_axis_tready) q.push_back({s_axis_tlast, s_axis_tdata});
    end
    check(n_full > 0, "buffer became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
