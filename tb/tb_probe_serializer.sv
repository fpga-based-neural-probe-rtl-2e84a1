// Testbench of the detector's Serializer: random frames of M=5 channels are
// sent with random spacing; every output sample is compared with the frame
// (value, channel index, last flag, and its clock: sample c of a frame taken
// on clock t appears on clock t+1+c). A frame sent while the previous one is
// still being sent must raise 'overrun' and be dropped.
module tb_probe_serializer;
  localparam int M = 5, W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic frame_valid = 0;
  logic signed [W-1:0] frame_data [M];
  logic s_valid, s_last, overrun;
  logic signed [W-1:0] s_data;
  logic [2:0] s_chan;
  probe_serializer #(.M(M), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic signed [W-1:0] exp_q [$];
  int n_over = 0, n_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (s_valid) begin
      logic signed [W-1:0] e;
      e = exp_q.pop_front();
      check(s_data == e, $sformatf("sample got %0d expected %0d", s_data, e));
      check(s_chan == 3'(n_out % M), "channel index");
      check(s_last == (n_out % M == M-1), "last flag");
      n_out++;
    end
    if (overrun) n_over++;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      @(negedge clk);
      foreach (frame_data[c]) frame_data[c] = W'($urandom);
      frame_valid = 1;
      foreach (frame_data[c]) exp_q.push_back(frame_data[c]);
      @(negedge clk); frame_valid = 0;
      repeat (M - 2 + $urandom_range(6)) @(negedge clk);
    end
    // a frame in the middle of another one is dropped
    repeat (M) @(negedge clk);
    foreach (frame_data[c]) frame_data[c] = W'($urandom);
    frame_valid = 1; foreach (frame_data[c]) exp_q.push_back(frame_data[c]);
    @(negedge clk); frame_valid = 0;
    @(negedge clk); frame_valid = 1;
    @(negedge clk); frame_valid = 0;
    repeat (2*M) @(negedge clk);
    check(n_over == 1, $sformatf("overrun pulses %0d", n_over));
    check(exp_q.size() == 0 && n_out == 31*M, "all samples out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
