// Testbench of the NEO unit: random frames of M=3 channels go in as a serial
// stream; for every channel the testbench keeps the last two samples itself
// and expects psi = x(n)^2 - x(n+1)x(n-1) two clocks after each input
// (zeros stand for the samples before reset).
module tb_neo_unit;
  localparam int M = 3, W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_valid = 0, s_last = 0;
  logic signed [W-1:0] s_data = 0;
  logic [1:0] s_chan = 0;
  logic neo_valid, neo_last;
  logic signed [2*W:0] neo_value;
  logic [1:0] neo_chan;
  neo_unit #(.M(M), .W(W)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  longint h1 [M], h2 [M];
  longint exp_q [$];
  int exp_c [$];
  int n_in = 0, n_out = 0;
  logic v_d1, v_d2;
  always @(posedge clk) begin
    v_d1 <= rst_n && s_valid; v_d2 <= v_d1;
    if (rst_n && neo_valid) begin
      longint e; int c;
      e = exp_q.pop_front(); c = exp_c.pop_front();
      check(longint'(neo_value) == e, $sformatf("psi got %0d expected %0d", neo_value, e));
      check(neo_chan == 2'(c) && neo_last == (c == M-1), "channel tag");
      check(v_d2, "latency of two clocks");
      n_out++;
    end
  end
  initial begin
    foreach (h1[c]) begin h1[c] = 0; h2[c] = 0; end
    v_d1 = 0; v_d2 = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 60; f++)
      for (int c = 0; c < M; c++) begin
        longint x;
        @(negedge clk);
        if ($urandom_range(3) == 0) begin s_valid = 0; @(negedge clk); end
        x = (f % 17 == 5) ? longint'($urandom_range(60000)) - 30000 : longint'($urandom_range(200)) - 100;
        s_valid = 1; s_data = W'(x); s_chan = 2'(c); s_last = (c == M-1);
        exp_q.push_back(h1[c]*h1[c] - x*h2[c]); exp_c.push_back(c);
        h2[c] = h1[c]; h1[c] = x;
        n_in++;
      end
    @(negedge clk); s_valid = 0;
    repeat (5) @(negedge clk);
    check(n_out == n_in, "every input produced a NEO value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
