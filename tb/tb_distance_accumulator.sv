// Testbench of ACC: windows of 64 random sums (back to back and with idle
// clocks), each closed by in_last; out_dist must be the window sum and
// out_tag the window's tag, on the clock after the last value.
module tb_distance_accumulator;
  localparam int IW = 42, OW = 48, TGW = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_first = 0, in_last = 0, out_valid;
  logic [TGW-1:0] in_tag = 0, out_tag;
  logic [IW-1:0] in_val = 0;
  logic [OW-1:0] out_dist;
  distance_accumulator #(.IW(IW), .OW(OW), .TGW(TGW)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  longint exp_q [$];
  int tag_q [$];
  int outs = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    check(longint'(out_dist) == exp_q.pop_front(), "window sum");
    check(int'(out_tag) == tag_q.pop_front(), "window tag");
    outs++;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int w = 0; w < 40; w++) begin
      longint e;
      e = 0;
      for (int s = 0; s < 64; s++) begin
        @(negedge clk);
        if (w % 3 == 2 && $urandom_range(1)) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_first = (s == 0); in_last = (s == 63); in_tag = TGW'(w);
        in_val = (w == 0) ? {IW{1'b1}} >> 1 : IW'({$urandom_range(255), $urandom});
        e += longint'(in_val);
      end
      exp_q.push_back(e); tag_q.push_back(w);
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    check(outs == 40, "one result per window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
