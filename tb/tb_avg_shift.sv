// Testbench of AVG & Shift: blocks of 2^LOG2N = 16 random NEO values (with
// gaps); after each block the threshold must equal floor(sum/16) * 8 and
// thr_ok must be high; before the first block thr_ok must be low.
module tb_avg_shift;
  localparam int NW = 33, LOG2N = 4, CSHIFT = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic neo_valid = 0;
  logic signed [NW-1:0] neo_value = 0;
  logic signed [NW+CSHIFT-1:0] thr;
  logic thr_ok, thr_update;
  avg_shift #(.NW(NW), .LOG2N(LOG2N), .CSHIFT(CSHIFT)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < 20; b++) begin
      longint sum, e;
      sum = 0;
      for (int i = 0; i < 16; i++) begin
        longint v;
        @(negedge clk);
        if ($urandom_range(3) == 0) begin neo_valid = 0; @(negedge clk); end
        check(b > 0 || !thr_ok, "no threshold before the first block");
        v = (b % 3 == 0) ? longint'($urandom_range(2000000)) - 500000 : longint'($urandom_range(1000000000));
        neo_valid = 1; neo_value = NW'(v); sum += v;
      end
      @(negedge clk); neo_valid = 0;
      e = (sum >>> 4) <<< 3;
      check(thr_ok && longint'(thr) == e, $sformatf("block %0d thr %0d expected %0d", b, thr, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
