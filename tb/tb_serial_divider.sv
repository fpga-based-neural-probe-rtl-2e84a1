// Testbench of the Serial Divider: random and corner operands (num = den,
// num = 0, num = 1, large counts); q must equal floor(num*2^16/den) and
// 'done' must rise WF+1 = 17 clock edges after the edge that takes 'start'.
module tb_serial_divider;
  localparam int NW = 21, WF = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic [NW-1:0] num = 0, den = 1;
  logic [WF:0] q;
  serial_divider #(.NW(NW), .WF(WF)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      longint n, d, e; int cyc;
      d = (i % 4 == 0) ? longint'($urandom_range(10)) + 1 : longint'($urandom_range(2097151)) + 1;
      case (i % 5)
        0: n = d;
        1: n = 0;
        2: n = 1;
        default: n = longint'($urandom) % (d + 1);
      endcase
      @(negedge clk); start = 1; num = NW'(n); den = NW'(d);
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      e = (n << 16) / d;
      check(longint'(q) == e, $sformatf("%0d/%0d q %0d expected %0d", n, d, q, e));
      check(cyc == WF + 2, $sformatf("latency %0d", cyc));  // start edge + WF+1 steps
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
