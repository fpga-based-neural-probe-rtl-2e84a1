// Testbench of the Arithmetic Unit: random and extreme operands in both modes;
// the square (x-m)^2 and the blend m + floor(((x-m)*w + 2^15) / 2^16) are
// computed here with 64-bit integers and compared one clock later.
module tb_arithmetic_unit;
  import osort_pkg::*;
  localparam int MW = 18, WF = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  au_mode_e mode = AU_DIST;
  logic signed [MW-1:0] x = 0, m = 0, blend;
  logic [WF:0] w = 0;
  logic [2*MW:0] sq;
  arithmetic_unit #(.MW(MW), .WF(WF)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    for (int i = 0; i < 2000; i++) begin
      longint xv, mv, wv, d, es, eb;
      @(negedge clk);
      if (i < 4) begin
        xv = (i % 2) ? 131071 : -131072; mv = (i % 2) ? -131072 : 131071;
      end else begin
        xv = longint'($urandom_range(262143)) - 131072; mv = longint'($urandom_range(262143)) - 131072;
      end
      wv = (i % 5 == 0) ? 65536 : longint'($urandom_range(65536));
      if (i % 7 == 0) xv = mv + longint'($urandom_range(20)) - 10;
      if (xv > 131071) xv = 131071; if (xv < -131072) xv = -131072;
      mode = (i % 2) ? AU_BLEND : AU_DIST;
      x = MW'(xv); m = MW'(mv); w = (WF+1)'(wv);
      d = xv - mv;
      es = d * d;
      eb = mv + ((d * wv + 32768) >>> 16);
      @(negedge clk);
      if (mode == AU_DIST) check(longint'(sq) == es, $sformatf("sq %0d expected %0d", sq, es));
      else check(longint'(blend) == eb, $sformatf("blend %0d expected %0d (x %0d m %0d w %0d)", blend, eb, xv, mv, wv));
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
