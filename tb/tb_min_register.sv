// Testbench of the MIN register: passes of random candidate distances (some
// equal) separated by 'clear'; after each pass the register must hold the
// smallest distance and the tag of its first occurrence; an empty pass must
// leave 'found' low.
module tb_min_register;
  localparam int DW = 48, IDW = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, in_valid = 0, found;
  logic [DW-1:0] in_dist = 0, min_dist;
  logic [IDW-1:0] in_tag = 0, min_tag;
  min_register #(.DW(DW), .IDW(IDW)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int p = 0; p < 100; p++) begin
      longint best; int bt; int n;
      best = -1; bt = 0;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      n = (p % 10 == 0) ? 0 : $urandom_range(1, 30);
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        in_valid = 1; in_tag = IDW'(i);
        in_dist = (p % 4 == 1) ? DW'($urandom_range(5)) : {16'($urandom), 32'($urandom)};
        if (best < 0 || longint'(in_dist) < best) begin best = longint'(in_dist); bt = i; end
      end
      @(negedge clk); in_valid = 0;
      @(negedge clk);
      check(found == (n > 0), "found flag");
      if (n > 0) check(longint'(min_dist) == best && int'(min_tag) == bt,
                       $sformatf("min %0d/%0d expected %0d/%0d", min_dist, min_tag, best, bt));
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
