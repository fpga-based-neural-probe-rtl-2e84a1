// Testbench of the Adder Tree at its default size (20 inputs of 37 bits):
// random and all-maximum inputs; the registered sum, valid flag and tag must
// match the plain sum one clock later.
module tb_adder_tree;
  localparam int N = 20, IW = 37, TGW = 9, OW = IW + 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [TGW-1:0] in_tag = 0, out_tag;
  logic [IW-1:0] in [N];
  logic [OW-1:0] sum;
  adder_tree dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    foreach (in[i]) in[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      longint e;
      e = 0;
      @(negedge clk);
      foreach (in[i]) begin
        in[i] = (k == 0) ? '1 : IW'({$urandom, $urandom});
        e += longint'(in[i]);
      end
      in_valid = k[0]; in_tag = TGW'(k);
      @(negedge clk);
      check(longint'(sum) == e, $sformatf("sum %0d expected %0d", sum, e));
      check(out_valid == k[0] && out_tag == TGW'(k), "valid and tag");
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
