// Testbench of the Cluster Memory at its full default size (128 clusters x 64
// rows x 360 bits): every row of a sample of clusters is written with a
// pattern derived from its address, then read back one clock after each
// request, interleaved with further writes to other rows.
module tb_cluster_memory;
  localparam int C = 128, L = 20, S = 64, MW = 18, RWID = L * MW;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [6:0] wr_cluster = 0, rd_cluster = 0;
  logic [5:0] wr_row = 0, rd_row = 0;
  logic [RWID-1:0] wr_data = 0, rd_data;
  cluster_memory dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic logic [RWID-1:0] pat(input int c, input int r, input int salt);
    logic [RWID-1:0] p;
    for (int i = 0; i < RWID / 32 + 1; i++) p[i*32 +: 32] = 32'(c * 7919 + r * 104729 + i * 31 + salt * 15485863);
    return p;
  endfunction
  int cl [8] = '{0, 1, 17, 63, 64, 100, 126, 127};
  initial begin
    foreach (cl[k]) for (int r = 0; r < S; r++) begin
      @(negedge clk); wr_en = 1; wr_cluster = 7'(cl[k]); wr_row = 6'(r); wr_data = pat(cl[k], r, 0);
    end
    @(negedge clk); wr_en = 0;
    foreach (cl[k]) for (int r = 0; r < S; r++) begin
      @(negedge clk);
      rd_en = 1; rd_cluster = 7'(cl[k]); rd_row = 6'(r);
      // write another row on the same clock
      wr_en = 1; wr_cluster = 7'(cl[k] ^ 7'h55); wr_row = 6'(r); wr_data = pat(cl[k] ^ 7'h55, r, 1);
      @(negedge clk); rd_en = 0; wr_en = 0;
      check(rd_data == pat(cl[k], r, 0), $sformatf("cluster %0d row %0d", cl[k], r));
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
