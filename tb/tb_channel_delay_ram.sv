// Testbench of the per-channel delay memory: entries never written read 0;
// written entries read back one clock after the read; rd_data holds while
// rd_en is low.
module tb_channel_delay_ram;
  localparam int D = 6, W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_en = 0, wr_en = 0;
  logic [2:0] rd_addr = 0, wr_addr = 0;
  logic signed [W-1:0] rd_data, wr_data = 0;
  channel_delay_ram #(.DEPTH(D), .W(W)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic signed [W-1:0] model [D];
  bit written [D];
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      logic signed [W-1:0] e;
      @(negedge clk);
      wr_en = $urandom_range(1); wr_addr = 3'($urandom_range(D-1)); wr_data = W'($urandom);
      rd_en = 1; rd_addr = 3'($urandom_range(D-1));
      e = written[rd_addr] ? model[rd_addr] : '0;
      @(posedge clk);
      if (wr_en) begin model[wr_addr] = wr_data; written[wr_addr] = 1; end
      @(negedge clk);
      check(rd_data == e, $sformatf("addr %0d got %0d expected %0d", rd_addr, rd_data, e));
      wr_en = 0; rd_en = 0;
      @(negedge clk);
      check(rd_data == e, "read data holds");
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
