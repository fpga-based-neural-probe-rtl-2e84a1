// Testbench of the sample store: fills several laps of the ring with random
// samples and reads back the most recent FRAMES frames, one clock after each
// read request.
module tb_sample_ring_buffer;
  localparam int M = 3, W = 16, F = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [2:0] wr_frame = 0, rd_frame = 0;
  logic [1:0] wr_chan = 0, rd_chan = 0;
  logic signed [W-1:0] wr_data = 0, rd_data;
  sample_ring_buffer #(.M(M), .W(W), .FRAMES(F)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic signed [W-1:0] hist [100][M];
  initial begin
    for (int lap = 0; lap < 3; lap++) begin
      for (int f = lap*20; f < lap*20 + 20; f++)
        for (int c = 0; c < M; c++) begin
          @(negedge clk); wr_en = 1; wr_frame = 3'(f % F); wr_chan = 2'(c);
          wr_data = W'($urandom); hist[f][c] = wr_data;
        end
      @(negedge clk); wr_en = 0;
      for (int f = lap*20 + 20 - F; f < lap*20 + 20; f++)
        for (int c = 0; c < M; c++) begin
          @(negedge clk); rd_en = 1; rd_frame = 3'(f % F); rd_chan = 2'(c);
          @(negedge clk); rd_en = 0;
          check(rd_data == hist[f][c], $sformatf("frame %0d ch %0d", f, c));
        end
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
