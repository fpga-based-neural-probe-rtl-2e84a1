// Testbench of the Deserializer (3 lanes, 4 rows): spikes are streamed with
// random gaps; every row write must carry the 3 samples of that time sample
// converted to the mean format (value * 4, 18 bits), 'done' must pulse once
// per spike, tready must close after the last beat, and a gap-free spike must
// take 3*4 clocks from the first beat to the last.
module tb_spike_deserializer;
  localparam int L = 3, S = 4, SW = 16, MW = 18;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  logic [SW-1:0] s_axis_tdata = 0;
  logic row_we, done;
  logic [1:0] row_addr;
  logic [L*MW-1:0] row_data;
  spike_deserializer #(.LANES(L), .SAMPLES(S), .SW(SW), .MW(MW), .FRAC(2)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  int x [S][L];
  int rows_seen = 0, dones = 0;
  always @(posedge clk) if (rst_n) begin
    if (row_we) begin
      for (int l = 0; l < L; l++)
        check($signed(row_data[l*MW +: MW]) == 18'(x[row_addr][l] * 4),
              $sformatf("row %0d lane %0d", row_addr, l));
      check(int'(row_addr) == rows_seen, "row order");
      rows_seen++;
    end
    if (done) dones++;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 10; k++) begin
      int t0, t1;
      foreach (x[s, l]) x[s][l] = int'($urandom_range(65535)) - 32768;
      rows_seen = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int s = 0; s < S; s++)
        for (int l = 0; l < L; l++) begin
          if (k % 2 == 1) while ($urandom_range(2) == 0) begin s_axis_tvalid = 0; @(negedge clk); end
          s_axis_tvalid = 1; s_axis_tdata = SW'(x[s][l]); s_axis_tlast = (s == S-1 && l == L-1);
          if (s == 0 && l == 0) t0 = $time;
          check(s_axis_tready, "ready while loading");
          t1 = $time;
          @(negedge clk);
        end
      s_axis_tvalid = 0; s_axis_tlast = 0;
      check(!s_axis_tready, "ready closes after the last beat");
      if (k % 2 == 0) check((t1 - t0) / 10 == L*S - 1, "one sample per clock");
      repeat (3) @(negedge clk);
      check(rows_seen == S && dones == k + 1, "all rows and one done");
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
