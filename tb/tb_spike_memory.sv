// Testbench of the spike memory: random row writes and reads (also on the
// same clock) against a model; read data arrives one clock after the request
// and holds while rd_en is low.
module tb_spike_memory;
  localparam int L = 4, S = 8, MW = 18;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [2:0] wr_addr = 0, rd_addr = 0;
  logic [L*MW-1:0] wr_data = 0, rd_data;
  spike_memory #(.LANES(L), .SAMPLES(S), .MW(MW)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [L*MW-1:0] model [S];
  initial begin
    for (int s = 0; s < S; s++) begin
      @(negedge clk); wr_en = 1; wr_addr = 3'(s); wr_data = {$urandom, $urandom, $urandom};
      model[s] = wr_data;
    end
    for (int i = 0; i < 300; i++) begin
      logic [L*MW-1:0] e;
      @(negedge clk);
      wr_en = $urandom_range(1); wr_addr = 3'($urandom); wr_data = {$urandom, $urandom, $urandom};
      rd_en = 1; rd_addr = 3'($urandom);
      e = model[rd_addr];
      if (wr_en) model[wr_addr] = wr_data;
      @(negedge clk); wr_en = 0; rd_en = 0;
      check(rd_data == e, "row read");
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
