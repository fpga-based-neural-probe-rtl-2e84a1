// Testbench of the threshold registers: the reset value, AXI-Lite writes
// (with byte strobes, and with address and data arriving on different
// clocks), read-back, held responses under back-pressure, and the comparator
// against T_C and T_M.
module tb_threshold_regs;
  localparam int DW = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_axil_awvalid = 0, s_axil_awready, s_axil_wvalid = 0, s_axil_wready;
  logic [3:0] s_axil_awaddr = 0, s_axil_araddr = 0, s_axil_wstrb = 0;
  logic [31:0] s_axil_wdata = 0, s_axil_rdata;
  logic s_axil_bvalid, s_axil_bready = 0, s_axil_arvalid = 0, s_axil_arready, s_axil_rvalid, s_axil_rready = 0;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic [DW-1:0] distance = 0, t_c, t_m;
  logic sel = 0, below;
  threshold_regs #(.DW(DW)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [63:0] model [2];
  task automatic wr(input logic [3:0] a, input logic [31:0] d, input logic [3:0] st);
    @(negedge clk);
    s_axil_awvalid = 1; s_axil_awaddr = a;
    if ($urandom_range(1)) begin @(negedge clk); check(!s_axil_awready, "no write without data"); end
    s_axil_wvalid = 1; s_axil_wdata = d; s_axil_wstrb = st;
    do @(posedge clk); while (!s_axil_awready);
    for (int b = 0; b < 4; b++) if (st[b]) model[a[3]][32*a[2] + 8*b +: 8] = d[8*b +: 8];
    @(negedge clk); s_axil_awvalid = 0; s_axil_wvalid = 0;
    check(s_axil_bvalid && s_axil_bresp == 2'b00, "write response");
    repeat ($urandom_range(2)) begin @(negedge clk); check(s_axil_bvalid, "response held"); end
    s_axil_bready = 1; @(negedge clk); s_axil_bready = 0;
    check(!s_axil_bvalid, "response taken");
  endtask
  task automatic rd(input logic [3:0] a);
    logic [31:0] e;
    @(negedge clk); s_axil_arvalid = 1; s_axil_araddr = a;
    do @(posedge clk); while (!s_axil_arready);
    @(negedge clk); s_axil_arvalid = 0;
    e = a[2] ? model[a[3]][63:32] : model[a[3]][31:0];
    check(s_axil_rvalid && s_axil_rdata == e, $sformatf("read %h got %h expected %h", a, s_axil_rdata, e));
    s_axil_rready = 1; @(negedge clk); s_axil_rready = 0;
  endtask
  initial begin
    model[0] = 64'(48'hFFFF_FFFF_FFFF); model[1] = model[0];
    repeat (2) @(negedge clk); rst_n = 1;
    check(t_c == '1 && t_m == '1, "reset value");
    for (int i = 0; i < 60; i++) begin
      logic [3:0] a;
      a = {2'($urandom), 2'b00};
      wr(a, $urandom, (i % 3 == 0) ? 4'($urandom) : 4'hF);
      rd({2'($urandom), 2'b00});
      check(t_c == DW'(model[0]) && t_m == DW'(model[1]), "threshold outputs");
      distance = (i % 2) ? t_c - 1 : t_c; sel = 0; #1;
      check(below == (distance < t_c), "compare with T_C");
      distance = {16'($urandom), 32'($urandom)}; sel = 1; #1;
      check(below == (distance < t_m), "compare with T_M");
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
