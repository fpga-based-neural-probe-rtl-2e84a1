// Threshold block of the Cluster Module: an AXI-Lite slave holding the
// clustering threshold T_C and the merging threshold T_M (both DW bits, set by
// the host, which computes T = std(signal)^2 * c_C * N_S), and a comparator
// telling whether a minimum distance lies below the selected one.
// Register map (32-bit words; this design's choice):
//   0x0 T_C[31:0]  0x4 T_C[DW-1:32]  0x8 T_M[31:0]  0xC T_M[DW-1:32]
// Thresholds are in the unit of the distance datapath: with 2 fractional bits
// per mean value, one ADC count squared is 16 units.
// AXI-Lite: a write is taken when AWVALID and WVALID are both high and no
// response is pending (AWREADY = WREADY = 1 on that clock); BVALID follows on
// the next clock. Reads answer on the clock after ARVALID with RVALID. WSTRB
// is honoured per byte. Responses are always OKAY,
// so BRESP and RRESP are constant zero.
// Compare: below = (distance < (sel ? T_M : T_C)), combinational.
module threshold_regs #(
  parameter int unsigned DW = 48,
  parameter logic [DW-1:0] T_RESET = '1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          s_axil_awvalid,
  output logic          s_axil_awready,
  input  logic [3:0]    s_axil_awaddr,
  input  logic          s_axil_wvalid,
  output logic          s_axil_wready,
  input  logic [31:0]   s_axil_wdata,
  input  logic [3:0]    s_axil_wstrb,
  output logic          s_axil_bvalid,
  input  logic          s_axil_bready,
  output logic [1:0]    s_axil_bresp,
  input  logic          s_axil_arvalid,
  output logic          s_axil_arready,
  input  logic [3:0]    s_axil_araddr,
  output logic          s_axil_rvalid,
  input  logic          s_axil_rready,
  output logic [31:0]   s_axil_rdata,
  output logic [1:0]    s_axil_rresp,
  input  logic [DW-1:0] distance,
  input  logic          sel,
  output logic          below,
  output logic [DW-1:0] t_c,
  output logic [DW-1:0] t_m
);
  logic [63:0] regs [2];
  logic        wr_go, rd_go;

  assign s_axil_awready = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_wready  = s_axil_awready;
  assign wr_go          = s_axil_awready;
  assign s_axil_arready = !s_axil_rvalid;
  assign rd_go          = s_axil_arvalid && s_axil_arready;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs[0]       <= 64'(T_RESET);
      regs[1]       <= 64'(T_RESET);
      s_axil_bvalid <= 1'b0;
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else begin
      if (wr_go) begin
        for (int b = 0; b < 4; b++)
          if (s_axil_wstrb[b])
            regs[s_axil_awaddr[3]][32*s_axil_awaddr[2] + 8*b +: 8] <= s_axil_wdata[8*b +: 8];
        s_axil_bvalid <= 1'b1;
      end else if (s_axil_bready) begin
        s_axil_bvalid <= 1'b0;
      end
      if (rd_go) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= s_axil_araddr[2] ? regs[s_axil_araddr[3]][63:32] : regs[s_axil_araddr[3]][31:0];
      end else if (s_axil_rready) begin
        s_axil_rvalid <= 1'b0;
      end
    end
  end

  assign t_c   = DW'(regs[0]);
  assign t_m   = DW'(regs[1]);
  assign below = distance < (sel ? t_m : t_c);

  // AXI-Lite: a response is held until it is accepted.
  a_bhold: assert property (@(posedge clk) disable iff (!rst_n)
                            s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  a_rhold: assert property (@(posedge clk) disable iff (!rst_n)
                            s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));
endmodule
