// Spike buffer between the detector and the Cluster Module: a synchronous
// AXI-Stream FIFO of DEPTH beats carrying a sample and its tlast flag. The
// detector can hand over a whole spike window (M*64 beats) while the Cluster
// Module is still sorting the previous spike. Standard valid/ready rules; the
// output reads the memory directly (first-word fall-through), so a beat
// written on clock t can leave on clock t+1. DEPTH must be a power of two.
module spike_stream_buffer #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s_axis_tvalid,
  output logic         s_axis_tready,
  input  logic [W-1:0] s_axis_tdata,
  input  logic         s_axis_tlast,
  output logic         m_axis_tvalid,
  input  logic         m_axis_tready,
  output logic [W-1:0] m_axis_tdata,
  output logic         m_axis_tlast,
  output logic [AW:0]  level
);
  logic [W:0]  mem [DEPTH];
  logic [AW:0] wp, rp;
  logic        push, pop;

  assign level         = wp - rp;
  assign s_axis_tready = (level != (AW+1)'(DEPTH));
  assign m_axis_tvalid = (wp != rp);
  assign push          = s_axis_tvalid && s_axis_tready;
  assign pop           = m_axis_tvalid && m_axis_tready;
  assign {m_axis_tlast, m_axis_tdata} = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push) mem[wp[AW-1:0]] <= {s_axis_tlast, s_axis_tdata};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
    end
  end

  // AXI-Stream: data must stay stable while valid is high and not accepted.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (m_axis_tvalid && !m_axis_tready) |=> (m_axis_tvalid && $stable(m_axis_tdata));
  endproperty
  a_hold: assert property (p_hold);
endmodule
