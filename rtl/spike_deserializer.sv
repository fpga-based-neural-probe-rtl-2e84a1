// Deserializer of the Cluster Module. Accepts the spike as a serial
// AXI-Stream of 16-bit samples, LANES channels of time sample 0, then of time
// sample 1, and so on (LANES*SAMPLES beats), and writes each completed row of
// LANES samples into the spike memory. Samples are converted to the mean
// format (MW bits, FRAC fractional bits) on the way.
// A 'start' pulse opens the input (tready high) for one spike; it closes
// itself on the last beat, so the next spike stays in the upstream buffer.
// One sample is taken per clock, so a spike takes LANES*SAMPLES clocks when
// the stream keeps up. 'done' pulses on the clock that the last row is
// written, one clock after the last beat. A beat with tlast also ends the
// spike (a short spike ends early; rows not reached keep their old contents).
// The FRAC low bits of every lane of row_data are always zero: input samples
// are integers.
module spike_deserializer #(
  parameter int unsigned LANES   = 20,
  parameter int unsigned SAMPLES = 64,
  parameter int unsigned SW      = 16,
  parameter int unsigned MW      = 18,
  parameter int unsigned FRAC    = 2,
  localparam int unsigned LW     = (LANES > 1) ? $clog2(LANES) : 1,
  localparam int unsigned RW     = (SAMPLES > 1) ? $clog2(SAMPLES) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  s_axis_tvalid,
  output logic                  s_axis_tready,
  input  logic [SW-1:0]         s_axis_tdata,
  input  logic                  s_axis_tlast,
  output logic                  row_we,
  output logic [RW-1:0]         row_addr,
  output logic [LANES*MW-1:0]   row_data,
  output logic                  done
);
  logic [LW-1:0]       lane;
  logic [RW-1:0]       row;
  logic [MW-1:0]       buf_q [LANES];
  logic                beat, row_end, spike_end, loading;
  logic signed [MW-1:0] conv;

  assign s_axis_tready = loading;
  assign beat      = s_axis_tvalid && s_axis_tready;
  assign row_end   = beat && (lane == LW'(LANES-1) || s_axis_tlast);
  assign spike_end = row_end && (row == RW'(SAMPLES-1) || s_axis_tlast);
  assign conv      = MW'($signed(s_axis_tdata)) <<< FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane     <= '0;
      row      <= '0;
      loading  <= 1'b0;
      row_we   <= 1'b0;
      row_addr <= '0;
      done     <= 1'b0;
    end else begin
      row_we <= row_end;
      done   <= spike_end;
      if (start)          loading <= 1'b1;
      else if (spike_end) loading <= 1'b0;
      if (row_end) row_addr <= row;
      if (beat) begin
        if (row_end) begin
          lane <= '0;
          row  <= spike_end ? '0 : row + 1'b1;
        end else begin
          lane <= lane + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (beat) buf_q[lane] <= conv;
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) row_data[l*MW +: MW] = buf_q[l];
  end
endmodule
