// Serial Divider: computes q = floor(num * 2^WF / den) for 0 <= num <= den,
// den > 0, i.e. the fraction num/den with WF fractional bits (q = 2^WF for
// num = den). Restoring division, one quotient bit per clock from bit WF down
// to bit 0. A 'start' pulse loads the operands; 'done' pulses WF+1 clock edges
// after the edge that takes 'start', with q valid; q holds until the next start. It precomputes the
// weights 1/(n+1) and n/(n+m) of the Cluster Module.
module serial_divider #(
  parameter int unsigned NW = 21,
  parameter int unsigned WF = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [NW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [WF:0]   q
);
  localparam int unsigned BW = (WF > 0) ? $clog2(WF + 1) : 1;
  logic [NW:0]   r, d;
  logic [BW-1:0] bitn;
  logic          ge;
  logic [NW:0]   r_sub;

  assign ge    = (r >= d);
  assign r_sub = ge ? r - d : r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      q    <= '0;
      r    <= '0;
      d    <= '0;
      bitn <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        r    <= {1'b0, num};
        d    <= {1'b0, den};
        q    <= '0;
        bitn <= BW'(WF);
      end else if (busy) begin
        q[bitn] <= ge;
        r       <= r_sub << 1;
        if (bitn == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          bitn <= bitn - 1'b1;
        end
      end
    end
  end
endmodule
