// Arithmetic Unit: one lane of the Cluster Module datapath, built around a
// single multiplier. d = x - m is formed first; then
//   mode AU_DIST : sq    = d * d                      (stages 1 and 3)
//   mode AU_BLEND: blend = m + round(d * w / 2^WF)    (stages 2 and 4)
// The weighted mean (n*m + x)/(n+1) is computed as m + (x - m)/(n+1), and the
// merge (n*a + k*b)/(n+k) as b + (a - b)*n/(n+k), so only one weight and one
// product per lane are needed. w is an unsigned fraction with WF fractional
// bits (w = 2^WF means 1.0, which copies x). x and m are MW-bit signed values
// in the same fixed-point format. Rounding is half-up on the scaled product.
// Timing: both results are registered; inputs on clock t give outputs on t+1.
module arithmetic_unit #(
  parameter int unsigned MW = 18,
  parameter int unsigned WF = 16,
  localparam int unsigned SQW = 2*MW + 1
) (
  input  logic                 clk,
  input  osort_pkg::au_mode_e  mode,
  input  logic signed [MW-1:0] x,
  input  logic signed [MW-1:0] m,
  input  logic [WF:0]          w,
  output logic [SQW-1:0]       sq,
  output logic signed [MW-1:0] blend
);
  localparam int unsigned DW = MW + 1;
  localparam int unsigned BW = (DW > WF + 2) ? DW : WF + 2;
  localparam int unsigned PW = DW + BW;
  logic signed [DW-1:0] d;
  logic signed [BW-1:0] b;
  logic signed [PW-1:0] p, pr;

  always_comb begin
    d  = DW'(x) - DW'(m);
    b  = (mode == osort_pkg::AU_DIST) ? BW'(d) : $signed({{(BW-WF-1){1'b0}}, w});
    p  = PW'(d) * PW'(b);
    pr = (p + (PW'(1) <<< (WF-1))) >>> WF;
  end

  always_ff @(posedge clk) begin
    sq    <= SQW'(p);
    blend <= MW'(PW'(m) + pr);
  end
endmodule
