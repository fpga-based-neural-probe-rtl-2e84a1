// ACC: adds up the per-sample sums of the Adder Tree over the SAMPLES rows of
// one cluster, giving the squared Euclidean distance between the spike and
// that cluster's mean. in_first restarts the sum, in_last closes it; the
// result and the cluster tag appear on the following clock with out_valid.
// The width, OW = 48 bits, holds the worst case of 20 x 64 squared 19-bit
// differences (47 bits); the document quotes a 42-bit accumulator.
module distance_accumulator #(
  parameter int unsigned IW  = 42,
  parameter int unsigned OW  = 48,
  parameter int unsigned TGW = 7
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic           in_first,
  input  logic           in_last,
  input  logic [TGW-1:0] in_tag,
  input  logic [IW-1:0]  in_val,
  output logic           out_valid,
  output logic [OW-1:0]  out_dist,
  output logic [TGW-1:0] out_tag
);
  logic [OW-1:0] acc, acc_next;
  assign acc_next = (in_first ? '0 : acc) + OW'(in_val);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      out_dist  <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        acc <= acc_next;
        if (in_last) begin
          out_dist <= acc_next;
          out_tag  <= in_tag;
        end
      end
    end
  end
endmodule
