// MIN register: during a distance pass it keeps the smallest distance offered
// and the cluster number it belongs to. 'clear' (one clock, at the start of a
// pass) empties it; each in_valid with a distance strictly below the stored
// one replaces it, so on a tie the cluster offered first stays. 'found' tells
// whether anything was offered since the last clear.
module min_register #(
  parameter int unsigned DW  = 48,
  parameter int unsigned IDW = 7
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           in_valid,
  input  logic [DW-1:0]  in_dist,
  input  logic [IDW-1:0] in_tag,
  output logic [DW-1:0]  min_dist,
  output logic [IDW-1:0] min_tag,
  output logic           found
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_dist <= '1;
      min_tag  <= '0;
      found    <= 1'b0;
    end else if (clear) begin
      min_dist <= '1;
      min_tag  <= '0;
      found    <= 1'b0;
    end else if (in_valid && (!found || in_dist < min_dist)) begin
      min_dist <= in_dist;
      min_tag  <= in_tag;
      found    <= 1'b1;
    end
  end
endmodule
