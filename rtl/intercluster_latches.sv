// intercluster_latches: the latches that carry tag and result broadcasts from
// one cluster to another.
//
// Forwarding a value across one cluster takes one cycle, so a broadcast from
// cluster i reaches cluster j after |i - j| cycles. This module is a chain of
// DEPTH registers for any payload type T; the core places one chain of depth
// |i - j| for every ordered pair of clusters. Reset clears the chain, so no
// broadcast is in flight after reset. The one-cycle-per-cluster latency is
// the document's; carrying the tag on the same kind of chain is this design's
// reading of the inter-cluster tag latches drawn in the cluster diagram.
module intercluster_latches #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  T     d,
  output T     q
);
  T stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int unsigned i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DEPTH-1];
endmodule
