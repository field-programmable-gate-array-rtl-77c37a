// Three-input sorter made of three compare-exchange nodes (basic_node):
// nodes on (x0,x1), then (hi,x2), then the two lower values. Outputs the
// maximum, middle and minimum. Combinational. Used by the median pipeline for
// each sort step of the 3x3 median network. Building the sorts from the
// compare nodes follows the source design; this three-node arrangement is
// the usual minimal one and is this design's choice.
module sort3 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  output logic [W-1:0] mx,
  output logic [W-1:0] md,
  output logic [W-1:0] mn
);
  logic [W-1:0] h1, l1, l2;
  basic_node #(.W(W)) n1 (.a(x0), .b(x1), .h(h1), .l(l1));
  basic_node #(.W(W)) n2 (.a(h1), .b(x2), .h(mx), .l(l2));
  basic_node #(.W(W)) n3 (.a(l1), .b(l2), .h(md), .l(mn));
endmodule
