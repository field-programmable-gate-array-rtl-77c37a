// Compare-exchange node, the building block of the median sorting network.
// One W-bit magnitude comparator decides whether a < b; two multiplexers
// steered by that decision route the larger input to h ("higher") and the
// smaller to l ("lower"). Purely combinational. The comparator-plus-two-mux
// structure and the 8-bit width follow the source design; on equal inputs
// h = a and l = b.
module basic_node #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] h,
  output logic [W-1:0] l
);
  logic a_lt_b;
  always_comb begin
    a_lt_b = (a < b);
    h = a_lt_b ? b : a;
    l = a_lt_b ? a : b;
  end
endmodule
