// prefix_g -- G cell: the generate half of the prefix operator.
//
// gout = ga | pa & gb. Placed where the lower group already reaches bit 0
// (carry in included): the result is then the final carry of the column and
// no group propagate is needed, which saves the AND gate of a GP cell.
// Combinational. Pin names follow the reference description.
module prefix_g (
  input  logic pa,
  input  logic ga,
  input  logic gb,
  output logic gout
);
  always_comb gout = ga | (pa & gb);
endmodule
