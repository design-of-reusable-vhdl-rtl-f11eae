// prefix_gp -- GP cell: the full prefix (dot) operator.
//
// Combines an upper group (pa, ga) with the adjacent lower group (pb, gb):
//   gout = ga | pa & gb      the merged group generates a carry
//   pout = pa & pb           the merged group propagates a carry
// Used wherever the merged group does not yet reach bit 0, so its propagate
// is still needed further down the array. Combinational. Pin names follow
// the reference description; the equations are the standard operator.
module prefix_gp (
  input  logic pa,
  input  logic ga,
  input  logic pb,
  input  logic gb,
  output logic pout,
  output logic gout
);
  always_comb begin
    gout = ga | (pa & gb);
    pout = pa & pb;
  end
endmodule
