// prefix_xr2 -- XR2 cell: one sum bit of the final summation block.
//
// s = h ^ c, where h is the bit's half sum (a ^ b) and c the carry into the
// bit. Combinational. The two-input XOR is named XR2 in the reference
// schematic.
module prefix_xr2 (
  input  logic h,
  input  logic c,
  output logic s
);
  always_comb s = h ^ c;
endmodule
