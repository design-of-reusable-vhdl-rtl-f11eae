// prefix_cpre -- CPRE cell: precondition of operand bit 0, carry in included.
//
// Bit 0 is the only column that sees the adder's carry in. Folding it into
// the bit generate here, g = a&b | (a^b)&cin, makes every prefix group that
// reaches bit 0 a finished carry, so the array needs no extra carry-in row
// and can use generate-only cells on those groups. p = a ^ b is the plain
// half sum. Combinational. The cell and its three inputs are those of the
// reference schematic; the equations are this design's reading of them.
module prefix_cpre (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic p,
  output logic g
);
  always_comb begin
    p = a ^ b;
    g = (a & b) | ((a ^ b) & cin);
  end
endmodule
