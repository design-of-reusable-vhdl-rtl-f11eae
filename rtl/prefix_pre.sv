// prefix_pre -- PRE cell: precondition of one operand bit pair.
//
// Forms the bit generate g = a & b and the bit propagate p = a ^ b, which is
// also the half sum used by the final XOR. Purely combinational, no state.
// The cell name comes from the reference schematic of the 8-bit Sklansky
// adder; its equations are the usual ones for a prefix adder and are this
// design's choice, since the schematic names the cell only.
module prefix_pre (
  input  logic a,
  input  logic b,
  output logic p,
  output logic g
);
  always_comb begin
    p = a ^ b;
    g = a & b;
  end
endmodule
