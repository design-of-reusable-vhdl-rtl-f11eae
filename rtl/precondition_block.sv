// precondition_block -- row 0 of a parallel prefix adder.
//
// One PRE cell per operand bit 1..N-1 and one CPRE cell on bit 0, which also
// takes the adder's carry in. Outputs are the per-bit propagate p (= a ^ b,
// which is also the half sum needed by the final summation block) and the
// per-bit generate g; g[0] already contains the carry in, so the carry
// generator that follows computes carries-out directly.
// Purely combinational; N is the operand width (default 8, the width of the
// reference 8-bit schematic). Splitting the adder into precondition, carry
// generator and final summation blocks follows the reference structure; the
// cell equations are this design's choice.
module precondition_block #(
  parameter int N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] p,
  output logic [N-1:0] g
);
  prefix_cpre u_cpre (.a(a[0]), .b(b[0]), .cin(cin), .p(p[0]), .g(g[0]));

  for (genvar i = 1; i < N; i++) begin : g_pre
    prefix_pre u_pre (.a(a[i]), .b(b[i]), .p(p[i]), .g(g[i]));
  end
endmodule
