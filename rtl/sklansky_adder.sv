// sklansky_adder -- parameterised N-bit Sklansky parallel prefix adder.
//
// s = a + b + cin (mod 2^N), cout = carry out of bit N-1. Three blocks in a
// row: the precondition block forms bit generate/propagate (carry in folded
// into bit 0), the Sklansky carry generator computes every carry in
// log2 N cell levels, and the final summation block XORs each half sum with
// the carry into its bit. Entirely combinational: the result is valid one
// propagation delay after the operands, there is no clock.
// The width is set by one parameter, N (default 8). M, the number of array
// rows, defaults to $clog2(N)+1; it may be set larger (for instance
// $clog2(N)+2) with no effect on the result. Ports, parameters and the
// three-block structure follow the reference model; gate equations are this
// design's.
module sklansky_adder #(
  parameter int N = 8,
  parameter int M = $clog2(N) + 1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic         cout,
  output logic [N-1:0] s
);
  logic [N-1:0] p, g, c;

  precondition_block #(.N(N)) u_pre (.a(a), .b(b), .cin(cin), .p(p), .g(g));
  sklansky_carry_gen #(.N(N), .M(M)) u_cg (.p0(p), .g0(g), .c(c));
  final_summation #(.N(N)) u_sum (.h(p), .c(c), .cin(cin), .s(s), .cout(cout));
endmodule
