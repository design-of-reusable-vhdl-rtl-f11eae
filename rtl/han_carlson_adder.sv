// han_carlson_adder -- parameterised N-bit Han-Carlson parallel prefix adder.
//
// s = a + b + cin (mod 2^N), cout = carry out of bit N-1. Same three-block
// structure and ports as the Sklansky adder: precondition block (carry in
// folded into bit 0), a Han-Carlson carry generator (log2 N + 1 cell levels with half the cells of Kogge-Stone),
// and the final summation block. Entirely combinational, no clock. The
// width is set by the single parameter N (default 8). The Han-Carlson type is one
// of the architectures the reference models offer; its array here is the
// standard one, built from the same cells as the Sklansky model.
module han_carlson_adder #(
  parameter int N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic         cout,
  output logic [N-1:0] s
);
  logic [N-1:0] p, g, c;

  precondition_block #(.N(N)) u_pre (.a(a), .b(b), .cin(cin), .p(p), .g(g));
  han_carlson_carry_gen #(.N(N)) u_cg (.p0(p), .g0(g), .c(c));
  final_summation #(.N(N)) u_sum (.h(p), .c(c), .cin(cin), .s(s), .cout(cout));
endmodule
