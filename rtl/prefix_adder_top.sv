// prefix_adder_top -- the three parameterised parallel prefix adders side by
// side: Sklansky, Han-Carlson and Kogge-Stone.
//
// All three compute s = a + b + cin with a carry out and differ only in their
// carry generator array, i.e. in the depth / cell count / fan-out trade-off.
// Each has its own operand, carry and sum ports so they can be used or
// compared independently. The one parameter N sets the width of all three;
// its default, 64, is the widest operand size the adders were evaluated at.
// Entirely combinational.
module prefix_adder_top #(
  parameter int N = 64
) (
  input  logic [N-1:0] skl_a,
  input  logic [N-1:0] skl_b,
  input  logic         skl_cin,
  output logic [N-1:0] skl_s,
  output logic         skl_cout,
  input  logic [N-1:0] hc_a,
  input  logic [N-1:0] hc_b,
  input  logic         hc_cin,
  output logic [N-1:0] hc_s,
  output logic         hc_cout,
  input  logic [N-1:0] ks_a,
  input  logic [N-1:0] ks_b,
  input  logic         ks_cin,
  output logic [N-1:0] ks_s,
  output logic         ks_cout
);
  sklansky_adder #(.N(N)) u_skl (
    .a(skl_a), .b(skl_b), .cin(skl_cin), .cout(skl_cout), .s(skl_s));
  han_carlson_adder #(.N(N)) u_hc (
    .a(hc_a), .b(hc_b), .cin(hc_cin), .cout(hc_cout), .s(hc_s));
  kogge_stone_adder #(.N(N)) u_ks (
    .a(ks_a), .b(ks_b), .cin(ks_cin), .cout(ks_cout), .s(ks_s));
endmodule
