// final_summation -- last block of a parallel prefix adder.
//
// One XR2 cell per bit: s[0] = h[0] ^ cin and s[i] = h[i] ^ c[i-1], where h
// is the half sum from the precondition block and c[i] the carry out of bit i
// produced by the carry generator (carry in already folded in). The adder's
// carry out is c[N-1]. Purely combinational; N >= 1, default 8.
module final_summation #(
  parameter int N = 8
) (
  input  logic [N-1:0] h,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  for (genvar i = 0; i < N; i++) begin : g_xr2
    if (i == 0) begin : g_lsb
      prefix_xr2 u_xr2 (.h(h[i]), .c(cin), .s(s[i]));
    end else begin : g_bit
      prefix_xr2 u_xr2 (.h(h[i]), .c(c[i-1]), .s(s[i]));
    end
  end

  always_comb cout = c[N-1];
endmodule
