// kogge_stone_carry_gen -- Kogge-Stone parallel prefix carry generator block.
//
// L = $clog2(N) rows after row 0. On row k every column i >= d, d = 2^(k-1),
// merges its group with that of column i-d; columns below d already hold a
// group reaching bit 0 and pass through. Each group doubles its span per row,
// so after L rows every column holds the carry out of its bit. As in the
// Sklansky array, a G cell (generate only) is used where the merged group
// reaches bit 0 (i < 2d), a GP cell elsewhere. Depth log2 N, fan-out 2, at
// the cost of the most cells and wiring of the three arrays.
// Combinational; N defaults to 8. The adder type is named in the reference
// material but its array is not drawn there: this is the standard
// Kogge-Stone network, using the same cells and carry-in convention as the
// Sklansky model.
module kogge_stone_carry_gen #(
  parameter int N = 8
) (
  input  logic [N-1:0] p0,
  input  logic [N-1:0] g0,
  output logic [N-1:0] c
);
  localparam int L = $clog2(N);

  logic [N-1:0] cp [L+1];
  logic [N-1:0] cg [L+1];

  assign cp[0] = p0;
  assign cg[0] = g0;

  for (genvar k = 1; k <= L; k++) begin : g_row
    localparam int D = 1 << (k - 1);
    for (genvar i = 0; i < N; i++) begin : g_col
      if (i >= D && i < 2 * D) begin : g_g
        prefix_g u_g (.pa(cp[k-1][i]), .ga(cg[k-1][i]), .gb(cg[k-1][i-D]),
                      .gout(cg[k][i]));
        assign cp[k][i] = 1'b0;   // group reaches bit 0: propagate unused
      end else if (i >= 2 * D) begin : g_gp
        prefix_gp u_gp (.pa(cp[k-1][i]), .ga(cg[k-1][i]),
                        .pb(cp[k-1][i-D]), .gb(cg[k-1][i-D]),
                        .pout(cp[k][i]), .gout(cg[k][i]));
      end else begin : g_pass
        assign cp[k][i] = cp[k-1][i];
        assign cg[k][i] = cg[k-1][i];
      end
    end
  end

  assign c = cg[L];
endmodule
