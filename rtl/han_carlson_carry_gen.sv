// han_carlson_carry_gen -- Han-Carlson parallel prefix carry generator block.
//
// A Kogge-Stone network over the odd columns only, followed by one extra row
// for the even columns. Rows 1..L (L = $clog2(N)): on row k every odd column
// i >= d, d = 2^(k-1), merges with column i-d (odd for k >= 2, the even
// neighbour for k = 1); even columns pass through. After row L every odd
// column holds its carry. Row L+1: every even column i >= 2 merges its own
// bit with the finished carry of column i-1 in a G cell. Column 0 needs no
// cell because its generate already contains the carry in.
// G cells are used wherever the merged group reaches bit 0, GP cells
// elsewhere. Half the cells of Kogge-Stone for one extra row of depth.
// Combinational; N defaults to 8. The adder type is named in the reference
// material but its array is not drawn there: this is the standard
// Han-Carlson network with the cells and carry-in convention of the Sklansky
// model.
module han_carlson_carry_gen #(
  parameter int N = 8
) (
  input  logic [N-1:0] p0,
  input  logic [N-1:0] g0,
  output logic [N-1:0] c
);
  localparam int L = $clog2(N);

  logic [N-1:0] cp [L+2];
  logic [N-1:0] cg [L+2];

  assign cp[0] = p0;
  assign cg[0] = g0;

  for (genvar k = 1; k <= L; k++) begin : g_row
    localparam int D = 1 << (k - 1);
    for (genvar i = 0; i < N; i++) begin : g_col
      if (i % 2 == 1 && i >= D && i < 2 * D) begin : g_g
        prefix_g u_g (.pa(cp[k-1][i]), .ga(cg[k-1][i]), .gb(cg[k-1][i-D]),
                      .gout(cg[k][i]));
        assign cp[k][i] = 1'b0;   // group reaches bit 0: propagate unused
      end else if (i % 2 == 1 && i >= 2 * D) begin : g_gp
        prefix_gp u_gp (.pa(cp[k-1][i]), .ga(cg[k-1][i]),
                        .pb(cp[k-1][i-D]), .gb(cg[k-1][i-D]),
                        .pout(cp[k][i]), .gout(cg[k][i]));
      end else begin : g_pass
        assign cp[k][i] = cp[k-1][i];
        assign cg[k][i] = cg[k-1][i];
      end
    end
  end

  // Last row: fill in the even columns from their odd neighbours.
  for (genvar i = 0; i < N; i++) begin : g_last
    if (i % 2 == 0 && i >= 2) begin : g_g
      prefix_g u_g (.pa(cp[L][i]), .ga(cg[L][i]), .gb(cg[L][i-1]),
                    .gout(cg[L+1][i]));
      assign cp[L+1][i] = 1'b0;
    end else begin : g_pass
      assign cp[L+1][i] = cp[L][i];
      assign cg[L+1][i] = cg[L][i];
    end
  end

  assign c = cg[L+1];
endmodule
