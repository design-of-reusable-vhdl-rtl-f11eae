// sklansky_carry_gen -- Sklansky (divide-and-conquer) parallel prefix carry
// generator block.
//
// The array has rows 0..M-1 of (propagate, generate) pairs cp[j][i],
// cg[j][i]; row 0 is the precondition block's output. In column i a cell is
// placed on row j exactly where bit j-1 of i is 1, so column 5 (binary 0101)
// has cells on rows 1 and 3. The cell on row j combines column i with column
// i - (i mod 2^(j-1)) - 1, the top bit of the lower half of the current
// 2^j-bit block, which already holds the prefix of that half. If j is above
// floor(log2 i) the merged group reaches bit 0, so only its generate is
// needed and a G cell is used; otherwise a GP cell. Where bit j-1 of i is 0
// the row passes the pair straight down. The output c[i] = cg[M-1][i] is the
// carry out of bit i (carry in included by the precondition block).
//
// Depth is log2 N cells, at the price of fan-out growing to N/2 on the last
// row. Combinational. M = $clog2(N)+1 rows by default; a larger M only adds
// pass-through rows (no i < N has a 1 beyond bit log2 N), so any M at or
// above that value gives the same circuit. The placement and G/GP rules are
// those of the reference description; the cells' equations are standard.
module sklansky_carry_gen
  import prefix_pkg::*;
#(
  parameter int N = 8,
  parameter int M = $clog2(N) + 1
) (
  input  logic [N-1:0] p0,
  input  logic [N-1:0] g0,
  output logic [N-1:0] c
);
  if (M < $clog2(N) + 1) begin : g_check
    $error("sklansky_carry_gen: M must be at least $clog2(N)+1");
  end

  logic [N-1:0] cp [M];
  logic [N-1:0] cg [M];

  assign cp[0] = p0;
  assign cg[0] = g0;

  for (genvar j = 1; j < M; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      if (bit_is_one(i, j - 1)) begin : g_cell
        localparam int K = i - (i % (1 << (j - 1))) - 1;   // lower neighbour
        if (j > floor_log2(i)) begin : g_g
          prefix_g u_g (.pa(cp[j-1][i]), .ga(cg[j-1][i]), .gb(cg[j-1][K]),
                        .gout(cg[j][i]));
          // The group reaches bit 0: its propagate is never read again.
          assign cp[j][i] = 1'b0;
        end else begin : g_gp
          prefix_gp u_gp (.pa(cp[j-1][i]), .ga(cg[j-1][i]),
                          .pb(cp[j-1][K]), .gb(cg[j-1][K]),
                          .pout(cp[j][i]), .gout(cg[j][i]));
        end
      end else begin : g_pass
        assign cp[j][i] = cp[j-1][i];
        assign cg[j][i] = cg[j-1][i];
      end
    end
  end

  assign c = cg[M-1];
endmodule
