// tb_han_carlson_carry_gen -- self-checking testbench for the han_carlson carry generator.
//
// Drives arbitrary row-0 propagate/generate vectors (including p and g both
// set on one bit) and compares every output carry with a bit-serial
// reference c[i] = g[i] | p[i] & c[i-1], c[-1] = 0. Exhaustive over all
// 8-bit pairs at the default width, random at 13 bits (not a power of two)
// and at 64 bits.
module tb_han_carlson_carry_gen;
  logic [7:0]  p0, g0, c;
  logic [12:0] p13, g13, c13;
  logic [63:0] p64, g64, c64;
  int checks = 0, failures = 0;

  han_carlson_carry_gen dut (.p0(p0), .g0(g0), .c(c));
  han_carlson_carry_gen #(.N(13)) dut13 (.p0(p13), .g0(g13), .c(c13));
  han_carlson_carry_gen #(.N(64)) dut64 (.p0(p64), .g0(g64), .c(c64));

  function automatic logic [63:0] ref_carries(logic [63:0] p, logic [63:0] g, int n);
    logic [63:0] r = '0;
    logic carry = 1'b0;
    for (int i = 0; i < n; i++) begin
      carry = g[i] | (p[i] & carry);
      r[i] = carry;
    end
    return r;
  endfunction

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 16); v++) begin
      {p0, g0} = v[15:0];
      #1;
      check("c", 64'(c), ref_carries(64'(p0), 64'(g0), 8));
    end
    for (int k = 0; k < 5000; k++) begin
      p13 = 13'($urandom); g13 = 13'($urandom);
      p64 = {$urandom, $urandom}; g64 = {$urandom, $urandom};
      // Favour long propagate runs so that carries cross many columns.
      if (k % 2 == 0) begin
        p13 = p13 | 13'($urandom); g13 = g13 & 13'($urandom) & 13'($urandom);
        p64 = ~(64'(1) << ($urandom % 64)); g64 = 64'(1) << ($urandom % 64);
      end
      #1;
      check("c13", 64'(c13), ref_carries(64'(p13), 64'(g13), 13));
      check("c64", c64, ref_carries(p64, g64, 64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
