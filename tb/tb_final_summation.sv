// tb_final_summation -- self-checking testbench for the final summation block.
//
// Exhaustive over 8-bit half-sum and carry vectors and both carry-in values
// at the default width, random at a 13-bit width. Expected: sum bit i is the
// parity of h[i] and the carry into bit i (cin for bit 0, c[i-1] above);
// cout is c[N-1]. The reference is computed bit by bit in a loop.
module tb_final_summation;
  localparam int NW = 13;
  logic [7:0]    h, c, s;
  logic          cin, cout;
  logic [NW-1:0] wh, wc, ws;
  logic          wcin, wcout;
  int checks = 0, failures = 0;

  final_summation dut (.h(h), .c(c), .cin(cin), .s(s), .cout(cout));
  final_summation #(.N(NW)) dut_w (.h(wh), .c(wc), .cin(wcin), .s(ws), .cout(wcout));

  function automatic logic [63:0] ref_sum(logic [63:0] hv, logic [63:0] cv,
                                          logic ci, int n);
    logic [63:0] r = '0;
    for (int i = 0; i < n; i++) begin
      logic carry = (i == 0) ? ci : cv[i-1];
      r[i] = (hv[i] == carry) ? 1'b0 : 1'b1;
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
    for (int v = 0; v < (1 << 17); v++) begin
      {cin, h, c} = v[16:0];
      #1;
      check("s", 64'(s), ref_sum(64'(h), 64'(c), cin, 8));
      check("cout", 64'(cout), 64'(c[7]));
    end
    for (int k = 0; k < 2000; k++) begin
      wh = NW'($urandom); wc = NW'($urandom); wcin = 1'($urandom);
      #1;
      check("ws", 64'(ws), ref_sum(64'(wh), 64'(wc), wcin, NW));
      check("wcout", 64'(wcout), 64'(wc[NW-1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
