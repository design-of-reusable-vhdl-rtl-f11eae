// tb_prefix_adder_top -- end-to-end testbench of the three prefix adders at
// the top's default width (N = 64), no parameters overridden.
//
// Every vector goes to all three adders; each {cout, s} is compared with the
// 65-bit integer sum a + b + cin. The vectors are chosen so that each
// behaviour the adders must handle occurs, and each is counted:
//   carry in used        cin = 1
//   carry out            the sum overflows N bits
//   full-width ripple    a ^ b all ones with cin = 1: the carry crosses every
//                        column, from the carry-in cell to the carry out
//   carry killed         a carry is generated and then stopped by a 0 + 0 bit
//   no carry at all      a & b = 0 and cin = 0
// A behaviour that never occurred counts as a failure.
module tb_prefix_adder_top;
  localparam int N = 64;
  logic [N-1:0] a, b;
  logic         cin;
  logic [N-1:0] skl_s, hc_s, ks_s;
  logic         skl_cout, hc_cout, ks_cout;
  int checks = 0, failures = 0;
  int n_cin = 0, n_cout = 0, n_ripple = 0, n_kill = 0, n_nocarry = 0;

  prefix_adder_top dut (
    .skl_a(a), .skl_b(b), .skl_cin(cin), .skl_s(skl_s), .skl_cout(skl_cout),
    .hc_a(a),  .hc_b(b),  .hc_cin(cin),  .hc_s(hc_s),   .hc_cout(hc_cout),
    .ks_a(a),  .ks_b(b),  .ks_cin(cin),  .ks_s(ks_s),   .ks_cout(ks_cout));

  task automatic check(string what, logic [N:0] got, logic [N:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h cin=%b got=%h exp=%h", what, a, b, cin, got, exp);
    end
  endtask

  task automatic apply(logic [N-1:0] av, logic [N-1:0] bv, logic cv);
    logic [N:0] exp;
    logic [N-1:0] gen, kill;
    a = av; b = bv; cin = cv;
    #1;
    exp = (N+1)'(a) + (N+1)'(b) + (N+1)'(cin);
    check("sklansky",    {skl_cout, skl_s}, exp);
    check("han-carlson", {hc_cout,  hc_s},  exp);
    check("kogge-stone", {ks_cout,  ks_s},  exp);
    gen  = a & b;
    kill = ~a & ~b;
    if (cin) n_cin++;
    if (exp[N]) n_cout++;
    if (cin && (a ^ b) == '1) n_ripple++;
    // a kill bit above some generate bit stops a carry
    for (int i = 1; i < N; i++)
      if (kill[i] && (gen & ((N'(1) << i) - 1)) != '0) begin n_kill++; break; end
    if (gen == '0 && !cin) n_nocarry++;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] r;
    // directed corners
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);              // full-width ripple, carry out
    apply('1, '1, 1'b1);
    apply(N'(1), '1, 1'b0);
    apply({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}}, 1'b0);
    // a carry generated at every single position, then rippling to the top
    for (int i = 0; i < N; i++) begin
      r = N'(1) << i;
      apply(~r | r, r, 1'b0);
      apply(~(N'(1) << i), N'(0), 1'b1);   // ripple broken at bit i
    end
    // random operands, with runs of propagate bits mixed in
    for (int k = 0; k < 20000; k++) begin
      r = {$urandom, $urandom};
      case (k % 3)
        0: apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
        1: apply(r, ~r ^ (N'(1) << ($urandom % N)), 1'($urandom));
        default: apply(r, ~r, 1'($urandom));
      endcase
    end
    $display("events: cin=%0d cout=%0d full_ripple=%0d kill=%0d no_carry=%0d",
             n_cin, n_cout, n_ripple, n_kill, n_nocarry);
    if (n_cin == 0)     begin failures++; $display("FAIL carry in never used"); end
    if (n_cout == 0)    begin failures++; $display("FAIL no carry out"); end
    if (n_ripple == 0)  begin failures++; $display("FAIL no full-width ripple"); end
    if (n_kill == 0)    begin failures++; $display("FAIL no killed carry"); end
    if (n_nocarry == 0) begin failures++; $display("FAIL no carry-free add"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
