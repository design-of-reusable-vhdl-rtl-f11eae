// tb_precondition_block -- self-checking testbench for the precondition block.
//
// Exhaustive over all 8-bit operand pairs and both carry-in values at the
// default width, plus random operands at a 13-bit width. Expected values:
// p = a ^ b on every bit, g = a & b on bits 1..N-1, and on bit 0 the carry
// out of a one-bit full adder a0 + b0 + cin.
module tb_precondition_block;
  localparam int NW = 13;
  logic [7:0]    a, b, p, g;
  logic          cin;
  logic [NW-1:0] wa, wb, wp, wg;
  logic          wcin;
  int checks = 0, failures = 0;

  precondition_block dut (.a(a), .b(b), .cin(cin), .p(p), .g(g));
  precondition_block #(.N(NW)) dut_w (.a(wa), .b(wb), .cin(wcin), .p(wp), .g(wg));

  function automatic logic bit0_carry(logic x, logic y, logic c);
    return (int'(x) + int'(y) + int'(c)) >= 2;
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
      {cin, a, b} = v[16:0];
      #1;
      check("p", 64'(p), 64'(a ^ b));
      check("g", 64'(g), 64'({a[7:1] & b[7:1], bit0_carry(a[0], b[0], cin)}));
    end
    for (int k = 0; k < 2000; k++) begin
      wa = NW'($urandom); wb = NW'($urandom); wcin = 1'($urandom);
      #1;
      check("wp", 64'(wp), 64'(wa ^ wb));
      check("wg", 64'(wg), 64'({wa[NW-1:1] & wb[NW-1:1], bit0_carry(wa[0], wb[0], wcin)}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
