// tb_sklansky_adder -- self-checking testbench for the sklansky adder.
//
// Compares {cout, s} with the integer sum a + b + cin. Exhaustive over all
// 8-bit operand pairs and both carry-in values at the default width; random
// and directed operands (full carry ripple, all-ones plus carry in) at 13
// bits (not a power of two) and at 64 bits, the widest evaluated width;
// exhaustive again at every width from 1 to 7 bits.
module tb_sklansky_adder;
  logic [7:0]  a, b, s;
  logic        cin, cout;
  logic [7:0]  s_m;       // same adder with M = $clog2(N)+2 rows
  logic        cout_m;
  logic [12:0] a13, b13, s13;
  logic        cin13, cout13;
  logic [63:0] a64, b64, s64;
  logic        cin64, cout64;
  int checks = 0, failures = 0;

  // Narrow widths 1..7, each tested exhaustively.
  logic [6:0] an, bn;
  logic       cn;
  logic [7:0] resn [1:7];
  for (genvar w = 1; w <= 7; w++) begin : g_narrow
    logic [w-1:0] sw;
    logic         cw;
    sklansky_adder #(.N(w)) u (.a(an[w-1:0]), .b(bn[w-1:0]), .cin(cn), .cout(cw), .s(sw));
    assign resn[w] = 8'({cw, sw});
  end

  sklansky_adder dut (.a(a), .b(b), .cin(cin), .cout(cout), .s(s));
  sklansky_adder #(.N(8), .M(5)) dut_m (.a(a), .b(b), .cin(cin), .cout(cout_m), .s(s_m));
  sklansky_adder #(.N(13)) dut13 (.a(a13), .b(b13), .cin(cin13), .cout(cout13), .s(s13));
  sklansky_adder #(.N(64)) dut64 (.a(a64), .b(b64), .cin(cin64), .cout(cout64), .s(s64));

  // Reference for the narrow adders: the low w bits of each operand, summed.
  function automatic logic [64:0] narrow_sum(logic [6:0] x, logic [6:0] y,
                                             logic c, int w);
    logic [6:0] mask;
    mask = 7'((8'd1 << w) - 8'd1);
    return 65'(x & mask) + 65'(y & mask) + 65'(c);
  endfunction

  task automatic check(string what, logic [64:0] got, logic [64:0] exp);
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
      check("sum8", {56'd0, cout, s}, 65'(a) + 65'(b) + 65'(cin));
      check("sum M+1", {56'd0, cout_m, s_m}, 64'(a) + 64'(b) + 64'(cin));
    end
    for (int v = 0; v < (1 << 15); v++) begin
      {cn, an, bn} = v[14:0];
      #1;
      for (int w = 1; w <= 7; w++)
        check($sformatf("sum%0d", w), 65'(resn[w]), narrow_sum(an, bn, cn, w));
    end
    for (int k = 0; k < 5000; k++) begin
      a13 = 13'($urandom); b13 = 13'($urandom); cin13 = 1'($urandom);
      a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom}; cin64 = 1'($urandom);
      case (k % 4)
        1: begin b13 = ~a13; b64 = ~a64; end                    // all propagate
        2: begin a13 = '1; b13 = 13'(k); a64 = '1; b64 = 64'(k); end
        3: begin b13 = ~a13 ^ (13'(1) << (k % 13));             // one kill or generate
                 b64 = ~a64 ^ (64'(1) << (k % 64)); end
        default: ;
      endcase
      #1;
      check("sum13", {51'd0, cout13, s13}, 65'(a13) + 65'(b13) + 65'(cin13));
      check("sum64", {cout64, s64}, 65'(a64) + 65'(b64) + 65'(cin64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
