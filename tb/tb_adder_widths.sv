// tb_adder_widths -- the three prefix adders at each operand width they were
// evaluated at: 8, 16, 32 and 64 bits.
//
// For every width the Sklansky, Han-Carlson and Kogge-Stone adders receive
// the same operands (random, all-propagate and all-ones patterns) and each
// {cout, s} is compared with the integer sum a + b + cin.
module tb_adder_widths;
  int checks = 0, failures = 0;

  logic [63:0] a, b;
  logic        cin;

  // One group of three adders per width; results gathered as 65-bit words.
  logic [64:0] res [4][3];

  for (genvar w = 0; w < 4; w++) begin : g_w
    localparam int N = 8 << w;
    logic [N-1:0] s0, s1, s2;
    logic         c0, c1, c2;
    sklansky_adder    #(.N(N)) u_skl (.a(a[N-1:0]), .b(b[N-1:0]), .cin(cin), .cout(c0), .s(s0));
    han_carlson_adder #(.N(N)) u_hc  (.a(a[N-1:0]), .b(b[N-1:0]), .cin(cin), .cout(c1), .s(s1));
    kogge_stone_adder #(.N(N)) u_ks  (.a(a[N-1:0]), .b(b[N-1:0]), .cin(cin), .cout(c2), .s(s2));
    assign res[w][0] = 65'({c0, s0});
    assign res[w][1] = 65'({c1, s1});
    assign res[w][2] = 65'({c2, s2});
  end

  task automatic run(logic [63:0] av, logic [63:0] bv, logic cv);
    a = av; b = bv; cin = cv;
    #1;
    for (int w = 0; w < 4; w++) begin
      int n = 8 << w;
      logic [64:0] mask = (65'(1) << n) - 1;
      logic [64:0] exp = (65'(a) & mask) + (65'(b) & mask) + 65'(cin);
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (res[w][k] !== exp) begin
          failures++;
          $display("FAIL width %0d adder %0d a=%h b=%h cin=%b got=%h exp=%h",
                   n, k, a, b, cin, res[w][k], exp);
        end
      end
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
    logic [63:0] r;
    for (int k = 0; k < 10000; k++) begin
      r = {$urandom, $urandom};
      case (k % 3)
        0: run(r, {$urandom, $urandom}, 1'($urandom));
        1: run(r, ~r, 1'($urandom));
        default: run('1, 64'(k), 1'($urandom));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
