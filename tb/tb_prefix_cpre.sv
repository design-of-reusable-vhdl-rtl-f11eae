// tb_prefix_cpre -- exhaustive self-checking testbench for the prefix_cpre cell.
//
// Applies every input combination and compares each output with the
// expected Boolean value written out here independently of the cell.
// Prints one TB_RESULT line; a watchdog ends the run if it hangs.
module tb_prefix_cpre;
  logic a, b, cin, p, g;
  int checks = 0, failures = 0;

  prefix_cpre dut (.a(a), .b(b), .cin(cin), .p(p), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 3); v++) begin
      {a, b, cin} = v[2:0];
      #1;
      checks++;
      if (p !== (a != b)) begin
        failures++;
        $display("FAIL inputs=%b p=%b", v, p);
      end
      checks++;
      if (g !== ((int'(a) + int'(b) + int'(cin)) >= 2)) begin
        failures++;
        $display("FAIL inputs=%b g=%b", v, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
