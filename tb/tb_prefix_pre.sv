// tb_prefix_pre -- exhaustive self-checking testbench for the prefix_pre cell.
//
// Applies every input combination and compares each output with the
// expected Boolean value written out here independently of the cell.
// Prints one TB_RESULT line; a watchdog ends the run if it hangs.
module tb_prefix_pre;
  logic a, b, p, g;
  int checks = 0, failures = 0;

  prefix_pre dut (.a(a), .b(b), .p(p), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 2); v++) begin
      {a, b} = v[1:0];
      #1;
      checks++;
      if (p !== (a != b)) begin failures++; $display("FAIL v=%b p=%b", v, p); end;       checks++; if (g !== (a && b)) begin
        failures++;
        $display("FAIL inputs=%b p=%b", v, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
