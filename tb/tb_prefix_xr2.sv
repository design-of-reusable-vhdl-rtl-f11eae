// tb_prefix_xr2 -- exhaustive self-checking testbench for the prefix_xr2 cell.
//
// Applies every input combination and compares each output with the
// expected Boolean value written out here independently of the cell.
// Prints one TB_RESULT line; a watchdog ends the run if it hangs.
module tb_prefix_xr2;
  logic h, c, s;
  int checks = 0, failures = 0;

  prefix_xr2 dut (.h(h), .c(c), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 2); v++) begin
      {h, c} = v[1:0];
      #1;
      checks++;
      if (s !== ((int'(h) + int'(c)) == 1)) begin
        failures++;
        $display("FAIL inputs=%b s=%b", v, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
