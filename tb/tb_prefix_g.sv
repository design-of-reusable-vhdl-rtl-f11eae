// tb_prefix_g -- exhaustive self-checking testbench for the prefix_g cell.
//
// Applies every input combination and compares each output with the
// expected Boolean value written out here independently of the cell.
// Prints one TB_RESULT line; a watchdog ends the run if it hangs.
module tb_prefix_g;
  logic pa, ga, gb, gout;
  int checks = 0, failures = 0;

  prefix_g dut (.pa(pa), .ga(ga), .gb(gb), .gout(gout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 3); v++) begin
      {pa, ga, gb} = v[2:0];
      #1;
      checks++;
      if (gout !== (ga ? 1'b1 : (pa ? gb : 1'b0))) begin
        failures++;
        $display("FAIL inputs=%b gout=%b", v, gout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
