// tb_prefix_gp -- exhaustive self-checking testbench for the prefix_gp cell.
//
// Applies every input combination and compares each output with the
// expected Boolean value written out here independently of the cell.
// Prints one TB_RESULT line; a watchdog ends the run if it hangs.
module tb_prefix_gp;
  logic pa, ga, pb, gb, pout, gout;
  int checks = 0, failures = 0;

  prefix_gp dut (.pa(pa), .ga(ga), .pb(pb), .gb(gb), .pout(pout), .gout(gout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 4); v++) begin
      {pa, ga, pb, gb} = v[3:0];
      #1;
      checks++;
      if (gout !== (ga ? 1'b1 : (pa ? gb : 1'b0))) begin
        failures++;
        $display("FAIL inputs=%b gout=%b", v, gout);
      end
      checks++;
      if (pout !== (pa ? pb : 1'b0)) begin
        failures++;
        $display("FAIL inputs=%b pout=%b", v, pout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
