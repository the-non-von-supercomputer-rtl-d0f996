// tb_pe_acu: exhaustive test of the byte comparator. Every pair of bytes is
// applied and eq/gt are compared with the unsigned relations computed by the
// testbench itself.
//
// Interface: no ports; the testbench instantiates pe_acu and prints
// "TB_RESULT checks=N failures=M" at the end. A watchdog counts a failure
// if the run hangs.
// Timing: combinational; each input pair is checked 1 ns after it is
//   applied.
// Source: COMPARE follows NON-VON 1; unsigned comparison is this design's
//   choice.
module tb_pe_acu;
  logic [7:0] a8, b8;
  logic eq, gt;
  int checks = 0, failures = 0;

  pe_acu dut (.a8, .b8, .eq, .gt);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        a8 = 8'(a);
        b8 = 8'(b);
        #1;
        checks++;
        if (eq !== (a == b) || gt !== (a > b)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d eq=%b gt=%b", a, b, eq, gt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
