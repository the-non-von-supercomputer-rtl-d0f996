// tb_pe_byte_regs: random writes and reads of the eight byte registers,
// checked against a reference copy; reset and the dedicated A8, B8, IO8 and
// MAR outputs are checked too.
//
// Interface: no ports; the testbench instantiates pe_byte_regs and prints
// "TB_RESULT checks=N failures=M" at the end. A watchdog counts a failure
// if the run hangs.
// Timing: 10 ns clock; inputs are applied at the falling edge and
//   results checked 1 ns after the following rising edge.
// Source: the register set follows NON-VON 1; reset values are this design's
//   choice.
module tb_pe_byte_regs;
  import nonvon_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  byte_reg_e rsel = R_A8, wsel = R_A8;
  byte_t rdata, wdata = '0, a8, b8, io8, mar;
  logic we = 1'b0;
  byte_t ref_r [8];
  int checks = 0, failures = 0;

  pe_byte_regs dut (.clk, .rst_n, .rsel, .rdata, .we, .wsel, .wdata, .a8, .b8, .io8, .mar);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_all();
    for (int i = 0; i < 8; i++) begin
      rsel = byte_reg_e'(i); #1;
      check($sformatf("reg %0d", i), int'(rdata), int'(ref_r[i]));
    end
    check("A8 port", int'(a8), int'(ref_r[0]));
    check("B8 port", int'(b8), int'(ref_r[1]));
    check("IO8 port", int'(io8), int'(ref_r[6]));
    check("MAR port", int'(mar), int'(ref_r[7]));
  endtask

  initial begin
    for (int i = 0; i < 8; i++) ref_r[i] = '0;
    #12 rst_n = 1'b1;
    check_all();
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) != 0);
      wsel = byte_reg_e'($urandom_range(0, 7));
      wdata = 8'($urandom);
      @(posedge clk); #1;
      if (we) ref_r[wsel] = wdata;
      we = 1'b0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
