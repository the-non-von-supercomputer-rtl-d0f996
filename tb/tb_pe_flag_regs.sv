// tb_pe_flag_regs: random use of the general flag write port, the A1 port
// and ENABLE, checked against a reference copy that applies the documented
// priorities (A1 port over general port, set_en over general port). Reset
// must leave only EN1 set.
//
// Interface: no ports; the testbench instantiates pe_flag_regs and prints
// "TB_RESULT checks=N failures=M" at the end. A watchdog counts a failure
// if the run hangs.
// Timing: 10 ns clock; inputs are applied at the falling edge and
//   results checked 1 ns after the following rising edge.
// Source: the flag set follows NON-VON 1; port priorities and reset values
//   are this design's choices.
module tb_pe_flag_regs;
  import nonvon_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  flag_reg_e rsel = F_A1, wsel = F_A1;
  logic rdata, we = 1'b0, wdata = 1'b0, a1_we = 1'b0, a1_wdata = 1'b0, set_en = 1'b0;
  logic a1, b1, c1, io1, en1;
  logic [7:0] ref_f;
  int checks = 0, failures = 0;

  pe_flag_regs dut (.clk, .rst_n, .rsel, .rdata, .we, .wsel, .wdata, .a1_we, .a1_wdata,
                    .set_en, .a1, .b1, .c1, .io1, .en1);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < 8; i++) begin
      rsel = flag_reg_e'(i); #1;
      checks++;
      if (rdata !== ref_f[i]) begin
        failures++;
        $display("FAIL flag %0d: got %b expected %b", i, rdata, ref_f[i]);
      end
    end
    checks++;
    if ({en1, io1, c1, b1, a1} !== {ref_f[7], ref_f[6], ref_f[2], ref_f[1], ref_f[0]}) begin
      failures++;
      $display("FAIL dedicated outputs");
    end
  endtask

  initial begin
    ref_f = 8'b1000_0000;
    #12 rst_n = 1'b1;
    check_all();
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we       = $urandom_range(0, 1);
      wsel     = flag_reg_e'($urandom_range(0, 7));
      wdata    = $urandom_range(0, 1);
      a1_we    = ($urandom_range(0, 3) == 0);
      a1_wdata = $urandom_range(0, 1);
      set_en   = ($urandom_range(0, 7) == 0);
      @(posedge clk); #1;
      if (we)     ref_f[wsel] = wdata;
      if (a1_we)  ref_f[0] = a1_wdata;
      if (set_en) ref_f[7] = 1'b1;
      we = 1'b0; a1_we = 1'b0; set_en = 1'b0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
