// tb_ihu: the Intelligent Head Unit in both modes. In passive mode both
// bundles must pass through unchanged; in active mode the subtree must get
// the local bus and nothing else from above, the father must see a silent
// subtree, and the local report/any lines must follow the subtree. The mode
// must change one clock after it is requested.
//
// Interface: no ports; the testbench instantiates ihu and prints
// "TB_RESULT checks=N failures=M" at the end. A watchdog counts a failure
// if the run hangs.
// Timing: 10 ns clock; inputs are applied at the falling edge and
//   results checked 1 ns after the following rising edge. Mode changes
//   are checked one clock after the request.
// Source: passive pass-through and active local control follow the IHU
//   description; the one-clock mode change is this design's choice.
module tb_ihu;
  import nonvon_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic active_i = 1'b0, active_o, loc_valid = 1'b0, loc_any;
  byte_t loc_byte = '0, loc_report;
  down_t p_down_i, s_down_o;
  up_t p_up_o, s_up_i;
  int checks = 0, failures = 0;
  int switches = 0;

  ihu dut (.clk, .rst_n, .active_i, .active_o, .loc_valid, .loc_byte,
           .loc_report, .loc_any, .p_down_i, .p_up_o, .s_down_o, .s_up_i);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic nbr_t rnd_nbr();
    return '{present: 1'($urandom), en: 1'($urandom), io8: 8'($urandom), io1: 1'($urandom)};
  endfunction

  initial begin
    logic mode = 1'b0;
    down_t exp_dn;
    up_t exp_up;
    p_down_i = DOWN_IDLE; s_up_i = UP_NONE;
    #12 rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if ($urandom_range(0, 9) == 0) active_i = ~active_i;
      loc_valid = 1'($urandom); loc_byte = 8'($urandom);
      p_down_i.bc = '{valid: 1'($urandom), data: 8'($urandom)};
      p_down_i.kill = 1'($urandom); p_down_i.is_left = 1'($urandom);
      p_down_i.father = rnd_nbr(); p_down_i.pred = rnd_nbr(); p_down_i.succ = rnd_nbr();
      s_up_i.present = 1'($urandom); s_up_i.report = 8'($urandom); s_up_i.any = 1'($urandom);
      s_up_i.self = rnd_nbr(); s_up_i.first = rnd_nbr(); s_up_i.last = rnd_nbr();
      #1;
      check("mode", active_o, mode);
      if (!mode) begin
        check("passive down", s_down_o, p_down_i);
        check("passive up", p_up_o, s_up_i);
      end else begin
        exp_dn = DOWN_IDLE;
        exp_dn.bc = '{valid: loc_valid, data: loc_byte};
        exp_up = UP_NONE;
        exp_up.present = s_up_i.present;
        check("active down", s_down_o, exp_dn);
        check("active up", p_up_o, exp_up);
      end
      check("local report", loc_report, s_up_i.present ? s_up_i.report : 8'h00);
      check("local any", loc_any, s_up_i.present && s_up_i.any);
      @(posedge clk); #1;
      if (mode != active_i) switches++;
      mode = active_i;
    end
    check("mode switches seen", int'(switches > 10), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
