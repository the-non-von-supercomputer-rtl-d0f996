// tb_pe_io_switch: the I/O switch with random inputs on all three links.
//
// For each random case the expected outputs are worked out here from the
// rules of the tree: broadcast copied down, report as the OR of enabled A8
// values, RESOLVE order left subtree < PE < right subtree, inorder first/
// last and predecessor/successor, and the receive selection of every
// SEND/RECV operand with enabled and disabled senders and receivers. Sons
// are present or absent at random, so both leaf and inner positions occur.
//
// Interface: no ports; the testbench instantiates pe_io_switch and prints
// "TB_RESULT checks=N failures=M" at the end. A watchdog counts a failure
// if the run hangs.
// Timing: combinational; each random case is checked 1 ns after it is
//   applied.
// Source: broadcast, report, RESOLVE order and neighbours follow NON-VON 1;
//   the missing-neighbour rule and SEND P are this design's choices.
module tb_pe_io_switch;
  import nonvon_pkg::*;
  logic en, a1, io1, kill_self, rx8_we, rx1_we, rx1;
  byte_t a8, io8, rx8;
  ctrl_t ctrl;
  down_t down_i, lc_down_o, rc_down_o;
  up_t up_o, lc_up_i, rc_up_i;
  int checks = 0, failures = 0;

  pe_io_switch dut (.en, .a1, .a8, .io8, .io1, .ctrl, .down_i, .up_o,
                    .lc_down_o, .lc_up_i, .rc_down_o, .rc_up_i,
                    .kill_self, .rx8_we, .rx8, .rx1_we, .rx1);

  initial begin
    #10000000;
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
    return '{present: ($urandom_range(0, 5) != 0), en: 1'($urandom),
             io8: 8'($urandom), io1: 1'($urandom)};
  endfunction

  function automatic up_t rnd_up();
    up_t u;
    u.present = $urandom_range(0, 1);
    u.report  = 8'($urandom);
    u.any     = 1'($urandom);
    u.self    = rnd_nbr(); u.self.present = 1'b1;
    u.first   = rnd_nbr(); u.first.present = 1'b1;
    u.last    = rnd_nbr(); u.last.present = 1'b1;
    return u;
  endfunction

  initial begin
    nbr_t me, exp_ln, exp_rn, src;
    logic ok, lc_any, rc_any;
    byte_t rep;
    for (int t = 0; t < 20000; t++) begin
      en = 1'($urandom); a1 = 1'($urandom); io1 = 1'($urandom);
      a8 = 8'($urandom); io8 = 8'($urandom);
      down_i.bc = '{valid: 1'($urandom), data: 8'($urandom)};
      down_i.kill = 1'($urandom); down_i.is_left = 1'($urandom);
      down_i.father = rnd_nbr(); down_i.pred = rnd_nbr(); down_i.succ = rnd_nbr();
      lc_up_i = rnd_up(); rc_up_i = rnd_up();
      ctrl = '{op: OP_NOP, acc_b: 1'b0, rsel: 3'd0, fn: 4'd0, nbr: N_P, imm: 8'd0};
      case ($urandom_range(0, 4))
        0: ctrl.op = OP_SEND8;
        1: ctrl.op = OP_RECV8;
        2: ctrl.op = OP_SEND1;
        3: ctrl.op = OP_RECV1;
        default: ctrl.op = OP_NOP;
      endcase
      ctrl.nbr = nbr_sel_e'($urandom_range(0, 4));
      #1;
      me = '{present: 1'b1, en: en, io8: io8, io1: io1};
      lc_any = lc_up_i.present && lc_up_i.any;
      rc_any = rc_up_i.present && rc_up_i.any;
      // broadcast and tree links
      check("bc to LC", lc_down_o.bc, down_i.bc);
      check("bc to RC", rc_down_o.bc, down_i.bc);
      check("LC side", lc_down_o.is_left, 1);
      check("RC side", rc_down_o.is_left, 0);
      check("father seen by LC", lc_down_o.father, me);
      check("father seen by RC", rc_down_o.father, me);
      check("self to father", up_o.self, me);
      // report and RESOLVE
      rep = (en ? a8 : 8'h00) | (lc_up_i.present ? lc_up_i.report : 8'h00)
                              | (rc_up_i.present ? rc_up_i.report : 8'h00);
      check("report", up_o.report, rep);
      check("any", up_o.any, lc_any || (en && a1) || rc_any);
      check("kill self", kill_self, down_i.kill || lc_any);
      check("kill LC", lc_down_o.kill, down_i.kill);
      check("kill RC", rc_down_o.kill, down_i.kill || lc_any || (en && a1));
      // inorder embedding
      check("first", up_o.first, lc_up_i.present ? lc_up_i.first : me);
      check("last",  up_o.last,  rc_up_i.present ? rc_up_i.last  : me);
      check("pred to LC", lc_down_o.pred, down_i.pred);
      check("succ to LC", lc_down_o.succ, me);
      check("pred to RC", rc_down_o.pred, me);
      check("succ to RC", rc_down_o.succ, down_i.succ);
      exp_ln = lc_up_i.present ? lc_up_i.last  : down_i.pred;
      exp_rn = rc_up_i.present ? rc_up_i.first : down_i.succ;
      // receive selection
      src = NBR_NONE; ok = 1'b0;
      if (ctrl.op == OP_RECV8 || ctrl.op == OP_RECV1) begin
        case (ctrl.nbr)
          N_P:  src = down_i.father;
          N_LC: src = lc_up_i.present ? lc_up_i.self : NBR_NONE;
          N_RC: src = rc_up_i.present ? rc_up_i.self : NBR_NONE;
          N_LN: src = exp_ln;
          default: src = exp_rn;
        endcase
        ok = en;
      end else if (ctrl.op == OP_SEND8 || ctrl.op == OP_SEND1) begin
        case (ctrl.nbr)
          N_LC: src = down_i.is_left ? down_i.father : NBR_NONE;
          N_RC: src = down_i.is_left ? NBR_NONE : down_i.father;
          N_LN: src = exp_rn;
          N_RN: src = exp_ln;
          default: src = NBR_NONE;
        endcase
        ok = en && src.present && src.en;
      end
      check("rx8_we", rx8_we, ok && (ctrl.op == OP_SEND8 || ctrl.op == OP_RECV8));
      check("rx1_we", rx1_we, ok && (ctrl.op == OP_SEND1 || ctrl.op == OP_RECV1));
      if (rx8_we) check("rx8", rx8, src.present ? src.io8 : 8'h00);
      if (rx1_we) check("rx1", rx1, src.present && src.io1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
