// tb_pps_board: a PPS board of two chips (16 PEs) closed into a tree and run as one.
//
// The testbench closes the block into a small tree: the interior PE that
// the block leaves free is made the root, with the block's complete subtree
// (its T connection) as the root's left son and no right son. It then acts
// as control processor on the root's father link: it numbers the PEs by
// associative enumeration (RESOLVE keeps the lowest inorder candidate), and
// checks every PE's number, what RECV8 from P, LC, RC, LN and RN delivers
// in every PE, and SEND8 RN with some PEs disabled. Expected values come from
// closed formulas for inorder numbers in a complete binary tree: a PE with
// number r and t trailing zero bits has sons r -+ 2**(t-1) and father
// r +- 2**t; the extra root has number S+1 and the subtree root as left son.
//
// Interface: no ports; the testbench instantiates pps_board, plus one
// pe as root, and prints
// "TB_RESULT checks=N failures=M" at the end. A watchdog counts a failure
// if the run hangs.
// Timing: 10 ns clock; the CP model applies one bus byte per clock, 1 ns
//   after the rising edge, and samples report and r1 1 ns after applying
//   REPORT or RESOLVE, before the edge that executes it.
// Source: the tree and inorder linear order follow NON-VON 1; the closing
//   root and test values are own choices.
module tb_pps_board;
  import nonvon_pkg::*;
  localparam int L = 4;          // levels of the complete subtree
  localparam int S = (1 << L) - 1;        // PEs in it
  localparam int N = S + 1;               // plus the root
  localparam int SUBROOT = 1 << (L - 1);

  logic clk = 1'b0, rst_n = 1'b0;
  down_t root_dn;
  up_t root_up;
  down_t t_dn, l_dn, r_dn;
  up_t t_up;
  int checks = 0, failures = 0;
  int n_resolve = 0, n_tree = 0, n_linear = 0, n_blocked = 0;

  pps_board #(.M(1), .C(3), .RAM_WORDS(64)) dut (
    .clk, .rst_n,
    .t_down_i(t_dn), .t_up_o(t_up),
    .f_down_i(root_dn), .f_up_o(root_up),
    .l_down_o(l_dn), .l_up_i(t_up),
    .r_down_o(r_dn), .r_up_i(UP_NONE)
  );

  assign t_dn = l_dn;   // root's left son is the block's subtree

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic issue(byte_t b);
    root_dn.bc = '{valid: 1'b1, data: b};
    @(posedge clk); #1;
    root_dn.bc.valid = 1'b0;
  endtask
  task automatic bcast(byte_t v);
    issue(OPC_BROADCAST8); issue(v);
  endtask
  task automatic select(int id);
    issue(OPC_ENABLE); bcast(byte_t'(id)); issue(op_store_a8(R_B8));
    issue(op_load_a8(R_C8)); issue(OPC_COMPARE); issue(op_store_a1(F_EN1));
  endtask
  task automatic peek8(int id, byte_reg_e r, output byte_t v);
    select(id);
    issue(op_load_a8(r));
    #1 v = root_up.report;
  endtask

  function automatic int tz(int r);
    int t = 0;
    while (((r >> t) & 1) == 0) t++;
    return t;
  endfunction
  function automatic int father(int r);
    int t = tz(r);
    if (r == N) return 0;
    if (r == SUBROOT) return N;
    return (((r >> (t + 1)) & 1) == 0) ? r + (1 << t) : r - (1 << t);
  endfunction
  function automatic int lson(int r);
    if (r == N) return SUBROOT;
    return (tz(r) == 0) ? 0 : r - (1 << (tz(r) - 1));
  endfunction
  function automatic int rson(int r);
    if (r == N) return 0;
    return (tz(r) == 0) ? 0 : r + (1 << (tz(r) - 1));
  endfunction
  function automatic bit en_pat(int r);
    return (r % 3) != 0;
  endfunction
  function automatic int expect_io8(int kind, int r);
    int x;
    case (kind)
      0: x = father(r);
      1: x = lson(r);
      2: x = rson(r);
      3: x = (r > 1) ? r - 1 : 0;
      4: x = (r < N) ? r + 1 : 0;
      default: x = (en_pat(r) && r > 1 && en_pat(r - 1)) ? r - 1 : 0;
    endcase
    if (x == 0) return (kind <= 4) ? 0 : r;   // RECV from no PE reads 0
    return x;
  endfunction

  initial begin
    byte_t v;
    logic f;
    int count;
    root_dn = DOWN_IDLE;
    #12 rst_n = 1'b1;
    @(posedge clk); #1;
    issue(op_logical(LF_CLEAR)); issue(op_store_a1(F_X1));
    count = 0;
    begin : enumerate
      forever begin
        issue(OPC_ENABLE); issue(op_load_a1(F_X1)); issue(op_logical(LF_NEGATE));
        root_dn.bc = '{valid: 1'b1, data: OPC_RESOLVE};
        #1 f = root_up.any;
        @(posedge clk); #1 root_dn.bc.valid = 1'b0;
        if (!f) disable enumerate;
        count++;
        n_resolve++;
        issue(op_store_a1(F_EN1));
        bcast(byte_t'(count)); issue(op_store_a8(R_C8));
        issue(op_logical(LF_SET)); issue(op_store_a1(F_X1));
      end
    end
    check("PEs enumerated", count, N);
    for (int r = 1; r <= N; r++) begin
      peek8(r, R_C8, v);
      check($sformatf("number of PE %0d", r), int'(v), r);
    end
    for (int kind = 0; kind < 6; kind++) begin
      issue(OPC_ENABLE); issue(op_load_a8(R_C8)); issue(op_store_a8(R_IO8));
      case (kind)
        0: issue(op_recv8(N_P));
        1: issue(op_recv8(N_LC));
        2: issue(op_recv8(N_RC));
        3: issue(op_recv8(N_LN));
        4: issue(op_recv8(N_RN));
        default: begin
          for (int r = 1; r <= N; r++) begin
            if (!en_pat(r)) begin
              select(r); issue(op_logical(LF_CLEAR)); issue(op_store_a1(F_Y1));
            end else begin
              select(r); issue(op_logical(LF_SET)); issue(op_store_a1(F_Y1));
            end
          end
          issue(OPC_ENABLE); issue(op_load_a1(F_Y1)); issue(op_store_a1(F_EN1));
          issue(op_send8(N_RN));
        end
      endcase
      for (int r = 1; r <= N; r++) begin
        peek8(r, R_IO8, v);
        check($sformatf("transfer %0d PE %0d", kind, r), int'(v), expect_io8(kind, r));
        if (int'(v) != r) begin
          if (kind >= 3) n_linear++; else n_tree++;
        end else if (kind == 5 && !en_pat(r) && r > 1) n_blocked++;
      end
    end
    check("RESOLVE used", int'(n_resolve > 0), 1);
    check("tree transfers seen", int'(n_tree > 0), 1);
    check("linear transfers seen", int'(n_linear > 0), 1);
    check("blocked SEND seen", int'(n_blocked > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
