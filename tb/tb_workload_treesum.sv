// tb_workload_treesum: the total payroll of a 63-employee firm, one record
// per PE, added up over the physical tree links in logarithmic time, on the
// machine at its default size.
//
// The control processor (this testbench) runs the tree algorithm of
// NON-VON:
//   1. Find the leaves in constant time: every PE sets IO1 = 1 and executes
//      RECV1 LC. A leaf has no son, reads 0, and so learns that it is a leaf.
//   2. Every PE starts its running sum (16 bits, X8 low / Y8 high) with its
//      own 8-bit salary from RAM[1].
//   3. The set S of active PEs starts as the leaves. Each step makes S the
//      fathers of S (each PE shows its S flag in IO1 and reads its left
//      son's with RECV1 LC), and only S stays enabled. Every PE of S then
//      fetches its left son's sum (two RECV8 LC, one per byte) and adds it
//      bit-serially with ADD1, then does the same with its right son.
//      After D-1 = 5 steps the root holds the sum of the whole tree.
//   4. The same steps with maximum in place of addition: each PE of S
//      fetches a son's value, COMPARE marks the PEs whose son holds more,
//      and only those copy it. The root then holds the highest salary; the
//      CP divides the total by the head count for the mean.
//   5. Associative selection joined to the tree sum: records of department
//      "C" (RAM[2]) with 3 to 5 years of service (RAM[3], two COMPAREs)
//      contribute their salary, every other PE 0; a second run with 1 in
//      place of the salary gives the head count, and the CP divides.
// The CP needs the PE numbers only to load the salaries and read back the
// results; the algorithm uses none.
//
// Checks: every PE's leaf flag, every PE's final running sum and maximum
// against the sum and maximum of its subtree (rank r with t trailing zeros covers ranks
// r-2**t+1 .. r+2**t-1), and the root's total and maximum read with REPORT while only
// the last active set (the root) is enabled. Expected values come from the
// salary formula, not from the design.
//
// Interface: no ports; the testbench instantiates nonvon_top at its default parameters and prints
// "TB_RESULT checks=N failures=M" at the end. A watchdog counts a failure
// if the run hangs.
// Timing: 10 ns clock; the CP model applies one bus byte per clock, 1 ns
//   after the rising edge, and samples report and r1 1 ns after applying
//   REPORT or RESOLVE, before the edge that executes it.
// Source: the tree-step algorithm follows NON-VON; 16-bit sums, the leaf
//   test and the salaries are own choices.
module tb_workload_treesum;
  import nonvon_pkg::*;

  localparam int D = 6;
  localparam int N = (1 << D) - 1;
  localparam int ROOT = 1 << (D - 1);
  localparam int NB = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cp_valid = 1'b0;
  byte_t cp_byte = '0;
  byte_t report;
  logic r1;
  logic [NB-1:0] ihu_active = '0, ihu_is_active, ihu_valid = '0, ihu_any;
  byte_t ihu_byte [NB];
  byte_t ihu_report [NB];

  int checks = 0, failures = 0;
  int n_steps = 0, n_max_steps = 0, n_leaves = 0;

  nonvon_top dut (
    .clk, .rst_n, .cp_valid, .cp_byte, .report, .r1,
    .ihu_active, .ihu_is_active, .ihu_valid, .ihu_byte, .ihu_report, .ihu_any
  );

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
      if (failures < 30) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic issue(byte_t b);
    cp_valid = 1'b1;
    cp_byte  = b;
    @(posedge clk);
    #1 cp_valid = 1'b0;
  endtask
  task automatic bcast(byte_t v);
    issue(OPC_BROADCAST8);
    issue(v);
  endtask
  task automatic do_report(output byte_t v);
    cp_valid = 1'b1;
    cp_byte  = OPC_REPORT;
    #1 v = report;
    @(posedge clk);
    #1 cp_valid = 1'b0;
  endtask
  task automatic do_resolve(output logic found);
    cp_valid = 1'b1;
    cp_byte  = OPC_RESOLVE;
    #1 found = r1;
    @(posedge clk);
    #1 cp_valid = 1'b0;
  endtask
  task automatic select(int id);
    issue(OPC_ENABLE);
    bcast(byte_t'(id));
    issue(op_store_a8(R_B8));
    issue(op_load_a8(R_C8));
    issue(OPC_COMPARE);
    issue(op_store_a1(F_EN1));
  endtask
  task automatic peek8(int id, byte_reg_e r, output byte_t v);
    select(id);
    issue(op_load_a8(r));
    do_report(v);
  endtask
  task automatic peek_flag(int id, flag_reg_e f, output logic v);
    byte_t b;
    select(id);
    bcast(8'h00);
    issue(op_load_a1(f));
    issue(OPC_ROTLA);
    do_report(b);
    v = b[0];
  endtask

  function automatic int tz(int r);
    int t = 0;
    while (((r >> t) & 1) == 0) t++;
    return t;
  endfunction
  function automatic int sal(int r);
    return (r * 37 + 11) % 200 + 20;
  endfunction
  function automatic int subtree_sum(int r);
    int s = 0, h = (1 << tz(r)) - 1;
    for (int q = r - h; q <= r + h; q++) s += sal(q);
    return s;
  endfunction

  function automatic int subtree_max(int r);
    int m = 0, h = (1 << tz(r)) - 1;
    for (int q = r - h; q <= r + h; q++) if (sal(q) > m) m = sal(q);
    return m;
  endfunction

  // {A8 ring} add: A8 <- A8 + B8 + C1 bit-serially, carry out left in C1
  task automatic add_bytes();
    repeat (8) begin
      issue(OPC_ROTRA);
      issue(OPC_ROTRB);
      issue(OPC_ADD1);
    end
    issue(OPC_ROTRA);
  endtask

  // Enabled PEs of the active set (flag X1) add the sum of son `nbr`.
  task automatic add_son(nbr_sel_e nbr);
    // every PE shows its low byte; the active set takes the son's
    issue(OPC_ENABLE);
    issue(op_load_a8(R_X8));
    issue(op_store_a8(R_IO8));
    issue(op_load_a1(F_X1));
    issue(op_store_a1(F_EN1));
    issue(op_recv8(nbr));
    issue(op_load_a8(R_IO8));
    issue(op_store_a8(R_Z8));          // son's low byte
    // same for the high byte, which stays in IO8
    issue(OPC_ENABLE);
    issue(op_load_a8(R_Y8));
    issue(op_store_a8(R_IO8));
    issue(op_load_a1(F_X1));
    issue(op_store_a1(F_EN1));
    issue(op_recv8(nbr));
    // low byte: X8 += Z8
    issue(op_logical(LF_CLEAR));
    issue(op_store_a1(F_C1));
    issue(op_load_a8(R_X8));
    issue(op_load_b8(R_Z8));
    add_bytes();
    issue(op_store_a8(R_X8));
    // high byte: Y8 += IO8 + carry
    issue(op_load_a8(R_Y8));
    issue(op_load_b8(R_IO8));
    add_bytes();
    issue(op_store_a8(R_Y8));
  endtask

  // Enabled PEs of the active set keep the larger of their Z8 and the Z8 of
  // son `nbr`: COMPARE sets B1 where the son's value is larger, and only
  // those PEs stay enabled for the store.
  task automatic max_son(nbr_sel_e nbr);
    issue(OPC_ENABLE);
    issue(op_load_a8(R_Z8));
    issue(op_store_a8(R_IO8));
    issue(op_load_a1(F_X1));
    issue(op_store_a1(F_EN1));
    issue(op_recv8(nbr));
    issue(op_load_b8(R_Z8));
    issue(op_load_a8(R_IO8));
    issue(OPC_COMPARE);                // B1 = son > own
    issue(op_load_a1(F_B1));
    issue(op_store_a1(F_EN1));
    issue(op_store_a8(R_Z8));
  endtask

  // department letter (RAM[2]) and years employed (RAM[3]) of PE r
  function automatic byte_t dept(int r);
    return byte_t'("A" + (r % 3));
  endfunction
  function automatic int years(int r);
    return (r * 5) % 9;
  endfunction
  function automatic bit chosen(int r);
    return dept(r) == "C" && years(r) >= 3 && years(r) <= 5;
  endfunction

  // the tree sum of {Y8,X8}: leaves (Z1) up to the root in D-1 steps,
  // then the root's total is read
  task automatic tree_total(output int total);
    byte_t lo, hi;
    issue(OPC_ENABLE);
    issue(op_load_a1(F_Z1));
    issue(op_store_a1(F_X1));
    for (int step = 1; step < D; step++) begin
      issue(OPC_ENABLE);
      issue(op_load_a1(F_X1));
      issue(op_store_a1(F_IO1));
      issue(op_recv1(N_LC));
      issue(op_load_a1(F_IO1));
      issue(op_store_a1(F_X1));
      add_son(N_LC);
      add_son(N_RC);
    end
    issue(OPC_ENABLE);
    issue(op_load_a1(F_X1));
    issue(op_store_a1(F_EN1));
    issue(op_load_a8(R_Y8));
    do_report(hi);
    issue(op_load_a8(R_X8));
    do_report(lo);
    total = int'({hi, lo});
  endtask
  // all PEs: {Y8,X8} = 0; then only the chosen records stay enabled:
  // department "C" (COMPARE equal) and 3 <= years <= 5 (two COMPAREs, the
  // greater-than flag B1 narrowing EN1 each time)
  task automatic choose();
    issue(OPC_ENABLE);
    bcast(8'd0);
    issue(op_store_a8(R_X8));
    issue(op_store_a8(R_Y8));
    bcast(8'd2);
    issue(op_store_a8(R_MAR));
    bcast("C");
    issue(op_store_a8(R_B8));
    issue(OPC_READRAM);
    issue(OPC_COMPARE);
    issue(op_store_a1(F_EN1));
    bcast(8'd3);
    issue(op_store_a8(R_MAR));
    bcast(8'd2);
    issue(op_store_a8(R_B8));
    issue(OPC_READRAM);
    issue(OPC_COMPARE);                // B1 = years > 2
    issue(op_load_a1(F_B1));
    issue(op_store_a1(F_EN1));
    bcast(8'd5);
    issue(op_store_a8(R_B8));
    issue(OPC_READRAM);
    issue(OPC_COMPARE);                // B1 = years > 5
    issue(op_load_a1(F_B1));
    issue(op_logical(LF_NEGATE));
    issue(op_store_a1(F_EN1));
  endtask

  initial begin
    logic f;
    byte_t lo, hi;
    int sel_total, sel_count, exp_total, exp_count;
    int count;
    for (int b = 0; b < NB; b++) ihu_byte[b] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // number the PEs (C8), only to load and read back data
    issue(op_logical(LF_CLEAR));
    issue(op_store_a1(F_X1));
    count = 0;
    begin : enumerate
      forever begin
        issue(OPC_ENABLE);
        issue(op_load_a1(F_X1));
        issue(op_logical(LF_NEGATE));
        do_resolve(f);
        if (!f) disable enumerate;
        count++;
        issue(op_store_a1(F_EN1));
        bcast(byte_t'(count));
        issue(op_store_a8(R_C8));
        issue(op_logical(LF_SET));
        issue(op_store_a1(F_X1));
      end
    end
    check("PEs numbered", count, N);
    for (int r = 1; r <= N; r++) begin
      select(r);
      bcast(8'd1);
      issue(op_store_a8(R_MAR));
      bcast(byte_t'(sal(r)));
      issue(OPC_WRITERAM);
      bcast(8'd2);
      issue(op_store_a8(R_MAR));
      bcast(dept(r));
      issue(OPC_WRITERAM);
      bcast(8'd3);
      issue(op_store_a8(R_MAR));
      bcast(byte_t'(years(r)));
      issue(OPC_WRITERAM);
    end

    // 1. leaves: IO1 = 1 everywhere, RECV1 LC; leaves read 0. Z1 = leaf.
    issue(OPC_ENABLE);
    issue(op_logical(LF_SET));
    issue(op_store_a1(F_IO1));
    issue(op_recv1(N_LC));
    issue(op_load_a1(F_IO1));
    issue(op_logical(LF_NEGATE));
    issue(op_store_a1(F_Z1));
    issue(op_store_a1(F_X1));          // active set S = leaves

    // 2. running sum = own salary
    bcast(8'd1);
    issue(op_store_a8(R_MAR));
    issue(OPC_READRAM);
    issue(op_store_a8(R_X8));
    bcast(8'd0);
    issue(op_store_a8(R_Y8));

    // 3. D-1 steps up the tree
    for (int step = 1; step < D; step++) begin
      issue(OPC_ENABLE);
      issue(op_load_a1(F_X1));
      issue(op_store_a1(F_IO1));
      issue(op_recv1(N_LC));           // S := fathers of S
      issue(op_load_a1(F_IO1));
      issue(op_store_a1(F_X1));
      add_son(N_LC);
      add_son(N_RC);
      n_steps++;
    end

    // the root is the only member of the last set: read the total
    issue(OPC_ENABLE);
    issue(op_load_a1(F_X1));
    issue(op_store_a1(F_EN1));
    issue(op_load_a8(R_Y8));
    do_report(hi);
    issue(op_load_a8(R_X8));
    do_report(lo);
    check("payroll total at the root", int'({hi, lo}), subtree_sum(ROOT));
    $display("payroll total %0d, mean %0d", {hi, lo}, int'({hi, lo}) / N);

    // 4. the same tree steps with maximum in place of addition, in Z8
    issue(OPC_ENABLE);
    issue(op_load_a1(F_Z1));
    issue(op_store_a1(F_X1));          // active set S = leaves again
    bcast(8'd1);
    issue(op_store_a8(R_MAR));
    issue(OPC_READRAM);
    issue(op_store_a8(R_Z8));
    for (int step = 1; step < D; step++) begin
      issue(OPC_ENABLE);
      issue(op_load_a1(F_X1));
      issue(op_store_a1(F_IO1));
      issue(op_recv1(N_LC));
      issue(op_load_a1(F_IO1));
      issue(op_store_a1(F_X1));
      max_son(N_LC);
      max_son(N_RC);
      n_max_steps++;
    end
    issue(OPC_ENABLE);
    issue(op_load_a1(F_X1));
    issue(op_store_a1(F_EN1));
    issue(op_load_a8(R_Z8));
    do_report(lo);
    check("highest salary at the root", int'(lo), subtree_max(ROOT));
    $display("highest salary %0d", lo);

    for (int r = 1; r <= N; r++) begin
      peek_flag(r, F_Z1, f);
      check($sformatf("leaf flag PE %0d", r), int'(f), int'(tz(r) == 0));
      if (f) n_leaves++;
      peek8(r, R_X8, lo);
      peek8(r, R_Y8, hi);
      check($sformatf("subtree sum PE %0d", r), int'({hi, lo}), subtree_sum(r));
      peek8(r, R_Z8, lo);
      check($sformatf("subtree max PE %0d", r), int'(lo), subtree_max(r));
    end
    check("leaves found", n_leaves, (N + 1) / 2);

    // 5. mean salary in department C for 3 to 5 years of service: the
    //    chosen records contribute their salary (then 1, for the head
    //    count) and every other PE 0, with the tree sum unchanged
    choose();
    bcast(8'd1);
    issue(op_store_a8(R_MAR));
    issue(OPC_READRAM);
    issue(op_store_a8(R_X8));
    tree_total(sel_total);
    choose();
    bcast(8'd1);
    issue(op_store_a8(R_X8));
    tree_total(sel_count);
    exp_total = 0;
    exp_count = 0;
    for (int r = 1; r <= N; r++) if (chosen(r)) begin
      exp_total += sal(r);
      exp_count++;
    end
    check("salary total of the chosen group", sel_total, exp_total);
    check("head count of the chosen group", sel_count, exp_count);
    check("chosen group neither empty nor everybody",
          int'(exp_count > 0 && exp_count < N), 1);
    if (sel_count > 0)
      $display("department C, 3..5 years: %0d employees, mean salary %0d",
               sel_count, sel_total / sel_count);
    check("tree steps", n_steps, D - 1);
    check("tree steps for the maximum", n_max_steps, D - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
