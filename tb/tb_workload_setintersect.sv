// tb_workload_setintersect: intersection of two sets stored in the same
// machine, by associative enumeration and probing, on the machine at its
// default size (63 PEs).
//
// Each PE holds one set element: a tag byte at RAM[0] (1 = set S, 2 = set
// L) and the element's value at RAM[1]. PEs whose number is a multiple of
// four hold S (15 elements), the others hold L (48 elements). The
// testbench, acting as control processor, runs the method NON-VON uses for
// intersection when one set is small:
//   1. mark S (X1) by comparing the tag with a broadcast 1, and clear the
//      result flag Y1 and the "done" flag Z1 everywhere;
//   2. repeat: enable the S elements not yet done, RESOLVE to pick one
//      (C1 marks it, Z1 records it as done), read its value with REPORT;
//      then enable L, broadcast the value, compare it with every L value at
//      once and RESOLVE only for its R1 output ("does any L element
//      match?"); if one does, enable the current S element again and set
//      its Y1;
//   3. stop when RESOLVE finds no S element left.
// The number of steps is |S|, each a constant number of instructions
// whatever the size of L.
//
// The difference S - L (S elements left unflagged, enumerated the same
// way) and the size of the union follow.
//
// Checks: S elements come out once each, in increasing PE (inorder)
// order, each with the right value; the CP's R1 answers and every PE's Y1
// flag match the intersection computed here. Expected values come from the
// loading formulas, not from the design.
//
// Interface: no ports; the testbench instantiates nonvon_top at its default parameters and prints
// "TB_RESULT checks=N failures=M" at the end. A watchdog counts a failure
// if the run hangs.
// Timing: 10 ns clock; the CP model applies one bus byte per clock, 1 ns
//   after the rising edge, and samples report and r1 1 ns after applying
//   REPORT or RESOLVE, before the edge that executes it.
// Source: enumeration and probing follow NON-VON; set sizes and values are
//   own choices.
module tb_workload_setintersect;
  import nonvon_pkg::*;

  localparam int D = 6;
  localparam int N = (1 << D) - 1;
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
  task automatic set_mar(int addr);
    bcast(byte_t'(addr));
    issue(op_store_a8(R_MAR));
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

  function automatic bit in_s(int r);
    return (r % 4) == 0;
  endfunction
  function automatic int value(int r);
    return in_s(r) ? (r * 7) % 41 : (r * 3 + 5) % 41;
  endfunction
  function automatic bit in_l_values(int v);
    for (int q = 1; q <= N; q++) if (!in_s(q) && value(q) == v) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    logic f, hit;
    byte_t v, id;
    int count, n_s, n_common, exp_common, last_id, n_diff;
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
      set_mar(0);
      bcast(in_s(r) ? 8'd1 : 8'd2);
      issue(OPC_WRITERAM);
      set_mar(1);
      bcast(byte_t'(value(r)));
      issue(OPC_WRITERAM);
    end
    exp_common = 0;
    for (int r = 1; r <= N; r++) if (in_s(r) && in_l_values(value(r))) exp_common++;

    // 1. X1 = member of S; Y1 (result) and Z1 (done) cleared
    issue(OPC_ENABLE);
    bcast(8'd1);
    issue(op_store_a8(R_B8));
    set_mar(0);
    issue(OPC_READRAM);
    issue(OPC_COMPARE);
    issue(op_store_a1(F_X1));
    issue(op_logical(LF_CLEAR));
    issue(op_store_a1(F_Y1));
    issue(op_store_a1(F_Z1));

    // 2. one step per element of S
    n_s = 0;
    n_common = 0;
    last_id = 0;
    begin : steps
      forever begin
        issue(OPC_ENABLE);
        issue(op_logical(LF_CLEAR));
        issue(op_store_a1(F_C1));       // no current element
        issue(op_load_a1(F_X1));
        issue(op_store_a1(F_EN1));      // S only
        issue(op_load_a1(F_Z1));
        issue(op_logical(LF_NEGATE));   // candidates: not done
        do_resolve(f);
        if (!f) disable steps;
        n_s++;
        issue(op_store_a1(F_EN1));      // the chosen element alone
        issue(op_store_a1(F_C1));
        issue(op_store_a1(F_Z1));
        issue(op_load_a8(R_C8));
        do_report(id);
        check("S elements in inorder", int'(int'(id) > last_id), 1);
        check($sformatf("PE %0d is in S", id), int'(in_s(int'(id))), 1);
        last_id = int'(id);
        set_mar(1);
        issue(OPC_READRAM);
        do_report(v);
        check($sformatf("value of S element %0d", id), int'(v), value(int'(id)));
        // probe L with the value
        issue(OPC_ENABLE);
        issue(op_load_a1(F_X1));
        issue(op_logical(LF_NEGATE));
        issue(op_store_a1(F_EN1));      // L only
        set_mar(1);
        bcast(v);
        issue(op_store_a8(R_B8));
        issue(OPC_READRAM);
        issue(OPC_COMPARE);
        do_resolve(hit);                // R1: some L element matches
        check($sformatf("probe for %0d", v), int'(hit), int'(in_l_values(int'(v))));
        if (hit) begin
          n_common++;
          issue(OPC_ENABLE);
          issue(op_load_a1(F_C1));
          issue(op_store_a1(F_EN1));
          issue(op_logical(LF_SET));
          issue(op_store_a1(F_Y1));
        end
        if (n_s > N) disable steps;
      end
    end
    check("elements of S enumerated", n_s, N / 4);
    check("size of the intersection", n_common, exp_common);

    // difference S - L: the S elements left without a result flag,
    // enumerated with RESOLVE (C1 marks those already counted); the union
    // is L plus that difference
    issue(OPC_ENABLE);
    issue(op_logical(LF_CLEAR));
    issue(op_store_a1(F_C1));
    n_diff = 0;
    begin : diff
      forever begin
        issue(OPC_ENABLE);
        issue(op_load_a1(F_X1));
        issue(op_store_a1(F_EN1));      // S only
        issue(op_load_a1(F_Y1));
        issue(op_load_b1(F_C1));
        issue(op_logical(4'b0001));     // NOR: not in L, not yet counted
        do_resolve(f);
        if (!f) disable diff;
        n_diff++;
        issue(op_store_a1(F_EN1));
        issue(op_load_a8(R_C8));
        do_report(id);
        check($sformatf("PE %0d belongs to the difference", id),
              int'(in_s(int'(id)) && !in_l_values(value(int'(id)))), 1);
        issue(op_logical(LF_SET));
        issue(op_store_a1(F_C1));
        if (n_diff > N) disable diff;
      end
    end
    check("size of the difference", n_diff, N / 4 - exp_common);
    check("size of the union", (N - N / 4) + n_diff, N - exp_common);
    $display("|S| = %0d, |L| = %0d, |S and L| = %0d", n_s, N - n_s, n_common);

    for (int r = 1; r <= N; r++) begin
      peek_flag(r, F_Y1, f);
      check($sformatf("result flag PE %0d", r), int'(f),
            int'(in_s(r) && in_l_values(value(r))));
      peek_flag(r, F_Z1, f);
      check($sformatf("done flag PE %0d", r), int'(f), int'(in_s(r)));
    end
    check("intersection neither empty nor all of S",
          int'(exp_common > 0 && exp_common < N / 4), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
