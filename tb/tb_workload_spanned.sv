// tb_workload_spanned: records too long for one PE, on the full 63-PE
// machine, under both allocation schemes of NON-VON: linear and bush.
//
// Each record is 150 bytes' worth of data split into three segments A, B
// and C held by three PEs; segment A holds the first two characters of a
// department name, segment B the other three, segment C the salary. The
// query is: raise the salary of everybody in department "SALES". It needs
// activation to travel from segment to segment inside every record at once:
//   linear allocation: record k sits in the PEs with inorder numbers 3k+1,
//     3k+2, 3k+3 (A, B, C). Matching A segments pass activation to their
//     right linear neighbour with SEND1 RN, the B segments match "LES" and
//     pass it on to C the same way. SEND1 only reaches an enabled receiver
//     from an enabled sender, which is what carries the activation.
//   bush allocation: a record occupies a three-PE "bush": B at the bush
//     root, A its left son, C its right son; bush roots sit at tree levels
//     0, 2 and 4, so 21 bushes fill the 63 PEs. B segments fetch the match
//     flag from their left son with RECV1 LC and hand it to the right son
//     with SEND1 RC.
// The raise itself is a bit-serial program: salary s becomes s + s/8 (an
// eighth rather than a tenth, which keeps the CP program to shifts and one
// bit-serial addition; the data path exercised is the same).
//
// The testbench is the control processor. It numbers the PEs by associative
// enumeration (RESOLVE keeps the lowest inorder number), loads every
// record through the broadcast bus, runs the query, then reads back every
// PE's RAM and its match flags. Expected values come from the record
// layout and closed inorder formulas (rank r with t trailing zeros has sons
// r -+ 2**(t-1)), not from the design. Three kinds of record are stored:
// "SALES" (raised), "SALTS" (A matches, B does not) and "MALES" (B would
// match but A does not), and each kind must occur.
//
// Finally the raised salaries of the bush layout are totalled the way the
// tree sum is extended to bushes: each bush is a node of a quaternary tree
// (its sons are the bushes below its A and C segments), and each of three
// bush steps adds the totals of a bush's sons into its running sum. Each
// PE's 16-bit total (X8 low, Y8 high) and the root's are checked.
//
// Interface: no ports; the testbench instantiates nonvon_top at its default parameters and prints
// "TB_RESULT checks=N failures=M" at the end. A watchdog counts a failure
// if the run hangs.
// Timing: 10 ns clock; the CP model applies one bus byte per clock, 1 ns
//   after the rising edge, and samples report and r1 1 ns after applying
//   REPORT or RESOLVE, before the edge that executes it.
// Source: linear and bush allocation and the SALES raise follow NON-VON; the
//   raise of one eighth and the record contents are own choices.
module tb_workload_spanned;
  import nonvon_pkg::*;

  localparam int D = 6;                    // depth of the default tree
  localparam int N = (1 << D) - 1;         // 63 PEs
  localparam int ROOT = 1 << (D - 1);
  localparam int NB = 4;
  localparam byte_t TAG_A = "A", TAG_B = "B", TAG_C = "C";

  logic clk = 1'b0, rst_n = 1'b0;
  logic cp_valid = 1'b0;
  byte_t cp_byte = '0;
  byte_t report;
  logic r1;
  logic [NB-1:0] ihu_active = '0, ihu_is_active, ihu_valid = '0, ihu_any;
  byte_t ihu_byte [NB];
  byte_t ihu_report [NB];

  int checks = 0, failures = 0;
  int n_raised [2], n_kept [2], n_kind [3];
  int n_bush_steps = 0;

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

  // ---- CP primitives ----
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
  // only the PE numbered `id` (in C8) stays enabled
  task automatic select(int id);
    issue(OPC_ENABLE);
    bcast(byte_t'(id));
    issue(op_store_a8(R_B8));
    issue(op_load_a8(R_C8));
    issue(OPC_COMPARE);
    issue(op_store_a1(F_EN1));
  endtask
  task automatic write_ram(byte_t addr, byte_t val);
    bcast(addr);
    issue(op_store_a8(R_MAR));
    bcast(val);
    issue(OPC_WRITERAM);
  endtask
  // enabled PEs whose RAM[addr] differs from ch disable themselves
  task automatic match(byte_t addr, byte_t ch);
    bcast(ch);
    issue(op_store_a8(R_B8));
    bcast(addr);
    issue(op_store_a8(R_MAR));
    issue(OPC_READRAM);
    issue(OPC_COMPARE);
    issue(op_store_a1(F_EN1));
  endtask
  // A1 := (segment tag == t), with A8 left holding the tag
  task automatic tag_is(byte_t t);
    bcast(t);
    issue(op_store_a8(R_B8));
    bcast(8'd0);
    issue(op_store_a8(R_MAR));
    issue(OPC_READRAM);
    issue(OPC_COMPARE);
  endtask
  task automatic peek_ram(int id, byte_t addr, output byte_t v);
    select(id);
    bcast(addr);
    issue(op_store_a8(R_MAR));
    issue(OPC_READRAM);
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

  // Salary raise in every enabled PE: RAM[1] += RAM[1] >> 3, bit-serially.
  task automatic raise_salary();
    bcast(8'd1);
    issue(op_store_a8(R_MAR));
    issue(OPC_READRAM);
    issue(op_store_a8(R_B8));
    repeat (3) begin                    // B8 >>= 1 with a zero shifted in
      issue(op_logical(LF_CLEAR));
      issue(op_store_a1(F_B1));
      issue(OPC_ROTRB);
    end
    issue(op_logical(LF_CLEAR));
    issue(op_store_a1(F_C1));           // carry in = 0
    repeat (8) begin                    // {A8,A1} ring: sum replaces A8 bits
      issue(OPC_ROTRA);
      issue(OPC_ROTRB);
      issue(OPC_ADD1);
    end
    issue(OPC_ROTRA);
    issue(OPC_WRITERAM);
  endtask

  // ---- record layout ----
  function automatic int tz(int r);
    int t = 0;
    while (((r >> t) & 1) == 0) t++;
    return t;
  endfunction
  function automatic int father(int r);
    int t = tz(r);
    return (((r >> (t + 1)) & 1) == 0) ? r + (1 << t) : r - (1 << t);
  endfunction
  function automatic bit is_left(int r);
    return ((r >> (tz(r) + 1)) & 1) == 0;
  endfunction
  // scheme 0 = linear, 1 = bush; segment 0/1/2 = A/B/C
  function automatic int seg_of(int scheme, int r);
    if (scheme == 0) return (r - 1) % 3;
    if (tz(r) % 2 == 1) return 1;        // bush root: B
    return is_left(r) ? 0 : 2;
  endfunction
  function automatic int rec_of(int scheme, int r);
    int b;
    if (scheme == 0) return (r - 1) / 3;
    b = (tz(r) % 2 == 1) ? r : father(r);
    return b / 2;                        // distinct per bush
  endfunction
  function automatic int kind_of(int scheme, int r);
    return rec_of(scheme, r) % 3;        // 0 SALES, 1 SALTS, 2 MALES
  endfunction
  function automatic byte_t dept(int kind, int i);
    string s;
    case (kind)
      0: s = "SALES";
      1: s = "SALTS";
      default: s = "MALES";
    endcase
    return byte_t'(s[i]);
  endfunction
  function automatic int salary(int scheme, int r);
    return 40 + 7 * (rec_of(scheme, r) % 21);
  endfunction
  function automatic int ram1(int scheme, int r, bit raised);
    int s;
    case (seg_of(scheme, r))
      0: return int'(dept(kind_of(scheme, r), 0));
      1: return int'(dept(kind_of(scheme, r), 2));
      default: begin
        s = salary(scheme, r);
        return raised && kind_of(scheme, r) == 0 ? (s + (s >> 3)) % 256 : s;
      end
    endcase
  endfunction

  task automatic load_records(int scheme);
    int sg, kd;
    byte_t tag;
    for (int r = 1; r <= N; r++) begin
      sg = seg_of(scheme, r);
      kd = kind_of(scheme, r);
      tag = (sg == 0) ? TAG_A : (sg == 1) ? TAG_B : TAG_C;
      select(r);
      write_ram(8'd0, tag);
      case (sg)
        0: begin
          write_ram(8'd1, dept(kd, 0));
          write_ram(8'd2, dept(kd, 1));
        end
        1: begin
          write_ram(8'd1, dept(kd, 2));
          write_ram(8'd2, dept(kd, 3));
          write_ram(8'd3, dept(kd, 4));
        end
        default: write_ram(8'd1, byte_t'(salary(scheme, r)));
      endcase
    end
  endtask

  // clear the match flags X1 (A matched), Y1 (B matched) and IO1 everywhere
  task automatic clear_flags();
    issue(OPC_ENABLE);
    issue(op_logical(LF_CLEAR));
    issue(op_store_a1(F_X1));
    issue(op_store_a1(F_Y1));
    issue(op_store_a1(F_IO1));
  endtask

  // Linear allocation: activation moves A -> B -> C with SEND1 RN.
  task automatic query_linear();
    clear_flags();
    // A segments matching "SA"
    tag_is(TAG_A);
    issue(op_store_a1(F_EN1));
    match(8'd1, "S");
    match(8'd2, "A");
    issue(op_logical(LF_SET));
    issue(op_store_a1(F_X1));
    issue(op_store_a1(F_IO1));
    // enabled: matched A segments (senders) and every B segment (receivers)
    issue(OPC_ENABLE);
    tag_is(TAG_B);
    issue(op_load_b1(F_X1));
    issue(op_logical(LF_OR));
    issue(op_store_a1(F_EN1));
    issue(op_send1(N_RN));
    // keep the B segments that received activation
    tag_is(TAG_B);
    issue(op_load_b1(F_IO1));
    issue(op_logical(LF_AND));
    issue(op_store_a1(F_EN1));
    match(8'd1, "L");
    match(8'd2, "E");
    match(8'd3, "S");
    issue(op_logical(LF_SET));
    issue(op_store_a1(F_Y1));
    // B -> C the same way
    issue(OPC_ENABLE);
    issue(op_load_a1(F_Y1));
    issue(op_store_a1(F_IO1));          // IO1 = Y1 in every PE
    tag_is(TAG_C);
    issue(op_load_b1(F_Y1));
    issue(op_logical(LF_OR));
    issue(op_store_a1(F_EN1));
    issue(op_send1(N_RN));
    tag_is(TAG_C);
    issue(op_load_b1(F_IO1));
    issue(op_logical(LF_AND));
    issue(op_store_a1(F_EN1));
    raise_salary();
  endtask

  // Bush allocation: B fetches from its left son (A) and hands to its right
  // son (C) over the physical tree links.
  task automatic query_bush();
    clear_flags();
    tag_is(TAG_A);
    issue(op_store_a1(F_EN1));
    match(8'd1, "S");
    match(8'd2, "A");
    issue(op_logical(LF_SET));
    issue(op_store_a1(F_X1));
    issue(op_store_a1(F_IO1));
    // every B segment reads its left son's flag
    issue(OPC_ENABLE);
    tag_is(TAG_B);
    issue(op_store_a1(F_EN1));
    issue(op_recv1(N_LC));
    issue(op_load_a1(F_IO1));
    issue(op_store_a1(F_EN1));
    match(8'd1, "L");
    match(8'd2, "E");
    match(8'd3, "S");
    issue(op_logical(LF_SET));
    issue(op_store_a1(F_Y1));
    // IO1 = Y1 everywhere, then enabled: matched B (senders) and all C
    issue(OPC_ENABLE);
    issue(op_load_a1(F_Y1));
    issue(op_store_a1(F_IO1));
    tag_is(TAG_C);
    issue(op_load_b1(F_Y1));
    issue(op_logical(LF_OR));
    issue(op_store_a1(F_EN1));
    issue(op_send1(N_RC));
    tag_is(TAG_C);
    issue(op_load_b1(F_IO1));
    issue(op_logical(LF_AND));
    issue(op_store_a1(F_EN1));
    raise_salary();
  endtask

  // ---- payroll total over bush-allocated records ----
  // A8 <- A8 + B8 + C1 bit-serially, carry out left in C1
  task automatic add_bytes();
    repeat (8) begin
      issue(OPC_ROTRA);
      issue(OPC_ROTRB);
      issue(OPC_ADD1);
    end
    issue(OPC_ROTRA);
  endtask
  // PEs of the active set (X1) add the 16-bit sum {Y8,X8} of son `nbr`
  task automatic add_son(nbr_sel_e nbr);
    issue(OPC_ENABLE);
    issue(op_load_a8(R_X8));
    issue(op_store_a8(R_IO8));
    issue(op_load_a1(F_X1));
    issue(op_store_a1(F_EN1));
    issue(op_recv8(nbr));
    issue(op_load_a8(R_IO8));
    issue(op_store_a8(R_Z8));
    issue(OPC_ENABLE);
    issue(op_load_a8(R_Y8));
    issue(op_store_a8(R_IO8));
    issue(op_load_a1(F_X1));
    issue(op_store_a1(F_EN1));
    issue(op_recv8(nbr));
    issue(op_logical(LF_CLEAR));
    issue(op_store_a1(F_C1));
    issue(op_load_a8(R_X8));
    issue(op_load_b8(R_Z8));
    add_bytes();
    issue(op_store_a8(R_X8));
    issue(op_load_a8(R_Y8));
    issue(op_load_b8(R_IO8));
    add_bytes();
    issue(op_store_a8(R_Y8));
  endtask
  // one tree step: the active set X1 moves to its fathers, which add the
  // sums of both sons
  task automatic tree_step();
    issue(OPC_ENABLE);
    issue(op_load_a1(F_X1));
    issue(op_store_a1(F_IO1));
    issue(op_recv1(N_LC));
    issue(op_load_a1(F_IO1));
    issue(op_store_a1(F_X1));
    add_son(N_LC);
    add_son(N_RC);
  endtask
  // Every bush is one node of a quaternary tree whose sons are the bushes
  // hanging below its A and C segments. Each bush step first lets A and C
  // collect the totals of the bushes below them, then lets B collect A and
  // C; the lowest bushes have nothing below and take the B half only.
  task automatic bush_payroll();
    issue(OPC_ENABLE);
    bcast(8'd0);
    issue(op_store_a8(R_X8));
    issue(op_store_a8(R_Y8));
    tag_is(TAG_C);                      // only C segments carry a salary
    issue(op_store_a1(F_EN1));
    bcast(8'd1);
    issue(op_store_a8(R_MAR));
    issue(OPC_READRAM);
    issue(op_store_a8(R_X8));
    issue(OPC_ENABLE);                  // leaves read 0 from a missing son
    issue(op_logical(LF_SET));
    issue(op_store_a1(F_IO1));
    issue(op_recv1(N_LC));
    issue(op_load_a1(F_IO1));
    issue(op_logical(LF_NEGATE));
    issue(op_store_a1(F_X1));
    tree_step();                        // bush step 1: lowest B segments
    n_bush_steps++;
    for (int k = 0; k < (D - 1) / 2; k++) begin
      tree_step();                      // A and C collect the bushes below
      tree_step();                      // B collects A and C
      n_bush_steps++;
    end
  endtask
  function automatic int bush_total(int r);
    int t = 0, h = (1 << tz(r)) - 1;
    for (int q = r - h; q <= r + h; q++)
      if (seg_of(1, q) == 2) t += ram1(1, q, 1'b1);
    return t;
  endfunction

  task automatic verify(int scheme, string name);
    byte_t v;
    logic f;
    for (int r = 1; r <= N; r++) begin
      peek_ram(r, 8'd1, v);
      check($sformatf("%s PE %0d RAM[1]", name, r), int'(v), ram1(scheme, r, 1'b1));
      if (seg_of(scheme, r) == 2) begin
        if (kind_of(scheme, r) == 0) n_raised[scheme]++;
        else n_kept[scheme]++;
        n_kind[kind_of(scheme, r)]++;
      end
      peek_flag(r, F_Y1, f);
      check($sformatf("%s PE %0d B-match flag", name, r), int'(f),
            int'(seg_of(scheme, r) == 1 && kind_of(scheme, r) == 0));
      peek_flag(r, F_X1, f);
      check($sformatf("%s PE %0d A-match flag", name, r), int'(f),
            int'(seg_of(scheme, r) == 0 && kind_of(scheme, r) != 2));
    end
  endtask

  initial begin
    logic f;
    int count;
    for (int b = 0; b < NB; b++) ihu_byte[b] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // number the PEs: C8 = inorder number
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

    load_records(0);
    query_linear();
    verify(0, "linear");

    load_records(1);
    query_bush();
    verify(1, "bush");
    bush_payroll();
    begin
      byte_t lo, hi;
      issue(OPC_ENABLE);
      issue(op_load_a1(F_X1));
      issue(op_store_a1(F_EN1));        // the bush root B alone
      issue(op_load_a8(R_Y8));
      do_report(hi);
      issue(op_load_a8(R_X8));
      do_report(lo);
      check("payroll over all bushes", int'({hi, lo}), bush_total(1 << (D - 1)));
      $display("bush payroll total %0d in %0d bush steps", {hi, lo}, n_bush_steps);
      for (int r = 1; r <= N; r++) begin
        select(r);
        issue(op_load_a8(R_X8));
        do_report(lo);
        issue(op_load_a8(R_Y8));
        do_report(hi);
        check($sformatf("payroll below PE %0d", r), int'({hi, lo}), bush_total(r));
      end
      check("bush steps", n_bush_steps, 3);
    end

    for (int s = 0; s < 2; s++) begin
      $display("%s: %0d records raised, %0d left alone", (s == 1) ? "bush" : "linear",
               n_raised[s], n_kept[s]);
      checks++;
      if (n_raised[s] == 0 || n_kept[s] == 0) begin
        failures++;
        $display("FAIL: scheme %0d did not exercise both outcomes", s);
      end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_kind[k] == 0) begin
        failures++;
        $display("FAIL: record kind %0d never stored", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
