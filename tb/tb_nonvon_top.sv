// tb_nonvon_top: end-to-end test of the PPS at its default size (63 PEs,
// four IHUs), driven the way a control processor would drive it.
//
// The testbench plays the CP: it puts one byte per clock on the broadcast
// bus and samples `report` and `r1` in the cycle it issues REPORT or
// RESOLVE. It first numbers the PEs by associative enumeration (RESOLVE
// picks one candidate, the CP broadcasts a number to it, marks it done),
// then checks every PE's number, its tree and linear neighbours, SEND with
// disabled PEs, bit-serial addition and subtraction, rotates, parallel RAM
// access with per-PE addresses, the associative "SALES" match with
// enumeration, and an IHU running its subtree on its own.
//
// Expected values come from closed formulas for the inorder numbering of a
// complete binary tree (rank r with t trailing zeros has sons r -+ 2**(t-1)
// and father r + 2**t or r - 2**t), not from the design. Each instruction
// takes one clock, so results are checked one instruction later.
//
// Interface: no ports; the testbench instantiates nonvon_top at its default parameters and prints
// "TB_RESULT checks=N failures=M" at the end. A watchdog counts a failure
// if the run hangs.
// Timing: 10 ns clock; the CP model applies one bus byte per clock, 1 ns
//   after the rising edge, and samples report and r1 1 ns after applying
//   REPORT or RESOLVE, before the edge that executes it.
// Source: the instruction semantics and the SALES query follow NON-VON 1;
//   the encoding, data values and test sequence are own choices.
module tb_nonvon_top;
  import nonvon_pkg::*;

  localparam int K = 2, BOARD_M = 1, C = 3;
  localparam int NB = 1 << K;
  localparam int D = K + BOARD_M + C;      // tree depth in levels
  localparam int N = (1 << D) - 1;         // working PEs
  localparam int ROOT = 1 << (D - 1);      // inorder rank of the root

  logic clk = 1'b0, rst_n = 1'b0;
  logic cp_valid = 1'b0;
  byte_t cp_byte = '0;
  byte_t report;
  logic r1;
  logic [NB-1:0] ihu_active = '0, ihu_is_active, ihu_valid = '0, ihu_any;
  byte_t ihu_byte [NB];
  byte_t ihu_report [NB];

  int checks = 0, failures = 0;
  int cycles = 0;
  // mechanism counters
  int n_bcast = 0, n_report = 0, n_resolve_multi = 0, n_disable = 0;
  int n_tree = 0, n_linear = 0, n_send_blocked = 0, n_ram_addr = 0;
  int n_compare = 0, n_add = 0, n_sub = 0, n_rot = 0, n_ihu = 0, n_logic = 0;

  nonvon_top dut (
    .clk, .rst_n, .cp_valid, .cp_byte, .report, .r1,
    .ihu_active, .ihu_is_active, .ihu_valid, .ihu_byte, .ihu_report, .ihu_any
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    repeat (400000) @(posedge clk);
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

  // ---- CP primitives ----
  task automatic issue(byte_t b);
    cp_valid = 1'b1;
    cp_byte  = b;
    @(posedge clk);
    #1;
    cp_valid = 1'b0;
  endtask

  task automatic bcast(byte_t v);
    issue(OPC_BROADCAST8);
    issue(v);
    n_bcast++;
  endtask

  task automatic do_report(output byte_t v);
    cp_valid = 1'b1;
    cp_byte  = OPC_REPORT;
    #1 v = report;
    @(posedge clk);
    #1 cp_valid = 1'b0;
    n_report++;
  endtask

  task automatic do_resolve(output logic found);
    cp_valid = 1'b1;
    cp_byte  = OPC_RESOLVE;
    #1 found = r1;
    @(posedge clk);
    #1 cp_valid = 1'b0;
  endtask

  // Leave enabled only the PE whose C8 holds `id`.
  task automatic select(int id);
    issue(OPC_ENABLE);
    bcast(byte_t'(id));
    issue(op_store_a8(R_B8));
    issue(op_load_a8(R_C8));
    issue(OPC_COMPARE);
    issue(op_store_a1(F_EN1));
    n_compare++;
  endtask

  // Report byte register r of PE `id`.
  task automatic peek8(int id, byte_reg_e r, output byte_t v);
    select(id);
    issue(op_load_a8(r));
    do_report(v);
  endtask

  // Report flag f of PE `id` (shifted into an all-zero A8).
  task automatic peek1(int id, flag_reg_e f, output logic v);
    byte_t b;
    select(id);
    bcast(8'h00);
    issue(op_load_a1(f));
    issue(OPC_ROTLA);
    do_report(b);
    v = b[0];
    n_rot++;
  endtask

  // ---- inorder formulas ----
  function automatic int tz(int r);
    int t = 0;
    while (((r >> t) & 1) == 0) t++;
    return t;
  endfunction
  function automatic int father(int r);
    int t = tz(r);
    if (r == ROOT) return 0;
    return (((r >> (t + 1)) & 1) == 0) ? r + (1 << t) : r - (1 << t);
  endfunction
  function automatic bit is_left(int r);
    return ((r >> (tz(r) + 1)) & 1) == 0;
  endfunction
  function automatic int lson(int r);
    return (tz(r) == 0) ? 0 : r - (1 << (tz(r) - 1));
  endfunction
  function automatic int rson(int r);
    return (tz(r) == 0) ? 0 : r + (1 << (tz(r) - 1));
  endfunction
  // PEs left enabled by the SEND test: bit 1 of the number clear
  function automatic bit en_pat(int r);
    return ((r >> 1) & 1) == 0;
  endfunction

  // Set IO8 := C8 (the PE's number) everywhere.
  task automatic io8_from_id();
    issue(OPC_ENABLE);
    issue(op_load_a8(R_C8));
    issue(op_store_a8(R_IO8));
  endtask

  // Disable PEs whose number has bit 1 set.
  task automatic disable_pattern();
    issue(op_load_a8(R_C8));
    issue(OPC_ROTRA);                 // A1 <- bit 0
    issue(OPC_ROTRA);                 // A1 <- bit 1
    issue(op_logical(LF_NEGATE));
    issue(op_store_a1(F_EN1));
    n_disable++; n_rot++; n_logic++;
  endtask

  // Check IO8 of every PE against exp_fn(kind, r).
  function automatic int expect_io8(int kind, int r);
    case (kind)
      0: return (r > 1) ? r - 1 : 0;                          // RECV8 LN
      1: return (r < N) ? r + 1 : 0;                          // RECV8 RN
      2: return (father(r) != 0) ? father(r) : 0;             // RECV8 P
      3: return (lson(r) != 0) ? lson(r) : 0;                 // RECV8 LC
      4: return (rson(r) != 0) ? rson(r) : 0;                 // RECV8 RC
      5: return (en_pat(r) && r > 1 && en_pat(r - 1)) ? r - 1 : r;   // SEND8 RN
      6: return (en_pat(r) && r < N && en_pat(r + 1)) ? r + 1 : r;   // SEND8 LN
      7: return (en_pat(r) && father(r) != 0 && is_left(r) && en_pat(father(r)))
                ? father(r) : r;                              // SEND8 LC
      8: return en_pat(r) ? ((r < N) ? r + 1 : 0) : r;        // RECV8 RN, partly disabled
      default: return -1;
    endcase
  endfunction

  task automatic check_all_io8(int kind, string what);
    byte_t v;
    int moved = 0, blocked = 0;
    for (int r = 1; r <= N; r++) begin
      peek8(r, R_IO8, v);
      check($sformatf("%s PE %0d", what, r), int'(v), expect_io8(kind, r));
      if (int'(v) != r) moved++;
    end
    if (kind == 5 || kind == 6 || kind == 7) begin
      for (int r = 1; r <= N; r++)
        if (expect_io8(kind, r) == r && !en_pat(r)) blocked++;
      n_send_blocked += blocked;
    end
    if (kind <= 1 || kind == 5 || kind == 6 || kind == 8) n_linear += moved;
    else n_tree += moved;
  endtask

  initial begin
    byte_t v;
    logic f;
    int count, last;
    for (int b = 0; b < NB; b++) ihu_byte[b] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // ---- 1. number the PEs by associative enumeration ----
    issue(op_logical(LF_CLEAR));
    issue(op_store_a1(F_X1));           // X1 = "numbered"
    count = 0;
    begin : enumerate
      forever begin
        issue(OPC_ENABLE);
        issue(op_load_a1(F_X1));
        issue(op_logical(LF_NEGATE));   // candidates: not yet numbered
        do_resolve(f);
        if (!f) disable enumerate;
        if (count < N - 1) n_resolve_multi++;
        count++;
        issue(op_store_a1(F_EN1));      // only the chosen PE stays enabled
        bcast(8'h00);
        issue(op_store_a8(R_MAR));
        bcast(byte_t'(count));
        issue(op_store_a8(R_C8));
        issue(OPC_WRITERAM);            // RAM[0] = number
        issue(op_logical(LF_SET));
        issue(op_store_a1(F_X1));
        n_logic += 3;
      end
    end
    check("PEs found by enumeration", count, N);

    // ---- 2. every PE reports its number (RESOLVE order = inorder) ----
    for (int r = 1; r <= N; r++) begin
      peek8(r, R_C8, v);
      check($sformatf("number of PE %0d", r), int'(v), r);
    end

    // ---- 3. linear neighbours (inorder embedding) ----
    io8_from_id(); issue(op_recv8(N_LN)); check_all_io8(0, "RECV8 LN");
    io8_from_id(); issue(op_recv8(N_RN)); check_all_io8(1, "RECV8 RN");
    io8_from_id(); disable_pattern(); issue(op_send8(N_RN)); check_all_io8(5, "SEND8 RN");
    io8_from_id(); disable_pattern(); issue(op_send8(N_LN)); check_all_io8(6, "SEND8 LN");
    io8_from_id(); disable_pattern(); issue(op_recv8(N_RN)); check_all_io8(8, "RECV8 RN dis");

    // ---- 4. tree neighbours ----
    io8_from_id(); issue(op_recv8(N_P));  check_all_io8(2, "RECV8 P");
    io8_from_id(); issue(op_recv8(N_LC)); check_all_io8(3, "RECV8 LC");
    io8_from_id(); issue(op_recv8(N_RC)); check_all_io8(4, "RECV8 RC");
    io8_from_id(); disable_pattern(); issue(op_send8(N_LC)); check_all_io8(7, "SEND8 LC");

    // ---- 5. one-bit transfer: IO1 := bit 0 of the number, RECV1 RC ----
    issue(OPC_ENABLE);
    issue(op_load_a8(R_C8));
    issue(OPC_ROTRA);
    issue(op_store_a1(F_IO1));
    issue(op_recv1(N_RC));
    for (int r = 1; r <= N; r += 3) begin
      peek1(r, F_IO1, f);
      check($sformatf("RECV1 RC PE %0d", r), int'(f),
            (rson(r) != 0) ? (rson(r) & 1) : 0);
      if (rson(r) != 0) n_tree++;
    end

    // ---- 6. bit-serial arithmetic: Z8 = number + 100, Y8 = number - 3 ----
    issue(OPC_ENABLE);
    begin : arith
      for (int op = 0; op < 2; op++) begin
        issue(op_load_a8(R_C8)); issue(op_store_a8(R_X8));
        bcast(op == 0 ? 8'd100 : 8'd3); issue(op_store_a8(R_Y8));
        issue(op_logical(op == 0 ? LF_CLEAR : LF_SET));
        issue(op_store_a1(F_C1));       // carry in (1 for subtraction)
        for (int i = 0; i < 8; i++) begin
          issue(op_load_a8(R_X8)); issue(OPC_ROTRA); issue(op_store_a8(R_X8));
          issue(op_load_b8(R_Y8)); issue(OPC_ROTRB); issue(op_store_b8(R_Y8));
          issue(op == 0 ? OPC_ADD1 : OPC_SUB1);
          issue(op_load_a8(R_Z8)); issue(OPC_ROTRA); issue(op_store_a8(R_Z8));
          if (op == 0) n_add++; else n_sub++;
          n_rot += 3;
        end
        if (op == 0) begin
          issue(op_load_a8(R_Z8)); issue(op_store_a8(R_IO8)); // keep the sum
        end
      end
    end
    for (int r = 1; r <= N; r += 2) begin
      peek8(r, R_IO8, v);
      check($sformatf("ADD1 sum PE %0d", r), int'(v), (r + 100) & 255);
      peek8(r, R_Z8, v);
      check($sformatf("SUB1 difference PE %0d", r), int'(v), (r - 3) & 255);
    end

    // ---- 7. RAM with a different address in each PE ----
    issue(OPC_ENABLE);
    issue(op_load_a8(R_C8));
    issue(op_store_a8(R_MAR));          // MAR = number
    issue(OPC_ROTLA);                   // A8 = number rotated (A1 was 0 or 1)
    issue(op_store_a8(R_X8));
    issue(OPC_WRITERAM);
    bcast(8'h00); issue(op_store_a8(R_A8));
    issue(OPC_READRAM);
    issue(op_store_a8(R_Y8));
    for (int r = 1; r <= N; r += 2) begin
      byte_t x;
      peek8(r, R_X8, x);
      peek8(r, R_Y8, v);
      check($sformatf("RAM[MAR] PE %0d", r), int'(v), int'(x));
      n_ram_addr++;
    end

    // ---- 8. associative match of "SALES" at RAM 17..21, then enumerate ----
    for (int r = 1; r <= N; r++) begin
      string s;
      s = (r % 3 == 0) ? "SALES" : ((r % 3 == 1) ? "SALAD" : "TAXES");
      select(r);
      for (int i = 0; i < 5; i++) begin
        bcast(byte_t'(17 + i)); issue(op_store_a8(R_MAR));
        bcast(s[i]);            issue(OPC_WRITERAM);
      end
    end
    begin
      string pat = "SALES";
      issue(OPC_ENABLE);
      for (int i = 0; i < 5; i++) begin
        bcast(byte_t'(17 + i)); issue(op_store_a8(R_MAR));
        bcast(pat[i]);          issue(op_store_a8(R_B8));
        issue(OPC_READRAM);
        issue(OPC_COMPARE);
        issue(op_store_a1(F_EN1));
        n_compare++;
      end
    end
    // enumerate the marked PEs: Y1 = marked
    issue(op_logical(LF_SET)); issue(op_store_a1(F_Y1));
    count = 0; last = 0;
    begin : assoc_enum
      forever begin
        issue(OPC_ENABLE);
        issue(op_load_a1(F_Y1));
        do_resolve(f);
        if (!f) disable assoc_enum;
        issue(op_store_a1(F_EN1));
        issue(op_load_a8(R_C8));
        do_report(v);
        check("enumerated PE matches SALES", int'(v) % 3, 0);
        check("enumeration ascends", int'(int'(v) > last), 1);
        last = int'(v);
        count++;
        issue(op_logical(LF_CLEAR)); issue(op_store_a1(F_Y1));
      end
    end
    check("number of SALES records", count, N / 3);

    // ---- 9. IHU 1 runs its subtree alone ----
    issue(OPC_ENABLE);
    bcast(8'h11); issue(op_store_a8(R_Z8));
    issue(op_logical(LF_CLEAR));
    ihu_active[1] = 1'b1;
    @(posedge clk); #1;
    check("IHU 1 active", int'(ihu_is_active[1]), 1);
    // local stream and CP stream run side by side
    begin
      byte_t loc [5] = '{OPC_BROADCAST8, 8'hEE, op_store_a8(R_Z8), op_logical(LF_SET), OPC_NOP};
      byte_t cpb [5] = '{OPC_BROADCAST8, 8'h22, op_store_a8(R_Z8), op_logical(LF_CLEAR), OPC_NOP};
      for (int i = 0; i < 5; i++) begin
        ihu_valid[1] = 1'b1; ihu_byte[1] = loc[i];
        cp_valid = 1'b1;     cp_byte = cpb[i];
        @(posedge clk); #1;
      end
      ihu_valid[1] = 1'b0; cp_valid = 1'b0;
    end
    check("CP does not see the active subtree (r1)", int'(r1), 0);
    check("IHU sees its own candidates", int'(ihu_any[1]), 1);
    check("IHU report of subtree", int'(ihu_report[1]), 8'hEE);
    n_ihu++;
    ihu_active[1] = 1'b0;
    @(posedge clk); #1;
    check("IHU 1 passive", int'(ihu_is_active[1]), 0);
    for (int r = 1; r <= N; r++) begin
      peek8(r, R_Z8, v);
      check($sformatf("Z8 after IHU run PE %0d", r), int'(v),
            (r >= 17 && r <= 31) ? 8'hEE : 8'h22);
    end

    // ---- mechanisms seen ----
    $display("mechanisms: bcast=%0d report=%0d resolve_multi=%0d disable=%0d tree=%0d linear=%0d send_blocked=%0d ram_addr=%0d compare=%0d add=%0d sub=%0d rot=%0d logic=%0d ihu=%0d",
             n_bcast, n_report, n_resolve_multi, n_disable, n_tree, n_linear,
             n_send_blocked, n_ram_addr, n_compare, n_add, n_sub, n_rot, n_logic, n_ihu);
    check("mechanism broadcast",        int'(n_bcast > 0), 1);
    check("mechanism report",           int'(n_report > 0), 1);
    check("mechanism resolve kill",     int'(n_resolve_multi > 0), 1);
    check("mechanism disable",          int'(n_disable > 0), 1);
    check("mechanism tree transfer",    int'(n_tree > 0), 1);
    check("mechanism linear transfer",  int'(n_linear > 0), 1);
    check("mechanism send blocked",     int'(n_send_blocked > 0), 1);
    check("mechanism per-PE RAM address", int'(n_ram_addr > 0), 1);
    check("mechanism compare",          int'(n_compare > 0), 1);
    check("mechanism ADD1",             int'(n_add > 0), 1);
    check("mechanism SUB1",             int'(n_sub > 0), 1);
    check("mechanism rotate",           int'(n_rot > 0), 1);
    check("mechanism logical",          int'(n_logic > 0), 1);
    check("mechanism IHU active mode",  int'(n_ihu > 0), 1);
    $display("cycles used: %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
