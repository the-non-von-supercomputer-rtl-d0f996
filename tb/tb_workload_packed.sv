// tb_workload_packed: small records packed four to a PE, on the machine at
// its default size (63 PEs, 252 records).
//
// Each 15-byte record sits in one of four "record slices" beginning at RAM
// locations 1, 16, 31 and 46 of every PE. An operation on packed records is
// the same instruction sequence issued once per slice with the slice's
// addresses, as in NON-VON. The testbench, acting as control processor,
//   1. loads all 252 records (byte i of the record in slice s of PE r holds
//      a value computed from r, s and i);
//   2. moves byte 5 of every record to byte 7 (for slice 0 that is
//      READRAM from location 5 and WRITERAM to location 7, for slice 1
//      locations 20 and 22, and so on), with MAR set by STOREA8 MAR;
//   3. marks the records whose key byte (record byte 2) equals a broadcast
//      value, one flag register per slice (X1, Y1, Z1, C1), restoring EN1
//      between slices with ENABLE;
//   4. counts the marked records of each slice by associative enumeration
//      (RESOLVE, then clear the chosen PE's flag) and reports each chosen
//      record's identity byte.
// It then reads back every byte it touched, and finally
//   5. totals record byte 3 over all 252 records: each PE first adds the
//      field of its four slices into a 16-bit sum (X8 low, Y8 high), then
//      the one-record-per-PE tree sum runs unchanged (leaves found with
//      RECV1 LC, five steps of RECV8 from both sons and bit-serial ADD1).
//      Every PE's subtree total and the root's total are checked.
// Expected values come from the loading formula, not from the design.
//
// Interface: no ports; the testbench instantiates nonvon_top at its default parameters and prints
// "TB_RESULT checks=N failures=M" at the end. A watchdog counts a failure
// if the run hangs.
// Timing: 10 ns clock; the CP model applies one bus byte per clock, 1 ns
//   after the rising edge, and samples report and r1 1 ns after applying
//   REPORT or RESOLVE, before the edge that executes it.
// Source: 15-byte records four to a PE at locations 1, 16, 31, 46 follow
//   NON-VON; record contents and the key are own choices.
module tb_workload_packed;
  import nonvon_pkg::*;

  localparam int D = 6;
  localparam int N = (1 << D) - 1;
  localparam int NB = 4;
  localparam int SLICES = 4, RECLEN = 15;
  localparam byte_t KEY = 8'd3;

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

  function automatic int base(int s);
    return 1 + RECLEN * s;                 // 1, 16, 31, 46
  endfunction
  // record byte i of slice s in PE r; byte 0 identifies the record
  function automatic byte_t rec_byte(int r, int s, int i);
    if (i == 0) return byte_t'(r * 4 + s);
    if (i == 2) return byte_t'((r * 5 + s * 3) % 7);    // key
    return byte_t'((r * 13 + s * 29 + i * 7) % 251);
  endfunction
  function automatic flag_reg_e slice_flag(int s);
    case (s)
      0: return F_X1;
      1: return F_Y1;
      2: return F_Z1;
      default: return F_C1;
    endcase
  endfunction

  function automatic int tz(int r);
    int t = 0;
    while (((r >> t) & 1) == 0) t++;
    return t;
  endfunction
  // field summed in step 5: record byte 3, all slices of PE r
  function automatic int pe_total(int r);
    int t = 0;
    for (int s = 0; s < SLICES; s++) t += int'(rec_byte(r, s, 3));
    return t;
  endfunction
  function automatic int subtree_total(int r);
    int t = 0, h = (1 << tz(r)) - 1;
    for (int q = r - h; q <= r + h; q++) t += pe_total(q);
    return t;
  endfunction

  // A8 <- A8 + B8 + C1 bit-serially, carry out left in C1
  task automatic add_bytes();
    repeat (8) begin
      issue(OPC_ROTRA);
      issue(OPC_ROTRB);
      issue(OPC_ADD1);
    end
    issue(OPC_ROTRA);
  endtask
  // {Y8,X8} += {0,Z8} in every enabled PE
  task automatic add_z8();
    issue(op_logical(LF_CLEAR));
    issue(op_store_a1(F_C1));
    issue(op_load_a8(R_X8));
    issue(op_load_b8(R_Z8));
    add_bytes();
    issue(op_store_a8(R_X8));
    bcast(8'd0);
    issue(op_store_a8(R_B8));
    issue(op_load_a8(R_Y8));
    add_bytes();
    issue(op_store_a8(R_Y8));
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

  initial begin
    logic f;
    byte_t v;
    int count, found, exp_n;
    byte_t lo, hi;
    bit seen [256];
    for (int b = 0; b < NB; b++) ihu_byte[b] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // number the PEs (C8)
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

    // 1. load records
    for (int r = 1; r <= N; r++) begin
      select(r);
      for (int s = 0; s < SLICES; s++)
        for (int i = 0; i < 8; i++) begin
          set_mar(base(s) + i);
          bcast(rec_byte(r, s, i));
          issue(OPC_WRITERAM);
        end
    end

    // 2. byte 5 -> byte 7 in every record, one sequence per slice
    issue(OPC_ENABLE);
    for (int s = 0; s < SLICES; s++) begin
      set_mar(base(s) + 4);
      issue(OPC_READRAM);
      issue(op_store_a8(R_X8));
      set_mar(base(s) + 6);
      issue(op_load_a8(R_X8));
      issue(OPC_WRITERAM);
    end

    // 3. mark key matches, one flag per slice
    for (int s = 0; s < SLICES; s++) begin
      issue(OPC_ENABLE);
      issue(op_logical(LF_CLEAR));
      issue(op_store_a1(slice_flag(s)));
      bcast(KEY);
      issue(op_store_a8(R_B8));
      set_mar(base(s) + 2);
      issue(OPC_READRAM);
      issue(OPC_COMPARE);
      issue(op_store_a1(F_EN1));
      issue(op_logical(LF_SET));
      issue(op_store_a1(slice_flag(s)));
    end

    // 4. enumerate the marked records of each slice
    for (int s = 0; s < SLICES; s++) begin
      exp_n = 0;
      for (int r = 1; r <= N; r++) if (rec_byte(r, s, 2) == KEY) exp_n++;
      found = 0;
      for (int k = 0; k < 256; k++) seen[k] = 1'b0;
      begin : enum_slice
        forever begin
          issue(OPC_ENABLE);
          issue(op_load_a1(slice_flag(s)));
          do_resolve(f);
          if (!f) disable enum_slice;
          found++;
          issue(op_store_a1(F_EN1));       // the chosen PE alone
          set_mar(base(s));
          issue(OPC_READRAM);
          do_report(v);                    // record identity r*4+s
          check($sformatf("slice %0d record is in slice", s), int'(v) % 4, s);
          check($sformatf("slice %0d record %0d has the key", s, int'(v) / 4),
                int'(rec_byte(int'(v) / 4, s, 2)), int'(KEY));
          check($sformatf("slice %0d record reported once", s), int'(seen[v]), 0);
          seen[v] = 1'b1;
          issue(op_logical(LF_CLEAR));
          issue(op_store_a1(slice_flag(s)));
          if (found > N) disable enum_slice;
        end
      end
      check($sformatf("slice %0d matches", s), found, exp_n);
      $display("slice %0d: %0d of %0d records match the key", s, found, N);
    end

    // read back: bytes 0..7 of every record (byte 7 must equal byte 5)
    for (int r = 1; r <= N; r++) begin
      select(r);
      for (int s = 0; s < SLICES; s++)
        for (int i = 0; i < 8; i++) begin
          set_mar(base(s) + i);
          issue(OPC_READRAM);
          do_report(v);
          check($sformatf("PE %0d slice %0d byte %0d", r, s, i), int'(v),
                int'(rec_byte(r, s, (i == 6) ? 4 : i)));
        end
    end

    // 5. sum record byte 3 over every record: first the four slices inside
    //    each PE (cost proportional to the packing factor), then the tree
    //    sum of one value per PE (leaves found with RECV1 LC, D-1 steps)
    issue(OPC_ENABLE);
    bcast(8'd0);
    issue(op_store_a8(R_X8));
    issue(op_store_a8(R_Y8));
    for (int s = 0; s < SLICES; s++) begin
      set_mar(base(s) + 3);
      issue(OPC_READRAM);
      issue(op_store_a8(R_Z8));
      add_z8();
    end
    issue(op_logical(LF_SET));
    issue(op_store_a1(F_IO1));
    issue(op_recv1(N_LC));
    issue(op_load_a1(F_IO1));
    issue(op_logical(LF_NEGATE));
    issue(op_store_a1(F_X1));          // active set = leaves
    for (int step = 1; step < D; step++) begin
      issue(OPC_ENABLE);
      issue(op_load_a1(F_X1));
      issue(op_store_a1(F_IO1));
      issue(op_recv1(N_LC));           // active set := fathers
      issue(op_load_a1(F_IO1));
      issue(op_store_a1(F_X1));
      add_son(N_LC);
      add_son(N_RC);
    end
    issue(OPC_ENABLE);
    issue(op_load_a1(F_X1));
    issue(op_store_a1(F_EN1));         // the root alone
    issue(op_load_a8(R_Y8));
    do_report(hi);
    issue(op_load_a8(R_X8));
    do_report(lo);
    check("total over all 252 records", int'({hi, lo}), subtree_total(1 << (D - 1)));
    $display("total of field 3 over all records %0d", {hi, lo});
    for (int r = 1; r <= N; r++) begin
      select(r);
      issue(op_load_a8(R_X8));
      do_report(lo);
      issue(op_load_a8(R_Y8));
      do_report(hi);
      check($sformatf("subtree total PE %0d", r), int'({hi, lo}), subtree_total(r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
