// tb_pe_pla: the instruction decoder. Every opcode of the instruction set is
// presented and the decoded operation, accumulator, operand and function
// fields are checked against a table written from the instruction list.
// BROADCAST8 is checked to take the following bus byte as data (even if
// that byte looks like an opcode), with idle bus cycles in between.
//
// Interface: no ports; the testbench instantiates pe_pla and prints
// "TB_RESULT checks=N failures=M" at the end. A watchdog counts a failure
// if the run hangs.
// Timing: 10 ns clock; inputs are applied at the falling edge and
//   results checked 1 ns after the following rising edge.
// Source: the instruction list follows NON-VON 1; the encoding is this
//   design's choice.
module tb_pe_pla;
  import nonvon_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bcast_t bc = '{valid: 1'b0, data: 8'h00};
  ctrl_t ctrl;
  logic want_operand;
  int checks = 0, failures = 0;

  pe_pla dut (.clk, .rst_n, .bc, .ctrl, .want_operand);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_op(byte_t b, op_e op, logic acc_b, int field);
    @(negedge clk);
    bc = '{valid: 1'b1, data: b};
    #1;
    checks++;
    if (ctrl.op !== op || (op inside {OP_LOAD8, OP_STORE8, OP_LOAD1, OP_STORE1,
                                      OP_ROTR, OP_ROTL} && ctrl.acc_b !== acc_b)
        || (op inside {OP_LOAD8, OP_STORE8, OP_LOAD1, OP_STORE1} && int'(ctrl.rsel) != field)
        || (op == OP_LOGIC && int'(ctrl.fn) != field)
        || (op inside {OP_SEND8, OP_RECV8, OP_SEND1, OP_RECV1} && int'(ctrl.nbr) != field)
        || (op == OP_BCAST && int'(ctrl.imm) != field)) begin
      failures++;
      $display("FAIL byte %h: op %s acc_b %b rsel %0d fn %0d nbr %0d imm %0d, expected %s/%0d",
               b, ctrl.op.name(), ctrl.acc_b, ctrl.rsel, ctrl.fn, ctrl.nbr, ctrl.imm,
               op.name(), field);
    end
    @(posedge clk); #1;
    bc.valid = 1'b0;
  endtask

  initial begin
    #12 rst_n = 1'b1;
    for (int r = 0; r < 8; r++) begin
      expect_op(op_load_a8 (byte_reg_e'(r)), OP_LOAD8,  1'b0, r);
      expect_op(op_load_b8 (byte_reg_e'(r)), OP_LOAD8,  1'b1, r);
      expect_op(op_store_a8(byte_reg_e'(r)), OP_STORE8, 1'b0, r);
      expect_op(op_store_b8(byte_reg_e'(r)), OP_STORE8, 1'b1, r);
      expect_op(op_load_a1 (flag_reg_e'(r)), OP_LOAD1,  1'b0, r);
      expect_op(op_load_b1 (flag_reg_e'(r)), OP_LOAD1,  1'b1, r);
      expect_op(op_store_a1(flag_reg_e'(r)), OP_STORE1, 1'b0, r);
      expect_op(op_store_b1(flag_reg_e'(r)), OP_STORE1, 1'b1, r);
    end
    for (int f = 0; f < 16; f++) expect_op(op_logical(4'(f)), OP_LOGIC, 1'b0, f);
    for (int p = 0; p < 5; p++) begin
      expect_op(op_send8(nbr_sel_e'(p)), OP_SEND8, 1'b0, p);
      expect_op(op_recv8(nbr_sel_e'(p)), OP_RECV8, 1'b0, p);
      expect_op(op_send1(nbr_sel_e'(p)), OP_SEND1, 1'b0, p);
      expect_op(op_recv1(nbr_sel_e'(p)), OP_RECV1, 1'b0, p);
    end
    expect_op(OPC_ADD1,     OP_ADD1,    1'b0, 0);
    expect_op(OPC_SUB1,     OP_SUB1,    1'b0, 0);
    expect_op(OPC_ROTRA,    OP_ROTR,    1'b0, 0);
    expect_op(OPC_ROTLA,    OP_ROTL,    1'b0, 0);
    expect_op(OPC_ROTRB,    OP_ROTR,    1'b1, 0);
    expect_op(OPC_ROTLB,    OP_ROTL,    1'b1, 0);
    expect_op(OPC_READRAM,  OP_READ,    1'b0, 0);
    expect_op(OPC_WRITERAM, OP_WRITE,   1'b0, 0);
    expect_op(OPC_ENABLE,   OP_ENABLE,  1'b0, 0);
    expect_op(OPC_COMPARE,  OP_COMPARE, 1'b0, 0);
    expect_op(OPC_RESOLVE,  OP_RESOLVE, 1'b0, 0);
    expect_op(OPC_REPORT,   OP_REPORT,  1'b0, 0);
    expect_op(OPC_NOP,      OP_NOP,     1'b0, 0);
    // BROADCAST8 then a data byte that is also an opcode, idle cycles between
    for (int t = 0; t < 50; t++) begin
      byte_t d = 8'($urandom);
      expect_op(OPC_BROADCAST8, OP_NOP, 1'b0, 0);
      checks++;
      if (!want_operand) begin failures++; $display("FAIL no operand state"); end
      repeat ($urandom_range(0, 2)) @(posedge clk);
      expect_op(d, OP_BCAST, 1'b0, int'(d));
      checks++;
      if (want_operand) begin failures++; $display("FAIL operand state kept"); end
      expect_op(OPC_COMPARE, OP_COMPARE, 1'b0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
