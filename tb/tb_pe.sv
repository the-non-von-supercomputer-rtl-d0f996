// tb_pe: one processing element against an instruction-level reference
// model kept in the testbench.
//
// The PE is placed as a leaf (son links tied off) under a father link that
// the testbench drives with random neighbour latches, kill and side bits.
// Random instruction streams covering every instruction, including
// BROADCAST8 with its data byte, SEND/RECV to every neighbour, ENABLE after
// self-disabling and idle bus cycles, are applied one per clock; the model
// executes the same instruction from the published semantics, and after
// every clock the PE's visible state (the report bus = A8 when enabled, the
// RESOLVE candidate line, IO8, IO1 and EN1 as shown to neighbours) is
// compared. Every few instructions all eight byte registers and the RAM
// word at MAR are read out through A8 to catch hidden differences.
//
// Interface: no ports; the testbench instantiates pe and prints
// "TB_RESULT checks=N failures=M" at the end. A watchdog counts a failure
// if the run hangs.
// Timing: 10 ns clock; inputs are applied at the falling edge and
//   results checked 1 ns after the following rising edge.
// Source: the reference model follows the NON-VON 1 instruction list;
//   encoding and the missing-neighbour rule are this design's choices.
module tb_pe;
  import nonvon_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  down_t down_i;
  up_t   up_o;
  down_t lc_down_o, rc_down_o;
  int checks = 0, failures = 0;

  // reference model state
  byte_t R [8];
  logic [7:0] F;
  byte_t M [64];

  pe #(.RAM_WORDS(64)) dut (
    .clk, .rst_n, .down_i, .up_o,
    .lc_down_o, .lc_up_i(UP_NONE), .rc_down_o, .rc_up_i(UP_NONE)
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
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic nbr_t rnd_nbr();
    nbr_t n;
    n.present = ($urandom_range(0, 4) != 0);
    n.en      = $urandom_range(0, 1);
    n.io8     = 8'($urandom);
    n.io1     = $urandom_range(0, 1);
    return n;
  endfunction

  // model of one instruction (op byte already decoded by the model itself)
  task automatic model(byte_t b, logic is_data);
    logic en = F[7];
    logic [2:0] r = b[2:0];
    nbr_t src;
    logic ok;
    int s;
    if (is_data) begin
      if (en) R[0] = b;
      return;
    end
    if (b == OPC_ENABLE) begin F[7] = 1'b1; return; end
    if (!en) return;
    casez (b)
      8'b00_000_???: R[0] = R[r];
      8'b00_001_???: R[1] = R[r];
      8'b00_010_???: R[r] = R[0];
      8'b00_011_???: R[r] = R[1];
      8'b00_100_???: F[0] = F[r];
      8'b00_101_???: F[1] = F[r];
      8'b00_110_???: F[r] = F[0];
      8'b00_111_???: F[r] = F[1];
      8'b0100_????:  F[0] = b[{F[0], F[1]}];
      8'b0101_????, 8'b0110_????: begin
        ok = 1'b0; src = NBR_NONE;
        if (b[2:0] <= 3'd4) begin
          if (b[3]) begin                    // RECV
            case (b[2:0])
              3'd0: src = down_i.father;
              3'd3: src = down_i.pred;       // leaf: LN is the PE before it
              3'd4: src = down_i.succ;
              default: src = NBR_NONE;       // a leaf has no sons
            endcase
            ok = 1'b1;                       // missing neighbour reads 0
          end else begin                     // SEND, seen by the receiver
            case (b[2:0])
              3'd1: src = down_i.is_left ? down_i.father : NBR_NONE;
              3'd2: src = down_i.is_left ? NBR_NONE : down_i.father;
              3'd3: src = down_i.succ;
              3'd4: src = down_i.pred;
              default: src = NBR_NONE;
            endcase
            ok = src.present && src.en;
          end
        end
        if (ok && b[5:4] == 2'b01) R[6] = src.present ? src.io8 : 8'h00;
        if (ok && b[5:4] == 2'b10) F[6] = src.present && src.io1;
      end
      OPC_ADD1: begin s = F[0] + F[1] + F[2]; F[0] = s[0]; F[2] = s[1]; end
      OPC_SUB1: begin s = F[0] + !F[1] + F[2]; F[0] = s[0]; F[2] = s[1]; end
      OPC_ROTRA: {R[0], F[0]} = {F[0], R[0]};
      OPC_ROTLA: {F[0], R[0]} = {R[0], F[0]};
      OPC_ROTRB: {R[1], F[1]} = {F[1], R[1]};
      OPC_ROTLB: {F[1], R[1]} = {R[1], F[1]};
      OPC_READRAM:  R[0] = M[R[7] % 64];
      OPC_WRITERAM: M[R[7] % 64] = R[0];
      OPC_COMPARE: begin F[0] = (R[0] == R[1]); F[1] = (R[0] > R[1]); end
      OPC_RESOLVE: F[0] = F[0] & !down_i.kill;
      default: ;
    endcase
  endtask

  task automatic compare_state(string where);
    check({where, " report"}, int'(up_o.report), F[7] ? int'(R[0]) : 0);
    check({where, " any"},    int'(up_o.any), int'(F[7] & F[0]));
    check({where, " io8"},    int'(up_o.self.io8), int'(R[6]));
    check({where, " io1"},    int'(up_o.self.io1), int'(F[6]));
    check({where, " en1"},    int'(up_o.self.en), int'(F[7]));
    check({where, " lc father"}, int'(lc_down_o.father.io8), int'(R[6]));
  endtask

  task automatic step(byte_t b, logic is_data);
    @(negedge clk);
    down_i.bc = '{valid: 1'b1, data: b};
    down_i.father = rnd_nbr();
    down_i.pred   = rnd_nbr();
    down_i.succ   = rnd_nbr();
    down_i.kill   = $urandom_range(0, 1);
    down_i.is_left = $urandom_range(0, 1);
    #1 model(b, is_data);
    @(posedge clk); #1;
    down_i.bc.valid = 1'b0;
    compare_state($sformatf("after %h", b));
  endtask

  function automatic byte_t rnd_op();
    case ($urandom_range(0, 9))
      0, 1: return {2'b00, 6'($urandom)};
      2:    return {4'b0100, 4'($urandom)};
      3:    return {4'b0101, 1'($urandom), 3'($urandom_range(0, 4))};
      4:    return {4'b0110, 1'($urandom), 3'($urandom_range(0, 4))};
      5:    return {4'b0111, 4'($urandom_range(0, 5))};
      6:    return {7'b1000000, 1'($urandom)};
      7:    return {6'b100100, 2'($urandom)};
      8:    return OPC_ENABLE;
      default: return OPC_NOP;
    endcase
  endfunction

  initial begin
    byte_t b;
    down_i = DOWN_IDLE;
    for (int i = 0; i < 8; i++) R[i] = '0;
    F = 8'b1000_0000;
    #12 rst_n = 1'b1;
    // give the RAM known contents
    for (int a = 0; a < 64; a++) begin
      step(OPC_BROADCAST8, 1'b0); step(8'(a), 1'b1);
      step(op_store_a8(R_MAR), 1'b0);
      step(OPC_BROADCAST8, 1'b0); step(8'($urandom), 1'b1);
      step(OPC_WRITERAM, 1'b0);
    end
    for (int t = 0; t < 6000; t++) begin
      if ($urandom_range(0, 7) == 0) begin
        step(OPC_BROADCAST8, 1'b0);
        step(8'($urandom), 1'b1);
      end else begin
        step(rnd_op(), 1'b0);
      end
      if (t % 50 == 49) begin
        // read every byte register and the RAM word through A8
        step(OPC_ENABLE, 1'b0);
        for (int r = 1; r < 8; r++) step(op_load_a8(byte_reg_e'(r)), 1'b0);
        step(OPC_READRAM, 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
