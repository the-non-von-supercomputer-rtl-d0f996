// tb_pe_alu: exhaustive test of the bit ALU. For every mode, function code
// and input combination the outputs are compared with the ADD1/SUB1 and
// LOGICAL semantics written out independently (arithmetic on integers,
// named logical functions as boolean expressions).
//
// Interface: no ports; the testbench instantiates pe_alu and prints
// "TB_RESULT checks=N failures=M" at the end. A watchdog counts a failure
// if the run hangs.
// Timing: combinational; each input is checked 1 ns after it is applied.
// Source: ADD1, SUB1 and LOGICAL follow NON-VON 1; the function code layout
//   is this design's choice.
module tb_pe_alu;
  import nonvon_pkg::*;
  alu_mode_e mode;
  logic [3:0] fn;
  logic a, b, c, a_out, c_out;
  int checks = 0, failures = 0;

  pe_alu dut (.mode, .fn, .a, .b, .c, .a_out, .c_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%b b=%b c=%b got %b expected %b", what, a, b, c, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      // ADD1: sum and carry of a + b + c
      mode = ALU_ADD; fn = 4'h0; #1;
      check("ADD1 sum",   a_out, 1'((int'(a) + int'(b) + int'(c)) % 2));
      check("ADD1 carry", c_out, (int'(a) + int'(b) + int'(c)) >= 2);
      // SUB1: a - b with c as "no borrow": a + (1-b) + c
      mode = ALU_SUB; #1;
      check("SUB1 diff",  a_out, 1'((int'(a) + 1 - int'(b) + int'(c)) % 2));
      check("SUB1 carry", c_out, (int'(a) + 1 - int'(b) + int'(c)) >= 2);
      // named logical functions
      mode = ALU_LOGIC;
      fn = LF_CLEAR;  #1; check("CLEAR",  a_out, 1'b0);
      fn = LF_SET;    #1; check("SET",    a_out, 1'b1);
      fn = LF_NEGATE; #1; check("NEGATE", a_out, !a);
      fn = LF_AND;    #1; check("AND",    a_out, a && b);
      fn = LF_OR;     #1; check("OR",     a_out, a || b);
      fn = LF_XOR;    #1; check("XOR",    a_out, (a && !b) || (!a && b));
      fn = LF_EQU;    #1; check("EQU",    a_out, (a && b) || (!a && !b));
      fn = LF_NAND;   #1; check("NAND",   a_out, !(a && b));
      check("logic keeps carry", c_out, c);
      // all sixteen codes as truth tables
      for (int f = 0; f < 16; f++) begin
        fn = 4'(f); #1;
        check("LOGICAL code", a_out, 1'((f >> (2 * int'(a) + int'(b))) & 1));
      end
    end
    // 8-bit bit-serial addition and subtraction built from the ALU
    for (int t = 0; t < 200; t++) begin
      int x = $urandom_range(0, 255), y = $urandom_range(0, 255);
      int s = 0, d = 0;
      logic cs = 1'b0, cd = 1'b1;
      for (int i = 0; i < 8; i++) begin
        a = 1'((x >> i) & 1); b = 1'((y >> i) & 1);
        mode = ALU_ADD; c = cs; #1; s |= int'(a_out) << i; cs = c_out;
        mode = ALU_SUB; c = cd; #1; d |= int'(a_out) << i; cd = c_out;
      end
      checks += 2;
      if (s != ((x + y) & 255) || d != ((x - y) & 255)) begin
        failures++;
        $display("FAIL serial %0d,%0d: sum %0d diff %0d", x, y, s, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
