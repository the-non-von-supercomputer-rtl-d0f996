// pe_alu: the bit-wide arithmetic logical unit of a processing element.
//
// Inputs are the bit accumulators A1 and B1 and the carry flag C1.
//   ALU_LOGIC: A1 <- fn[{A1,B1}], any of the 16 boolean functions of two
//              bits (fn is the 4-bit code of the LOGICAL instruction, used as
//              a truth table; CLEAR, SET, NEGATE, AND, OR, XOR, EQU and NAND
//              are particular codes). C1 is unchanged.
//   ALU_ADD:   full adder, A1 <- A1^B1^C1, C1 <- majority(A1,B1,C1) (ADD1).
//   ALU_SUB:   the same with B1 inverted (SUB1), so a multi-bit subtraction
//              starts with C1 = 1.
// Wider arithmetic is done bit-serially by repeating ADD1/SUB1.
// Purely combinational; the PE writes a_out and c_out back.
// Follows NON-VON 1: ADD1/SUB1 and LOGICAL on A1, B1 and C1. Own choice:
// the function code is the truth table itself, and SUB1 works as A1 - B1
// with C1 as the no-borrow flag.
module pe_alu
  import nonvon_pkg::*;
(
  input  alu_mode_e  mode,
  input  logic [3:0] fn,
  input  logic       a,
  input  logic       b,
  input  logic       c,
  output logic       a_out,
  output logic       c_out
);
  logic bb;

  always_comb begin
    bb    = (mode == ALU_SUB) ? ~b : b;
    a_out = a ^ bb ^ c;
    c_out = (a & bb) | (a & c) | (bb & c);
    if (mode == ALU_LOGIC) begin
      a_out = fn[{a, b}];
      c_out = c;
    end
  end
endmodule
