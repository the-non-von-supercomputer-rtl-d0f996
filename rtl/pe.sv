// pe: one NON-VON 1 processing element.
//
// A PE is a tiny SIMD slave: it holds a 64 x 8 local RAM, eight byte
// registers, eight flag registers, a byte-wide comparator (ACU), a bit-wide
// ALU, an I/O switch and its own PLA. It owns no program: each cycle it may
// receive one instruction byte on the broadcast bus from its father and,
// if it is enabled, executes it in that same cycle. A disabled PE (EN1 = 0)
// ignores every instruction except ENABLE, but still tracks the bus so it
// stays in step. The datapath has an 8-bit side (RAM, byte registers, ACU)
// and a 1-bit side (flags, ALU); the rotate instructions link the two by
// shifting A8 through A1 (or B8 through B1) as a 9-bit ring.
//
// Instructions (all one cycle, results visible after the clock edge):
//   LOADA8/LOADB8 r, STOREA8/STOREB8 r, LOADA1/LOADB1 f, STOREA1/STOREB1 f
//   READRAM (A8 <- RAM[MAR]), WRITERAM (RAM[MAR] <- A8)
//   ADD1, SUB1 (bit-serial full adder/subtractor on A1, B1, carry C1)
//   ROTRA, ROTLA, ROTRB, ROTLB
//   LOGICAL f (any of 16 functions of A1, B1 into A1)
//   SEND8/RECV8 p, SEND1/RECV1 p (into IO8/IO1; p = P LC RC LN RN)
//   ENABLE, COMPARE (A1 <- A8 = B8, B1 <- A8 > B8), RESOLVE, REPORT
//   BROADCAST8 d (two bus bytes; A8 <- d in every enabled PE)
// Ports: the father link (`down_i`, `up_o`) and the two son links. A leaf
// is the same PE with its son inputs tied to UP_NONE.
// What a BROADCAST8 value lands in (A8) and the instruction encoding are
// this design's choices (see nonvon_pkg); the rest follows NON-VON 1.
module pe
  import nonvon_pkg::*;
#(
  parameter int unsigned RAM_WORDS = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  down_t down_i,
  output up_t   up_o,
  output down_t lc_down_o,
  input  up_t   lc_up_i,
  output down_t rc_down_o,
  input  up_t   rc_up_i
);
  ctrl_t ctrl;
  logic  want_operand;

  // byte registers
  byte_reg_e b_rsel, b_wsel;
  byte_t     b_rdata, b_wdata, a8, b8, io8, mar;
  logic      b_we;
  // flag registers
  flag_reg_e f_rsel, f_wsel;
  logic      f_rdata, f_we, f_wdata, a1_we, a1_wdata, set_en;
  logic      a1, b1, c1, io1, en1;
  // units
  byte_t     ram_rdata;
  logic      ram_we;
  logic      acu_eq, acu_gt;
  alu_mode_e alu_mode;
  logic      alu_a, alu_c;
  logic      kill_self, rx8_we, rx1_we, rx1;
  byte_t     rx8;
  logic      act;
  byte_t     acc8;
  logic      acc1;

  pe_pla u_pla (
    .clk, .rst_n, .bc(down_i.bc), .ctrl, .want_operand
  );

  pe_byte_regs u_bregs (
    .clk, .rst_n, .rsel(b_rsel), .rdata(b_rdata), .we(b_we), .wsel(b_wsel),
    .wdata(b_wdata), .a8, .b8, .io8, .mar
  );

  pe_flag_regs u_fregs (
    .clk, .rst_n, .rsel(f_rsel), .rdata(f_rdata), .we(f_we), .wsel(f_wsel),
    .wdata(f_wdata), .a1_we, .a1_wdata, .set_en, .a1, .b1, .c1, .io1, .en1
  );

  pe_ram #(.WORDS(RAM_WORDS)) u_ram (
    .clk, .addr(mar), .we(ram_we), .wdata(a8), .rdata(ram_rdata)
  );

  pe_acu u_acu (.a8, .b8, .eq(acu_eq), .gt(acu_gt));

  pe_alu u_alu (
    .mode(alu_mode), .fn(ctrl.fn), .a(a1), .b(b1), .c(c1),
    .a_out(alu_a), .c_out(alu_c)
  );

  pe_io_switch u_sw (
    .en(en1), .a1, .a8, .io8, .io1, .ctrl,
    .down_i, .up_o, .lc_down_o, .lc_up_i, .rc_down_o, .rc_up_i,
    .kill_self, .rx8_we, .rx8, .rx1_we, .rx1
  );

  // Execute: one register-file write set per instruction.
  always_comb begin
    act      = en1;
    acc8     = ctrl.acc_b ? b8 : a8;
    acc1     = ctrl.acc_b ? b1 : a1;
    b_rsel   = byte_reg_e'(ctrl.rsel);
    f_rsel   = flag_reg_e'(ctrl.rsel);
    b_we     = 1'b0;
    b_wsel   = R_A8;
    b_wdata  = b_rdata;
    f_we     = 1'b0;
    f_wsel   = F_A1;
    f_wdata  = f_rdata;
    a1_we    = 1'b0;
    a1_wdata = alu_a;
    set_en   = 1'b0;
    ram_we   = 1'b0;
    alu_mode = ALU_LOGIC;

    unique case (ctrl.op)
      OP_LOAD8: begin
        b_we   = act;
        b_wsel = ctrl.acc_b ? R_B8 : R_A8;
      end
      OP_STORE8: begin
        b_we    = act;
        b_wsel  = byte_reg_e'(ctrl.rsel);
        b_wdata = acc8;
      end
      OP_LOAD1: begin
        f_we   = act;
        f_wsel = ctrl.acc_b ? F_B1 : F_A1;
      end
      OP_STORE1: begin
        f_we    = act;
        f_wsel  = flag_reg_e'(ctrl.rsel);
        f_wdata = acc1;
      end
      OP_LOGIC: begin
        a1_we = act;
      end
      OP_ADD1, OP_SUB1: begin
        alu_mode = (ctrl.op == OP_SUB1) ? ALU_SUB : ALU_ADD;
        a1_we    = act;
        f_we     = act;
        f_wsel   = F_C1;
        f_wdata  = alu_c;
      end
      OP_ROTR: begin                // acc8 >> 1, low bit into the flag
        b_we    = act;
        b_wsel  = ctrl.acc_b ? R_B8 : R_A8;
        b_wdata = {acc1, acc8[7:1]};
        f_we    = act;
        f_wsel  = ctrl.acc_b ? F_B1 : F_A1;
        f_wdata = acc8[0];
      end
      OP_ROTL: begin                // acc8 << 1, high bit into the flag
        b_we    = act;
        b_wsel  = ctrl.acc_b ? R_B8 : R_A8;
        b_wdata = {acc8[6:0], acc1};
        f_we    = act;
        f_wsel  = ctrl.acc_b ? F_B1 : F_A1;
        f_wdata = acc8[7];
      end
      OP_READ: begin
        b_we    = act;
        b_wsel  = R_A8;
        b_wdata = ram_rdata;
      end
      OP_WRITE: begin
        ram_we = act;
      end
      OP_ENABLE: begin
        set_en = 1'b1;              // executed by disabled PEs too
      end
      OP_COMPARE: begin
        a1_we    = act;
        a1_wdata = acu_eq;
        f_we     = act;
        f_wsel   = F_B1;
        f_wdata  = acu_gt;
      end
      OP_RESOLVE: begin
        a1_we    = act;
        a1_wdata = a1 & ~kill_self;
      end
      OP_BCAST: begin
        b_we    = act;
        b_wsel  = R_A8;
        b_wdata = ctrl.imm;
      end
      OP_SEND8, OP_RECV8: begin
        b_we    = rx8_we;           // rx8_we already includes EN1
        b_wsel  = R_IO8;
        b_wdata = rx8;
      end
      OP_SEND1, OP_RECV1: begin
        f_we    = rx1_we;
        f_wsel  = F_IO1;
        f_wdata = rx1;
      end
      default: ;                    // NOP, REPORT
    endcase
  end

  // The PLA may not decode two instructions from one BROADCAST8 sequence.
  assert property (@(posedge clk) disable iff (!rst_n)
                   want_operand |-> (ctrl.op == OP_BCAST) || !down_i.bc.valid)
    else $error("pe: bus byte after BROADCAST8 not taken as data");
endmodule
