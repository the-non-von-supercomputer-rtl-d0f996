// nonvon_pkg: types and constants shared by every block of the NON-VON
// Primary Processing Subsystem (PPS).
//
// The PPS is a binary tree of small processing elements (PEs). Every tree
// edge carries two bundles: `down_t` from father to son and `up_t` from son
// to father. The same two bundles appear on the T, F, L and R ports of a PPS
// chip, on board ports and on both sides of an Intelligent Head Unit.
//
// What the PE instruction set contains (the mnemonics, their operands and
// their semantics) follows the NON-VON 1 description. The binary encoding of
// the 8-bit instruction word is not published; the encoding below is this
// design's own choice:
//
//   00 ooo rrr   register transfer: ooo = LOADA8 LOADB8 STOREA8 STOREB8
//                LOADA1 LOADB1 STOREA1 STOREB1 (0..7), rrr = register
//   0100 ffff    LOGICAL f: A1 <- f[{A1,B1}] (truth table, index {A1,B1})
//   0101 d ppp   d=0 SEND8 <PE>, d=1 RECV8 <PE>;  ppp = P LC RC LN RN (0..4)
//   0110 d ppp   d=0 SEND1 <PE>, d=1 RECV1 <PE>
//   0111 0000..0101  ADD1 SUB1 ROTRA ROTLA ROTRB ROTLB
//   1000 000w    READRAM (w=0), WRITERAM (w=1)
//   1001 00ii    ENABLE COMPARE RESOLVE REPORT
//   1010 0000    BROADCAST8, followed on the bus by one data byte
//   anything else is a no-operation
package nonvon_pkg;

  typedef logic [7:0] byte_t;

  // Byte register numbers (operand field rrr of the register group).
  typedef enum logic [2:0] {
    R_A8 = 3'd0, R_B8 = 3'd1, R_C8 = 3'd2, R_X8 = 3'd3,
    R_Y8 = 3'd4, R_Z8 = 3'd5, R_IO8 = 3'd6, R_MAR = 3'd7
  } byte_reg_e;

  // Flag register numbers.
  typedef enum logic [2:0] {
    F_A1 = 3'd0, F_B1 = 3'd1, F_C1 = 3'd2, F_X1 = 3'd3,
    F_Y1 = 3'd4, F_Z1 = 3'd5, F_IO1 = 3'd6, F_EN1 = 3'd7
  } flag_reg_e;

  // Neighbour operand of SEND/RECV.
  typedef enum logic [2:0] {
    N_P = 3'd0, N_LC = 3'd1, N_RC = 3'd2, N_LN = 3'd3, N_RN = 3'd4
  } nbr_sel_e;

  // Opcode bytes of the no-register instructions.
  localparam byte_t OPC_ADD1       = 8'h70;
  localparam byte_t OPC_SUB1       = 8'h71;
  localparam byte_t OPC_ROTRA      = 8'h72;
  localparam byte_t OPC_ROTLA      = 8'h73;
  localparam byte_t OPC_ROTRB      = 8'h74;
  localparam byte_t OPC_ROTLB      = 8'h75;
  localparam byte_t OPC_READRAM    = 8'h80;
  localparam byte_t OPC_WRITERAM   = 8'h81;
  localparam byte_t OPC_ENABLE     = 8'h90;
  localparam byte_t OPC_COMPARE    = 8'h91;
  localparam byte_t OPC_RESOLVE    = 8'h92;
  localparam byte_t OPC_REPORT     = 8'h93;
  localparam byte_t OPC_BROADCAST8 = 8'hA0;
  localparam byte_t OPC_NOP        = 8'hFF;

  // Truth tables of the named logical functions (bit {A1,B1} of the code).
  localparam logic [3:0] LF_CLEAR  = 4'b0000;
  localparam logic [3:0] LF_SET    = 4'b1111;
  localparam logic [3:0] LF_NEGATE = 4'b0011;
  localparam logic [3:0] LF_AND    = 4'b1000;
  localparam logic [3:0] LF_OR     = 4'b1110;
  localparam logic [3:0] LF_XOR    = 4'b0110;
  localparam logic [3:0] LF_EQU    = 4'b1001;
  localparam logic [3:0] LF_NAND   = 4'b0111;

  // Instruction-byte builders, used by control code and testbenches.
  function automatic byte_t op_load_a8 (byte_reg_e r); return {5'b00000, r}; endfunction
  function automatic byte_t op_load_b8 (byte_reg_e r); return {5'b00001, r}; endfunction
  function automatic byte_t op_store_a8(byte_reg_e r); return {5'b00010, r}; endfunction
  function automatic byte_t op_store_b8(byte_reg_e r); return {5'b00011, r}; endfunction
  function automatic byte_t op_load_a1 (flag_reg_e r); return {5'b00100, r}; endfunction
  function automatic byte_t op_load_b1 (flag_reg_e r); return {5'b00101, r}; endfunction
  function automatic byte_t op_store_a1(flag_reg_e r); return {5'b00110, r}; endfunction
  function automatic byte_t op_store_b1(flag_reg_e r); return {5'b00111, r}; endfunction
  function automatic byte_t op_logical (logic [3:0] f); return {4'b0100, f}; endfunction
  function automatic byte_t op_send8   (nbr_sel_e p);  return {5'b01010, p}; endfunction
  function automatic byte_t op_recv8   (nbr_sel_e p);  return {5'b01011, p}; endfunction
  function automatic byte_t op_send1   (nbr_sel_e p);  return {5'b01100, p}; endfunction
  function automatic byte_t op_recv1   (nbr_sel_e p);  return {5'b01101, p}; endfunction

  // Decoded operation, produced by the PLA of each PE.
  typedef enum logic [4:0] {
    OP_NOP, OP_LOAD8, OP_STORE8, OP_LOAD1, OP_STORE1, OP_LOGIC,
    OP_ADD1, OP_SUB1, OP_ROTR, OP_ROTL, OP_READ, OP_WRITE,
    OP_ENABLE, OP_COMPARE, OP_RESOLVE, OP_REPORT, OP_BCAST,
    OP_SEND8, OP_RECV8, OP_SEND1, OP_RECV1
  } op_e;

  typedef struct packed {
    op_e        op;
    logic       acc_b;    // accumulator selected: 0 = A8/A1, 1 = B8/B1
    logic [2:0] rsel;     // register operand
    logic [3:0] fn;       // logical function code
    nbr_sel_e   nbr;      // neighbour operand
    byte_t      imm;      // data byte of BROADCAST8
  } ctrl_t;

  // ALU modes.
  typedef enum logic [1:0] {ALU_LOGIC, ALU_ADD, ALU_SUB} alu_mode_e;

  // One byte on the global broadcast bus.
  typedef struct packed {
    logic  valid;
    byte_t data;
  } bcast_t;

  // What a PE shows its tree and linear neighbours: its I/O latches and
  // whether it is enabled. `present` is 0 where no PE exists.
  typedef struct packed {
    logic  present;
    logic  en;
    byte_t io8;
    logic  io1;
  } nbr_t;

  // Father -> son.
  typedef struct packed {
    bcast_t bc;       // global broadcast, passed down unclocked
    logic   kill;     // RESOLVE: a lower-numbered candidate exists
    logic   is_left;  // this son is its father's left child
    nbr_t   father;   // father's latches
    nbr_t   pred;     // inorder predecessor of this subtree's first PE
    nbr_t   succ;     // inorder successor of this subtree's last PE
  } down_t;

  // Son -> father.
  typedef struct packed {
    logic   present;  // a PE subtree is attached
    byte_t  report;   // OR of A8 over the enabled PEs of the subtree
    logic   any;      // some enabled PE of the subtree has A1 = 1
    nbr_t   self;     // the son's own latches
    nbr_t   first;    // latches of the subtree's first PE in inorder
    nbr_t   last;     // latches of the subtree's last PE in inorder
  } up_t;

  localparam nbr_t  NBR_NONE  = '{present: 1'b0, en: 1'b0, io8: 8'h00, io1: 1'b0};
  localparam up_t   UP_NONE   = '{present: 1'b0, report: 8'h00, any: 1'b0,
                                  self: NBR_NONE, first: NBR_NONE, last: NBR_NONE};
  localparam down_t DOWN_IDLE = '{bc: '{valid: 1'b0, data: 8'h00}, kill: 1'b0,
                                  is_left: 1'b0, father: NBR_NONE,
                                  pred: NBR_NONE, succ: NBR_NONE};

endpackage
