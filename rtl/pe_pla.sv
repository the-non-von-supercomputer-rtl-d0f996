// pe_pla: instruction decoder and finite-state control of a processing
// element (the PLA of the NON-VON 1 PE).
//
// Instructions arrive one byte at a time on the global broadcast bus
// (`bc.valid` marks a byte). Every instruction is one byte, except
// BROADCAST8, whose opcode byte is followed by one data byte. The control
// therefore has two states: IDLE, where a byte is decoded as an opcode, and
// OPERAND, entered after a BROADCAST8 opcode, where the next byte is taken
// as the broadcast value. `ctrl` is combinational from the bus byte and the
// state; the opcode byte of BROADCAST8 itself decodes to OP_NOP and the data
// byte to OP_BCAST with `imm` = the byte. Every PE, enabled or not, runs
// this state machine so that all PEs stay in step; whether a decoded
// instruction is executed is decided by the PE from EN1.
// The bit encoding is the one listed in nonvon_pkg (this design's choice);
// unassigned bytes decode to OP_NOP.
module pe_pla
  import nonvon_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  bcast_t bc,
  output ctrl_t  ctrl,
  output logic   want_operand   // state: the next byte is BROADCAST8 data
);
  typedef enum logic {S_IDLE, S_OPERAND} state_e;
  state_e state, state_n;

  always_comb begin
    byte_t b;
    b       = bc.data;
    ctrl    = '{op: OP_NOP, acc_b: 1'b0, rsel: b[2:0], fn: b[3:0],
                nbr: nbr_sel_e'(b[2:0]), imm: b};
    state_n = state;
    if (bc.valid) begin
      if (state == S_OPERAND) begin
        ctrl.op = OP_BCAST;
        state_n = S_IDLE;
      end else begin
        unique casez (b)
          8'b00_???_???: begin
            unique case (b[5:3])
              3'd0: begin ctrl.op = OP_LOAD8;  ctrl.acc_b = 1'b0; end
              3'd1: begin ctrl.op = OP_LOAD8;  ctrl.acc_b = 1'b1; end
              3'd2: begin ctrl.op = OP_STORE8; ctrl.acc_b = 1'b0; end
              3'd3: begin ctrl.op = OP_STORE8; ctrl.acc_b = 1'b1; end
              3'd4: begin ctrl.op = OP_LOAD1;  ctrl.acc_b = 1'b0; end
              3'd5: begin ctrl.op = OP_LOAD1;  ctrl.acc_b = 1'b1; end
              3'd6: begin ctrl.op = OP_STORE1; ctrl.acc_b = 1'b0; end
              default: begin ctrl.op = OP_STORE1; ctrl.acc_b = 1'b1; end
            endcase
          end
          8'b0100_????: ctrl.op = OP_LOGIC;
          8'b0101_????: if (b[2:0] <= 3'd4) ctrl.op = b[3] ? OP_RECV8 : OP_SEND8;
          8'b0110_????: if (b[2:0] <= 3'd4) ctrl.op = b[3] ? OP_RECV1 : OP_SEND1;
          OPC_ADD1:     ctrl.op = OP_ADD1;
          OPC_SUB1:     ctrl.op = OP_SUB1;
          OPC_ROTRA:    begin ctrl.op = OP_ROTR; ctrl.acc_b = 1'b0; end
          OPC_ROTLA:    begin ctrl.op = OP_ROTL; ctrl.acc_b = 1'b0; end
          OPC_ROTRB:    begin ctrl.op = OP_ROTR; ctrl.acc_b = 1'b1; end
          OPC_ROTLB:    begin ctrl.op = OP_ROTL; ctrl.acc_b = 1'b1; end
          OPC_READRAM:  ctrl.op = OP_READ;
          OPC_WRITERAM: ctrl.op = OP_WRITE;
          OPC_ENABLE:   ctrl.op = OP_ENABLE;
          OPC_COMPARE:  ctrl.op = OP_COMPARE;
          OPC_RESOLVE:  ctrl.op = OP_RESOLVE;
          OPC_REPORT:   ctrl.op = OP_REPORT;
          OPC_BROADCAST8: state_n = S_OPERAND;
          default:      ctrl.op = OP_NOP;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_n;
  end

  assign want_operand = (state == S_OPERAND);
endmodule
