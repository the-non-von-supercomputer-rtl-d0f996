// pe_byte_regs: the eight 8-bit registers of a processing element.
//
// Registers, by number: A8, B8 (byte accumulators), C8, X8, Y8, Z8 (general),
// IO8 (latch for data passed between PEs) and MAR (address of the local
// RAM). One read port (`rsel` -> `rdata`) serves LOAD and STORE sources; the
// accumulators, IO8 and MAR are also brought out on their own ports for the
// comparator, the rotate logic, the I/O switch and the RAM.
//
// A PE instruction writes at most one byte register, so one write port
// (`we`, `wsel`, `wdata`) suffices; the write takes effect at the clock edge.
// Reset clears every register (the reset value is this design's choice).
module pe_byte_regs
  import nonvon_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  byte_reg_e rsel,
  output byte_t     rdata,
  input  logic      we,
  input  byte_reg_e wsel,
  input  byte_t     wdata,
  output byte_t     a8,
  output byte_t     b8,
  output byte_t     io8,
  output byte_t     mar
);
  byte_t r [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) r[i] <= '0;
    end else if (we) begin
      r[wsel] <= wdata;
    end
  end

  assign rdata = r[rsel];
  assign a8    = r[R_A8];
  assign b8    = r[R_B8];
  assign io8   = r[R_IO8];
  assign mar   = r[R_MAR];
endmodule
