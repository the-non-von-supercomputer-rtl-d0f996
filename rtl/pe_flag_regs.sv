// pe_flag_regs: the eight 1-bit flag registers of a processing element.
//
// Registers, by number: A1, B1 (bit accumulators), C1 (carry), X1, Y1, Z1
// (general), IO1 (latch for flags passed between PEs) and EN1 (enable).
// One read port (`rsel` -> `rdata`) serves LOAD and STORE sources; A1, B1,
// C1, IO1 and EN1 are also brought out for the ALU, the I/O switch and the
// control. An instruction writes at most two flags, and then one of them is
// A1 (ADD1/SUB1: A1 and C1; COMPARE: A1 and B1), so there are two write
// ports: a general one (`we`, `wsel`, `wdata`) and a dedicated A1 port
// (`a1_we`, `a1_wdata`), which wins if both address A1. `set_en` forces EN1
// to 1 (the ENABLE instruction) and wins over the general port.
// All writes take effect at the clock edge. Reset clears every flag except
// EN1, which resets to 1 so that all PEs start enabled (this design's choice).
module pe_flag_regs
  import nonvon_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  flag_reg_e rsel,
  output logic      rdata,
  input  logic      we,
  input  flag_reg_e wsel,
  input  logic      wdata,
  input  logic      a1_we,
  input  logic      a1_wdata,
  input  logic      set_en,
  output logic      a1,
  output logic      b1,
  output logic      c1,
  output logic      io1,
  output logic      en1
);
  logic [7:0] f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f <= 8'b1000_0000;          // EN1 = 1, all others 0
    end else begin
      if (we)     f[wsel]  <= wdata;
      if (a1_we)  f[F_A1]  <= a1_wdata;
      if (set_en) f[F_EN1] <= 1'b1;
    end
  end

  assign rdata = f[rsel];
  assign a1    = f[F_A1];
  assign b1    = f[F_B1];
  assign c1    = f[F_C1];
  assign io1   = f[F_IO1];
  assign en1   = f[F_EN1];
endmodule
