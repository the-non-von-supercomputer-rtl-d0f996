// pe_ram: the local random access memory of one processing element.
//
// NON-VON 1 gives every PE 64 words of 8 bits. The address comes from the
// 8-bit memory address register (MAR); the architecture allows up to 256
// words, so only the low log2(WORDS) address bits are used and larger
// addresses wrap. The read is combinational (the PE latches the word into
// A8 at the clock edge that ends READRAM); the write happens at the clock
// edge when `we` is high (WRITERAM stores A8). Read-before-write on the same
// edge returns the old word. The RAM is not reset.
// Ports: `clk`, `we`, `addr` (MAR), `wdata` (A8), `rdata`. The size comes
// from NON-VON 1; address wrap and read-before-write are own choices.
module pe_ram #(
  parameter int unsigned WORDS = 64
) (
  input  logic       clk,
  input  logic [7:0] addr,
  input  logic       we,
  input  logic [7:0] wdata,
  output logic [7:0] rdata
);
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [7:0] mem [WORDS];
  logic [AW-1:0] a;

  assign a     = addr[AW-1:0];
  assign rdata = mem[a];

  always_ff @(posedge clk) begin
    if (we) mem[a] <= wdata;
  end
endmodule
