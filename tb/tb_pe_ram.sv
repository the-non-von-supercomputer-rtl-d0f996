// tb_pe_ram: the local RAM. Random writes and reads are checked against a
// reference array; addresses above the RAM size are checked to wrap.
//
// Interface: no ports; the testbench instantiates pe_ram and prints
// "TB_RESULT checks=N failures=M" at the end. A watchdog counts a failure
// if the run hangs.
// Timing: 10 ns clock; inputs are applied at the falling edge and
//   results checked 1 ns after the following rising edge.
// Source: 64 words of 8 bits follow NON-VON 1; address wrap is this design's
//   choice.
module tb_pe_ram;
  localparam int WORDS = 64;
  logic clk = 1'b0;
  logic [7:0] addr = '0, wdata = '0, rdata;
  logic we = 1'b0;
  logic [7:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  pe_ram #(.WORDS(WORDS)) dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      addr = 8'(i); wdata = 8'($urandom); we = 1'b1;
      ref_mem[i] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      addr  = 8'($urandom);
      we    = ($urandom_range(0, 2) == 0);
      wdata = 8'($urandom);
      #1;
      checks++;
      if (rdata !== ref_mem[addr % WORDS]) begin
        failures++;
        $display("FAIL read addr %0d: got %h expected %h", addr, rdata, ref_mem[addr % WORDS]);
      end
      if (we) ref_mem[addr % WORDS] = wdata;
      @(posedge clk); #1;
      if (we) begin
        checks++;
        if (rdata !== wdata) begin
          failures++;
          $display("FAIL written word addr %0d", addr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
