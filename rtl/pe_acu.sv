// pe_acu: the byte-wide arithmetic comparison unit of a processing element.
//
// It compares the two byte accumulators in one step, as COMPARE requires:
// `eq` is 1 exactly when A8 = B8 (latched into A1) and `gt` is 1 exactly
// when A8 > B8 (latched into B1). The bytes are compared as unsigned
// numbers, which is this design's choice. The comparator is a ripple from
// the most significant bit down, one stage per bit. Purely combinational.
module pe_acu (
  input  logic [7:0] a8,
  input  logic [7:0] b8,
  output logic       eq,
  output logic       gt
);
  always_comb begin
    logic e, g;
    e = 1'b1;
    g = 1'b0;
    for (int i = 7; i >= 0; i--) begin
      g = g | (e & a8[i] & ~b8[i]);
      e = e & ~(a8[i] ^ b8[i]);
    end
    eq = e;
    gt = g;
  end
endmodule
