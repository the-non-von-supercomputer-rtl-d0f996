// pps_chip: one PPS chip in Leiserson's tree partitioning.
//
// The chip carries a complete binary subtree of 2**C - 1 PEs plus one single
// interior PE that is not part of that subtree, 2**C PEs in all (8 in
// NON-VON 1, C = 3). It has four external tree connections, whatever C is:
//   T  to the root of the on-chip subtree (the subtree's father link),
//   F  to the father of the interior PE,
//   L  to the left son of the interior PE,
//   R  to the right son of the interior PE.
// Each connection is a `down_t` bundle towards the sons and an `up_t` bundle
// towards the father. Because the pinout does not grow with C, a larger C
// only needs a smaller feature size. The subtree is wired in heap order
// (PE i has sons 2i and 2i+1); its leaves are ordinary PEs whose son links
// are tied to UP_NONE. On silicon the subtree is laid out as a hyper-H;
// the layout has no bearing on the logic.
// Each connection here is a full bundle rather than the 9-bit chip bus of
// NON-VON 1 (8 data bits and 1 control bit); this wider link is this
// design's own choice.
module pps_chip
  import nonvon_pkg::*;
#(
  parameter int unsigned C         = 3,
  parameter int unsigned RAM_WORDS = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  // T: subtree root
  input  down_t t_down_i,
  output up_t   t_up_o,
  // F, L, R: the interior PE
  input  down_t f_down_i,
  output up_t   f_up_o,
  output down_t l_down_o,
  input  up_t   l_up_i,
  output down_t r_down_o,
  input  up_t   r_up_i
);
  localparam int unsigned N = (1 << C) - 1;   // PEs in the subtree

  // Heap-ordered links: dn[i] / up[i] connect PE i to its father.
  down_t dn [1:2*N+1];
  up_t   up [1:2*N+1];

  assign dn[1]  = t_down_i;
  assign t_up_o = up[1];

  for (genvar i = 1; i <= N; i++) begin : g_pe
    pe #(.RAM_WORDS(RAM_WORDS)) u_pe (
      .clk, .rst_n,
      .down_i(dn[i]), .up_o(up[i]),
      .lc_down_o(dn[2*i]),   .lc_up_i(up[2*i]),
      .rc_down_o(dn[2*i+1]), .rc_up_i(up[2*i+1])
    );
  end

  // Son links below the leaves: no PE there.
  for (genvar i = N + 1; i <= 2 * N + 1; i++) begin : g_leaf_tie
    assign up[i] = UP_NONE;
  end

  pe #(.RAM_WORDS(RAM_WORDS)) u_interior (
    .clk, .rst_n,
    .down_i(f_down_i), .up_o(f_up_o),
    .lc_down_o(l_down_o), .lc_up_i(l_up_i),
    .rc_down_o(r_down_o), .rc_up_i(r_up_i)
  );
endmodule
