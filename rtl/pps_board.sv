// pps_board: a printed circuit board of 2**M PPS chips in Leiserson's
// planar layout.
//
// Two chips combine into a bigger "chip": the interior PE of the first chip
// becomes the root of a complete subtree whose left son is the first chip's
// subtree (its T port) and whose right son is the second chip's subtree; the
// interior PE of the second chip stays free. The result again has exactly
// four connections T, F, L, R. Applying the step recursively, a board of
// 2**M chips holds a complete subtree of 2**(C+M) - 1 PEs plus one free
// interior PE, and boards combine with each other in exactly the same way.
//
// This module wires the recursion flat. Group (j, i) is the block of 2**j
// chips starting at chip i*2**j; its T link is g_lv[j].g_grp[i].dn/up. For j >= 1 its
// root is the interior PE of chip i*2**j + 2**(j-1) - 1 (the last chip of
// its left half), whose L and R go to the T links of groups (j-1, 2i) and
// (j-1, 2i+1). The board's T is group (M, 0); its F, L, R are the interior
// PE of the last chip, the one left free. All timing is the PEs' (one
// instruction per clock); the board adds only wiring.
module pps_board
  import nonvon_pkg::*;
#(
  parameter int unsigned M         = 1,
  parameter int unsigned C         = 3,
  parameter int unsigned RAM_WORDS = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  down_t t_down_i,
  output up_t   t_up_o,
  input  down_t f_down_i,
  output up_t   f_up_o,
  output down_t l_down_o,
  input  up_t   l_up_i,
  output down_t r_down_o,
  input  up_t   r_up_i
);
  localparam int unsigned NCHIP = 1 << M;

  // Every chip's four connections live in the chip's own generate scope.
  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    down_t tdn, fdn, ldn, rdn;
    up_t   tup, fup, lup, rup;
    pps_chip #(.C(C), .RAM_WORDS(RAM_WORDS)) u_chip (
      .clk, .rst_n,
      .t_down_i(tdn), .t_up_o(tup),
      .f_down_i(fdn), .f_up_o(fup),
      .l_down_o(ldn), .l_up_i(lup),
      .r_down_o(rdn), .r_up_i(rup)
    );
  end

  // Group T links, level by level; level 0 groups are single chips.
  for (genvar j = 0; j <= M; j++) begin : g_lv
    for (genvar i = 0; i < (NCHIP >> j); i++) begin : g_grp
      down_t dn;
      up_t   up;
      if (j == 0) begin : g_single
        assign g_chip[i].tdn = dn;
        assign up            = g_chip[i].tup;
      end else begin : g_comb
        // root of the group: interior PE of the last chip of its left half
        localparam int unsigned F = i * (1 << j) + (1 << (j - 1)) - 1;
        assign g_chip[F].fdn         = dn;
        assign up                    = g_chip[F].fup;
        assign g_lv[j-1].g_grp[2*i].dn   = g_chip[F].ldn;
        assign g_chip[F].lup             = g_lv[j-1].g_grp[2*i].up;
        assign g_lv[j-1].g_grp[2*i+1].dn = g_chip[F].rdn;
        assign g_chip[F].rup             = g_lv[j-1].g_grp[2*i+1].up;
      end
    end
  end

  // board ports
  assign g_lv[M].g_grp[0].dn  = t_down_i;
  assign t_up_o               = g_lv[M].g_grp[0].up;
  assign g_chip[NCHIP-1].fdn  = f_down_i;
  assign f_up_o               = g_chip[NCHIP-1].fup;
  assign l_down_o             = g_chip[NCHIP-1].ldn;
  assign g_chip[NCHIP-1].lup  = l_up_i;
  assign r_down_o             = g_chip[NCHIP-1].rdn;
  assign g_chip[NCHIP-1].rup  = r_up_i;
endmodule
