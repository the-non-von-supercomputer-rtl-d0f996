// nonvon_top: the NON-VON Primary Processing Subsystem with its Intelligent
// Head Units, ready to be driven by a control processor.
//
// The PPS is one complete binary tree of PEs. Level K of the tree (the root
// is level 0) is the interface level: each of its 2**K PEs roots an
// interface-rooted subtree and has an IHU inserted between it and its
// father. Physically the tree is 2**K PPS boards (pps_board, each 2**BOARD_M
// chips of 2**C PEs), combined with each other exactly as chips combine on a
// board: the free interior PEs of the boards form the top K levels of the
// tree, and the free PE of the last board stays unused. The tree therefore
// has 2**(K + BOARD_M + C) - 1 working PEs.
//
// The control processor (CP) is outside this module. Its link is the root's
// father link: `cp_valid`/`cp_byte` put one byte per clock on the global
// broadcast bus (instructions, and the data byte after BROADCAST8);
// `report` is the OR of A8 over all enabled PEs (the value REPORT returns
// when one PE is enabled) and `r1` is 1 when some enabled PE has A1 = 1 (the
// RESOLVE result the CP keeps in R1). Both are combinational from PE
// registers and meant to be sampled in the cycle the CP issues REPORT or
// RESOLVE. For each IHU the disk-side controller gets `ihu_active` (mode
// request), a local broadcast port and its subtree's report/any lines.
// The default sizes are C = 3 (8 PEs per chip, as in NON-VON 1), K = 2 (four
// disk heads, as drawn for the machine's organisation) and BOARD_M = 1
// (this design's choice), giving 63 PEs with 64 bytes of RAM each.
module nonvon_top
  import nonvon_pkg::*;
#(
  parameter int unsigned K         = 2,
  parameter int unsigned BOARD_M   = 1,
  parameter int unsigned C         = 3,
  parameter int unsigned RAM_WORDS = 64,
  localparam int unsigned NB       = 1 << K
) (
  input  logic          clk,
  input  logic          rst_n,
  // control processor link
  input  logic          cp_valid,
  input  byte_t         cp_byte,
  output byte_t         report,
  output logic          r1,
  // one set per IHU / disk head
  input  logic [NB-1:0] ihu_active,
  output logic [NB-1:0] ihu_is_active,
  input  logic [NB-1:0] ihu_valid,
  input  byte_t         ihu_byte   [NB],
  output byte_t         ihu_report [NB],
  output logic [NB-1:0] ihu_any
);
  down_t root_dn;
  up_t   root_up;

  always_comb begin
    root_dn    = DOWN_IDLE;
    root_dn.bc = '{valid: cp_valid, data: cp_byte};
  end
  assign report = root_up.present ? root_up.report : 8'h00;
  assign r1     = root_up.present & root_up.any;

  // Boards, each behind its IHU.
  for (genvar b = 0; b < NB; b++) begin : g_board
    down_t tdn, fdn, ldn, rdn, ihu_dn;
    up_t   tup, fup, lup, rup, ihu_up;

    pps_board #(.M(BOARD_M), .C(C), .RAM_WORDS(RAM_WORDS)) u_board (
      .clk, .rst_n,
      .t_down_i(tdn), .t_up_o(tup),
      .f_down_i(fdn), .f_up_o(fup),
      .l_down_o(ldn), .l_up_i(lup),
      .r_down_o(rdn), .r_up_i(rup)
    );

    ihu u_ihu (
      .clk, .rst_n,
      .active_i(ihu_active[b]), .active_o(ihu_is_active[b]),
      .loc_valid(ihu_valid[b]), .loc_byte(ihu_byte[b]),
      .loc_report(ihu_report[b]), .loc_any(ihu_any[b]),
      .p_down_i(ihu_dn), .p_up_o(ihu_up),
      .s_down_o(tdn), .s_up_i(tup)
    );
  end

  // Upper tree: boards combine like chips, the IHU's father side standing
  // for each board's T connection.
  for (genvar j = 0; j <= K; j++) begin : g_lv
    for (genvar i = 0; i < (NB >> j); i++) begin : g_grp
      down_t dn;
      up_t   up;
      if (j == 0) begin : g_single
        assign g_board[i].ihu_dn = dn;
        assign up                = g_board[i].ihu_up;
      end else begin : g_comb
        localparam int unsigned F = i * (1 << j) + (1 << (j - 1)) - 1;
        assign g_board[F].fdn             = dn;
        assign up                         = g_board[F].fup;
        assign g_lv[j-1].g_grp[2*i].dn    = g_board[F].ldn;
        assign g_board[F].lup             = g_lv[j-1].g_grp[2*i].up;
        assign g_lv[j-1].g_grp[2*i+1].dn  = g_board[F].rdn;
        assign g_board[F].rup             = g_lv[j-1].g_grp[2*i+1].up;
      end
    end
  end

  assign g_lv[K].g_grp[0].dn = root_dn;
  assign root_up             = g_lv[K].g_grp[0].up;

  // The one PE the construction leaves over: idle, with no sons.
  assign g_board[NB-1].fdn = DOWN_IDLE;
  assign g_board[NB-1].lup = UP_NONE;
  assign g_board[NB-1].rup = UP_NONE;
endmodule
