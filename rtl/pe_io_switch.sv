// pe_io_switch: the I/O switch of a processing element.
//
// It joins the PE to its father (F side: `down_i` in, `up_o` out) and to its
// left and right sons (`lc_*`, `rc_*`), and carries every inter-PE function:
//
//  * Global broadcast: the bus byte from the father is passed unchanged and
//    unclocked to both sons, so an instruction reaches the whole tree in one
//    cycle through one small gate delay per level.
//  * Report to the control processor: the OR of A8 over all enabled PEs of
//    the subtree flows up (`up_o.report`); with one PE enabled this is its A8.
//  * RESOLVE: the kill chain. A candidate is an enabled PE with A1 = 1.
//    `up_o.any` tells the father that the subtree holds a candidate; `kill`
//    passed down tells a subtree that a candidate with a lower inorder number
//    exists. The left subtree comes before the PE, the PE before the right
//    subtree, so this PE is killed by the father's kill or a left-subtree
//    candidate, and its right son additionally by this PE. Only the lowest
//    numbered candidate survives; `any` at the root is the CP's R1.
//  * Tree neighbours (P, LC, RC): the PE's latches (IO8, IO1, EN1) are shown
//    to the sons and the father directly; sons learn which side they are on.
//  * Linear neighbours (LN, RN) under the inorder embedding: each subtree
//    reports the latches of its first and last PE in inorder, and receives
//    from above the latches of the PE just before and just after it. A PE's
//    LN is then the last PE of its left subtree (or, for a leaf, the PE
//    before its subtree) and its RN the first PE of its right subtree (or
//    the PE after its subtree). The paths run through the switches on the
//    tree edges, as the inorder embedding requires.
//  * SEND/RECV: selects the value to be latched into IO8 or IO1. RECV takes
//    the named neighbour's latch whether that neighbour is enabled or not;
//    where there is no such neighbour (a leaf's sons, the root's father,
//    the ends of the linear order) the open inputs read as 0, so a leaf
//    can tell that it has no descendants;
//    SEND is resolved at the receiver: a PE latches the value of the PE that
//    names it as target, provided that sender is enabled. Both need the
//    receiver enabled (`en`). SEND to P is not a legal operation (both sons
//    would drive one father) and does nothing.
//
// Purely combinational. Sons that do not exist are marked by
// `present = 0` on their up link (leaves are identical PEs with tied-off
// son ports). Every neighbour path is a function of registers only, so the
// tree has no combinational loop.
// Follows NON-VON 1: broadcast, report, RESOLVE order and the five
// neighbours. Own choices: wide links instead of the 9-bit multiplexed bus,
// a missing neighbour reads as 0, and SEND P does nothing.
module pe_io_switch
  import nonvon_pkg::*;
(
  // own state
  input  logic  en,        // EN1
  input  logic  a1,        // A1 (RESOLVE candidate flag)
  input  byte_t a8,        // A8 (reported value)
  input  byte_t io8,
  input  logic  io1,
  input  ctrl_t ctrl,      // decoded instruction (SEND/RECV operand)
  // father side
  input  down_t down_i,
  output up_t   up_o,
  // sons
  output down_t lc_down_o,
  input  up_t   lc_up_i,
  output down_t rc_down_o,
  input  up_t   rc_up_i,
  // results for the PE
  output logic  kill_self, // RESOLVE: clear A1
  output logic  rx8_we,
  output byte_t rx8,
  output logic  rx1_we,
  output logic  rx1
);
  nbr_t self_n, ln, rn, lc_n, rc_n, src;
  logic lc_any, rc_any, cand;
  logic is_send, is_recv, src_ok;

  always_comb begin
    self_n = '{present: 1'b1, en: en, io8: io8, io1: io1};
    lc_n   = lc_up_i.present ? lc_up_i.self : NBR_NONE;
    rc_n   = rc_up_i.present ? rc_up_i.self : NBR_NONE;
    ln     = lc_up_i.present ? lc_up_i.last  : down_i.pred;
    rn     = rc_up_i.present ? rc_up_i.first : down_i.succ;

    // RESOLVE kill chain
    cand      = en & a1;
    lc_any    = lc_up_i.present & lc_up_i.any;
    rc_any    = rc_up_i.present & rc_up_i.any;
    kill_self = down_i.kill | lc_any;

    // to the father
    up_o.present = 1'b1;
    up_o.report  = (en ? a8 : 8'h00)
                 | (lc_up_i.present ? lc_up_i.report : 8'h00)
                 | (rc_up_i.present ? rc_up_i.report : 8'h00);
    up_o.any     = lc_any | cand | rc_any;
    up_o.self    = self_n;
    up_o.first   = lc_up_i.present ? lc_up_i.first : self_n;
    up_o.last    = rc_up_i.present ? rc_up_i.last  : self_n;

    // to the sons
    lc_down_o.bc      = down_i.bc;
    lc_down_o.kill    = down_i.kill;
    lc_down_o.is_left = 1'b1;
    lc_down_o.father  = self_n;
    lc_down_o.pred    = down_i.pred;
    lc_down_o.succ    = self_n;

    rc_down_o.bc      = down_i.bc;
    rc_down_o.kill    = down_i.kill | lc_any | cand;
    rc_down_o.is_left = 1'b0;
    rc_down_o.father  = self_n;
    rc_down_o.pred    = self_n;
    rc_down_o.succ    = down_i.succ;

    // SEND / RECV source selection
    is_send = (ctrl.op == OP_SEND8) || (ctrl.op == OP_SEND1);
    is_recv = (ctrl.op == OP_RECV8) || (ctrl.op == OP_RECV1);
    src     = NBR_NONE;
    src_ok  = 1'b0;
    if (is_recv) begin
      unique case (ctrl.nbr)
        N_P:     src = down_i.father;
        N_LC:    src = lc_n;
        N_RC:    src = rc_n;
        N_LN:    src = ln;
        N_RN:    src = rn;
        default: src = NBR_NONE;
      endcase
      src_ok = 1'b1;              // a missing neighbour reads as 0
    end else if (is_send) begin
      unique case (ctrl.nbr)
        N_LC:    src = down_i.is_left  ? down_i.father : NBR_NONE;
        N_RC:    src = !down_i.is_left ? down_i.father : NBR_NONE;
        N_LN:    src = rn;   // my right neighbour sends to its left one
        N_RN:    src = ln;   // my left neighbour sends to its right one
        default: src = NBR_NONE;
      endcase
      src_ok = src.present & src.en;
    end
    rx8    = src.present ? src.io8 : 8'h00;
    rx1    = src.present & src.io1;
    rx8_we = en & src_ok & ((ctrl.op == OP_SEND8) || (ctrl.op == OP_RECV8));
    rx1_we = en & src_ok & ((ctrl.op == OP_SEND1) || (ctrl.op == OP_RECV1));
  end
endmodule
