// ihu: Intelligent Head Unit, the interface between one disk head of the
// Secondary Processing Subsystem and the PPS tree.
//
// The IHU sits on the tree edge between an interface-level PE (the root of
// an "interface-rooted subtree") and that PE's father. It has two modes:
//   passive: a plain bus; both bundles pass through unchanged, so the tree
//            behaves as if the IHU were not there.
//   active:  the IHU is the control processor of its own subtree. The
//            subtree's broadcast bus is driven from the IHU's local port
//            (`loc_valid`, `loc_byte`), so every subtree can run its own
//            instruction stream independently of the others. The subtree
//            is cut off from the rest of the tree: no RESOLVE kill, no tree
//            or linear neighbour reaches across the IHU, and the father sees
//            an attached but silent subtree (nothing reported, no RESOLVE
//            candidate, no neighbour latches).
// In both modes the subtree's report bus and RESOLVE "any" line are
// available to the IHU (`loc_report`, `loc_any`), as the CP sees them at
// the root. The mode is a register loaded from `active_i` every clock, so a
// mode change takes effect on the cycle after it is requested.
// What the IHU does with the disk data (on-the-fly filtering, hash coding)
// is not part of this block; its instruction source is brought out as
// ports. The isolation rules of active mode are this design's choice.
module ihu
  import nonvon_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  active_i,
  output logic  active_o,
  // local control (disk side)
  input  logic  loc_valid,
  input  byte_t loc_byte,
  output byte_t loc_report,
  output logic  loc_any,
  // father side
  input  down_t p_down_i,
  output up_t   p_up_o,
  // subtree side
  output down_t s_down_o,
  input  up_t   s_up_i
);
  logic active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) active <= 1'b0;
    else        active <= active_i;
  end

  always_comb begin
    if (active) begin
      s_down_o    = DOWN_IDLE;
      s_down_o.bc = '{valid: loc_valid, data: loc_byte};
      p_up_o      = UP_NONE;
      p_up_o.present = s_up_i.present;
    end else begin
      s_down_o = p_down_i;
      p_up_o   = s_up_i;
    end
  end

  assign active_o   = active;
  assign loc_report = s_up_i.present ? s_up_i.report : 8'h00;
  assign loc_any    = s_up_i.present & s_up_i.any;
endmodule
