// retire_sync: the retire-stage half of spawn/endblock synchronisation.
//
// Two ordering rules tie the cores together at retirement:
//  * a WT instruction may retire only after the pbr that spawned its block
//    has retired on the CT (otherwise a CT mispredict could still cancel it);
//  * a CT instruction after a pbr may retire only once the matching pjn has
//    been decoded on the WT (only then is it certain the block produces no
//    further value the CT instruction needs).
// Spawns and blocks are ordered by sid, and both notice streams arrive in
// sid order, so the retire-stage spawn queue and endblock queue reduce to
// counts of notices received: ct_pbr_retired counts retired pbrs, and so on.
// An instruction tagged with sid k may retire when the relevant count has
// passed k. The WT pjn retire count tells the register allocators that all
// registers of blocks below it may be freed on the CT side.
// Counters wrap; comparisons use wrapping sid arithmetic. Queries are
// combinational; a notice counts from the next cycle.
module retire_sync (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ct_pbr_retire,    // CT retired a pbr (in sid order)
  input  logic           wt_pjn_decode,    // WT decoded a pjn (in sid order)
  input  logic           wt_pjn_retire,    // WT retired a pjn (in sid order)
  input  cdp_pkg::sid_t  wt_head_sid,      // block of the oldest WT instruction
  output logic           wt_retire_ok,
  input  logic           ct_head_after_pbr,// oldest CT instruction follows some pbr
  input  cdp_pkg::sid_t  ct_head_sid,      //   ... this one
  output logic           ct_retire_ok,
  output cdp_pkg::sid_t  pbr_retired,      // count of retired pbrs
  output cdp_pkg::sid_t  pjn_decoded,
  output cdp_pkg::sid_t  pjn_retired
);
  import cdp_pkg::*;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pbr_retired <= '0;
      pjn_decoded <= '0;
      pjn_retired <= '0;
    end else begin
      pbr_retired <= pbr_retired + sid_t'(ct_pbr_retire);
      pjn_decoded <= pjn_decoded + sid_t'(wt_pjn_decode);
      pjn_retired <= pjn_retired + sid_t'(wt_pjn_retire);
    end
  end

  assign wt_retire_ok = sid_after(pbr_retired, wt_head_sid);
  assign ct_retire_ok = !ct_head_after_pbr || sid_after(pjn_decoded, ct_head_sid);

  // a block cannot end at decode before it was spawned, nor retire before it ended
  assert property (@(posedge clk) disable iff (!rst_n)
                   wt_pjn_retire |-> sid_after(pjn_decoded, pjn_retired));
endmodule
