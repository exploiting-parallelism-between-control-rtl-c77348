// wt_fetch_ctrl: steers the work-thread core from the spawn queue.
//
// The WT core treats pjn as a branch: its BTB predicts where the next spawn
// point is and fetch continues there at once. When the pjn reaches decode
// (dec_pjn_valid, with the predicted target dec_pjn_pred), the instructions
// behind it are held at decode (dec_stall) until a spawn is in the queue.
// Dequeuing the spawn "resolves" the pjn: if the spawn target equals the
// prediction, decode simply resumes; otherwise fetch is redirected to the
// spawn target (redirect_valid/redirect_pc) and the wrongly fetched
// instructions are dropped by the core. Each dequeued spawn starts a block:
// blk_start_valid delivers its register mask and sid to rename.
//
// After reset, and after wt_squash (the CT squashed spawns the WT already
// took), there is no prediction: the next spawn always redirects fetch.
// Timing: a spawn present at the head while waiting is dequeued in that cycle
// and the redirect / block start are given in that same cycle; decode resumes
// in the next cycle. The mechanism follows the design description; the
// state encoding and the one-cycle resolution are this design's own.
// redirect_pc, blk_mask and blk_sid are the queue head's fields passed
// straight through; they are meaningful only with their valid signals.
module wt_fetch_ctrl (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sq_valid,
  output logic                sq_pop,
  input  cdp_pkg::spawn_req_t sq_head,
  input  logic                dec_pjn_valid,
  input  cdp_pkg::pc_t        dec_pjn_pred,
  input  logic                wt_squash,
  output logic                dec_stall,
  output logic                redirect_valid,
  output cdp_pkg::pc_t        redirect_pc,
  output logic                blk_start_valid,
  output cdp_pkg::regmask_t   blk_mask,
  output cdp_pkg::sid_t       blk_sid,
  output logic                pred_hit       // the resolved pjn was predicted right
);
  import cdp_pkg::*;

  typedef enum logic {S_WAIT, S_RUN} state_e;
  state_e state;
  logic   pred_valid;
  pc_t    pred_pc;

  assign dec_stall       = (state == S_WAIT);
  assign sq_pop          = (state == S_WAIT) && sq_valid && !wt_squash;
  assign blk_start_valid = sq_pop;
  assign blk_mask        = sq_head.mask;
  assign blk_sid         = sq_head.sid;
  assign pred_hit        = sq_pop && pred_valid && (pred_pc == sq_head.target);
  assign redirect_valid  = sq_pop && !pred_hit;
  assign redirect_pc     = sq_head.target;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_WAIT;
      pred_valid <= 1'b0;
      pred_pc    <= '0;
    end else if (wt_squash) begin
      state      <= S_WAIT;
      pred_valid <= 1'b0;
    end else if (state == S_RUN) begin
      if (dec_pjn_valid) begin
        state      <= S_WAIT;
        pred_valid <= 1'b1;
        pred_pc    <= dec_pjn_pred;
      end
    end else if (sq_pop) begin
      state <= S_RUN;
    end
  end

  // a pjn cannot reach decode while decode is held
  assert property (@(posedge clk) disable iff (!rst_n) dec_stall |-> !dec_pjn_valid);
endmodule
