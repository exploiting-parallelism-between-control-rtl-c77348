// cdp_top: the hardware added to a dual-core chip multiprocessor so that a
// control thread (CT) and its work threads (WT) run in parallel.
//
// The CT core runs the slice of the program that decides control flow; when
// it reaches a pbr it spawns the following work block on the WT core. The
// two cores themselves (out-of-order x86 cores), their caches and their
// branch predictors are outside this module: their signals are its ports.
// Inside:
//   * CT decode: pbr detection per slot, the CT register update mask, the
//     spawn id counter and the CT register-map checkpoint at each pbr; each
//     pbr pushes {target, mask, sid} into the spawn queue (ct_stall when
//     full). A mispredict rolls the queue and the sid counter back.
//   * WT front end: wt_fetch_ctrl takes spawns from the queue, resolves the
//     predicted pjn targets, redirects fetch and starts blocks; wt_input_check
//     flags source registers that must be fetched from the CT; pjn detection
//     closes a block: WT mask -> endblock queue, WT map checkpoint.
//   * Register communication: one RCU per core, wired back to back; the CT
//     side is fed by ct_update_ctrl, which turns endblock masks into register
//     requests.
//   * retire_sync for the retirement rules and the shared memory
//     communication unit (mcu), whose core-side ports are brought out.
// Interface conventions: per-slot arrays of WIDTH decode/rename slots, the
// decode and rename information of a slot presented together (the cores
// align them), at most one pbr (CT) or pjn (WT) per group, a WT pjn is the
// last valid slot of its group. Synchronous active-low reset.
// Status outputs of the sub-blocks that the cores do not need (queue and
// buffer occupancies, current masks, stale mask, the decoders' next-PC and
// length, the update drain flag) are left unconnected here.
module cdp_top #(
  parameter int unsigned WIDTH      = 4,
  parameter int unsigned NSRC       = 2,
  parameter int unsigned SQ_DEPTH   = 256,
  parameter int unsigned EQ_DEPTH   = 256,
  parameter int unsigned SILO_DEPTH = 512,
  parameter int unsigned RCU_DEPTH  = 128,
  parameter int unsigned BW         = 2,
  parameter int unsigned BATCH      = 4,
  parameter int unsigned ASB_DEPTH  = 320,
  parameter int unsigned ASB_RESV   = 128,
  parameter int unsigned MSB_DEPTH  = 160,
  parameter int unsigned MSB_RESV   = 32,
  parameter int unsigned BYP_LAT    = 5,
  localparam int unsigned SQW = $clog2(SQ_DEPTH),
  localparam int unsigned AW  = $clog2(ASB_DEPTH),
  localparam int unsigned MW  = $clog2(MSB_DEPTH),
  localparam int unsigned NP  = 1 << cdp_pkg::PREG_W
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // ---------------- CT core: decode/rename group ----------------
  input  logic [WIDTH-1:0]                       ct_slot_valid,
  input  cdp_pkg::pc_t [WIDTH-1:0]               ct_slot_pc,
  input  logic [WIDTH-1:0][23:0]                 ct_slot_bytes,
  input  logic [WIDTH-1:0]                       ct_dst_valid,
  input  cdp_pkg::areg_t [WIDTH-1:0]             ct_dst_areg,
  input  cdp_pkg::preg_t [cdp_pkg::NUM_AREGS-1:0] ct_map,
  output logic                                   ct_stall,
  output logic                                   ct_spawn_valid,
  output cdp_pkg::sid_t                          ct_spawn_sid,
  output logic [SQW:0]                           ct_spawn_ptr,   // checkpoint with each branch
  output cdp_pkg::sid_t                          ct_next_sid,    // checkpoint with each branch
  input  logic                                   ct_squash_valid,
  input  logic [SQW:0]                           ct_squash_ptr,
  input  cdp_pkg::sid_t                          ct_squash_sid,
  // CT register file side
  input  logic                                   ct_rel_valid,
  input  cdp_pkg::sid_t                          ct_rel_sid,
  input  logic                                   ct_upd_flush,
  output logic [BW-1:0]                          ct_up_valid,
  output cdp_pkg::areg_t [BW-1:0]                ct_up_areg,
  input  cdp_pkg::preg_t [BW-1:0]                ct_up_preg,
  input  logic [NP-1:0]                          ct_preg_ready,
  output logic [BW-1:0]                          ct_rf_rd_valid,
  output cdp_pkg::preg_t [BW-1:0]                ct_rf_rd_preg,
  input  cdp_pkg::data_t [BW-1:0]                ct_rf_rd_data,
  output logic [BW-1:0]                          ct_rf_wr_valid,
  output cdp_pkg::preg_t [BW-1:0]                ct_rf_wr_preg,
  output cdp_pkg::data_t [BW-1:0]                ct_rf_wr_data,
  // ---------------- WT core ----------------
  input  logic [WIDTH-1:0]                       wt_slot_valid,
  input  cdp_pkg::pc_t [WIDTH-1:0]               wt_slot_pc,
  input  logic [WIDTH-1:0][23:0]                 wt_slot_bytes,
  input  cdp_pkg::pc_t                           wt_pjn_pred,
  input  logic [WIDTH-1:0][NSRC-1:0]             wt_src_valid,
  input  logic [WIDTH-1:0][NSRC-1:0][cdp_pkg::AREG_W-1:0] wt_src_areg,
  input  logic [WIDTH-1:0][NSRC-1:0][cdp_pkg::PREG_W-1:0] wt_src_newpreg,
  input  logic [WIDTH-1:0]                       wt_dst_valid,
  input  cdp_pkg::areg_t [WIDTH-1:0]             wt_dst_areg,
  input  cdp_pkg::preg_t [cdp_pkg::NUM_AREGS-1:0] wt_map,
  input  logic                                   wt_squash,
  output logic                                   wt_squash_req,
  output logic                                   wt_dec_stall,
  output logic [WIDTH-1:0][NSRC-1:0]             wt_need_remote,
  output logic                                   wt_redirect_valid,
  output cdp_pkg::pc_t                           wt_redirect_pc,
  output logic                                   wt_blk_start,
  output cdp_pkg::sid_t                          wt_blk_sid,
  output logic                                   wt_pred_hit,
  output logic                                   wt_pjn_valid,
  input  logic                                   wt_rel_valid,
  input  cdp_pkg::sid_t                          wt_rel_sid,
  input  logic [NP-1:0]                          wt_preg_ready,
  output logic [BW-1:0]                          wt_rf_rd_valid,
  output cdp_pkg::preg_t [BW-1:0]                wt_rf_rd_preg,
  input  cdp_pkg::data_t [BW-1:0]                wt_rf_rd_data,
  output logic [BW-1:0]                          wt_rf_wr_valid,
  output cdp_pkg::preg_t [BW-1:0]                wt_rf_wr_preg,
  output cdp_pkg::data_t [BW-1:0]                wt_rf_wr_data,
  // ---------------- retirement ----------------
  input  logic                                   ct_pbr_retire,
  input  logic                                   wt_pjn_retire,
  input  cdp_pkg::sid_t                          wt_head_sid,
  output logic                                   wt_retire_ok,
  input  logic                                   ct_head_after_pbr,
  input  cdp_pkg::sid_t                          ct_head_sid,
  output logic                                   ct_retire_ok,
  output cdp_pkg::sid_t                          pjn_retired,
  // ---------------- memory communication (index 0 = CT, 1 = WT) ----------------
  input  logic [1:0]                             mem_ins_valid,
  input  logic [1:0]                             mem_ins_store,
  input  cdp_pkg::seq_t [1:0]                    mem_ins_seq,
  output logic [1:0]                             mem_ins_ready,
  output logic [1:0][AW-1:0]                     mem_ins_asb_idx,
  output logic [1:0][MW-1:0]                     mem_ins_msb_idx,
  input  logic [1:0]                             mem_ld_valid,
  input  logic [1:0][AW-1:0]                     mem_ld_asb_idx,
  input  cdp_pkg::addr_t [1:0]                   mem_ld_addr,
  input  cdp_pkg::seq_t [1:0]                    mem_ld_seq,
  output logic [1:0]                             mem_ld_ready,
  output logic                                   mem_ld_rsp_valid,
  output logic                                   mem_ld_rsp_core,
  output logic [AW-1:0]                          mem_ld_rsp_idx,
  output logic                                   mem_ld_rsp_fwd,
  output cdp_pkg::data_t                         mem_ld_rsp_data,
  input  logic [1:0]                             mem_st_valid,
  input  logic [1:0][AW-1:0]                     mem_st_asb_idx,
  input  logic [1:0][MW-1:0]                     mem_st_msb_idx,
  input  cdp_pkg::addr_t [1:0]                   mem_st_addr,
  input  cdp_pkg::data_t [1:0]                   mem_st_data,
  input  cdp_pkg::seq_t [1:0]                    mem_st_seq,
  output logic [1:0]                             mem_st_ready,
  output logic                                   mem_vio_valid,
  output logic                                   mem_vio_core,
  output cdp_pkg::seq_t                          mem_vio_seq,
  output logic [AW-1:0]                          mem_vio_idx,
  input  logic [1:0]                             mem_cm_valid,
  input  logic [1:0][AW-1:0]                     mem_cm_asb_idx,
  input  logic [1:0]                             mem_cm_store,
  input  logic [1:0][MW-1:0]                     mem_cm_msb_idx,
  output logic [1:0]                             mem_cm_ready,
  output logic                                   mem_wr_valid,
  output cdp_pkg::addr_t                         mem_wr_addr,
  output cdp_pkg::data_t                         mem_wr_data,
  output logic                                   mem_oldest_core
);
  import cdp_pkg::*;
  localparam int unsigned SW = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  // =============== CT decode: pbr ===============
  logic [WIDTH-1:0] ct_is_pbr, ct_is_pjn_unused;
  pc_t  [WIDTH-1:0] ct_tgt, ct_npc;
  logic [WIDTH-1:0][1:0] ct_len;
  for (genvar i = 0; i < WIDTH; i++) begin : g_ct_dec
    pbr_pjn_decode u_dec (
      .valid(ct_slot_valid[i]), .pc(ct_slot_pc[i]), .bytes(ct_slot_bytes[i]),
      .is_pbr(ct_is_pbr[i]), .is_pjn(ct_is_pjn_unused[i]), .len(ct_len[i]),
      .spawn_target(ct_tgt[i]), .next_pc(ct_npc[i])
    );
  end

  logic          ct_bnd;
  logic [SW-1:0] ct_bnd_slot;
  pc_t           ct_bnd_tgt;
  always_comb begin
    ct_bnd      = 1'b0;
    ct_bnd_slot = '0;
    ct_bnd_tgt  = '0;
    for (int i = WIDTH-1; i >= 0; i--)
      if (ct_is_pbr[i]) begin ct_bnd = 1'b1; ct_bnd_slot = SW'(i); ct_bnd_tgt = ct_tgt[i]; end
  end

  logic     ct_mask_v;
  regmask_t ct_mask, ct_cur_mask;
  reg_update_mask #(.WIDTH(WIDTH)) u_ct_mask (
    .clk, .rst_n,
    .wr_valid(ct_dst_valid & ct_slot_valid & {WIDTH{!ct_stall}}), .wr_areg(ct_dst_areg),
    .bnd_valid(ct_bnd && !ct_stall), .bnd_slot(ct_bnd_slot),
    .out_valid(ct_mask_v), .out_mask(ct_mask), .cur_mask(ct_cur_mask)
  );

  sid_t sid_q;
  logic sq_push_ready;
  assign ct_stall       = ct_bnd && !sq_push_ready;
  assign ct_spawn_valid = ct_mask_v;
  assign ct_spawn_sid   = sid_q;
  assign ct_next_sid    = sid_q;
  always_ff @(posedge clk) begin
    if (!rst_n)               sid_q <= '0;
    else if (ct_squash_valid) sid_q <= ct_squash_sid;
    else if (ct_spawn_valid)  sid_q <= sid_q + 1'b1;
  end

  // =============== spawn queue ===============
  spawn_req_t sq_head;
  logic       sq_valid, sq_pop, sq_consumed;
  logic [SQW:0] sq_count;
  spawn_queue #(.T(spawn_req_t), .DEPTH(SQ_DEPTH)) u_sq (
    .clk, .rst_n,
    .push_valid(ct_spawn_valid), .push_ready(sq_push_ready),
    .push_data('{target: ct_bnd_tgt, mask: ct_mask, sid: sid_q}),
    .pop_valid(sq_valid), .pop_ready(sq_pop), .pop_data(sq_head),
    .wr_ptr(ct_spawn_ptr),
    .squash_valid(ct_squash_valid), .squash_ptr(ct_squash_ptr),
    .squash_consumed(sq_consumed), .count(sq_count)
  );
  assign wt_squash_req = sq_consumed;

  // =============== WT front end ===============
  logic [WIDTH-1:0] wt_is_pjn, wt_is_pbr_unused;
  pc_t  [WIDTH-1:0] wt_tgt_unused, wt_npc_unused;
  logic [WIDTH-1:0][1:0] wt_len_unused;
  for (genvar i = 0; i < WIDTH; i++) begin : g_wt_dec
    pbr_pjn_decode u_dec (
      .valid(wt_slot_valid[i]), .pc(wt_slot_pc[i]), .bytes(wt_slot_bytes[i]),
      .is_pbr(wt_is_pbr_unused[i]), .is_pjn(wt_is_pjn[i]), .len(wt_len_unused[i]),
      .spawn_target(wt_tgt_unused[i]), .next_pc(wt_npc_unused[i])
    );
  end

  logic          wt_bnd;
  logic [SW-1:0] wt_bnd_slot;
  always_comb begin
    wt_bnd      = 1'b0;
    wt_bnd_slot = '0;
    for (int i = WIDTH-1; i >= 0; i--)
      if (wt_is_pjn[i]) begin wt_bnd = 1'b1; wt_bnd_slot = SW'(i); end
  end
  assign wt_pjn_valid = wt_bnd;

  regmask_t blk_mask;
  logic     eq_push_ready;
  wt_fetch_ctrl u_wfc (
    .clk, .rst_n,
    .sq_valid, .sq_pop, .sq_head,
    .dec_pjn_valid(wt_bnd), .dec_pjn_pred(wt_pjn_pred),
    .wt_squash(wt_squash || sq_consumed),
    .dec_stall(wt_dec_stall),
    .redirect_valid(wt_redirect_valid), .redirect_pc(wt_redirect_pc),
    .blk_start_valid(wt_blk_start), .blk_mask, .blk_sid(wt_blk_sid),
    .pred_hit(wt_pred_hit)
  );

  sid_t wt_cur_sid;
  always_ff @(posedge clk) begin
    if (!rst_n)            wt_cur_sid <= '0;
    else if (wt_blk_start) wt_cur_sid <= wt_blk_sid;
  end

  regmask_t wt_stale;
  wt_input_check #(.WIDTH(WIDTH), .NSRC(NSRC)) u_wic (
    .clk, .rst_n,
    .blk_start_valid(wt_blk_start), .blk_mask,
    .dec_valid(wt_slot_valid), .src_valid(wt_src_valid), .src_areg(wt_src_areg),
    .dst_valid(wt_dst_valid), .dst_areg(wt_dst_areg),
    .need_remote(wt_need_remote), .stale_mask(wt_stale)
  );

  logic     wt_mask_v;
  regmask_t wt_mask, wt_cur_mask;
  reg_update_mask #(.WIDTH(WIDTH)) u_wt_mask (
    .clk, .rst_n,
    .wr_valid(wt_dst_valid & wt_slot_valid), .wr_areg(wt_dst_areg),
    .bnd_valid(wt_bnd), .bnd_slot(wt_bnd_slot),
    .out_valid(wt_mask_v), .out_mask(wt_mask), .cur_mask(wt_cur_mask)
  );

  // =============== endblock queue ===============
  endblock_t eq_head;
  logic      eq_valid, eq_pop, eq_consumed_unused;
  logic [$clog2(EQ_DEPTH):0] eq_wr_ptr, eq_count;
  spawn_queue #(.T(endblock_t), .DEPTH(EQ_DEPTH)) u_eq (
    .clk, .rst_n,
    .push_valid(wt_mask_v), .push_ready(eq_push_ready),
    .push_data('{mask: wt_mask, sid: wt_cur_sid}),
    .pop_valid(eq_valid), .pop_ready(eq_pop), .pop_data(eq_head),
    .wr_ptr(eq_wr_ptr),
    .squash_valid(1'b0), .squash_ptr(eq_wr_ptr),
    .squash_consumed(eq_consumed_unused), .count(eq_count)
  );

  // =============== CT register update ===============
  sid_t [BW-1:0] ct_up_sid;
  logic          ct_push_ready, ct_draining;
  ct_update_ctrl #(.BATCH(BATCH), .BW(BW)) u_cuc (
    .clk, .rst_n,
    .eb_valid(eq_valid), .eb(eq_head), .eb_pop(eq_pop),
    .flush(ct_upd_flush),
    .up_valid(ct_up_valid), .up_sid(ct_up_sid), .up_areg(ct_up_areg),
    .up_ready(ct_push_ready), .draining(ct_draining)
  );

  // =============== register communication ===============
  localparam int unsigned WNP = WIDTH * NSRC;
  logic [WNP-1:0]  wt_push_v;
  sid_t [WNP-1:0]  wt_push_sid;
  areg_t [WNP-1:0] wt_push_areg;
  preg_t [WNP-1:0] wt_push_preg;
  always_comb begin
    for (int i = 0; i < WIDTH; i++)
      for (int s = 0; s < NSRC; s++) begin
        wt_push_v[i*NSRC+s]    = wt_need_remote[i][s];
        wt_push_sid[i*NSRC+s]  = wt_cur_sid;
        wt_push_areg[i*NSRC+s] = wt_src_areg[i][s];
        wt_push_preg[i*NSRC+s] = wt_src_newpreg[i][s];
      end
  end

  logic [BW-1:0] c2w_req_v, w2c_req_v, c2w_rsp_v, w2c_rsp_v;
  reg_req_t [BW-1:0] c2w_req, w2c_req;
  reg_rsp_t [BW-1:0] c2w_rsp, w2c_rsp;
  logic ct_in_ready, wt_in_ready, wt_push_ready;
  logic [$clog2(RCU_DEPTH):0] ct_preq, ct_prd, wt_preq, wt_prd;

  // CT: checkpoints at pbr, requests for registers written by the WT
  rcu #(.SILO_DEPTH(SILO_DEPTH), .REQ_DEPTH(RCU_DEPTH), .RD_DEPTH(RCU_DEPTH), .NPUSH(BW), .BW(BW)) u_ct_rcu (
    .clk, .rst_n,
    .ckpt_valid(ct_spawn_valid), .ckpt_sid(sid_q), .ckpt_map(ct_map),
    .rel_valid(ct_rel_valid), .rel_sid(ct_rel_sid),
    .push_valid(ct_up_valid), .push_sid(ct_up_sid), .push_areg(ct_up_areg), .push_preg(ct_up_preg),
    .push_ready(ct_push_ready),
    .rf_wr_valid(ct_rf_wr_valid), .rf_wr_preg(ct_rf_wr_preg), .rf_wr_data(ct_rf_wr_data),
    .preg_ready(ct_preg_ready),
    .rf_rd_valid(ct_rf_rd_valid), .rf_rd_preg(ct_rf_rd_preg), .rf_rd_data(ct_rf_rd_data),
    .link_req_valid(c2w_req_v), .link_req(c2w_req), .link_req_ready(wt_in_ready),
    .link_req_in_valid(w2c_req_v), .link_req_in(w2c_req), .link_req_in_ready(ct_in_ready),
    .link_rsp_valid(c2w_rsp_v), .link_rsp(c2w_rsp),
    .link_rsp_in_valid(w2c_rsp_v), .link_rsp_in(w2c_rsp),
    .pending_requests(ct_preq), .pending_reads(ct_prd)
  );

  // WT: checkpoints at pjn, requests for stale source registers
  rcu #(.SILO_DEPTH(SILO_DEPTH), .REQ_DEPTH(RCU_DEPTH), .RD_DEPTH(RCU_DEPTH), .NPUSH(WNP), .BW(BW)) u_wt_rcu (
    .clk, .rst_n,
    .ckpt_valid(wt_mask_v), .ckpt_sid(wt_cur_sid), .ckpt_map(wt_map),
    .rel_valid(wt_rel_valid), .rel_sid(wt_rel_sid),
    .push_valid(wt_push_v), .push_sid(wt_push_sid), .push_areg(wt_push_areg), .push_preg(wt_push_preg),
    .push_ready(wt_push_ready),
    .rf_wr_valid(wt_rf_wr_valid), .rf_wr_preg(wt_rf_wr_preg), .rf_wr_data(wt_rf_wr_data),
    .preg_ready(wt_preg_ready),
    .rf_rd_valid(wt_rf_rd_valid), .rf_rd_preg(wt_rf_rd_preg), .rf_rd_data(wt_rf_rd_data),
    .link_req_valid(w2c_req_v), .link_req(w2c_req), .link_req_ready(ct_in_ready),
    .link_req_in_valid(c2w_req_v), .link_req_in(c2w_req), .link_req_in_ready(wt_in_ready),
    .link_rsp_valid(w2c_rsp_v), .link_rsp(w2c_rsp),
    .link_rsp_in_valid(c2w_rsp_v), .link_rsp_in(c2w_rsp),
    .pending_requests(wt_preq), .pending_reads(wt_prd)
  );

  // =============== retirement ===============
  sid_t pbr_retired_unused, pjn_decoded_unused;
  retire_sync u_rs (
    .clk, .rst_n,
    .ct_pbr_retire, .wt_pjn_decode(wt_bnd), .wt_pjn_retire,
    .wt_head_sid, .wt_retire_ok,
    .ct_head_after_pbr, .ct_head_sid, .ct_retire_ok,
    .pbr_retired(pbr_retired_unused), .pjn_decoded(pjn_decoded_unused), .pjn_retired
  );

  // =============== memory communication ===============
  seq_t mem_oldest_seq_unused;
  logic mem_oldest_valid_unused;
  logic [1:0][$clog2(ASB_DEPTH+1)-1:0] asb_used_unused;
  logic [1:0][$clog2(MSB_DEPTH+1)-1:0] msb_used_unused;
  mcu #(.ASB_DEPTH(ASB_DEPTH), .ASB_RESV(ASB_RESV), .MSB_DEPTH(MSB_DEPTH),
        .MSB_RESV(MSB_RESV), .BYP_LAT(BYP_LAT)) u_mcu (
    .clk, .rst_n,
    .ins_valid(mem_ins_valid), .ins_store(mem_ins_store), .ins_seq(mem_ins_seq),
    .ins_ready(mem_ins_ready), .ins_asb_idx(mem_ins_asb_idx), .ins_msb_idx(mem_ins_msb_idx),
    .ld_req_valid(mem_ld_valid), .ld_asb_idx(mem_ld_asb_idx), .ld_addr(mem_ld_addr),
    .ld_seq(mem_ld_seq), .ld_req_ready(mem_ld_ready),
    .ld_rsp_valid(mem_ld_rsp_valid), .ld_rsp_core(mem_ld_rsp_core), .ld_rsp_idx(mem_ld_rsp_idx),
    .ld_rsp_fwd(mem_ld_rsp_fwd), .ld_rsp_data(mem_ld_rsp_data),
    .st_req_valid(mem_st_valid), .st_asb_idx(mem_st_asb_idx), .st_msb_idx(mem_st_msb_idx),
    .st_addr(mem_st_addr), .st_data(mem_st_data), .st_seq(mem_st_seq), .st_req_ready(mem_st_ready),
    .vio_valid(mem_vio_valid), .vio_core(mem_vio_core), .vio_seq(mem_vio_seq), .vio_idx(mem_vio_idx),
    .cm_valid(mem_cm_valid), .cm_asb_idx(mem_cm_asb_idx), .cm_store(mem_cm_store),
    .cm_msb_idx(mem_cm_msb_idx), .cm_ready(mem_cm_ready),
    .mem_wr_valid, .mem_wr_addr, .mem_wr_data,
    .oldest_valid(mem_oldest_valid_unused), .oldest_core(mem_oldest_core),
    .oldest_seq(mem_oldest_seq_unused), .asb_used(asb_used_unused), .msb_used(msb_used_unused)
  );

  // WT decode must not deliver a group that would overflow its request buffer
  // or the endblock queue; the core holds decode on these.
  assert property (@(posedge clk) disable iff (!rst_n) (|wt_push_v) |-> wt_push_ready);
  assert property (@(posedge clk) disable iff (!rst_n) wt_mask_v |-> eq_push_ready);
endmodule
