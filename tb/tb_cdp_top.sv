// tb_cdp_top: end-to-end test of the control/data parallel hardware at its
// full default sizes. The two cores are modelled here as simple programs:
//
//  Phase A  (12 blocks) - the CT writes register k%8, then executes a pbr.
//           The WT block k reads that register (it must be fetched from the
//           CT and must carry the CT's value at pbr k), writes register
//           20+k%4, and ends with pjn. Every third pjn is mispredicted, the
//           others predicted right. The endblock masks flow back to the CT,
//           which fetches the WT values in batches of four blocks. A
//           retirement process checks both retirement rules every cycle.
//  Phase B  the WT holds one block open while the CT spawns until the spawn
//           queue is full and the CT stalls; then the WT drains all blocks.
//  Phase C  CT squash: wrong-path spawns still queued are removed; then a
//           wrong-path spawn the WT already took is squashed, which must ask
//           the WT to squash, and the correct spawn redirects the WT.
//  Phase D  memory: CT store -> WT load forwarding, a WT load that ran too
//           early is reported, and operations commit in program order.
// Each mechanism is counted; one that never happens is a failure.
module tb_cdp_top;
  import cdp_pkg::*;
  localparam int WIDTH = 4, NSRC = 2, BW = 2, NP = 256;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- DUT signals ----------------
  logic [WIDTH-1:0] ct_slot_valid, ct_dst_valid, wt_slot_valid, wt_dst_valid;
  pc_t [WIDTH-1:0] ct_slot_pc, wt_slot_pc;
  logic [WIDTH-1:0][23:0] ct_slot_bytes, wt_slot_bytes;
  areg_t [WIDTH-1:0] ct_dst_areg, wt_dst_areg;
  preg_t [NUM_AREGS-1:0] ct_map, wt_map;
  logic ct_stall, ct_spawn_valid, ct_squash_valid, ct_rel_valid, ct_upd_flush;
  sid_t ct_spawn_sid, ct_next_sid, ct_squash_sid, ct_rel_sid;
  logic [8:0] ct_spawn_ptr, ct_squash_ptr;
  logic [BW-1:0] ct_up_valid, ct_rf_rd_valid, ct_rf_wr_valid, wt_rf_rd_valid, wt_rf_wr_valid;
  areg_t [BW-1:0] ct_up_areg;
  preg_t [BW-1:0] ct_up_preg, ct_rf_rd_preg, ct_rf_wr_preg, wt_rf_rd_preg, wt_rf_wr_preg;
  logic [NP-1:0] ct_preg_ready, wt_preg_ready;
  data_t [BW-1:0] ct_rf_rd_data, ct_rf_wr_data, wt_rf_rd_data, wt_rf_wr_data;
  pc_t wt_pjn_pred, wt_redirect_pc;
  logic [WIDTH-1:0][NSRC-1:0] wt_src_valid, wt_need_remote;
  logic [WIDTH-1:0][NSRC-1:0][AREG_W-1:0] wt_src_areg;
  logic [WIDTH-1:0][NSRC-1:0][PREG_W-1:0] wt_src_newpreg;
  logic wt_squash, wt_squash_req, wt_dec_stall, wt_redirect_valid, wt_blk_start, wt_pred_hit, wt_pjn_valid;
  sid_t wt_blk_sid, wt_rel_sid;
  logic wt_rel_valid;
  logic ct_pbr_retire, wt_pjn_retire, wt_retire_ok, ct_head_after_pbr, ct_retire_ok;
  sid_t wt_head_sid, ct_head_sid, pjn_retired;
  logic [1:0] mem_ins_valid, mem_ins_store, mem_ins_ready, mem_ld_valid, mem_ld_ready, mem_st_valid, mem_st_ready;
  logic [1:0] mem_cm_valid, mem_cm_store, mem_cm_ready;
  seq_t [1:0] mem_ins_seq, mem_ld_seq, mem_st_seq;
  logic [1:0][8:0] mem_ins_asb_idx, mem_ld_asb_idx, mem_st_asb_idx, mem_cm_asb_idx;
  logic [1:0][7:0] mem_ins_msb_idx, mem_st_msb_idx, mem_cm_msb_idx;
  addr_t [1:0] mem_ld_addr, mem_st_addr;
  data_t [1:0] mem_st_data;
  logic mem_ld_rsp_valid, mem_ld_rsp_core, mem_ld_rsp_fwd, mem_vio_valid, mem_vio_core, mem_wr_valid, mem_oldest_core;
  logic [8:0] mem_ld_rsp_idx, mem_vio_idx;
  data_t mem_ld_rsp_data, mem_wr_data;
  seq_t mem_vio_seq;
  addr_t mem_wr_addr;

  cdp_top dut (.*);

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  int n_spawn = 0, n_blk = 0, n_hit = 0, n_redirect = 0, n_wt_stall = 0, n_ct_stall = 0;
  int n_remote = 0, n_remote_ok = 0, n_ctupd = 0, n_ctupd_ok = 0, n_squash = 0, n_consumed = 0;
  int n_wt_ret_block = 0, n_ct_ret_block = 0, n_fwd = 0, n_vio = 0, n_commit_block = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  data_t ct_rf [NP];
  data_t wt_rf [NP];
  int ct_alloc = NUM_AREGS, wt_alloc = NUM_AREGS;
  data_t exp_wt_wr [int];    // WT preg -> value expected from the CT
  data_t exp_ct_wr [int];    // CT preg -> value expected from the WT
  int    exp_blk_sid [$];    // sids the WT should start, in order
  bit    exp_blk_hit [$];    // predicted right?
  pc_t   exp_blk_tgt [$];
  int    pbr_retired_n = 0, pjn_decoded_n = 0, pjn_retired_n = 0, pbr_issued_ok = 0;
  bit    phase_a = 1;

  always_comb
    for (int b = 0; b < BW; b++) begin
      ct_rf_rd_data[b] = ct_rf[ct_rf_rd_preg[b]];
      wt_rf_rd_data[b] = wt_rf[wt_rf_rd_preg[b]];
    end

  function automatic pc_t tgt_of(int k);
    return pc_t'(32'h0001_0000 + k * 256 + 3 + 32'h200);
  endfunction

  // ---------------- monitors ----------------
  int up_count = 0;
  always @(negedge clk) if (rst_n) begin
    if (ct_spawn_valid && !ct_stall) n_spawn++;
    if (ct_stall) n_ct_stall++;
    if (wt_dec_stall) n_wt_stall++;
    if (wt_squash_req) n_consumed++;
    if (wt_blk_start) begin
      n_blk++;
      check(exp_blk_sid.size() > 0, "expected block start");
      if (exp_blk_sid.size() > 0) begin
        check(int'(wt_blk_sid) == exp_blk_sid[0], "blocks start in spawn order");
        check(wt_pred_hit == exp_blk_hit[0], "pjn prediction outcome");
        if (!wt_pred_hit) check(wt_redirect_valid && wt_redirect_pc == exp_blk_tgt[0], "redirect to the spawn point");
        void'(exp_blk_sid.pop_front()); void'(exp_blk_hit.pop_front()); void'(exp_blk_tgt.pop_front());
      end
      if (wt_pred_hit) n_hit++; else n_redirect++;
    end
    for (int b = 0; b < BW; b++) begin
      if (wt_rf_wr_valid[b]) begin
        check(exp_wt_wr.exists(int'(wt_rf_wr_preg[b])), "WT write to a requested register");
        if (exp_wt_wr.exists(int'(wt_rf_wr_preg[b]))) begin
          check(wt_rf_wr_data[b] == exp_wt_wr[int'(wt_rf_wr_preg[b])], "WT gets the CT value at the pbr");
          if (wt_rf_wr_data[b] == exp_wt_wr[int'(wt_rf_wr_preg[b])]) n_remote_ok++;
          exp_wt_wr.delete(int'(wt_rf_wr_preg[b]));
        end
        wt_rf[wt_rf_wr_preg[b]] = wt_rf_wr_data[b];
      end
      if (ct_rf_wr_valid[b]) begin
        check(exp_ct_wr.exists(int'(ct_rf_wr_preg[b])), "CT write to a requested register");
        if (exp_ct_wr.exists(int'(ct_rf_wr_preg[b]))) begin
          check(ct_rf_wr_data[b] == exp_ct_wr[int'(ct_rf_wr_preg[b])], "CT gets the WT block's value");
          if (ct_rf_wr_data[b] == exp_ct_wr[int'(ct_rf_wr_preg[b])]) n_ctupd_ok++;
          exp_ct_wr.delete(int'(ct_rf_wr_preg[b]));
        end
        ct_rf[ct_rf_wr_preg[b]] = ct_rf_wr_data[b];
      end
    end
    if (mem_vio_valid) n_vio++;
  end

  // CT update requests: allocate a CT register; value expected from the
  // latest block of the batch that wrote it (batch b = blocks 4b..4b+3,
  // block k writes register 20 + k%4)
  always_comb
    for (int b = 0; b < BW; b++) ct_up_preg[b] = preg_t'(ct_alloc + b);
  always @(posedge clk) if (rst_n) begin
    int na;
    na = 0;
    if (dut.u_ct_rcu.push_ready)
      for (int b = 0; b < BW; b++)
        if (ct_up_valid[b]) begin
          int batch, k;
          batch = up_count / 4;
          k = 4 * batch + (int'(ct_up_areg[b]) - 20);
          exp_ct_wr[ct_alloc + b] = data_t'(32'hD000_0000 + k);
          check(int'(ct_up_areg[b]) >= 20 && int'(ct_up_areg[b]) < 24, "CT updates only registers the WT wrote");
          up_count++; n_ctupd++; na++;
        end
    ct_alloc <= ct_alloc + na;
  end

  // ---------------- retirement (phase A) ----------------
  initial begin
    ct_pbr_retire = 0; wt_pjn_retire = 0; ct_head_after_pbr = 0; ct_head_sid = '0; wt_head_sid = '0;
    wait (rst_n);
    while (1) begin
      @(negedge clk);
      ct_pbr_retire = 0; wt_pjn_retire = 0;
      if (!phase_a) begin
        // later phases: retire everything as it goes, in order
        ct_head_after_pbr = 0;
        continue;
      end
      // queries: oldest CT instruction after pbr number pbr_retired_n - 1 ...
      ct_head_after_pbr = (pbr_retired_n > 0);
      ct_head_sid = sid_t'(pbr_retired_n - 1);
      wt_head_sid = sid_t'(pjn_retired_n);
      #1;
      if (pbr_retired_n > 0) begin
        check(ct_retire_ok == (pjn_decoded_n > pbr_retired_n - 1), "CT retire rule");
        if (!ct_retire_ok) n_ct_ret_block++;
      end
      check(wt_retire_ok == (pbr_retired_n > pjn_retired_n), "WT retire rule");
      if (!wt_retire_ok && pjn_decoded_n > pjn_retired_n) n_wt_ret_block++;
      // retire a pbr now and then (lagging), retire a pjn when allowed
      if (pbr_retired_n < pbr_issued_ok && $urandom % 4 == 0) begin ct_pbr_retire = 1; pbr_retired_n++; end
      if (wt_retire_ok && pjn_decoded_n > pjn_retired_n && $urandom % 2 == 0) begin wt_pjn_retire = 1; pjn_retired_n++; end
    end
  end
  always @(posedge clk) if (rst_n && wt_pjn_valid) pjn_decoded_n++;

  // ---------------- core drivers ----------------
  task automatic ct_idle();
    ct_slot_valid = '0; ct_dst_valid = '0; ct_slot_bytes = '0;
  endtask
  task automatic wt_idle();
    wt_slot_valid = '0; wt_dst_valid = '0; wt_src_valid = '0; wt_slot_bytes = '0;
  endtask

  // one pbr in slot 0 at pc; returns when accepted
  task automatic ct_pbr(int k, bit expect_block = 1);
    ct_idle();
    ct_slot_valid[0] = 1; ct_slot_pc[0] = pc_t'(32'h0001_0000 + k * 256);
    ct_slot_bytes[0] = {16'h0200, 8'hD6};
    #1;
    while (ct_stall) begin @(negedge clk); #1; end
    check(ct_spawn_valid && int'(ct_spawn_sid) == k, $sformatf("spawn gets the next sid (%0d %0d %0d)", ct_spawn_valid, ct_spawn_sid, k));
    if (expect_block) pbr_issued_ok++;
    @(negedge clk);
    ct_idle();
  endtask

  // WT block: wait for decode, present one group, optional read/write, pjn
  task automatic wt_block(int k, bit rd, bit wr, bit pred_ok, int next_k);
    while (wt_dec_stall) @(negedge clk);
    wt_idle();
    wt_slot_valid[0] = 1; wt_slot_pc[0] = tgt_of(k);
    if (rd) begin
      wt_src_valid[0][0] = 1; wt_src_areg[0][0] = AREG_W'(k % 8);
      wt_src_newpreg[0][0] = PREG_W'(wt_alloc);
    end
    if (wr) begin
      wt_dst_valid[0] = 1; wt_dst_areg[0] = areg_t'(20 + k % 4);
      wt_rf[wt_alloc + 1] = data_t'(32'hD000_0000 + k);
      wt_map[20 + k % 4] = preg_t'(wt_alloc + 1);
    end
    wt_slot_valid[1] = 1; wt_slot_pc[1] = tgt_of(k) + 1; wt_slot_bytes[1] = {16'h0, 8'hF1};
    wt_pjn_pred = pred_ok ? tgt_of(next_k) : tgt_of(next_k) + 32'h40;
    #1;
    if (rd) begin
      check(wt_need_remote[0][0], "stale source fetched from the CT");
      if (wt_need_remote[0][0]) begin
        exp_wt_wr[wt_alloc] = data_t'(32'hC000_0000 + k);
        n_remote++;
      end
    end
    check(wt_pjn_valid, "pjn seen at WT decode");
    wt_alloc += 2;
    @(negedge clk);
    wt_idle();
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NA = 12;
  initial begin
    int k;
    ct_idle(); wt_idle();
    ct_slot_pc = '0; wt_slot_pc = '0; ct_dst_areg = '0; wt_dst_areg = '0;
    wt_src_areg = '0; wt_src_newpreg = '0; wt_pjn_pred = '0;
    ct_squash_valid = 0; ct_squash_ptr = '0; ct_squash_sid = '0;
    ct_rel_valid = 0; ct_rel_sid = '0; wt_rel_valid = 0; wt_rel_sid = '0; ct_upd_flush = 0; wt_squash = 0;
    ct_preg_ready = '1; wt_preg_ready = '1;
    for (int r = 0; r < NUM_AREGS; r++) begin
      ct_map[r] = preg_t'(r); wt_map[r] = preg_t'(r);
      ct_rf[r] = data_t'(32'hAAAA_0000 + r); wt_rf[r] = data_t'(32'hAAAA_0000 + r);
    end
    mem_ins_valid = '0; mem_ins_store = '0; mem_ins_seq = '0; mem_ld_valid = '0; mem_ld_asb_idx = '0;
    mem_ld_addr = '0; mem_ld_seq = '0; mem_st_valid = '0; mem_st_asb_idx = '0; mem_st_msb_idx = '0;
    mem_st_addr = '0; mem_st_data = '0; mem_st_seq = '0; mem_cm_valid = '0; mem_cm_asb_idx = '0;
    mem_cm_store = '0; mem_cm_msb_idx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(wt_dec_stall, "WT waits for its first spawn");

    // ================= phase A =================
    for (int i = 0; i < NA; i++) begin
      exp_blk_sid.push_back(i);
      exp_blk_hit.push_back(i > 0 && ((i - 1) % 3 != 0));
      exp_blk_tgt.push_back(tgt_of(i));
    end
    fork
      begin : ct_prog
        for (int i = 0; i < NA; i++) begin
          // write register i%8 with a new physical register
          ct_idle();
          ct_slot_valid[0] = 1; ct_dst_valid[0] = 1; ct_dst_areg[0] = areg_t'(i % 8);
          ct_slot_pc[0] = pc_t'(32'h0001_0000 + i * 256 - 4);
          ct_rf[ct_alloc] = data_t'(32'hC000_0000 + i);
          ct_map[i % 8] = preg_t'(ct_alloc);
          ct_alloc++;
          @(negedge clk);
          ct_pbr(i);
          repeat ($urandom % 4) @(negedge clk);
        end
      end
      begin : wt_prog
        for (int i = 0; i < NA; i++) begin
          wt_block(i, 1, 1, (i % 3 != 0), i + 1);
          repeat ($urandom % 3) @(negedge clk);
        end
      end
    join
    repeat (40) @(negedge clk);
    // all WT values requested so far reached the CT, all CT values the WT
    check(exp_wt_wr.size() == 0, "every WT remote fetch answered");
    check(exp_ct_wr.size() == 0, "every CT update answered");
    check(n_ctupd == 4 * (NA / 4), "one CT update per register per batch");
    // let the retirement process finish phase A
    while (pbr_retired_n < pbr_issued_ok || pjn_retired_n < pjn_decoded_n) @(negedge clk);
    phase_a = 0;
    @(negedge clk);
    // release all phase A checkpoints
    for (int i = 0; i < NA; i++) begin
      ct_rel_valid = 1; ct_rel_sid = sid_t'(i); wt_rel_valid = 1; wt_rel_sid = sid_t'(i);
      @(negedge clk);
    end
    ct_rel_valid = 0; wt_rel_valid = 0;

    // ================= phase B: spawn queue full =================
    k = NA;
    exp_blk_sid.push_back(k); exp_blk_hit.push_back((NA - 1) % 3 != 0); exp_blk_tgt.push_back(tgt_of(k));
    ct_pbr(k, 0);                      // the WT takes this one and keeps it open
    repeat (3) @(negedge clk);
    begin
      int first, last;
      int stalls_before;
      first = k + 1;
      stalls_before = n_ct_stall;
      last = first;
      fork
        begin
          for (int i = first; i < first + 256 + 2; i++) begin
            exp_blk_sid.push_back(i); exp_blk_hit.push_back(1); exp_blk_tgt.push_back(tgt_of(i));
            ct_pbr(i, 0);
            last = i;
          end
        end
        begin
          // hold the WT until the CT has stalled on a full queue for a while
          wait (n_ct_stall > stalls_before + 20);
          check(dut.u_sq.count == 256, "spawn queue holds 256 spawns when full");
          for (int i = k; i < first + 256 + 2; i++) begin
            wt_block(i, 0, 0, 1, i + 1);
            ct_rel_valid = 1; ct_rel_sid = sid_t'(i); wt_rel_valid = 1; wt_rel_sid = sid_t'(i - 1);
          end
          ct_rel_valid = 0; wt_rel_valid = 0;
        end
      join
      k = first + 256 + 2;
    end
    check(n_ct_stall > 0, "CT stalled on a full spawn queue");

    // ================= phase C: squash =================
    // WT is waiting with prediction tgt_of(k). Spawn k is correct.
    exp_blk_sid.push_back(k); exp_blk_hit.push_back(1); exp_blk_tgt.push_back(tgt_of(k));
    ct_pbr(k, 0);
    repeat (2) @(negedge clk);
    begin
      logic [8:0] sp;
      sid_t ss;
      sp = ct_spawn_ptr; ss = ct_next_sid;
      // two wrong-path spawns stay in the queue (the WT is busy with block k)
      ct_idle();
      ct_slot_valid[0] = 1; ct_slot_pc[0] = 32'h00F0_0000; ct_slot_bytes[0] = {16'h0100, 8'hD6};
      repeat (2) @(negedge clk);
      ct_idle();
      check(dut.u_sq.count == 2, "wrong-path spawns queued");
      ct_squash_valid = 1; ct_squash_ptr = sp; ct_squash_sid = ss;
      #1 check(!wt_squash_req, "queued wrong-path spawns squashed silently");
      @(negedge clk);
      ct_squash_valid = 0; n_squash++;
      check(dut.u_sq.count == 0 && ct_next_sid == ss, "queue and sid rolled back");
    end
    k++;
    exp_blk_sid.push_back(k); exp_blk_hit.push_back(1); exp_blk_tgt.push_back(tgt_of(k));
    ct_pbr(k, 0);
    wt_block(k - 1, 0, 0, 1, k);       // block k-1 ends, spawn k predicted right
    // now the WT waits; a wrong-path spawn is taken at once, then squashed
    repeat (2) @(negedge clk);
    begin
      logic [8:0] sp;
      sid_t ss;
      int consumed_before;
      sp = ct_spawn_ptr; ss = ct_next_sid;
      consumed_before = n_consumed;
      // the wrong spawn: the WT takes it (prediction from block k's pjn does not match)
      wt_block(k, 0, 0, 1, k + 1);
      exp_blk_sid.push_back(k + 1); exp_blk_hit.push_back(0); exp_blk_tgt.push_back(32'h00F0_0103);
      ct_idle();
      ct_slot_valid[0] = 1; ct_slot_pc[0] = 32'h00F0_0000; ct_slot_bytes[0] = {16'h0100, 8'hD6};
      @(negedge clk);
      ct_idle();
      @(negedge clk);
      ct_squash_valid = 1; ct_squash_ptr = sp; ct_squash_sid = ss;
      #1 check(wt_squash_req, "WT told to squash a spawn it already took");
      @(negedge clk);
      ct_squash_valid = 0; n_squash++;
      check(n_consumed > consumed_before && wt_dec_stall, "WT back to waiting for a spawn");
      // correct spawn k+1: no prediction left, so fetch is redirected
      exp_blk_sid.push_back(k + 1); exp_blk_hit.push_back(0); exp_blk_tgt.push_back(tgt_of(k + 1));
      ct_pbr(k + 1, 0);
      repeat (2) @(negedge clk);
      check(exp_blk_sid.size() == 0, "all expected blocks started");
    end

    // ================= phase D: memory communication =================
    begin
      logic [8:0] a_st, a_ld, a_st2, a_ld2;
      logic [7:0] m_st, m_st2;
      int lat;
      // CT store (seq 1) and WT load (seq 2) to 0x100; CT store (3), WT load (4) to 0x200
      mem_ins_valid = 2'b11; mem_ins_store = 2'b01; mem_ins_seq[0] = 1; mem_ins_seq[1] = 2;
      #1 a_st = mem_ins_asb_idx[0]; m_st = mem_ins_msb_idx[0]; a_ld = mem_ins_asb_idx[1];
      check(mem_ins_ready == 2'b11, "both cores insert");
      @(negedge clk);
      mem_ins_seq[0] = 3; mem_ins_seq[1] = 4;
      #1 a_st2 = mem_ins_asb_idx[0]; m_st2 = mem_ins_msb_idx[0]; a_ld2 = mem_ins_asb_idx[1];
      @(negedge clk);
      mem_ins_valid = '0;
      mem_st_valid = 2'b01; mem_st_asb_idx[0] = a_st; mem_st_msb_idx[0] = m_st;
      mem_st_addr[0] = 32'h100; mem_st_data[0] = 32'h5EED; mem_st_seq[0] = 1;
      // the WT load of seq 4 runs before the store of seq 3
      mem_ld_valid = 2'b10; mem_ld_asb_idx[1] = a_ld2; mem_ld_addr[1] = 32'h200; mem_ld_seq[1] = 4;
      @(negedge clk);
      mem_st_valid = '0; mem_ld_valid = '0;
      repeat (6) @(negedge clk);
      mem_ld_valid = 2'b10; mem_ld_asb_idx[1] = a_ld; mem_ld_addr[1] = 32'h100; mem_ld_seq[1] = 2;
      @(negedge clk);
      mem_ld_valid = '0;
      lat = 1;
      while (!mem_ld_rsp_valid && lat < 20) begin @(negedge clk); lat++; end
      check(lat == 5 && mem_ld_rsp_fwd && mem_ld_rsp_data == 32'h5EED, "CT store forwarded to WT load in 5 cycles");
      if (mem_ld_rsp_fwd) n_fwd++;
      mem_st_valid = 2'b01; mem_st_asb_idx[0] = a_st2; mem_st_msb_idx[0] = m_st2;
      mem_st_addr[0] = 32'h200; mem_st_data[0] = 32'h7777; mem_st_seq[0] = 3;
      @(negedge clk);
      mem_st_valid = '0;
      #1 check(mem_vio_valid && mem_vio_core && mem_vio_seq == 4, "early WT load reported");
      // commit in order 1 (CT), 2 (WT), 3 (CT), 4 (WT); the other core is refused
      for (int s = 1; s <= 4; s++) begin
        int c;
        c = (s % 2 == 1) ? 0 : 1;
        mem_cm_valid = 2'b11;
        mem_cm_asb_idx[0] = (s == 1) ? a_st : a_st2; mem_cm_store[0] = 1; mem_cm_msb_idx[0] = (s == 1) ? m_st : m_st2;
        mem_cm_asb_idx[1] = (s == 2) ? a_ld : a_ld2; mem_cm_store[1] = 0; mem_cm_msb_idx[1] = '0;
        #1 check(mem_cm_ready[c] && !mem_cm_ready[1 - c] && mem_oldest_core == 1'(c), "only the oldest's core commits");
        if (!mem_cm_ready[1 - c]) n_commit_block++;
        @(negedge clk);
        mem_cm_valid = '0;
        if (c == 0) #1 check(mem_wr_valid && mem_wr_data == ((s == 1) ? 32'h5EED : 32'h7777), "store reaches memory at commit");
      end
    end

    // ================= mechanism coverage =================
    $display("spawns=%0d blocks=%0d pred_hits=%0d redirects=%0d wt_stall_cycles=%0d ct_stall_cycles=%0d",
             n_spawn, n_blk, n_hit, n_redirect, n_wt_stall, n_ct_stall);
    $display("remote_fetches=%0d/%0d ct_updates=%0d/%0d squashes=%0d wt_squash_requests=%0d",
             n_remote_ok, n_remote, n_ctupd_ok, n_ctupd, n_squash, n_consumed);
    $display("wt_retire_held=%0d ct_retire_held=%0d forwards=%0d violations=%0d commit_refused=%0d",
             n_wt_ret_block, n_ct_ret_block, n_fwd, n_vio, n_commit_block);
    check(n_spawn > 0, "mechanism: spawn");
    check(n_hit > 0, "mechanism: pjn predicted right");
    check(n_redirect > 0, "mechanism: pjn mispredicted, fetch redirected");
    check(n_wt_stall > 0, "mechanism: WT decode held for a spawn");
    check(n_ct_stall > 0, "mechanism: spawn queue full");
    check(n_remote > 0 && n_remote_ok == n_remote, "mechanism: WT register fetch");
    check(n_ctupd > 0 && n_ctupd_ok == n_ctupd, "mechanism: CT register update");
    check(n_squash == 2, "mechanism: spawn squash");
    check(n_consumed > 0, "mechanism: squash of a taken spawn");
    check(n_wt_ret_block > 0, "mechanism: WT retirement held");
    check(n_ct_ret_block > 0, "mechanism: CT retirement held");
    check(n_fwd > 0, "mechanism: memory bypass");
    check(n_vio > 0, "mechanism: memory dependence violation");
    check(n_commit_block > 0, "mechanism: in-order commit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
