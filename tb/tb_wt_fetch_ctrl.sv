// tb_wt_fetch_ctrl: feeds spawns and pjns to the WT fetch steering logic.
// Checks: decode is held after reset and after each pjn until a spawn is
// present; a spawn whose target matches the pjn prediction resumes decode
// without a redirect, a mismatch redirects fetch to the spawn target; after
// a squash the next spawn always redirects; the block start carries the
// spawn's mask and sid; decode resumes one cycle after the dequeue.
module tb_wt_fetch_ctrl;
  import cdp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sq_valid, sq_pop, dec_pjn_valid, wt_squash, dec_stall, redirect_valid, blk_start_valid, pred_hit;
  spawn_req_t sq_head;
  pc_t dec_pjn_pred, redirect_pc;
  regmask_t blk_mask;
  sid_t blk_sid;
  wt_fetch_ctrl dut (.*);

  int checks = 0, failures = 0, hits = 0, misses = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // present spawn k after a delay, wait for the pop, check the outcome
  task automatic deliver(int k, pc_t tgt, bit expect_hit, int delay);
    sq_valid = 0;
    repeat (delay) begin
      @(negedge clk);
      check(dec_stall && !sq_pop, "held while queue empty");
    end
    sq_valid = 1;
    sq_head.target = tgt; sq_head.mask = regmask_t'({4{27'(k*7919)}}); sq_head.sid = sid_t'(k);
    #1;
    check(sq_pop && blk_start_valid, "spawn taken");
    check(blk_sid == sid_t'(k) && blk_mask == sq_head.mask, "block info");
    check(redirect_valid == !expect_hit && pred_hit == expect_hit, "redirect decision");
    if (!expect_hit) check(redirect_pc == tgt, "redirect target");
    if (expect_hit) hits++; else misses++;
    @(negedge clk);
    sq_valid = 0;
    check(!dec_stall, "decode resumes next cycle");
  endtask

  initial begin
    sq_valid = 0; sq_head = '0; dec_pjn_valid = 0; dec_pjn_pred = '0; wt_squash = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    deliver(0, 32'h100, 0, 3);   // first spawn: no prediction
    for (int k = 1; k < 200; k++) begin
      pc_t tgt, pred;
      bit  hit;
      repeat ($urandom % 4) begin @(negedge clk); check(!dec_stall, "running"); end
      tgt  = pc_t'($urandom);
      hit  = ($urandom % 3) != 0;
      pred = hit ? tgt : tgt + 4;
      if (k % 50 == 0) begin
        wt_squash = 1; @(negedge clk); wt_squash = 0;
        deliver(k, tgt, 0, $urandom % 3);
      end else begin
        dec_pjn_valid = 1; dec_pjn_pred = pred;
        @(negedge clk);
        dec_pjn_valid = 0;
        check(dec_stall, "stall after pjn");
        deliver(k, tgt, hit, $urandom % 3);
      end
    end
    check(hits > 0 && misses > 0, "both outcomes seen");
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
