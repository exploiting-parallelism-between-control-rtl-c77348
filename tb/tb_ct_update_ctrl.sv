// tb_ct_update_ctrl: endblock notices with random masks. After each batch of
// BATCH notices (or a flush) the requests issued must be exactly the union
// of the batch's masks, each register once, each tagged with the sid of the
// latest block of the batch that wrote it, at most BW per cycle, and the
// unit must take no notice while draining. A back-pressured drain is tried.
module tb_ct_update_ctrl;
  import cdp_pkg::*;
  localparam int BATCH = 4, BW = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic eb_valid, eb_pop, flush, up_ready, draining;
  endblock_t eb;
  logic [BW-1:0] up_valid;
  sid_t [BW-1:0] up_sid;
  areg_t [BW-1:0] up_areg;
  ct_update_ctrl #(.BATCH(BATCH), .BW(BW)) dut (.*);

  int checks = 0, failures = 0, batches = 0, flushes = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned sid_n = 0;
  initial begin
    eb_valid = 0; eb = '0; flush = 0; up_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int b = 0; b < 60; b++) begin
      regmask_t exp_mask, got;
      sid_t exp_sid [NUM_AREGS];
      int nblk, cyc;
      bit use_flush;
      use_flush = (b % 5 == 4);
      nblk = use_flush ? 1 + ($urandom % (BATCH-1)) : BATCH;
      exp_mask = '0;
      for (int k = 0; k < nblk; k++) begin
        eb_valid = 1;
        for (int r = 0; r < NUM_AREGS; r++) eb.mask[r] = ($urandom % 6) == 0;
        eb.sid = sid_t'(sid_n); sid_n++;
        for (int r = 0; r < NUM_AREGS; r++) if (eb.mask[r]) exp_sid[r] = eb.sid;
        exp_mask |= eb.mask;
        #1 check(eb_pop, "notice taken while gathering");
        check(up_valid == '0, "no request while gathering");
        @(negedge clk);
        eb_valid = ($urandom % 2) == 1;   // idle cycles between notices
        if (eb_valid && k < nblk - 1) begin eb_valid = 0; @(negedge clk); end
        eb_valid = 0;
      end
      if (use_flush) begin flush = 1; @(negedge clk); flush = 0; flushes++; end
      check(draining, "draining after batch");
      got = '0; cyc = 0;
      eb_valid = 1; eb.mask = '1; eb.sid = sid_t'(16'hBEEF);   // must not be taken
      while (draining && cyc < 200) begin
        up_ready = (b % 3 != 1) || ($urandom % 2 == 1);
        #1;
        check(!eb_pop, "no notice taken while draining");
        if (up_ready)
          for (int k = 0; k < BW; k++)
            if (up_valid[k]) begin
              check(!got[up_areg[k]], "register requested once");
              check(exp_mask[up_areg[k]], "only written registers");
              check(up_sid[k] == exp_sid[up_areg[k]], "latest block's sid");
              got[up_areg[k]] = 1'b1;
            end
        @(negedge clk);
        cyc++;
      end
      eb_valid = 0; up_ready = 1;
      check(got == exp_mask, "all written registers requested");
      check(cyc >= ($countones(exp_mask) + BW - 1) / BW, "bandwidth limit respected");
      batches++;
    end
    $display("batches=%0d flushes=%0d", batches, flushes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
