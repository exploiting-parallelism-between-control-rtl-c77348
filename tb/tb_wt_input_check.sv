// tb_wt_input_check: random spawn masks and decode groups. A reference stale
// set kept here (added by block starts, cleared by local writes and by
// remote fetches, in slot order) must give exactly the sources the block
// flags for remote fetch.
module tb_wt_input_check;
  import cdp_pkg::*;
  localparam int WIDTH = 4, NSRC = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic blk_start_valid;
  regmask_t blk_mask, stale_mask;
  logic [WIDTH-1:0] dec_valid, dst_valid;
  logic [WIDTH-1:0][NSRC-1:0] src_valid, need_remote;
  logic [WIDTH-1:0][NSRC-1:0][AREG_W-1:0] src_areg;
  logic [WIDTH-1:0][AREG_W-1:0] dst_areg;
  wt_input_check #(.WIDTH(WIDTH), .NSRC(NSRC)) dut (.*);

  int checks = 0, failures = 0, remote = 0;
  regmask_t stale;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_start_valid = 0; blk_mask = '0; dec_valid = '0; src_valid = '0; src_areg = '0;
    dst_valid = '0; dst_areg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    stale = '0;
    @(negedge clk);
    for (int it = 0; it < 3000; it++) begin
      logic [WIDTH-1:0][NSRC-1:0] exp_need;
      blk_start_valid = ($urandom % 8) == 0;
      for (int r = 0; r < NUM_AREGS; r++) blk_mask[r] = ($urandom % 8) == 0;
      for (int i = 0; i < WIDTH; i++) begin
        dec_valid[i] = ($urandom % 4) != 0;
        dst_valid[i] = ($urandom % 2) == 1;
        dst_areg[i]  = AREG_W'($urandom % 16);          // small register range: more overlap
        for (int s = 0; s < NSRC; s++) begin
          src_valid[i][s] = ($urandom % 2) == 1;
          src_areg[i][s]  = AREG_W'($urandom % 16);
        end
      end
      if (blk_start_valid) stale |= blk_mask;
      exp_need = '0;
      for (int i = 0; i < WIDTH; i++)
        if (dec_valid[i]) begin
          for (int s = 0; s < NSRC; s++)
            if (src_valid[i][s] && stale[src_areg[i][s]]) begin
              exp_need[i][s] = 1'b1;
              stale[src_areg[i][s]] = 1'b0;
            end
          if (dst_valid[i]) stale[dst_areg[i]] = 1'b0;
        end
      #1;
      checks++;
      if (need_remote !== exp_need) begin failures++; $display("FAIL need_remote it=%0d %b %b", it, need_remote, exp_need); end
      remote += $countones(exp_need);
      @(negedge clk);
      checks++;
      if (stale_mask !== stale) begin failures++; $display("FAIL stale mask"); end
    end
    $display("remote fetches=%0d", remote);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
