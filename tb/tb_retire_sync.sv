// tb_retire_sync: drives pbr-retire, pjn-decode and pjn-retire notices in
// order and queries the retire permissions for every sid around the counts;
// the expected answers follow from the counts kept here.
module tb_retire_sync;
  import cdp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ct_pbr_retire, wt_pjn_decode, wt_pjn_retire, wt_retire_ok, ct_head_after_pbr, ct_retire_ok;
  sid_t wt_head_sid, ct_head_sid, pbr_retired, pjn_decoded, pjn_retired;
  retire_sync dut (.*);

  int checks = 0, failures = 0;
  int npbr = 0, ndec = 0, nret = 0;
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

  initial begin
    ct_pbr_retire = 0; wt_pjn_decode = 0; wt_pjn_retire = 0;
    wt_head_sid = 0; ct_head_sid = 0; ct_head_after_pbr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    ct_head_after_pbr = 1; ct_head_sid = 0; wt_head_sid = 0;
    #1 check(!wt_retire_ok && !ct_retire_ok, "nothing may retire before notices");
    ct_head_after_pbr = 0;
    #1 check(ct_retire_ok, "CT code before any pbr retires freely");
    for (int it = 0; it < 1500; it++) begin
      ct_pbr_retire = ($urandom % 2) == 1;
      wt_pjn_decode = ($urandom % 2) == 1 && (ndec < npbr + 3);
      wt_pjn_retire = ($urandom % 2) == 1 && (nret < ndec) && (nret < npbr);
      @(negedge clk);
      if (ct_pbr_retire) npbr++;
      if (wt_pjn_decode) ndec++;
      if (wt_pjn_retire) nret++;
      ct_pbr_retire = 0; wt_pjn_decode = 0; wt_pjn_retire = 0;
      for (int d = -2; d <= 2; d++) begin
        wt_head_sid = sid_t'(npbr + d);
        ct_head_sid = sid_t'(ndec + d);
        ct_head_after_pbr = 1;
        #1;
        check(wt_retire_ok == (d < 0), "WT block waits for its pbr to retire");
        check(ct_retire_ok == (d < 0), "CT waits for the pjn at WT decode");
      end
      check(pjn_retired == sid_t'(nret) && pbr_retired == sid_t'(npbr) && pjn_decoded == sid_t'(ndec),
            "counts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
