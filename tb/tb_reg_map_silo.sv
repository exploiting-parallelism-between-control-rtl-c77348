// tb_reg_map_silo: checkpoints random register maps under successive sids,
// releases the oldest ones, and looks up random (sid, register) pairs; each
// answer must equal the map saved for that sid, and released or never
// written sids must miss.
module tb_reg_map_silo;
  import cdp_pkg::*;
  localparam int DEPTH = 16, NLK = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ckpt_valid, rel_valid;
  sid_t ckpt_sid, rel_sid;
  preg_t [NUM_AREGS-1:0] ckpt_map;
  sid_t [NLK-1:0] lk_sid;
  areg_t [NLK-1:0] lk_areg;
  preg_t [NLK-1:0] lk_preg;
  logic [NLK-1:0] lk_hit;
  reg_map_silo #(.DEPTH(DEPTH), .NLK(NLK)) dut (.*);

  int checks = 0, failures = 0;
  preg_t [NUM_AREGS-1:0] saved [int];
  int oldest = 0, next = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ckpt_valid = 0; rel_valid = 0; ckpt_sid = 0; rel_sid = 0; ckpt_map = '0; lk_sid = '0; lk_areg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    lk_sid[0] = 0; lk_sid[1] = 5; #1;
    checks++; if (lk_hit != '0) begin failures++; $display("FAIL hit after reset"); end
    for (int it = 0; it < 2000; it++) begin
      ckpt_valid = (next - oldest < DEPTH) && ($urandom % 2 == 1);
      rel_valid  = (next > oldest) && ($urandom % 3 == 0);
      ckpt_sid = sid_t'(next);
      rel_sid  = sid_t'(oldest);
      for (int r = 0; r < NUM_AREGS; r++) ckpt_map[r] = preg_t'($urandom);
      for (int p = 0; p < NLK; p++) begin
        lk_sid[p]  = sid_t'(oldest - 2 + ($urandom % (next - oldest + 4)));
        lk_areg[p] = areg_t'($urandom % NUM_AREGS);
      end
      #1;
      for (int p = 0; p < NLK; p++) begin
        bit live;
        live = int'(lk_sid[p]) >= oldest && int'(lk_sid[p]) < next;
        checks++;
        if (lk_hit[p] != live) begin failures++; $display("FAIL hit sid=%0d", lk_sid[p]); end
        else if (live) begin
          checks++;
          if (lk_preg[p] != saved[int'(lk_sid[p])][lk_areg[p]]) begin failures++; $display("FAIL map value"); end
        end
      end
      @(posedge clk);
      if (ckpt_valid) begin saved[next] = ckpt_map; next++; end
      if (rel_valid) begin saved.delete(oldest); oldest++; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
