// tb_pbr_pjn_decode: checks pbr/pjn recognition, instruction length and the
// spawn target (next PC plus the sign-extended 16-bit offset) against values
// computed here, for fixed and random byte patterns.
module tb_pbr_pjn_decode;
  import cdp_pkg::*;
  logic        valid;
  pc_t         pc, spawn_target, next_pc;
  logic [23:0] bytes;
  logic        is_pbr, is_pjn;
  logic [1:0]  len;
  pbr_pjn_decode dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s pc=%h bytes=%h", what, pc, bytes); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 1; pc = 32'h0040_1000; bytes = 24'h0010D6;   // pbr +0x10
    #1 check(is_pbr && !is_pjn && len == 3, "pbr seen");
    check(spawn_target == 32'h0040_1013, "pbr forward target");
    bytes = 24'hFFF0D6;                                   // pbr -16
    #1 check(spawn_target == 32'h0040_0FF3, "pbr backward target");
    bytes = 24'h0000F1;
    #1 check(is_pjn && !is_pbr && len == 1 && next_pc == 32'h0040_1001, "pjn seen");
    valid = 0;
    #1 check(!is_pjn && !is_pbr, "invalid slot ignored");
    valid = 1;
    for (int i = 0; i < 300; i++) begin
      logic [7:0] op;
      int signed off;
      op  = (i % 3 == 0) ? 8'hD6 : (i % 3 == 1) ? 8'hF1 : 8'($urandom);
      bytes = {16'($urandom), op};
      pc    = $urandom;
      off   = int'(signed'(bytes[23:8]));
      #1;
      check(is_pbr == (op == 8'hD6), "pbr flag");
      check(is_pjn == (op == 8'hF1), "pjn flag");
      if (op == 8'hD6) check(spawn_target == pc + 3 + off, "target");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
