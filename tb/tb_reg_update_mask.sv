// tb_reg_update_mask: random rename groups with writes and occasional block
// boundaries; a reference mask kept here must equal the mask handed out at
// each boundary (writes before the boundary slot count, the boundary's own
// slot and later slots start the next mask).
module tb_reg_update_mask;
  import cdp_pkg::*;
  localparam int WIDTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [WIDTH-1:0] wr_valid;
  logic [WIDTH-1:0][AREG_W-1:0] wr_areg;
  logic bnd_valid, out_valid;
  logic [1:0] bnd_slot;
  regmask_t out_mask, cur_mask;
  reg_update_mask #(.WIDTH(WIDTH)) dut (.*);

  int checks = 0, failures = 0, bnds = 0;
  regmask_t ref_mask;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = '0; wr_areg = '0; bnd_valid = 0; bnd_slot = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ref_mask = '0;
    @(negedge clk);
    for (int it = 0; it < 2000; it++) begin
      regmask_t after;
      for (int i = 0; i < WIDTH; i++) begin
        wr_valid[i] = ($urandom % 2) == 1;
        wr_areg[i]  = AREG_W'($urandom % NUM_AREGS);
      end
      bnd_valid = ($urandom % 6) == 0;
      bnd_slot  = 2'($urandom);
      after = '0;
      for (int i = 0; i < WIDTH; i++)
        if (wr_valid[i]) begin
          if (!bnd_valid || i < bnd_slot) ref_mask[wr_areg[i]] = 1'b1;
          else if (i > bnd_slot)          after[wr_areg[i]] = 1'b1;
        end
      #1;
      checks++;
      if (out_valid !== bnd_valid) begin failures++; $display("FAIL out_valid"); end
      if (bnd_valid) begin
        bnds++;
        checks++;
        if (out_mask !== ref_mask) begin failures++; $display("FAIL mask at boundary %0d", bnds); end
        ref_mask = after;
      end
      @(negedge clk);
      checks++;
      if (cur_mask !== ref_mask) begin failures++; $display("FAIL cur_mask"); end
    end
    $display("boundaries=%0d", bnds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
