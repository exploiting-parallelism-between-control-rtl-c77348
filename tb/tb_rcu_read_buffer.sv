// tb_rcu_read_buffer: requests from the other core arrive up to BW per
// cycle; the silo is modelled by a fixed function (sid, areg) -> preg and the
// register file by a function preg -> value, the ready bits change at
// random. Checks: a register is read only while ready, at most BW reads per
// cycle, each reply carries the requester's tag and the right value one
// cycle after the read, every request is answered once, and a request to a
// ready register is read the cycle after it arrives and answered the cycle
// after that.
module tb_rcu_read_buffer;
  import cdp_pkg::*;
  localparam int DEPTH = 16, BW = 2;
  localparam int NP = 1 << PREG_W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [BW-1:0] in_valid, lk_hit, rf_rd_valid, rsp_valid;
  reg_req_t [BW-1:0] in_req;
  logic in_ready;
  sid_t [BW-1:0] lk_sid;
  areg_t [BW-1:0] lk_areg;
  preg_t [BW-1:0] lk_preg, rf_rd_preg;
  logic [NP-1:0] preg_ready;
  data_t [BW-1:0] rf_rd_data;
  reg_rsp_t [BW-1:0] rsp;
  logic [$clog2(DEPTH):0] occupancy;
  rcu_read_buffer #(.DEPTH(DEPTH), .BW(BW)) dut (.*);

  function automatic preg_t map(sid_t s, areg_t a);
    return preg_t'(s * 5 + 16'(a) * 3);
  endfunction
  function automatic data_t rf(preg_t p);
    return data_t'(p) * 32'h01000193 + 32'h55;
  endfunction

  always_comb
    for (int b = 0; b < BW; b++) begin
      lk_preg[b] = map(lk_sid[b], lk_areg[b]);
      lk_hit[b]  = 1'b1;
      rf_rd_data[b] = rf(rf_rd_preg[b]);
    end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  data_t expect_val[int];
  int    n_in = 0, n_out = 0, tagc = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = '0; in_req = '0; preg_ready = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency check: ready register answered in the next cycle
    preg_ready = '1;
    in_valid = 2'b01; in_req[0] = '{tag: 8'd200, sid: 16'd3, areg: 7'd9};
    @(negedge clk);
    in_valid = '0;
    #1 check(!rsp_valid[0], "not answered in the arrival cycle");
    @(negedge clk);
    #1 check(rsp_valid[0] && rsp[0].tag == 8'd200 && rsp[0].data == rf(map(16'd3, 7'd9)),
             "answer one cycle after the read");
    @(negedge clk);
    for (int it = 0; it < 3000 || n_out < n_in; it++) begin
      if (it > 6000) break;
      for (int p = 0; p < NP; p++) if ($urandom % 4 == 0) preg_ready[p] = !preg_ready[p];
      if (it >= 3000) preg_ready = '1;
      for (int b = 0; b < BW; b++) begin
        in_valid[b] = (it < 3000) && ($urandom % 2 == 1);
        in_req[b].tag  = 8'(tagc + b);
        in_req[b].sid  = sid_t'($urandom % 64);
        in_req[b].areg = areg_t'($urandom % NUM_AREGS);
      end
      #1;
      begin
        int nr;
        nr = 0;
        for (int b = 0; b < BW; b++)
          if (rf_rd_valid[b]) begin
            check(preg_ready[rf_rd_preg[b]], "read only when ready");
            nr++;
          end
        check(nr <= BW, "read bandwidth");
      end
      for (int b = 0; b < BW; b++)
        if (rsp_valid[b]) begin
          check(expect_val.exists(int'(rsp[b].tag)), "reply to a pending request");
          if (expect_val.exists(int'(rsp[b].tag))) begin
            check(rsp[b].data == expect_val[int'(rsp[b].tag)], "reply value");
            expect_val.delete(int'(rsp[b].tag));
          end
          n_out++;
        end
      if (in_ready)
        for (int b = 0; b < BW; b++)
          if (in_valid[b]) begin
            expect_val[int'(in_req[b].tag)] = rf(map(in_req[b].sid, in_req[b].areg));
            n_in++;
          end
      tagc = (tagc + BW) % 256;
      @(negedge clk);
    end
    check(n_out == n_in && expect_val.size() == 0, "every request answered once");
    $display("requests=%0d replies=%0d", n_in, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
