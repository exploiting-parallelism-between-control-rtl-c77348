// tb_rcu_req_buffer: random bursts of register requests, replies returned
// out of order after random delays. Checks: requests leave in push order,
// each exactly once, at most BW per cycle; every reply writes its value to
// the physical register recorded for that request; the buffer refuses
// pushes when it cannot take NPUSH more; the buffer ends empty.
module tb_rcu_req_buffer;
  import cdp_pkg::*;
  localparam int DEPTH = 16, NPUSH = 4, BW = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NPUSH-1:0] push_valid;
  sid_t [NPUSH-1:0] push_sid;
  areg_t [NPUSH-1:0] push_areg;
  preg_t [NPUSH-1:0] push_preg;
  logic push_ready, req_ready;
  logic [BW-1:0] req_valid, rsp_valid, rf_wr_valid;
  reg_req_t [BW-1:0] req;
  reg_rsp_t [BW-1:0] rsp;
  preg_t [BW-1:0] rf_wr_preg;
  data_t [BW-1:0] rf_wr_data;
  logic [$clog2(DEPTH):0] occupancy;
  rcu_req_buffer #(.DEPTH(DEPTH), .NPUSH(NPUSH), .BW(BW)) dut (.*);

  int checks = 0, failures = 0, full_seen = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  typedef struct { sid_t sid; areg_t areg; preg_t preg; } rq_t;
  rq_t pushed[$];           // in push order, not yet sent
  rq_t by_tag[int];         // sent, awaiting reply
  int  pend_tags[$];
  int  n_pushed = 0, n_written = 0;

  function automatic data_t val(sid_t s, areg_t a);
    return data_t'({s, 9'(a)} * 32'h9E3779B1);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_valid = '0; push_sid = '0; push_areg = '0; push_preg = '0; req_ready = 1; rsp_valid = '0; rsp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int it = 0; it < 3000 || pushed.size() + pend_tags.size() > 0; it++) begin
      int nsend;
      if (it > 5000) break;
      // pushes
      for (int i = 0; i < NPUSH; i++) begin
        push_valid[i] = (it < 3000) && ($urandom % 3 == 0);
        push_sid[i]   = sid_t'($urandom);
        push_areg[i]  = areg_t'($urandom % NUM_AREGS);
        push_preg[i]  = preg_t'($urandom);
      end
      req_ready = ($urandom % 4) != 0;
      // replies: up to BW random pending tags
      rsp_valid = '0;
      for (int b = 0; b < BW; b++)
        if (pend_tags.size() > 0 && $urandom % 2 == 1) begin
          int k, t;
          k = $urandom % pend_tags.size();
          t = pend_tags[k];
          pend_tags.delete(k);
          rsp_valid[b] = 1'b1;
          rsp[b].tag   = 8'(t);
          rsp[b].data  = val(by_tag[t].sid, by_tag[t].areg);
        end
      #1;
      if (!push_ready) full_seen++;
      check(push_ready == (int'(occupancy) + NPUSH <= DEPTH), "push_ready rule");
      for (int b = 0; b < BW; b++) begin
        check(rf_wr_valid[b] == rsp_valid[b], "reply accepted");
        if (rsp_valid[b]) begin
          int t;
          t = int'(rsp[b].tag);
          check(rf_wr_preg[b] == by_tag[t].preg && rf_wr_data[b] == val(by_tag[t].sid, by_tag[t].areg),
                "value written to the requester's physical register");
          by_tag.delete(t);
          n_written++;
        end
      end
      // requests leaving
      nsend = 0;
      for (int b = 0; b < BW; b++)
        if (req_valid[b] && req_ready) begin
          check(pushed.size() > 0, "request was pushed");
          if (pushed.size() > 0) begin
            check(req[b].sid == pushed[0].sid && req[b].areg == pushed[0].areg, "push order");
            by_tag[int'(req[b].tag)] = pushed[0];
            pend_tags.push_back(int'(req[b].tag));
            void'(pushed.pop_front());
          end
          nsend++;
        end
      check(nsend <= BW, "bandwidth");
      if (push_ready)
        for (int i = 0; i < NPUSH; i++)
          if (push_valid[i]) begin
            rq_t r;
            r.sid = push_sid[i]; r.areg = push_areg[i]; r.preg = push_preg[i];
            pushed.push_back(r); n_pushed++;
          end
      @(negedge clk);
    end
    push_valid = '0; rsp_valid = '0;
    repeat (DEPTH) @(negedge clk);
    check(n_written == n_pushed && occupancy == 0, "all requests answered and freed");
    check(full_seen > 0, "buffer filled up at least once");
    $display("pushed=%0d written=%0d full_cycles=%0d", n_pushed, n_written, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
