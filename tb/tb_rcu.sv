// tb_rcu: two register communication units wired back to back, as on the
// chip. Unit B holds checkpoints of random register maps; unit A's core asks
// for (sid, register) pairs. B's register file and ready bits are modelled
// here. Every value written into A's register file must be B's register
// value at that boundary, written to the physical register A allocated;
// the fastest round trip (request leaves A to value at A's write port) must
// be the 2-cycle minimum latency; traffic also flows from B to A at once.
module tb_rcu;
  import cdp_pkg::*;
  localparam int BW = 2, NPUSH = 2, SILO = 16, DEPTH = 16;
  localparam int NP = 1 << PREG_W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // per-unit signals, index 0 = A, 1 = B
  logic [1:0] ckpt_valid, rel_valid, push_ready, req_ready_x, in_ready_x;
  sid_t [1:0] ckpt_sid, rel_sid;
  preg_t [1:0][NUM_AREGS-1:0] ckpt_map;
  logic [1:0][NPUSH-1:0] push_valid;
  sid_t [1:0][NPUSH-1:0] push_sid;
  areg_t [1:0][NPUSH-1:0] push_areg;
  preg_t [1:0][NPUSH-1:0] push_preg;
  logic [1:0][BW-1:0] rf_wr_valid, rf_rd_valid, lreq_v, lrsp_v;
  preg_t [1:0][BW-1:0] rf_wr_preg, rf_rd_preg;
  data_t [1:0][BW-1:0] rf_wr_data, rf_rd_data;
  logic [1:0][NP-1:0] preg_ready;
  reg_req_t [1:0][BW-1:0] lreq;
  reg_rsp_t [1:0][BW-1:0] lrsp;
  logic [1:0][$clog2(DEPTH):0] preq, prd;

  for (genvar u = 0; u < 2; u++) begin : g_u
    rcu #(.SILO_DEPTH(SILO), .REQ_DEPTH(DEPTH), .RD_DEPTH(DEPTH), .NPUSH(NPUSH), .BW(BW)) dut (
      .clk, .rst_n,
      .ckpt_valid(ckpt_valid[u]), .ckpt_sid(ckpt_sid[u]), .ckpt_map(ckpt_map[u]),
      .rel_valid(rel_valid[u]), .rel_sid(rel_sid[u]),
      .push_valid(push_valid[u]), .push_sid(push_sid[u]), .push_areg(push_areg[u]),
      .push_preg(push_preg[u]), .push_ready(push_ready[u]),
      .rf_wr_valid(rf_wr_valid[u]), .rf_wr_preg(rf_wr_preg[u]), .rf_wr_data(rf_wr_data[u]),
      .preg_ready(preg_ready[u]),
      .rf_rd_valid(rf_rd_valid[u]), .rf_rd_preg(rf_rd_preg[u]), .rf_rd_data(rf_rd_data[u]),
      .link_req_valid(lreq_v[u]), .link_req(lreq[u]), .link_req_ready(in_ready_x[1-u]),
      .link_req_in_valid(lreq_v[1-u]), .link_req_in(lreq[1-u]), .link_req_in_ready(in_ready_x[u]),
      .link_rsp_valid(lrsp_v[u]), .link_rsp(lrsp[u]),
      .link_rsp_in_valid(lrsp_v[1-u]), .link_rsp_in(lrsp[1-u]),
      .pending_requests(preq[u]), .pending_reads(prd[u])
    );
  end

  function automatic data_t rfval(int u, preg_t p);
    return data_t'(u * 32'h10000 + int'(p) * 77 + 1);
  endfunction
  always_comb
    for (int u = 0; u < 2; u++)
      for (int b = 0; b < BW; b++) rf_rd_data[u][b] = rfval(u, rf_rd_preg[u][b]);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  preg_t [NUM_AREGS-1:0] maps [2][int];
  data_t exp_val [2][int];      // by destination preg
  int    sent_at [2][int];      // cycle a request for this preg left
  int    cyc = 0, n_req = 0, n_done = 0, min_lat = 1000;
  always @(posedge clk) cyc <= cyc + 1;

  // watch requests leaving and values arriving
  always @(negedge clk) if (rst_n) begin
    for (int u = 0; u < 2; u++) begin
      for (int b = 0; b < BW; b++)
        if (rf_wr_valid[u][b]) begin
          int p;
          p = int'(rf_wr_preg[u][b]);
          check(exp_val[u].exists(p), "write to a requested register");
          if (exp_val[u].exists(p)) begin
            check(rf_wr_data[u][b] == exp_val[u][p], "value from the other core at the boundary");
            if (cyc - sent_at[u][p] < min_lat) min_lat = cyc - sent_at[u][p];
            exp_val[u].delete(p);
            n_done++;
          end
        end
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // request sent in the current cycle: record its send time
  always @(negedge clk) if (rst_n)
    for (int u = 0; u < 2; u++)
      if (in_ready_x[1-u])
        for (int b = 0; b < BW; b++)
          if (lreq_v[u][b]) sent_at[u][int'(g_pending_preg(u, lreq[u][b].tag))] = cyc;

  // preg of a request buffer slot, kept by the pusher below
  preg_t slot_preg [2][256];
  function automatic preg_t g_pending_preg(int u, logic [7:0] tag);
    return slot_preg[u][tag];
  endfunction
  int tailc [2];

  initial begin
    ckpt_valid = '0; rel_valid = '0; ckpt_sid = '0; rel_sid = '0; ckpt_map = '0;
    push_valid = '0; push_sid = '0; push_areg = '0; push_preg = '0; preg_ready = '0;
    tailc[0] = 0; tailc[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // checkpoints 0..7 on both units
    for (int s = 0; s < 8; s++) begin
      for (int u = 0; u < 2; u++) begin
        ckpt_valid[u] = 1; ckpt_sid[u] = sid_t'(s);
        for (int r = 0; r < NUM_AREGS; r++) ckpt_map[u][r] = preg_t'($urandom);
        maps[u][s] = ckpt_map[u];
      end
      @(negedge clk);
    end
    ckpt_valid = '0;
    preg_ready = '1;
    // traffic: destination pregs used once at a time per unit
    for (int it = 0; it < 1500; it++) begin
      for (int u = 0; u < 2; u++) begin
        push_valid[u] = '0;
        if (it < 1200 && $urandom % 2 == 1)
          for (int i = 0; i < NPUSH; i++) begin
            preg_t dp;
            int s;
            areg_t a;
            dp = preg_t'($urandom);
            if (exp_val[u].exists(int'(dp)) || (i == 1 && push_preg[u][0] == dp && push_valid[u][0])) continue;
            s = $urandom % 8;
            a = areg_t'($urandom % NUM_AREGS);
            push_valid[u][i] = 1'b1;
            push_sid[u][i] = sid_t'(s); push_areg[u][i] = a; push_preg[u][i] = dp;
          end
        for (int p = 0; p < NP; p++) if ($urandom % 8 == 0) preg_ready[u][p] = !preg_ready[u][p];
        if (it > 1200) preg_ready[u] = '1;
      end
      #1;
      for (int u = 0; u < 2; u++)
        if (push_ready[u])
          for (int i = 0; i < NPUSH; i++)
            if (push_valid[u][i]) begin
              int s;
              s = int'(push_sid[u][i]);
              exp_val[u][int'(push_preg[u][i])] = rfval(1-u, maps[1-u][s][push_areg[u][i]]);
              slot_preg[u][tailc[u] % DEPTH] = push_preg[u][i];
              tailc[u]++;
              n_req++;
            end
      @(negedge clk);
    end
    push_valid = '0;
    repeat (50) @(negedge clk);
    check(n_done == n_req && exp_val[0].size() == 0 && exp_val[1].size() == 0, "all requests answered");
    check(min_lat == 2, "minimum register communication latency is 2 cycles");
    $display("requests=%0d answered=%0d min_latency=%0d", n_req, n_done, min_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
