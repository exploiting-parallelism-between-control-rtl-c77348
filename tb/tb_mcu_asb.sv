// tb_mcu_asb: the access state buffer against a model kept here.
// Random allocations from both cores (with the per-core reservation rule),
// address updates, frees, and violation searches; the oldest entry's core
// and the oldest violating load must match the model. The test also fills
// one core up to its reservation plus the whole shared part and checks that
// only the other core can still allocate.
module tb_mcu_asb;
  import cdp_pkg::*;
  localparam int DEPTH = 20, RESV = 6, IW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] alloc_valid, alloc_store, alloc_ready, set_addr_valid, free_valid;
  seq_t [1:0] alloc_seq;
  logic [1:0][IW-1:0] alloc_idx, set_addr_idx, free_idx;
  addr_t [1:0] set_addr;
  addr_t srch_addr;
  seq_t srch_lo, srch_hi, vio_seq, oldest_seq;
  logic srch_hi_valid, vio_hit, vio_core, oldest_valid, oldest_core;
  logic [IW-1:0] vio_idx;
  logic [1:0][$clog2(DEPTH+1)-1:0] used_by;
  mcu_asb #(.DEPTH(DEPTH), .RESV(RESV)) dut (.*);

  typedef struct { bit v; bit core; bit store; bit aok; seq_t seq; addr_t addr; } m_t;
  m_t m [DEPTH];
  int checks = 0, failures = 0, vios = 0;
  seq_t nseq = 100;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  function automatic int cnt(int c);
    int n = 0;
    for (int i = 0; i < DEPTH; i++) if (m[i].v && m[i].core == 1'(c)) n++;
    return n;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc_valid = '0; alloc_store = '0; alloc_seq = '0; set_addr_valid = '0; set_addr_idx = '0; set_addr = '0;
    free_valid = '0; free_idx = '0; srch_addr = '0; srch_lo = '0; srch_hi = '0; srch_hi_valid = 0;
    for (int i = 0; i < DEPTH; i++) m[i].v = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // reservation: core 0 takes all it can
    alloc_valid = 2'b01;
    for (int k = 0; k < DEPTH; k++) begin
      alloc_seq[0] = nseq; #1;
      if (!alloc_ready[0]) break;
      m[alloc_idx[0]] = '{1, 0, 0, 0, nseq, 0}; nseq++;
      @(negedge clk);
    end
    check(cnt(0) == DEPTH - RESV, "core 0 gets its reservation plus the shared part");
    alloc_valid = 2'b10; alloc_seq[1] = nseq; #1;
    check(alloc_ready[1], "core 1 still has its reserved entries");
    alloc_valid = '0;
    // free all
    for (int i = 0; i < DEPTH; i += 2) begin
      free_valid = 2'b11; free_idx[0] = IW'(i); free_idx[1] = IW'(i+1);
      @(negedge clk);
      m[i].v = 0; m[i+1].v = 0;
    end
    free_valid = '0;
    @(negedge clk);
    check(used_by[0] == 0 && used_by[1] == 0 && !oldest_valid, "empty");
    // random operation
    for (int it = 0; it < 4000; it++) begin
      int c0, c1, shared_over;
      for (int c = 0; c < 2; c++) begin
        alloc_valid[c] = $urandom % 2;
        alloc_store[c] = $urandom % 2;
        alloc_seq[c]   = nseq + seq_t'(c * 3) + seq_t'($urandom % 2);
      end
      for (int u = 0; u < 2; u++) begin
        int k;
        k = $urandom % DEPTH;
        set_addr_valid[u] = m[k].v && !m[k].aok && ($urandom % 2 == 1) && !(u == 1 && set_addr_valid[0] && set_addr_idx[0] == IW'(k));
        set_addr_idx[u]   = IW'(k);
        set_addr[u]       = addr_t'($urandom % 4);
      end
      for (int f = 0; f < 2; f++) begin
        int k;
        k = $urandom % DEPTH;
        free_valid[f] = m[k].v && ($urandom % 3 == 0) && !(f == 1 && free_valid[0] && free_idx[0] == IW'(k));
        free_idx[f]   = IW'(k);
      end
      srch_addr = addr_t'($urandom % 4);
      srch_lo   = nseq - seq_t'($urandom % 200);
      srch_hi_valid = $urandom % 2;
      srch_hi   = srch_lo + seq_t'($urandom % 100);
      #1;
      // model checks on the current state
      begin
        bit hit; seq_t bs; int bi;
        hit = 0; bs = 0; bi = 0;
        for (int i = 0; i < DEPTH; i++)
          if (m[i].v && !m[i].store && m[i].aok && m[i].addr == srch_addr && m[i].seq > srch_lo &&
              (!srch_hi_valid || m[i].seq < srch_hi) && (!hit || m[i].seq < bs)) begin
            hit = 1; bs = m[i].seq; bi = i;
          end
        check(vio_hit == hit, "violation search hit");
        if (hit) begin check(vio_seq == bs && vio_idx == IW'(bi) && vio_core == m[bi].core, "oldest violating load"); vios++; end
        hit = 0; bs = 0; bi = 0;
        for (int i = 0; i < DEPTH; i++) if (m[i].v && (!hit || m[i].seq < bs)) begin hit = 1; bs = m[i].seq; bi = i; end
        check(oldest_valid == hit, "oldest valid");
        if (hit) check(oldest_core == m[bi].core && oldest_seq == bs, "oldest core");
        c0 = cnt(0); c1 = cnt(1);
        check(used_by[0] == c0 && used_by[1] == c1, "occupancy");
        shared_over = (c0 > RESV ? c0 - RESV : 0) + (c1 > RESV ? c1 - RESV : 0);
        check(!alloc_ready[0] || c0 < RESV || shared_over < DEPTH - 2*RESV, "core 0 respects the shared limit");
        check(!alloc_ready[1] || c1 < RESV || shared_over + (c0 >= RESV ? 1 : 0) < DEPTH - 2*RESV, "core 1 respects the shared limit");
        if (alloc_ready[0] && alloc_ready[1]) check(alloc_idx[0] != alloc_idx[1], "distinct slots");
        for (int c = 0; c < 2; c++) if (alloc_ready[c]) check(!m[alloc_idx[c]].v, "free slot");
      end
      @(posedge clk);
      for (int f = 0; f < 2; f++) if (free_valid[f]) m[free_idx[f]].v = 0;
      for (int u = 0; u < 2; u++) if (set_addr_valid[u]) begin m[set_addr_idx[u]].aok = 1; m[set_addr_idx[u]].addr = set_addr[u]; end
      for (int c = 0; c < 2; c++)
        if (alloc_valid[c] && alloc_ready[c]) m[alloc_idx[c]] = '{1, 1'(c), alloc_store[c], 0, alloc_seq[c], 0};
      nseq += 8;
      @(negedge clk);
    end
    check(vios > 50, "violations found");
    $display("violations=%0d", vios);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
