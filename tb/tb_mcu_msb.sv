// tb_mcu_msb: the modify state buffer against a model kept here. Random
// store allocations from both cores, address/data updates, frees, and on
// every cycle a load search (youngest older known store to the address
// forwards its data) and a store search (next younger known store).
module tb_mcu_msb;
  import cdp_pkg::*;
  localparam int DEPTH = 16, RESV = 4, IW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] alloc_valid, alloc_ready, free_valid;
  seq_t [1:0] alloc_seq;
  logic [1:0][IW-1:0] alloc_idx, free_idx;
  logic set_valid, fwd_hit, nxt_valid;
  logic [IW-1:0] set_idx;
  addr_t set_addr, ld_addr, st_addr;
  data_t set_data, fwd_data;
  seq_t ld_seq, st_seq, nxt_seq;
  addr_t [1:0] free_addr;
  data_t [1:0] free_data;
  logic [1:0][$clog2(DEPTH+1)-1:0] used_by;
  mcu_msb #(.DEPTH(DEPTH), .RESV(RESV)) dut (.*);

  typedef struct { bit v; bit core; bit known; seq_t seq; addr_t addr; data_t data; } m_t;
  m_t m [DEPTH];
  int checks = 0, failures = 0, fwds = 0, nxts = 0;
  seq_t nseq = 50;
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

  initial begin
    alloc_valid = '0; alloc_seq = '0; free_valid = '0; free_idx = '0; set_valid = 0; set_idx = '0;
    set_addr = '0; set_data = '0; ld_addr = '0; ld_seq = '0; st_addr = '0; st_seq = '0;
    for (int i = 0; i < DEPTH; i++) m[i].v = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int it = 0; it < 4000; it++) begin
      int k;
      for (int c = 0; c < 2; c++) begin
        alloc_valid[c] = $urandom % 2;
        alloc_seq[c]   = nseq + seq_t'(c * 3);
      end
      k = $urandom % DEPTH;
      set_valid = m[k].v && !m[k].known && ($urandom % 2 == 1);
      set_idx = IW'(k); set_addr = addr_t'($urandom % 4); set_data = $urandom;
      for (int f = 0; f < 2; f++) begin
        k = $urandom % DEPTH;
        free_valid[f] = m[k].v && ($urandom % 3 == 0) && !(f == 1 && free_valid[0] && free_idx[0] == IW'(k));
        free_idx[f] = IW'(k);
      end
      ld_addr = addr_t'($urandom % 4); ld_seq = nseq - seq_t'($urandom % 60);
      st_addr = addr_t'($urandom % 4); st_seq = nseq - seq_t'($urandom % 300);
      #1;
      begin
        bit hit; seq_t bs; data_t bd;
        hit = 0; bs = 0; bd = 0;
        for (int i = 0; i < DEPTH; i++)
          if (m[i].v && m[i].known && m[i].addr == ld_addr && m[i].seq < ld_seq && (!hit || m[i].seq > bs)) begin
            hit = 1; bs = m[i].seq; bd = m[i].data;
          end
        check(fwd_hit == hit, "forward hit");
        if (hit) begin check(fwd_data == bd, "forward from the youngest older store"); fwds++; end
        hit = 0; bs = 0;
        for (int i = 0; i < DEPTH; i++)
          if (m[i].v && m[i].known && m[i].addr == st_addr && m[i].seq > st_seq && (!hit || m[i].seq < bs)) begin
            hit = 1; bs = m[i].seq;
          end
        check(nxt_valid == hit, "next store hit");
        if (hit) begin check(nxt_seq == bs, "next younger store"); nxts++; end
        for (int f = 0; f < 2; f++)
          if (free_valid[f] && m[free_idx[f]].known)
            check(free_addr[f] == m[free_idx[f]].addr && free_data[f] == m[free_idx[f]].data, "committed store data");
        for (int c = 0; c < 2; c++) if (alloc_ready[c]) check(!m[alloc_idx[c]].v, "free slot");
      end
      @(posedge clk);
      for (int f = 0; f < 2; f++) if (free_valid[f]) m[free_idx[f]].v = 0;
      if (set_valid) begin m[set_idx].known = 1; m[set_idx].addr = set_addr; m[set_idx].data = set_data; end
      for (int c = 0; c < 2; c++)
        if (alloc_valid[c] && alloc_ready[c]) m[alloc_idx[c]] = '{1, 1'(c), 0, alloc_seq[c], 0, 0};
      nseq += 8;
      @(negedge clk);
    end
    check(fwds > 50 && nxts > 50, "both searches exercised");
    $display("forwards=%0d next=%0d", fwds, nxts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
