// tb_mcu: directed scenarios for the memory communication unit, each with
// its expected result worked out by hand:
//   1. a CT store followed in program order by a WT load to the same address:
//      the value is forwarded, exactly BYP_LAT cycles after the load address;
//   2. a WT load executed before a logically older CT store to its address:
//      a violation naming that load, one cycle after the store;
//   3. a store whose next younger store to the address already exists does
//      not flag a load behind that younger store;
//   4. a load and an older store to one address in the same cycle: violation;
//   5. commit strictly in sequence order across the cores: only the owner of
//      the oldest operation may commit, and stores reach memory in order;
//   6. simultaneous load requests from both cores are served alternately.
module tb_mcu;
  import cdp_pkg::*;
  localparam int AD = 24, AR = 8, MD = 12, MR = 4, LAT = 5;
  localparam int AW = $clog2(AD), MW = $clog2(MD);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] ins_valid, ins_store, ins_ready, ld_req_valid, ld_req_ready, st_req_valid, st_req_ready;
  logic [1:0] cm_valid, cm_store, cm_ready;
  seq_t [1:0] ins_seq, ld_seq, st_seq;
  logic [1:0][AW-1:0] ins_asb_idx, ld_asb_idx, st_asb_idx, cm_asb_idx;
  logic [1:0][MW-1:0] ins_msb_idx, st_msb_idx, cm_msb_idx;
  addr_t [1:0] ld_addr, st_addr;
  data_t [1:0] st_data;
  logic ld_rsp_valid, ld_rsp_core, ld_rsp_fwd, vio_valid, vio_core, mem_wr_valid, oldest_valid, oldest_core;
  logic [AW-1:0] ld_rsp_idx, vio_idx;
  data_t ld_rsp_data, mem_wr_data;
  seq_t vio_seq, oldest_seq;
  addr_t mem_wr_addr;
  logic [1:0][$clog2(AD+1)-1:0] asb_used;
  logic [1:0][$clog2(MD+1)-1:0] msb_used;
  mcu #(.ASB_DEPTH(AD), .ASB_RESV(AR), .MSB_DEPTH(MD), .MSB_RESV(MR), .BYP_LAT(LAT)) dut (.*);

  int checks = 0, failures = 0;
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

  // bookkeeping of inserted operations
  typedef struct { int c; bit st; seq_t seq; int ai; int mi; addr_t a; data_t d; } op_t;
  op_t ops [int];   // by seq

  task automatic idle();
    ins_valid = '0; ld_req_valid = '0; st_req_valid = '0; cm_valid = '0;
  endtask

  task automatic insert(int c, bit st, int seq);
    idle();
    ins_valid[c] = 1; ins_store[c] = st; ins_seq[c] = seq_t'(seq);
    #1 check(ins_ready[c], "insert accepted");
    ops[seq] = '{c, st, seq_t'(seq), int'(ins_asb_idx[c]), int'(ins_msb_idx[c]), '0, '0};
    @(negedge clk);
    idle();
  endtask

  task automatic do_store(int seq, addr_t a, data_t d);
    int c;
    c = ops[seq].c;
    idle();
    st_req_valid[c] = 1; st_asb_idx[c] = AW'(ops[seq].ai); st_msb_idx[c] = MW'(ops[seq].mi);
    st_addr[c] = a; st_data[c] = d; st_seq[c] = seq_t'(seq);
    ops[seq].a = a; ops[seq].d = d;
  endtask

  task automatic do_load(int seq, addr_t a);
    int c;
    c = ops[seq].c;
    ld_req_valid[c] = 1; ld_asb_idx[c] = AW'(ops[seq].ai); ld_addr[c] = a; ld_seq[c] = seq_t'(seq);
    ops[seq].a = a;
  endtask

  // wait for the load response; return cycles waited
  task automatic wait_load(output int lat, output bit fwd, output data_t d);
    lat = 0;
    do begin @(negedge clk); idle(); lat++; end while (!ld_rsp_valid && lat < 20);
    fwd = ld_rsp_fwd; d = ld_rsp_data;
  endtask

  initial begin
    int lat;
    bit fwd;
    data_t d;
    idle(); ins_store = '0; ins_seq = '0; ld_asb_idx = '0; ld_addr = '0; ld_seq = '0;
    st_asb_idx = '0; st_msb_idx = '0; st_addr = '0; st_data = '0; st_seq = '0;
    cm_asb_idx = '0; cm_store = '0; cm_msb_idx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. forwarding CT store -> WT load
    insert(0, 1, 10); insert(1, 0, 20);
    do_store(10, 32'hA0, 32'hCAFE_0001); @(negedge clk); idle();
    do_load(20, 32'hA0); #1 check(ld_req_ready[1], "load accepted");
    wait_load(lat, fwd, d);
    check(lat == LAT, "bypass latency");
    check(fwd && d == 32'hCAFE_0001, "value forwarded from the older CT store");
    check(!vio_valid, "no violation for an ordered pair");

    // 2. violation: WT load (30) runs before older CT store (25)
    insert(0, 1, 25); insert(1, 0, 30);
    do_load(30, 32'hB0); @(negedge clk); idle();
    do_store(25, 32'hB0, 32'h1234); @(negedge clk); idle();
    #1 check(vio_valid && vio_seq == 30 && vio_core == 1'b1 && int'(vio_idx) == ops[30].ai,
             "violation reports the early load");
    @(negedge clk);
    #1 check(!vio_valid, "violation pulse one cycle");
    // replay the load once its first answer has drained: now it gets the store's value
    repeat (LAT) @(negedge clk);
    do_load(30, 32'hB0);
    wait_load(lat, fwd, d);
    check(fwd && d == 32'h1234, "replayed load gets the store value");

    // 3. store 45 with younger store 50 known: load 60 (behind 50) not flagged
    insert(0, 1, 45); insert(1, 1, 50); insert(1, 0, 60);
    do_store(50, 32'hC0, 32'h50); @(negedge clk); idle();
    do_load(60, 32'hC0);
    wait_load(lat, fwd, d);
    check(fwd && d == 32'h50, "forward from store 50");
    do_store(45, 32'hC0, 32'h45); @(negedge clk); idle();
    #1 check(!vio_valid, "load behind a younger store is not a violation");

    // 4. same-cycle load and older store to one address
    insert(0, 1, 65); insert(1, 0, 70);
    do_store(65, 32'hD0, 32'h65); do_load(70, 32'hD0);
    @(negedge clk); idle();
    #1 check(vio_valid && vio_seq == 70, "same-cycle load/store violation");
    repeat (LAT + 1) @(negedge clk);

    // 6. simultaneous load requests alternate between the cores
    insert(0, 0, 80); insert(1, 0, 81); insert(0, 0, 82); insert(1, 0, 83);
    begin
      int served0, served1;
      served0 = 0; served1 = 0;
      ld_req_valid = 2'b11;
      ld_asb_idx[0] = AW'(ops[80].ai); ld_addr[0] = 32'hE0; ld_seq[0] = 80;
      ld_asb_idx[1] = AW'(ops[81].ai); ld_addr[1] = 32'hE4; ld_seq[1] = 81;
      for (int k = 0; k < 4; k++) begin
        #1;
        check(^ld_req_ready, "one load per cycle");
        if (ld_req_ready[0]) served0++; else served1++;
        @(negedge clk);
      end
      check(served0 == 2 && served1 == 2, "fair alternation");
      idle();
      repeat (LAT + 1) @(negedge clk);
    end

    // 5. commit in sequence order; stores reach memory in order
    begin
      int order [$];
      int idx;
      data_t last_d;
      foreach (ops[s]) order.push_back(s);
      order.sort();
      idx = 0;
      while (idx < order.size()) begin
        op_t o;
        o = ops[order[idx]];
        idle();
        // both cores ask to commit their oldest operation; only the owner may
        #1 check(oldest_valid && oldest_core == 1'(o.c) && oldest_seq == o.seq, "oldest operation");
        cm_valid = 2'b11;
        for (int c = 0; c < 2; c++) begin
          cm_asb_idx[c] = AW'(o.ai); cm_store[c] = 1'b0; cm_msb_idx[c] = '0;
        end
        cm_store[o.c] = o.st; cm_msb_idx[o.c] = MW'(o.mi);
        cm_valid[1 - o.c] = 1'b0;
        #1 check(cm_ready[o.c] && !cm_ready[1 - o.c], "only the oldest's core may commit");
        @(negedge clk);
        idle();
        if (o.st) begin
          #1 check(mem_wr_valid && mem_wr_addr == o.a && mem_wr_data == o.d, "store written at commit");
        end
        idx++;
      end
      #1 check(!oldest_valid && asb_used == '0 && msb_used == '0, "all committed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
