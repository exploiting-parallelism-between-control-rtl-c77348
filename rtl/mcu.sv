// mcu: memory communication unit shared by the CT and WT cores.
//
// Memory operations of both cores are ordered by a logical sequence number
// (program order of the original single thread), supplied by the core when
// the operation enters the pipeline (ins_*): loads get an access state
// buffer (ASB) entry, stores an ASB and a modify state buffer (MSB) entry.
//  * Load address (ld_req_*): the address is written to the ASB and the MSB
//    is searched for the youngest older store to it. The answer (forwarded
//    value or "read the cache") returns BYP_LAT cycles later on ld_rsp_*.
//  * Store address and data (st_req_*): written to the MSB. The next younger
//    store to the same address is found in the MSB, and the ASB is searched
//    for loads to that address between the two stores. Any such load read a
//    stale value: the oldest one is reported on vio_* one cycle later, and
//    its core must replay it (by sending its address again).
//    A load granted in the same cycle as the store is checked as well.
//  * Commit (cm_*): operations commit in original program order. Only the
//    core owning the oldest ASB entry (oldest_core) may commit; a store's
//    value is then written to the cache (mem_wr_*).
// One load and one store address are accepted per cycle, alternating
// between the cores when both ask. Sizes, the 1-per-cycle bypass bandwidth
// and the 5-cycle minimum bypass latency follow the design; the core
// supplying the sequence numbers, the arbitration and the replay-by-reissue
// are this design's own. Sequence numbers are assumed not to wrap while
// operations are in flight.
module mcu #(
  parameter int unsigned ASB_DEPTH = 320,
  parameter int unsigned ASB_RESV  = 128,
  parameter int unsigned MSB_DEPTH = 160,
  parameter int unsigned MSB_RESV  = 32,
  parameter int unsigned BYP_LAT   = 5,
  localparam int unsigned AW = $clog2(ASB_DEPTH),
  localparam int unsigned MW = $clog2(MSB_DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // insertion
  input  logic [1:0]                ins_valid,
  input  logic [1:0]                ins_store,
  input  cdp_pkg::seq_t [1:0]       ins_seq,
  output logic [1:0]                ins_ready,
  output logic [1:0][AW-1:0]        ins_asb_idx,
  output logic [1:0][MW-1:0]        ins_msb_idx,
  // load address
  input  logic [1:0]                ld_req_valid,
  input  logic [1:0][AW-1:0]        ld_asb_idx,
  input  cdp_pkg::addr_t [1:0]      ld_addr,
  input  cdp_pkg::seq_t [1:0]       ld_seq,
  output logic [1:0]                ld_req_ready,
  output logic                      ld_rsp_valid,
  output logic                      ld_rsp_core,
  output logic [AW-1:0]             ld_rsp_idx,
  output logic                      ld_rsp_fwd,
  output cdp_pkg::data_t            ld_rsp_data,
  // store address and data
  input  logic [1:0]                st_req_valid,
  input  logic [1:0][AW-1:0]        st_asb_idx,
  input  logic [1:0][MW-1:0]        st_msb_idx,
  input  cdp_pkg::addr_t [1:0]      st_addr,
  input  cdp_pkg::data_t [1:0]      st_data,
  input  cdp_pkg::seq_t [1:0]       st_seq,
  output logic [1:0]                st_req_ready,
  output logic                      vio_valid,
  output logic                      vio_core,
  output cdp_pkg::seq_t             vio_seq,
  output logic [AW-1:0]             vio_idx,
  // commit
  input  logic [1:0]                cm_valid,
  input  logic [1:0][AW-1:0]        cm_asb_idx,
  input  logic [1:0]                cm_store,
  input  logic [1:0][MW-1:0]        cm_msb_idx,
  output logic [1:0]                cm_ready,
  output logic                      mem_wr_valid,
  output cdp_pkg::addr_t            mem_wr_addr,
  output cdp_pkg::data_t            mem_wr_data,
  output logic                      oldest_valid,
  output logic                      oldest_core,
  output cdp_pkg::seq_t             oldest_seq,
  output logic [1:0][$clog2(ASB_DEPTH+1)-1:0] asb_used,
  output logic [1:0][$clog2(MSB_DEPTH+1)-1:0] msb_used
);
  import cdp_pkg::*;

  // ---------------- insertion ----------------
  logic [1:0] asb_ar, msb_ar, asb_av, msb_av;
  logic [1:0][AW-1:0] asb_ai;
  logic [1:0][MW-1:0] msb_ai;
  always_comb begin
    for (int c = 0; c < 2; c++) begin
      ins_ready[c] = asb_ar[c] && (!ins_store[c] || msb_ar[c]);
      asb_av[c]    = ins_valid[c] && ins_ready[c];
      msb_av[c]    = ins_valid[c] && ins_ready[c] && ins_store[c];
    end
  end
  assign ins_asb_idx = asb_ai;
  assign ins_msb_idx = msb_ai;

  // ---------------- arbitration ----------------
  logic ld_pri, st_pri;     // core that wins a tie
  logic ld_go, st_go;
  logic ld_c, st_c;
  always_comb begin
    ld_go = |ld_req_valid;
    ld_c  = (ld_req_valid == 2'b11) ? ld_pri : ld_req_valid[1];
    st_go = |st_req_valid;
    st_c  = (st_req_valid == 2'b11) ? st_pri : st_req_valid[1];
    ld_req_ready = ld_go ? (2'b01 << ld_c) : 2'b00;
    st_req_ready = st_go ? (2'b01 << st_c) : 2'b00;
  end

  // ---------------- commit ----------------
  logic [1:0] cm_do;
  always_comb begin
    for (int c = 0; c < 2; c++) begin
      cm_ready[c] = oldest_valid && (oldest_core == 1'(c));
      cm_do[c]    = cm_valid[c] && cm_ready[c];
    end
  end

  // ---------------- buffers ----------------
  logic [1:0]           asb_sv;
  logic [1:0][AW-1:0]   asb_si;
  addr_t [1:0]          asb_sa;
  logic                 a_hit, a_core;
  seq_t                 a_seq;
  logic [AW-1:0]        a_idx;
  logic                 m_fwd, m_nxt;
  data_t                m_fdata;
  seq_t                 m_nseq;
  addr_t [1:0]          m_faddr;
  data_t [1:0]          m_fdat;
  logic [1:0]           asb_fv, msb_fv;
  logic [1:0][AW-1:0]   asb_fi;
  logic [1:0][MW-1:0]   msb_fi;

  assign asb_sv = {st_go, ld_go};
  assign asb_si = {st_asb_idx[st_c], ld_asb_idx[ld_c]};
  assign asb_sa = {st_addr[st_c], ld_addr[ld_c]};
  always_comb begin
    for (int c = 0; c < 2; c++) begin
      asb_fv[c] = cm_do[c];
      asb_fi[c] = cm_asb_idx[c];
      msb_fv[c] = cm_do[c] && cm_store[c];
      msb_fi[c] = cm_msb_idx[c];
    end
  end

  mcu_asb #(.DEPTH(ASB_DEPTH), .RESV(ASB_RESV)) u_asb (
    .clk, .rst_n,
    .alloc_valid(asb_av), .alloc_seq(ins_seq), .alloc_store(ins_store),
    .alloc_ready(asb_ar), .alloc_idx(asb_ai),
    .set_addr_valid(asb_sv), .set_addr_idx(asb_si), .set_addr(asb_sa),
    .srch_addr(st_addr[st_c]), .srch_lo(st_seq[st_c]),
    .srch_hi_valid(m_nxt), .srch_hi(m_nseq),
    .vio_hit(a_hit), .vio_seq(a_seq), .vio_core(a_core), .vio_idx(a_idx),
    .free_valid(asb_fv), .free_idx(asb_fi),
    .oldest_valid, .oldest_core, .oldest_seq,
    .used_by(asb_used)
  );

  mcu_msb #(.DEPTH(MSB_DEPTH), .RESV(MSB_RESV)) u_msb (
    .clk, .rst_n,
    .alloc_valid(msb_av), .alloc_seq(ins_seq), .alloc_ready(msb_ar), .alloc_idx(msb_ai),
    .set_valid(st_go), .set_idx(st_msb_idx[st_c]), .set_addr(st_addr[st_c]), .set_data(st_data[st_c]),
    .ld_addr(ld_addr[ld_c]), .ld_seq(ld_seq[ld_c]), .fwd_hit(m_fwd), .fwd_data(m_fdata),
    .st_addr(st_addr[st_c]), .st_seq(st_seq[st_c]), .nxt_valid(m_nxt), .nxt_seq(m_nseq),
    .free_valid(msb_fv), .free_idx(msb_fi), .free_addr(m_faddr), .free_data(m_fdat),
    .used_by(msb_used)
  );

  // ---------------- violation ----------------
  logic same_cyc;   // load granted this cycle falls between the store and the next one
  logic v_hit, v_core;
  seq_t v_seq;
  logic [AW-1:0] v_idx;
  always_comb begin
    same_cyc = ld_go && st_go && ld_addr[ld_c] == st_addr[st_c] && ld_seq[ld_c] > st_seq[st_c] &&
               (!m_nxt || ld_seq[ld_c] < m_nseq);
    v_hit  = st_go && (a_hit || same_cyc);
    v_core = a_core;
    v_seq  = a_seq;
    v_idx  = a_idx;
    if (same_cyc && (!a_hit || ld_seq[ld_c] < a_seq)) begin
      v_core = ld_c;
      v_seq  = ld_seq[ld_c];
      v_idx  = ld_asb_idx[ld_c];
    end
  end

  // ---------------- bypass pipeline ----------------
  typedef struct packed {
    logic          valid;
    logic          core;
    logic [AW-1:0] idx;
    logic          fwd;
    data_t         data;
  } lrsp_t;
  lrsp_t pipe [BYP_LAT];

  assign ld_rsp_valid = pipe[BYP_LAT-1].valid;
  assign ld_rsp_core  = pipe[BYP_LAT-1].core;
  assign ld_rsp_idx   = pipe[BYP_LAT-1].idx;
  assign ld_rsp_fwd   = pipe[BYP_LAT-1].fwd;
  assign ld_rsp_data  = pipe[BYP_LAT-1].data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < BYP_LAT; s++) pipe[s] <= '0;
      ld_pri    <= 1'b0;
      st_pri    <= 1'b0;
      vio_valid <= 1'b0;
      vio_core  <= 1'b0;
      vio_seq   <= '0;
      vio_idx   <= '0;
      mem_wr_valid <= 1'b0;
      mem_wr_addr  <= '0;
      mem_wr_data  <= '0;
    end else begin
      pipe[0] <= '{valid: ld_go, core: ld_c, idx: ld_asb_idx[ld_c], fwd: m_fwd, data: m_fdata};
      for (int s = 1; s < BYP_LAT; s++) pipe[s] <= pipe[s-1];
      if (ld_req_valid == 2'b11) ld_pri <= !ld_c;
      if (st_req_valid == 2'b11) st_pri <= !st_c;
      vio_valid <= v_hit;
      vio_core  <= v_core;
      vio_seq   <= v_seq;
      vio_idx   <= v_idx;
      mem_wr_valid <= 1'b0;
      for (int c = 0; c < 2; c++)
        if (cm_do[c] && cm_store[c]) begin
          mem_wr_valid <= 1'b1;
          mem_wr_addr  <= m_faddr[c];
          mem_wr_data  <= m_fdat[c];
        end
    end
  end

  // only the owner of the oldest operation commits, one operation per cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(cm_do[0] && cm_do[1]));
endmodule
