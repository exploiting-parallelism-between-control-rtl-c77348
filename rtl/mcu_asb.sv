// mcu_asb: access state buffer of the memory communication unit.
//
// One entry per memory operation in flight on either core: issuing core,
// logical sequence number, whether it is a store, and the address once it is
// generated. It is searched by address like a CAM.
//  * Allocation: each core may allocate one entry per cycle (core 0 takes the
//    lowest free slot, core 1 the highest, and core 1 only while two slots
//    are free). RESV entries are reserved for each core, the remaining
//    DEPTH - 2*RESV are shared: a core beyond its reservation may only use a
//    shared slot. Core 1's check counts a shared slot for core 0 whenever core
//    0 is past its reservation, so the two grants never depend on each other.
//  * Address: set_addr_* records a generated address.
//  * Violation search (combinational): for a store with sequence number
//    srch_lo and address srch_addr, find loads with that address whose
//    sequence number lies above srch_lo and, if srch_hi_valid, below
//    srch_hi. Such a load read its value too early. The oldest one is
//    reported (vio_*), so that replay can start at the right place.
//  * Commit order: oldest_core names the core of the oldest entry; only that
//    core may commit a memory operation. free_* releases committed entries.
// Sizes follow the design (320 entries, 128 reserved per core); the
// allocation order and the single oldest-entry search are this design's.
module mcu_asb #(
  parameter int unsigned DEPTH = 320,
  parameter int unsigned RESV  = 128
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [1:0]                        alloc_valid,
  input  cdp_pkg::seq_t [1:0]               alloc_seq,
  input  logic [1:0]                        alloc_store,
  output logic [1:0]                        alloc_ready,
  output logic [1:0][$clog2(DEPTH)-1:0]     alloc_idx,
  input  logic [1:0]                        set_addr_valid,
  input  logic [1:0][$clog2(DEPTH)-1:0]     set_addr_idx,
  input  cdp_pkg::addr_t [1:0]              set_addr,
  input  cdp_pkg::addr_t                    srch_addr,
  input  cdp_pkg::seq_t                     srch_lo,
  input  logic                              srch_hi_valid,
  input  cdp_pkg::seq_t                     srch_hi,
  output logic                              vio_hit,
  output cdp_pkg::seq_t                     vio_seq,
  output logic                              vio_core,
  output logic [$clog2(DEPTH)-1:0]          vio_idx,
  input  logic [1:0]                        free_valid,
  input  logic [1:0][$clog2(DEPTH)-1:0]     free_idx,
  output logic                              oldest_valid,
  output logic                              oldest_core,
  output cdp_pkg::seq_t                     oldest_seq,
  output logic [1:0][$clog2(DEPTH+1)-1:0]   used_by
);
  import cdp_pkg::*;
  localparam int unsigned IW     = $clog2(DEPTH);
  localparam int unsigned SHARED = DEPTH - 2*RESV;

  typedef struct packed {
    logic  core;
    logic  store;
    logic  addr_ok;
    seq_t  seq;
    addr_t addr;
  } asb_t;

  logic [DEPTH-1:0] valid;
  asb_t             ent [DEPTH];

  // occupancy per core and reservation rule
  always_comb begin
    used_by = '0;
    for (int i = 0; i < DEPTH; i++)
      if (valid[i]) used_by[ent[i].core] = used_by[ent[i].core] + 1'b1;
  end

  logic [1:0] may;
  always_comb begin
    int over0, over1;
    over0 = (32'(used_by[0]) > RESV) ? 32'(used_by[0]) - RESV : 0;
    over1 = (32'(used_by[1]) > RESV) ? 32'(used_by[1]) - RESV : 0;
    may[0] = (32'(used_by[0]) < RESV) || (over0 + over1 < SHARED);
    may[1] = (32'(used_by[1]) < RESV) || (over0 + over1 + ((32'(used_by[0]) >= RESV) ? 1 : 0) < SHARED);
  end

  logic [1:0] found;
  always_comb begin
    found = '0;
    alloc_idx = '0;
    for (int i = DEPTH-1; i >= 0; i--)
      if (!valid[i]) begin found[0] = 1'b1; alloc_idx[0] = IW'(i); end
    for (int i = 0; i < DEPTH; i++)
      if (!valid[i] && IW'(i) != alloc_idx[0]) begin
        found[1] = 1'b1; alloc_idx[1] = IW'(i);
      end
    alloc_ready[0] = found[0] && may[0];
    alloc_ready[1] = found[1] && may[1];
  end

  // violation search: oldest load in (srch_lo, srch_hi) at srch_addr
  always_comb begin
    vio_hit  = 1'b0;
    vio_seq  = '0;
    vio_core = 1'b0;
    vio_idx  = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (valid[i] && !ent[i].store && ent[i].addr_ok && ent[i].addr == srch_addr &&
          ent[i].seq > srch_lo && (!srch_hi_valid || ent[i].seq < srch_hi) &&
          (!vio_hit || ent[i].seq < vio_seq)) begin
        vio_hit  = 1'b1;
        vio_seq  = ent[i].seq;
        vio_core = ent[i].core;
        vio_idx  = IW'(i);
      end
    end
  end

  // oldest operation in flight
  always_comb begin
    oldest_valid = 1'b0;
    oldest_core  = 1'b0;
    oldest_seq   = '0;
    for (int i = 0; i < DEPTH; i++)
      if (valid[i] && (!oldest_valid || ent[i].seq < oldest_seq)) begin
        oldest_valid = 1'b1;
        oldest_core  = ent[i].core;
        oldest_seq   = ent[i].seq;
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) valid <= '0;
    else begin
      for (int f = 0; f < 2; f++) if (free_valid[f]) valid[free_idx[f]] <= 1'b0;
      for (int c = 0; c < 2; c++) if (alloc_valid[c] && alloc_ready[c]) valid[alloc_idx[c]] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int u = 0; u < 2; u++)
      if (set_addr_valid[u]) begin
        ent[set_addr_idx[u]].addr    <= set_addr[u];
        ent[set_addr_idx[u]].addr_ok <= 1'b1;
      end
    for (int c = 0; c < 2; c++)
      if (alloc_valid[c] && alloc_ready[c])
        ent[alloc_idx[c]] <= '{core: 1'(c), store: alloc_store[c], addr_ok: 1'b0,
                               seq: alloc_seq[c], addr: '0};
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   !(alloc_valid[0] && alloc_ready[0] && alloc_valid[1] && alloc_ready[1] &&
                     alloc_idx[0] == alloc_idx[1]));
endmodule
