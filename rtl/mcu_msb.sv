// mcu_msb: modify state buffer of the memory communication unit.
//
// One entry per store in flight on either core: issuing core, logical
// sequence number, and address and data once both are known. Searched by
// address like a CAM.
//  * Allocation: as in the access state buffer, one per core per cycle (core
//    0 lowest free slot, core 1 highest, core 1 only while two are free),
//    RESV entries reserved per core, the rest shared.
//  * set_*: the store's address and data are known.
//  * Load search (combinational): among known stores to ld_addr that are
//    older than ld_seq, the youngest one supplies its data (fwd_hit/fwd_data).
//  * Store search (combinational): among other known stores to st_addr, the
//    one with the smallest sequence number above st_seq (nxt_*). Loads
//    between the two stores are the only ones the new store can have
//    affected.
//  * free_*: a committed store leaves the buffer; its data go to the cache.
// Sizes follow the design (160 entries, 32 reserved per core).
module mcu_msb #(
  parameter int unsigned DEPTH = 160,
  parameter int unsigned RESV  = 32
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [1:0]                        alloc_valid,
  input  cdp_pkg::seq_t [1:0]               alloc_seq,
  output logic [1:0]                        alloc_ready,
  output logic [1:0][$clog2(DEPTH)-1:0]     alloc_idx,
  input  logic                              set_valid,
  input  logic [$clog2(DEPTH)-1:0]          set_idx,
  input  cdp_pkg::addr_t                    set_addr,
  input  cdp_pkg::data_t                    set_data,
  input  cdp_pkg::addr_t                    ld_addr,
  input  cdp_pkg::seq_t                     ld_seq,
  output logic                              fwd_hit,
  output cdp_pkg::data_t                    fwd_data,
  input  cdp_pkg::addr_t                    st_addr,
  input  cdp_pkg::seq_t                     st_seq,
  output logic                              nxt_valid,
  output cdp_pkg::seq_t                     nxt_seq,
  input  logic [1:0]                        free_valid,
  input  logic [1:0][$clog2(DEPTH)-1:0]     free_idx,
  output cdp_pkg::addr_t [1:0]              free_addr,
  output cdp_pkg::data_t [1:0]              free_data,
  output logic [1:0][$clog2(DEPTH+1)-1:0]   used_by
);
  import cdp_pkg::*;
  localparam int unsigned IW     = $clog2(DEPTH);
  localparam int unsigned SHARED = DEPTH - 2*RESV;

  typedef struct packed {
    logic  core;
    logic  known;
    seq_t  seq;
    addr_t addr;
    data_t data;
  } msb_t;

  logic [DEPTH-1:0] valid;
  msb_t             ent [DEPTH];

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

  // youngest older store to the load's address
  always_comb begin
    seq_t best;
    fwd_hit  = 1'b0;
    fwd_data = '0;
    best     = '0;
    for (int i = 0; i < DEPTH; i++)
      if (valid[i] && ent[i].known && ent[i].addr == ld_addr && ent[i].seq < ld_seq &&
          (!fwd_hit || ent[i].seq > best)) begin
        fwd_hit  = 1'b1;
        fwd_data = ent[i].data;
        best     = ent[i].seq;
      end
  end

  // next younger store to the store's address
  always_comb begin
    nxt_valid = 1'b0;
    nxt_seq   = '0;
    for (int i = 0; i < DEPTH; i++)
      if (valid[i] && ent[i].known && ent[i].addr == st_addr && ent[i].seq > st_seq &&
          (!nxt_valid || ent[i].seq < nxt_seq)) begin
        nxt_valid = 1'b1;
        nxt_seq   = ent[i].seq;
      end
  end

  always_comb begin
    for (int f = 0; f < 2; f++) begin
      free_addr[f] = ent[free_idx[f]].addr;
      free_data[f] = ent[free_idx[f]].data;
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
    if (set_valid) begin
      ent[set_idx].addr  <= set_addr;
      ent[set_idx].data  <= set_data;
      ent[set_idx].known <= 1'b1;
    end
    for (int c = 0; c < 2; c++)
      if (alloc_valid[c] && alloc_ready[c])
        ent[alloc_idx[c]] <= '{core: 1'(c), known: 1'b0, seq: alloc_seq[c], addr: '0, data: '0};
  end
endmodule
