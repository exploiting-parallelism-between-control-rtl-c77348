// reg_map_silo: register map silo of one core's register communication unit.
//
// At every block boundary still in the machine (a pbr on the CT, a pjn on
// the WT) the silo holds a copy of the core's architectural-to-physical
// register map as it stood at that boundary. A register request from the
// other core names a boundary (sid) and an architectural register; the silo
// returns the physical register that holds the value the requester must see.
//
// Checkpoint: ckpt_valid copies the whole map (ckpt_map) into the slot
// sid mod DEPTH. Release: rel_valid frees the slot of rel_sid once the block
// has retired on the other core. Lookup: NLK combinational ports, lk_hit is
// low when no live checkpoint for lk_sid exists. A checkpoint written in a
// cycle is visible to lookups from the next cycle.
// A sid handed out again after a CT squash simply overwrites its squashed
// checkpoint. Full-map copies per boundary are this design's choice. DEPTH
// defaults to 512: every spawn still in the 256-entry spawn queue plus every
// block in the WT core's 256-instruction window may hold a checkpoint.
module reg_map_silo #(
  parameter int unsigned DEPTH     = 512,
  parameter int unsigned NLK       = 2,
  parameter int unsigned NUM_AREGS = cdp_pkg::NUM_AREGS
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               ckpt_valid,
  input  cdp_pkg::sid_t                      ckpt_sid,
  input  cdp_pkg::preg_t [NUM_AREGS-1:0]     ckpt_map,
  input  logic                               rel_valid,
  input  cdp_pkg::sid_t                      rel_sid,
  input  cdp_pkg::sid_t [NLK-1:0]            lk_sid,
  input  cdp_pkg::areg_t [NLK-1:0]           lk_areg,
  output cdp_pkg::preg_t [NLK-1:0]           lk_preg,
  output logic [NLK-1:0]                     lk_hit
);
  import cdp_pkg::*;
  localparam int unsigned IW = $clog2(DEPTH);

  preg_t [NUM_AREGS-1:0] maps [DEPTH];
  sid_t                  tags [DEPTH];
  logic [DEPTH-1:0]      live;

  always_ff @(posedge clk) begin
    if (ckpt_valid) begin
      maps[ckpt_sid[IW-1:0]] <= ckpt_map;
      tags[ckpt_sid[IW-1:0]] <= ckpt_sid;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) live <= '0;
    else begin
      if (rel_valid && tags[rel_sid[IW-1:0]] == rel_sid) live[rel_sid[IW-1:0]] <= 1'b0;
      if (ckpt_valid) live[ckpt_sid[IW-1:0]] <= 1'b1;
    end
  end

  always_comb begin
    for (int p = 0; p < NLK; p++) begin
      lk_hit[p]  = live[lk_sid[p][IW-1:0]] && (tags[lk_sid[p][IW-1:0]] == lk_sid[p])
                   && (32'(lk_areg[p]) < NUM_AREGS);
      lk_preg[p] = maps[lk_sid[p][IW-1:0]][lk_areg[p]];
    end
  end

  // a checkpoint may not overwrite a live one of another boundary (a sid
  // given again after a squash overwrites its own squashed checkpoint)
  assert property (@(posedge clk) disable iff (!rst_n)
                   ckpt_valid |-> !live[ckpt_sid[IW-1:0]] || tags[ckpt_sid[IW-1:0]] == ckpt_sid ||
                                  (rel_valid && rel_sid == tags[ckpt_sid[IW-1:0]]));
endmodule
