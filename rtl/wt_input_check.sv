// wt_input_check: decides, after WT decode, which source registers must be
// fetched from the CT core.
//
// Each spawn carries the set of registers the CT wrote since its previous
// spawn. Those registers are stale in the WT register file. The check keeps
// a stale mask: a block start ORs in the spawn's mask; a WT write of a
// register clears it (the WT value is then the newest in program order); a
// source that is fetched remotely clears it (later readers use the newly
// allocated physical register). For each decoded instruction, in slot order,
// a source is flagged need_remote when its register is stale and no earlier
// slot of the same group wrote or fetched it. The core allocates a physical
// register for every flagged source and enqueues a request tagged with the
// current block's sid (blk_sid). The block start is applied before the
// decode group of the same cycle. Combinational flags, registered mask.
// The rule comes from the design description; the per-slot ordering is this
// design's own.
module wt_input_check #(
  parameter int unsigned WIDTH     = 4,
  parameter int unsigned NSRC      = 2,
  parameter int unsigned NUM_AREGS = cdp_pkg::NUM_AREGS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      blk_start_valid,
  input  logic [NUM_AREGS-1:0]      blk_mask,
  input  logic [WIDTH-1:0]          dec_valid,
  input  logic [WIDTH-1:0][NSRC-1:0] src_valid,
  input  logic [WIDTH-1:0][NSRC-1:0][$clog2(NUM_AREGS)-1:0] src_areg,
  input  logic [WIDTH-1:0]          dst_valid,
  input  logic [WIDTH-1:0][$clog2(NUM_AREGS)-1:0] dst_areg,
  output logic [WIDTH-1:0][NSRC-1:0] need_remote,
  output logic [NUM_AREGS-1:0]      stale_mask
);
  logic [NUM_AREGS-1:0] stale_q, stale_d;

  always_comb begin
    stale_d = stale_q | (blk_start_valid ? blk_mask : '0);
    need_remote = '0;
    for (int i = 0; i < WIDTH; i++) begin
      if (dec_valid[i]) begin
        for (int s = 0; s < NSRC; s++) begin
          if (src_valid[i][s] && (32'(src_areg[i][s]) < NUM_AREGS) && stale_d[src_areg[i][s]]) begin
            need_remote[i][s]     = 1'b1;
            stale_d[src_areg[i][s]] = 1'b0;
          end
        end
        if (dst_valid[i] && (32'(dst_areg[i]) < NUM_AREGS)) stale_d[dst_areg[i]] = 1'b0;
      end
    end
  end

  assign stale_mask = stale_q;

  always_ff @(posedge clk) begin
    if (!rst_n) stale_q <= '0;
    else        stale_q <= stale_d;
  end
endmodule
