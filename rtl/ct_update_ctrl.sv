// ct_update_ctrl: brings registers written by the WT into the CT register
// file.
//
// Each WT block ends with an endblock notice {mask, sid}: the registers the
// block wrote. The CT must read all of them from the WT. To keep
// cross-core traffic low the notices of several blocks are gathered first
// (BATCH blocks, or fewer when flush is raised): for each register only the
// latest block that wrote it is kept, so a register written by several
// blocks is fetched once. The batch is then drained as register requests
// {sid, areg}, up to BW per cycle, lowest register first; the core allocates
// a physical register for each and pushes it into its RCU (up_ready means
// all offered requests were taken). No notice is accepted while draining.
// Gathering per register and BATCH = 4 are this design's choices; the
// document says only that the updates are queued for several blocks.
module ct_update_ctrl #(
  parameter int unsigned BATCH     = 4,
  parameter int unsigned BW        = 2,
  parameter int unsigned NUM_AREGS = cdp_pkg::NUM_AREGS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   eb_valid,
  input  cdp_pkg::endblock_t     eb,
  output logic                   eb_pop,
  input  logic                   flush,
  output logic [BW-1:0]          up_valid,
  output cdp_pkg::sid_t  [BW-1:0] up_sid,
  output cdp_pkg::areg_t [BW-1:0] up_areg,
  input  logic                   up_ready,
  output logic                   draining
);
  import cdp_pkg::*;

  logic [NUM_AREGS-1:0] pend;
  sid_t                 last_sid [NUM_AREGS];
  logic [$clog2(BATCH+1)-1:0] nblk;
  logic [NUM_AREGS-1:0] taken;

  assign eb_pop = eb_valid && !draining;

  always_comb begin
    logic [NUM_AREGS-1:0] cand;
    cand = pend;
    for (int b = 0; b < BW; b++) begin
      up_valid[b] = 1'b0;
      up_areg[b]  = '0;
      for (int r = NUM_AREGS-1; r >= 0; r--)
        if (cand[r]) begin up_valid[b] = 1'b1; up_areg[b] = areg_t'(r); end
      if (up_valid[b]) cand[up_areg[b]] = 1'b0;
      up_sid[b] = last_sid[up_areg[b]];
    end
    if (!draining) up_valid = '0;
    taken = '0;
    for (int b = 0; b < BW; b++)
      if (up_valid[b]) taken[up_areg[b]] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (eb_pop)
      for (int r = 0; r < NUM_AREGS; r++)
        if (eb.mask[r]) last_sid[r] <= eb.sid;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend     <= '0;
      nblk     <= '0;
      draining <= 1'b0;
    end else if (draining) begin
      if (up_ready)
        pend <= pend & ~taken;
      // batch done when nothing is left after this cycle's transfers
      if ((pend & ~(up_ready ? taken : '0)) == '0) begin
        draining <= 1'b0;
        nblk     <= '0;
      end
    end else begin
      if (eb_pop) begin
        pend <= pend | eb.mask;
        nblk <= nblk + 1'b1;
      end
      if ((eb_pop && 32'(nblk) + 1 >= BATCH) || (flush && (nblk != '0 || eb_pop)))
        draining <= 1'b1;
    end
  end
endmodule
