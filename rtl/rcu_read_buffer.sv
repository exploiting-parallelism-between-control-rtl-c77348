// rcu_read_buffer: the buffer of pending reads of this core's register file
// on behalf of the other core (centre of the register communication unit).
//
// A request arriving from the other core names a boundary sid and an
// architectural register. On arrival it is looked up in this core's register
// map silo (lk_* ports, combinational) and parked with the physical register
// it maps to. Every cycle up to BW parked reads whose physical register is
// ready (preg_ready, from the core's scoreboard) are performed on dedicated
// register file read ports (rf_rd_*, data expected in the same cycle) and
// the values go back, registered, on rsp_valid/rsp with the requester's tag.
//
// Up to BW requests are accepted per cycle (in_ready means BW slots are
// free). Slots are allocated and serviced lowest index first; that order is
// this design's choice. DEPTH 128 and BW 2 follow the design's register
// communication queue size and bandwidth. Latency: a request whose register
// is already ready is read in the cycle after it arrives and its reply is
// driven, from a register, in the cycle after that.
// The lookup request (lk_sid, lk_areg) is the arriving request's fields
// passed straight through.
module rcu_read_buffer #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned BW    = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [BW-1:0]                 in_valid,
  input  cdp_pkg::reg_req_t [BW-1:0]    in_req,
  output logic                          in_ready,
  output cdp_pkg::sid_t  [BW-1:0]       lk_sid,
  output cdp_pkg::areg_t [BW-1:0]       lk_areg,
  input  cdp_pkg::preg_t [BW-1:0]       lk_preg,
  input  logic [BW-1:0]                 lk_hit,
  input  logic [(1<<cdp_pkg::PREG_W)-1:0] preg_ready,
  output logic [BW-1:0]                 rf_rd_valid,
  output cdp_pkg::preg_t [BW-1:0]       rf_rd_preg,
  input  cdp_pkg::data_t [BW-1:0]       rf_rd_data,
  output logic [BW-1:0]                 rsp_valid,
  output cdp_pkg::reg_rsp_t [BW-1:0]    rsp,
  output logic [$clog2(DEPTH):0]        occupancy
);
  import cdp_pkg::*;
  localparam int unsigned IW = $clog2(DEPTH);

  logic [DEPTH-1:0] used;
  logic [7:0]       tag  [DEPTH];
  preg_t            preg [DEPTH];

  // free slots for arrivals
  logic [BW-1:0][IW-1:0] fslot;
  logic [BW-1:0]         fslot_ok;
  always_comb begin
    logic [DEPTH-1:0] taken;
    taken = used;
    for (int b = 0; b < BW; b++) begin
      fslot[b] = '0;
      fslot_ok[b] = 1'b0;
      for (int i = DEPTH-1; i >= 0; i--)
        if (!taken[i]) begin fslot[b] = IW'(i); fslot_ok[b] = 1'b1; end
      if (fslot_ok[b]) taken[fslot[b]] = 1'b1;
    end
  end
  assign in_ready = &fslot_ok;

  always_comb begin
    for (int b = 0; b < BW; b++) begin
      lk_sid[b]  = in_req[b].sid;
      lk_areg[b] = in_req[b].areg;
    end
  end

  // reads whose register is ready
  logic [BW-1:0][IW-1:0] rslot;
  always_comb begin
    logic [DEPTH-1:0] cand;
    for (int i = 0; i < DEPTH; i++) cand[i] = used[i] && preg_ready[preg[i]];
    for (int b = 0; b < BW; b++) begin
      rslot[b] = '0;
      rf_rd_valid[b] = 1'b0;
      for (int i = DEPTH-1; i >= 0; i--)
        if (cand[i]) begin rslot[b] = IW'(i); rf_rd_valid[b] = 1'b1; end
      if (rf_rd_valid[b]) cand[rslot[b]] = 1'b0;
      rf_rd_preg[b] = preg[rslot[b]];
    end
  end

  always_comb begin
    occupancy = '0;
    for (int i = 0; i < DEPTH; i++) occupancy = occupancy + (IW+1)'(used[i]);
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < BW; b++)
      if (in_valid[b] && in_ready) begin
        tag[fslot[b]]  <= in_req[b].tag;
        preg[fslot[b]] <= lk_preg[b];
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      used      <= '0;
      rsp_valid <= '0;
      rsp       <= '0;
    end else begin
      for (int b = 0; b < BW; b++) begin
        rsp_valid[b] <= rf_rd_valid[b];
        rsp[b]       <= '{tag: tag[rslot[b]], data: rf_rd_data[b]};
        if (rf_rd_valid[b]) used[rslot[b]] <= 1'b0;
      end
      for (int b = 0; b < BW; b++)
        if (in_valid[b] && in_ready) used[fslot[b]] <= 1'b1;
    end
  end

  // every request must find a live checkpoint of its boundary
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_ready |-> ((in_valid & ~lk_hit) == '0));
endmodule
