// rcu: register communication unit of one core. Both cores have one; the
// two are wired back to back.
//
// It holds the core's register map silo, the buffer of register requests
// this core sends (rcu_req_buffer) and the buffer of reads the other core
// asks of this core's register file (rcu_read_buffer).
//   * Boundaries: ckpt_* snapshots the rename map at each pbr/pjn, rel_*
//     frees the snapshot when the other core has retired past it.
//   * Outgoing: rename pushes {sid, areg, preg} (push_*); the request goes
//     over link_req_*, the value returns on link_rsp_in_*, and is written to
//     the register file on rf_wr_*.
//   * Incoming: link_req_in_* requests are looked up in the silo, wait for
//     their physical register (preg_ready), are read on rf_rd_*, and return on
//     link_rsp_*.
// Timing: a request leaving the request buffer in cycle t is parked in the
// remote read buffer at the end of t, read in t+1 if its register is ready,
// and its value reaches the local register file write port in t+2: the
// minimum register communication latency of 2 cycles. BW = 2 transfers per
// cycle each way. The composition follows the design's register
// communication unit; the link handshake (the remote read buffer takes all
// offered requests or none) is this design's own.
module rcu #(
  parameter int unsigned SILO_DEPTH = 512,
  parameter int unsigned REQ_DEPTH  = 128,
  parameter int unsigned RD_DEPTH   = 128,
  parameter int unsigned NPUSH      = 8,
  parameter int unsigned BW         = 2
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            ckpt_valid,
  input  cdp_pkg::sid_t                   ckpt_sid,
  input  cdp_pkg::preg_t [cdp_pkg::NUM_AREGS-1:0] ckpt_map,
  input  logic                            rel_valid,
  input  cdp_pkg::sid_t                   rel_sid,
  input  logic [NPUSH-1:0]                push_valid,
  input  cdp_pkg::sid_t  [NPUSH-1:0]      push_sid,
  input  cdp_pkg::areg_t [NPUSH-1:0]      push_areg,
  input  cdp_pkg::preg_t [NPUSH-1:0]      push_preg,
  output logic                            push_ready,
  output logic [BW-1:0]                   rf_wr_valid,
  output cdp_pkg::preg_t [BW-1:0]         rf_wr_preg,
  output cdp_pkg::data_t [BW-1:0]         rf_wr_data,
  input  logic [(1<<cdp_pkg::PREG_W)-1:0] preg_ready,
  output logic [BW-1:0]                   rf_rd_valid,
  output cdp_pkg::preg_t [BW-1:0]         rf_rd_preg,
  input  cdp_pkg::data_t [BW-1:0]         rf_rd_data,
  output logic [BW-1:0]                   link_req_valid,
  output cdp_pkg::reg_req_t [BW-1:0]      link_req,
  input  logic                            link_req_ready,
  input  logic [BW-1:0]                   link_req_in_valid,
  input  cdp_pkg::reg_req_t [BW-1:0]      link_req_in,
  output logic                            link_req_in_ready,
  output logic [BW-1:0]                   link_rsp_valid,
  output cdp_pkg::reg_rsp_t [BW-1:0]      link_rsp,
  input  logic [BW-1:0]                   link_rsp_in_valid,
  input  cdp_pkg::reg_rsp_t [BW-1:0]      link_rsp_in,
  output logic [$clog2(REQ_DEPTH):0]      pending_requests,
  output logic [$clog2(RD_DEPTH):0]       pending_reads
);
  import cdp_pkg::*;

  logic [BW-1:0]       rb_req_valid;
  reg_req_t [BW-1:0]   rb_req;
  logic                rb_req_ready;
  sid_t  [BW-1:0]      lk_sid;
  areg_t [BW-1:0]      lk_areg;
  preg_t [BW-1:0]      lk_preg;
  logic  [BW-1:0]      lk_hit;

  rcu_req_buffer #(.DEPTH(REQ_DEPTH), .NPUSH(NPUSH), .BW(BW)) u_req (
    .clk, .rst_n,
    .push_valid, .push_sid, .push_areg, .push_preg, .push_ready,
    .req_valid(rb_req_valid), .req(rb_req), .req_ready(rb_req_ready),
    .rsp_valid(link_rsp_in_valid), .rsp(link_rsp_in),
    .rf_wr_valid, .rf_wr_preg, .rf_wr_data,
    .occupancy(pending_requests)
  );

  // outgoing requests go straight to the other core's read buffer, which
  // takes all of them or none
  assign link_req_valid = rb_req_valid;
  assign link_req       = rb_req;
  assign rb_req_ready   = link_req_ready;

  reg_map_silo #(.DEPTH(SILO_DEPTH), .NLK(BW)) u_silo (
    .clk, .rst_n,
    .ckpt_valid, .ckpt_sid, .ckpt_map,
    .rel_valid, .rel_sid,
    .lk_sid, .lk_areg, .lk_preg, .lk_hit
  );

  rcu_read_buffer #(.DEPTH(RD_DEPTH), .BW(BW)) u_rd (
    .clk, .rst_n,
    .in_valid(link_req_in_valid), .in_req(link_req_in), .in_ready(link_req_in_ready),
    .lk_sid, .lk_areg, .lk_preg, .lk_hit,
    .preg_ready,
    .rf_rd_valid, .rf_rd_preg, .rf_rd_data,
    .rsp_valid(link_rsp_valid), .rsp(link_rsp),
    .occupancy(pending_reads)
  );
endmodule
