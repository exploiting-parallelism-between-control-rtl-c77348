// rcu_req_buffer: the buffer of pending register requests that originate on
// this core (left and right columns of the register communication unit).
//
// When rename finds that a source register must come from the other core, it
// allocates a physical register and pushes {sid, areg, preg} here. The buffer
// sends the requests, oldest first, up to BW per cycle, tagging each with its
// slot number. Replies come back in any order, up to BW per cycle; a reply's
// tag selects the slot, the value is written into the local register file at
// that slot's physical register (rf_wr_*), which wakes up the waiting
// instructions, and the slot is freed.
//
// Organisation (this design's choice): a circular buffer. Up to NPUSH
// requests enter at the tail per cycle (push_ready means NPUSH slots are
// free); a send pointer walks from head to tail; slots free out of order and
// the head skips over freed slots, up to BW per cycle.
// BW = 2 follows the design's register communication bandwidth.
// rf_wr_data is the reply data passed straight through. The slot pointers
// carry one wrap bit; a slot index uses only the bits below it.
module rcu_req_buffer #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned NPUSH = 8,
  parameter int unsigned BW    = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NPUSH-1:0]              push_valid,
  input  cdp_pkg::sid_t  [NPUSH-1:0]    push_sid,
  input  cdp_pkg::areg_t [NPUSH-1:0]    push_areg,
  input  cdp_pkg::preg_t [NPUSH-1:0]    push_preg,
  output logic                          push_ready,
  output logic [BW-1:0]                 req_valid,
  output cdp_pkg::reg_req_t [BW-1:0]    req,
  input  logic                          req_ready,   // the link takes all offered requests
  input  logic [BW-1:0]                 rsp_valid,
  input  cdp_pkg::reg_rsp_t [BW-1:0]    rsp,
  output logic [BW-1:0]                 rf_wr_valid,
  output cdp_pkg::preg_t [BW-1:0]       rf_wr_preg,
  output cdp_pkg::data_t [BW-1:0]       rf_wr_data,
  output logic [$clog2(DEPTH):0]        occupancy
);
  import cdp_pkg::*;
  localparam int unsigned PW = $clog2(DEPTH);

  typedef struct packed {
    sid_t  sid;
    areg_t areg;
    preg_t preg;
  } entry_t;

  entry_t         ent  [DEPTH];
  logic [DEPTH-1:0] busy;
  logic [PW:0]    head, send, tail;

  assign occupancy  = tail - head;
  assign push_ready = (32'(occupancy) + NPUSH) <= DEPTH;

  // sending
  logic [PW:0] unsent;
  assign unsent = tail - send;
  always_comb begin
    for (int b = 0; b < BW; b++) begin
      logic [PW:0] p;
      p = send + (PW+1)'(b);
      req_valid[b]    = (32'(unsent) > b);
      req[b].tag      = 8'(p[PW-1:0]);
      req[b].sid      = ent[p[PW-1:0]].sid;
      req[b].areg     = ent[p[PW-1:0]].areg;
    end
  end

  // replies
  always_comb begin
    for (int b = 0; b < BW; b++) begin
      rf_wr_valid[b] = rsp_valid[b] && busy[rsp[b].tag[PW-1:0]];
      rf_wr_preg[b]  = ent[rsp[b].tag[PW-1:0]].preg;
      rf_wr_data[b]  = rsp[b].data;
    end
  end

  // head advance over freed slots (after this cycle's frees)
  logic [DEPTH-1:0] busy_n;
  logic [PW:0]      head_n;
  always_comb begin
    busy_n = busy;
    for (int b = 0; b < BW; b++)
      if (rf_wr_valid[b]) busy_n[rsp[b].tag[PW-1:0]] = 1'b0;
    head_n = head;
    for (int b = 0; b < BW; b++)
      if (head_n != send && !busy_n[head_n[PW-1:0]]) head_n = head_n + 1'b1;
  end

  logic [PW:0] tail_n;
  always_comb begin
    tail_n = tail;
    if (push_ready)
      for (int i = 0; i < NPUSH; i++)
        if (push_valid[i]) tail_n = tail_n + 1'b1;
  end

  always_ff @(posedge clk) begin
    logic [PW:0] t;
    t = tail;
    if (push_ready)
      for (int i = 0; i < NPUSH; i++)
        if (push_valid[i]) begin
          ent[t[PW-1:0]] <= '{sid: push_sid[i], areg: push_areg[i], preg: push_preg[i]};
          t = t + 1'b1;
        end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= '0;
      head <= '0;
      send <= '0;
      tail <= '0;
    end else begin
      logic [PW:0] t;
      busy <= busy_n;
      t = tail;
      if (push_ready)
        for (int i = 0; i < NPUSH; i++)
          if (push_valid[i]) begin
            busy[t[PW-1:0]] <= 1'b1;
            t = t + 1'b1;
          end
      tail <= tail_n;
      head <= head_n;
      if (req_ready) send <= send + (PW+1)'((32'(unsent) < BW) ? 32'(unsent) : BW);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (tail - head) <= (PW+1)'(DEPTH));
  // a reply must match a request that was sent and is still pending
  assert property (@(posedge clk) disable iff (!rst_n)
                   rsp_valid[0] |-> busy[rsp[0].tag[PW-1:0]]);
endmodule
