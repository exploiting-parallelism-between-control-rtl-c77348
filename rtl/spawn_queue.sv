// spawn_queue: circular FIFO carrying spawn requests from the CT decode stage
// to the WT fetch stage (and, as a second instance, endblock notices from WT
// back to CT).
//
// The CT sends spawns speculatively, at decode. When a CT branch turns out
// mispredicted, the spawns sent after it must disappear: the CT core saves
// wr_ptr with each branch and hands it back on squash_valid. The write
// pointer is rolled back to that value. If the WT already dequeued some of
// the squashed spawns (the saved pointer is behind rd_ptr) the queue is
// emptied and squash_consumed tells the WT core to squash its own copies.
//
// Interface: valid/ready push and pop, first-word-fall-through (the head is
// visible on pop_data while pop_valid). Push and pop may happen in the same
// cycle; in a squash cycle nothing is pushed or popped.
// Depth 256 follows the design's spawn queue size; the rollback port is this
// design's own choice of how speculative spawns are cancelled.
module spawn_queue #(
  parameter type         T     = cdp_pkg::spawn_req_t,
  parameter int unsigned DEPTH = 256
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push_valid,
  output logic                   push_ready,
  input  T                       push_data,
  output logic                   pop_valid,
  input  logic                   pop_ready,
  output T                       pop_data,
  output logic [$clog2(DEPTH):0] wr_ptr,
  input  logic                   squash_valid,
  input  logic [$clog2(DEPTH):0] squash_ptr,
  output logic                   squash_consumed,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned PW = $clog2(DEPTH);

  T mem [DEPTH];
  logic [PW:0] rd_ptr;

  assign count      = wr_ptr - rd_ptr;
  assign push_ready = (count != (PW+1)'(DEPTH));
  assign pop_valid  = (count != '0) && !squash_valid;
  assign pop_data   = mem[rd_ptr[PW-1:0]];

  logic        do_push, do_pop;
  logic [PW:0] keep;
  assign do_push = push_valid && push_ready && !squash_valid;
  assign do_pop  = pop_valid && pop_ready;
  // entries from the read pointer up to squash_ptr survive the squash
  assign keep    = squash_ptr - rd_ptr;
  assign squash_consumed = squash_valid && (keep > count);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_pop) rd_ptr <= rd_ptr + 1'b1;
      if (squash_valid) begin
        wr_ptr <= squash_consumed ? rd_ptr : squash_ptr;
      end else if (do_push) begin
        wr_ptr <= wr_ptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr[PW-1:0]] <= push_data;
  end

  // a squash can only remove entries, never add them
  assert property (@(posedge clk) disable iff (!rst_n)
                   squash_valid |-> ((wr_ptr - squash_ptr) <= (PW+1)'(DEPTH)));
  assert property (@(posedge clk) disable iff (!rst_n) count <= (PW+1)'(DEPTH));
endmodule
