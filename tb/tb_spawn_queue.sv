// tb_spawn_queue: self-checking test of the spawn queue.
// A scoreboard queue mirrors the FIFO. Random pushes and pops, a full queue,
// and rollbacks to a saved write pointer, both partial (the squashed spawns
// are still queued) and past the read pointer (some squashed spawns were
// already taken, which must raise squash_consumed and empty the queue).
module tb_spawn_queue;
  import cdp_pkg::*;
  localparam int DEPTH = 8;
  localparam int PW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push_valid, push_ready, pop_valid, pop_ready, squash_valid, squash_consumed;
  spawn_req_t push_data, pop_data;
  logic [PW:0] wr_ptr, squash_ptr, count;

  spawn_queue #(.T(spawn_req_t), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  spawn_req_t model[$];
  int unsigned n = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic spawn_req_t mk(int unsigned k);
    spawn_req_t r;
    r.target = pc_t'(32'h1000 + k * 16);
    r.mask   = {4{27'(k * 2654435761)}};
    r.sid    = sid_t'(k);
    return r;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_valid = 0; pop_ready = 0; squash_valid = 0; squash_ptr = '0; push_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!pop_valid && push_ready && count == 0, "empty after reset");
    // fill completely
    for (int i = 0; i < DEPTH; i++) begin
      push_valid = 1; push_data = mk(n); model.push_back(mk(n)); n++;
      @(negedge clk);
    end
    push_valid = 0;
    check(!push_ready && count == DEPTH, "full");
    // random traffic
    for (int it = 0; it < 400; it++) begin
      push_valid = ($urandom % 2) == 1;
      pop_ready  = ($urandom % 3) != 0;
      push_data  = mk(n);
      #1;
      if (pop_valid) check(pop_data == model[0], "head matches");
      check(pop_valid == (model.size() != 0), "pop_valid");
      check(push_ready == (model.size() != DEPTH), "push_ready");
      @(posedge clk);
      if (pop_valid && pop_ready) void'(model.pop_front());
      if (push_valid && push_ready) begin model.push_back(mk(n)); n++; end
      @(negedge clk);
    end
    push_valid = 0; pop_ready = 0;
    // partial rollback: save pointer, push 3, squash back
    while (model.size() > 0) begin pop_ready = 1; @(posedge clk); void'(model.pop_front()); @(negedge clk); end
    pop_ready = 0;
    for (int i = 0; i < 2; i++) begin
      push_valid = 1; push_data = mk(n); model.push_back(mk(n)); n++; @(negedge clk);
    end
    push_valid = 0;
    begin
      logic [PW:0] saved;
      saved = wr_ptr;
      for (int i = 0; i < 3; i++) begin push_valid = 1; push_data = mk(n); n++; @(negedge clk); end
      push_valid = 0;
      check(count == 5, "count before squash");
      squash_valid = 1; squash_ptr = saved;
      #1 check(!squash_consumed, "partial squash not consumed");
      check(!pop_valid, "no pop during squash");
      @(negedge clk);
      squash_valid = 0;
      check(count == 2, "partial squash keeps older spawns");
      check(pop_data == model[0], "head kept");
      // rollback past the read pointer
      saved = wr_ptr;
      push_valid = 1; push_data = mk(n); model.push_back(mk(n)); n++; @(negedge clk);
      push_valid = 0;
      pop_ready = 1;
      for (int i = 0; i < 3; i++) begin @(posedge clk); void'(model.pop_front()); @(negedge clk); end
      pop_ready = 0;
      squash_valid = 1; squash_ptr = saved;
      #1 check(squash_consumed, "squash past read pointer flagged");
      @(negedge clk);
      squash_valid = 0;
      check(count == 0 && !pop_valid, "queue emptied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
