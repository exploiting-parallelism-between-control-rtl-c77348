// reg_update_mask: the rename-stage register update bitmask of one core.
//
// Each rename group of up to WIDTH instructions reports the architectural
// registers it writes. The mask collects them. When the group holds a block
// boundary (a pbr on the CT, a pjn on the WT) at slot bnd_slot, the writes of
// the slots before the boundary are added, the result is handed out on
// out_mask (with out_valid, combinationally in that cycle) and the mask
// restarts with only the writes of the slots after the boundary. The CT sends
// out_mask with its spawn request; the WT sends it with its endblock notice.
// At most one boundary per rename group (this design's restriction).
// cur_mask shows the registers written since the last boundary, before this
// cycle's group. Reset clears the mask.
// out_valid is bnd_valid passed through, for the receiver's convenience.
module reg_update_mask #(
  parameter int unsigned WIDTH     = 4,
  parameter int unsigned NUM_AREGS = cdp_pkg::NUM_AREGS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [WIDTH-1:0]              wr_valid,
  input  logic [WIDTH-1:0][$clog2(NUM_AREGS)-1:0] wr_areg,
  input  logic                          bnd_valid,
  input  logic [$clog2(WIDTH)-1:0]      bnd_slot,
  output logic                          out_valid,
  output logic [NUM_AREGS-1:0]          out_mask,
  output logic [NUM_AREGS-1:0]          cur_mask
);
  logic [NUM_AREGS-1:0] mask_q, before_bnd, after_bnd;

  always_comb begin
    before_bnd = '0;
    after_bnd  = '0;
    for (int i = 0; i < WIDTH; i++) begin
      if (wr_valid[i] && (32'(wr_areg[i]) < NUM_AREGS)) begin
        if (!bnd_valid || i < int'(bnd_slot)) before_bnd[wr_areg[i]] = 1'b1;
        else if (i > int'(bnd_slot))           after_bnd[wr_areg[i]]  = 1'b1;
      end
    end
  end

  assign out_valid = bnd_valid;
  assign out_mask  = mask_q | before_bnd;
  assign cur_mask  = mask_q;

  always_ff @(posedge clk) begin
    if (!rst_n)         mask_q <= '0;
    else if (bnd_valid) mask_q <= after_bnd;
    else                mask_q <= mask_q | before_bnd;
  end
endmodule
