// pbr_pjn_decode: recognises the two instructions added to x86 for
// control/data parallel execution, for one decode slot.
//
//   pbr (parallel branch): 1 opcode byte + 16-bit immediate. It spawns a work
//       block at a spawn point given as an offset; the CT itself continues
//       with the next instruction, like a call whose body runs elsewhere.
//   pjn (parallel join): 1 opcode byte. It ends a work block.
//
// The opcode values are this design's choice (two one-byte x86 opcodes that
// are otherwise unused): PBR_OPC = 8'hD6, PJN_OPC = 8'hF1. The immediate is
// little-endian and sign-extended, and counts from the end of the pbr (the
// address of the next instruction), which is also this design's reading.
// Purely combinational; len gives the instruction length for pbr/pjn.
module pbr_pjn_decode #(
  parameter logic [7:0] PBR_OPC = 8'hD6,
  parameter logic [7:0] PJN_OPC = 8'hF1
) (
  input  logic           valid,
  input  cdp_pkg::pc_t   pc,
  input  logic [23:0]    bytes,     // bytes[7:0] is the byte at pc
  output logic           is_pbr,
  output logic           is_pjn,
  output logic [1:0]     len,
  output cdp_pkg::pc_t   spawn_target,
  output cdp_pkg::pc_t   next_pc
);
  import cdp_pkg::*;
  logic signed [15:0] offset;

  assign is_pbr = valid && (bytes[7:0] == PBR_OPC);
  assign is_pjn = valid && (bytes[7:0] == PJN_OPC);
  assign len    = is_pbr ? 2'd3 : 2'd1;
  assign offset = signed'(bytes[23:8]);
  assign next_pc      = pc + PC_W'(len);
  assign spawn_target = next_pc + pc_t'(PC_W'(signed'(offset)));
endmodule
