// cdp_pkg: types and sizes shared by the control/data parallel add-on hardware.
//
// The machine pairs a control-thread (CT) core with a work-thread (WT) core.
// The CT spawns work blocks with a pbr instruction; a WT block ends with pjn.
// Every pbr gets a spawn id (sid) in program order; the WT block it starts
// and the pjn ending that block carry the same sid, so one counter names
// every boundary on both cores.
//
// Sizes that follow the design description: a 108-bit register update mask
// (x86 partial registers, flags and microcode temporaries), a 16-bit pbr
// offset, 256 spawn queue entries, 128 pending reads per core, 320 ASB and
// 160 MSB entries. Widths of data, addresses, physical register tags, sids
// and sequence numbers are this design's own choice.
package cdp_pkg;

  localparam int unsigned NUM_AREGS = 108;  // architectural registers in the update mask
  localparam int unsigned AREG_W    = 7;    // ceil(log2(108))
  localparam int unsigned PREG_W    = 8;    // physical register tag (256 physical registers)
  localparam int unsigned DATA_W    = 32;   // register / memory value
  localparam int unsigned ADDR_W    = 32;   // memory address
  localparam int unsigned PC_W      = 32;   // fetch address
  localparam int unsigned SID_W     = 16;   // spawn / boundary id, wraps
  localparam int unsigned SEQ_W     = 32;   // logical memory-operation order

  typedef logic [NUM_AREGS-1:0] regmask_t;
  typedef logic [AREG_W-1:0]    areg_t;
  typedef logic [PREG_W-1:0]    preg_t;
  typedef logic [DATA_W-1:0]    data_t;
  typedef logic [ADDR_W-1:0]    addr_t;
  typedef logic [PC_W-1:0]      pc_t;
  typedef logic [SID_W-1:0]     sid_t;
  typedef logic [SEQ_W-1:0]     seq_t;

  typedef enum logic {CORE_CT = 1'b0, CORE_WT = 1'b1} core_e;

  // CT decode -> WT fetch: a spawn request (Sec. "Instruction fetch").
  typedef struct packed {
    pc_t      target;   // spawn point
    regmask_t mask;     // registers the CT wrote since its previous pbr
    sid_t     sid;
  } spawn_req_t;

  // WT decode -> CT: end of a work block.
  typedef struct packed {
    regmask_t mask;     // registers the WT block wrote
    sid_t     sid;      // spawn that started the block
  } endblock_t;

  // Register request crossing between the two RCUs.
  typedef struct packed {
    logic [7:0] tag;    // requester's buffer slot, returned with the value
    sid_t       sid;    // boundary preceding the requesting instruction
    areg_t      areg;   // architectural register wanted
  } reg_req_t;

  typedef struct packed {
    logic [7:0] tag;
    data_t      data;
  } reg_rsp_t;

  // "a > b" for wrapping sids: true when a is later than b.
  function automatic logic sid_after(sid_t a, sid_t b);
    sid_t d;
    d = a - b;
    return (d != '0) && !d[SID_W-1];
  endfunction

endpackage
