// hbtc_pkg: types and constants shared by the history-based tag-comparison
// (HBTC) instruction-cache blocks.
//
// The HBTC cache runs in one of three operation modes. In Normal mode the
// I-cache checks its tag on every access. In Omitting mode the tag array is
// not read at all, because a valid execution footprint in the BTB proves the
// instruction block being fetched is resident. In Tracing mode tags are
// checked as in Normal mode and, at the next BTB hit, the footprint of the
// block just fetched is recorded. The encoding of the modes and the 32-bit
// address width are this design's own choices.
package hbtc_pkg;

  typedef enum logic [1:0] {
    NMODE = 2'd0,   // normal: tag check on every access
    OMODE = 2'd1,   // omitting: no tag check
    TMODE = 2'd2    // tracing: tag check, footprints recorded at the next BTB hit
  } hbtc_mode_e;

  localparam int unsigned ADDR_W = 32;

  // Contents of the Previous Branch Address register: the address of the
  // branch whose BTB hit started the current Tracing-mode block, and the
  // direction predicted for it (selects flag T or flag F of that entry).
  typedef struct packed {
    logic              valid;
    logic [ADDR_W-1:0] pc;
    logic              taken;
  } pba_t;

endpackage
