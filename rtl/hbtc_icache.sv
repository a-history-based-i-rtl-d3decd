// hbtc_icache: history-based tag-comparison (HBTC) instruction cache.
//
// A direct-mapped I-cache whose tag checks are skipped when the fetched
// instruction block is known to be resident. Residency is learned from the
// program's own history: the BTB carries, for each branch, a footprint flag
// for the block at its target (T) and one for the block at its fall-through
// address (F). A block ends at the next branch registered in the BTB. A flag
// is set once every instruction of its block has been fetched with tag checks
// and no cache miss, and all flags are cleared by any cache miss or BTB
// replacement. While the flag chosen at the last BTB hit is set the cache is
// in Omitting mode and the tag array is not read.
//
// Four parts, as the HBTC scheme organises them: the I-cache (dm_icache), the
// extended BTB (hbtc_btb), the Previous Branch Address register (pba_reg,
// inside the controller) and the mode controller (hbtc_mode_ctrl).
//
// Fetch interface: the processor presents fetch_pc with fetch_valid and holds
// it until fetch_ready. In the same cycle it gets the instruction word, the
// BTB result (btb_hit, btb_target) and must return the direction prediction
// (pred_taken) and whether the target comes from its return address stack
// (ras_used); these are sampled only when the fetch completes. mispredict may
// pulse in any cycle. Taken branches are registered with upd_*. The next
// level of memory is reached through mem_* (see dm_icache). fetch_ready is low
// during a refill and during the controller's BTB-port cycles (one per
// footprint write, INV_PENALTY per footprint clear). The remaining outputs
// expose the mode, the PBA register and per-cycle activity for energy
// accounting.
module hbtc_icache
  import hbtc_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned LINE_BYTES  = 32,
  parameter int unsigned SUBBANKS    = 4,
  parameter int unsigned BTB_SETS    = 512,
  parameter int unsigned BTB_WAYS    = 4,
  parameter int unsigned INST_BYTES  = LINE_BYTES / SUBBANKS,
  parameter int unsigned INV_PENALTY = 1,
  localparam int unsigned WORD_W     = LINE_BYTES / SUBBANKS * 8,
  localparam int unsigned LINE_W     = LINE_BYTES * 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // fetch
  input  logic                fetch_valid,
  input  logic [ADDR_W-1:0]   fetch_pc,
  output logic                fetch_ready,
  output logic [WORD_W-1:0]   fetch_data,
  // branch prediction
  output logic                btb_hit,
  output logic [ADDR_W-1:0]   btb_target,
  input  logic                pred_taken,
  input  logic                ras_used,
  input  logic                mispredict,
  // BTB registration
  input  logic                upd_en,
  input  logic [ADDR_W-1:0]   upd_pc,
  input  logic [ADDR_W-1:0]   upd_target,
  // next-level memory
  output logic                mem_req,
  output logic [ADDR_W-1:0]   mem_addr,
  input  logic                mem_rvalid,
  input  logic [LINE_W-1:0]   mem_rdata,
  // observation
  output hbtc_mode_e          mode,
  output logic                tag_rd,
  output logic [SUBBANKS-1:0] bank_en,
  output logic                cache_miss,
  output logic                refill_busy,
  output logic                btb_replaced,
  output logic                fp_write,
  output logic                fp_clear,
  output logic                ctrl_stall,
  output pba_t                pba
);

  logic              omit_tag, fire, flag_t, flag_f;
  logic              fp_set_en, fp_set_taken;
  logic [ADDR_W-1:0] fp_set_pc;

  assign fire = fetch_valid && fetch_ready;

  dm_icache #(
    .ADDR_W      (ADDR_W),
    .CACHE_BYTES (CACHE_BYTES),
    .LINE_BYTES  (LINE_BYTES),
    .SUBBANKS    (SUBBANKS)
  ) u_cache (
    .clk        (clk),
    .rst_n      (rst_n),
    .req_valid  (fetch_valid && !ctrl_stall),
    .req_addr   (fetch_pc),
    .omit_tag   (omit_tag),
    .resp_ready (fetch_ready),
    .resp_data  (fetch_data),
    .miss       (cache_miss),
    .busy       (refill_busy),
    .tag_rd     (tag_rd),
    .bank_en    (bank_en),
    .mem_req    (mem_req),
    .mem_addr   (mem_addr),
    .mem_rvalid (mem_rvalid),
    .mem_rdata  (mem_rdata)
  );

  hbtc_btb #(
    .ADDR_W     (ADDR_W),
    .SETS       (BTB_SETS),
    .WAYS       (BTB_WAYS),
    .INST_BYTES (INST_BYTES)
  ) u_btb (
    .clk           (clk),
    .rst_n         (rst_n),
    .lookup_en     (fetch_valid && !ctrl_stall),
    .lookup_pc     (fetch_pc),
    .lookup_hit    (btb_hit),
    .lookup_target (btb_target),
    .lookup_t      (flag_t),
    .lookup_f      (flag_f),
    .upd_en        (upd_en),
    .upd_pc        (upd_pc),
    .upd_target    (upd_target),
    .replaced      (btb_replaced),
    .fp_set_en     (fp_set_en),
    .fp_set_pc     (fp_set_pc),
    .fp_set_taken  (fp_set_taken),
    .fp_clear      (fp_clear)
  );

  hbtc_mode_ctrl #(
    .INV_PENALTY (INV_PENALTY)
  ) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .fire         (fire),
    .fetch_pc     (fetch_pc),
    .btb_hit      (btb_hit),
    .flag_t       (flag_t),
    .flag_f       (flag_f),
    .pred_taken   (pred_taken),
    .ras_used     (ras_used),
    .mispredict   (mispredict),
    .cache_miss   (cache_miss),
    .btb_replaced (btb_replaced),
    .mode         (mode),
    .omit_tag     (omit_tag),
    .stall        (ctrl_stall),
    .fp_set_en    (fp_set_en),
    .fp_set_pc    (fp_set_pc),
    .fp_set_taken (fp_set_taken),
    .fp_clear     (fp_clear),
    .pba          (pba)
  );

  assign fp_write = fp_set_en;

endmodule
