// hbtc_mode_ctrl: operation-mode controller of the HBTC cache.
//
// Chooses, for every fetch, whether the I-cache checks its tag, and keeps
// the execution footprints in the BTB up to date. On every completed fetch
// that hits in the BTB (fire && btb_hit) it takes the footprint flag chosen
// by the predicted direction (T if taken, F if not) and moves to Omitting
// mode if that flag is set, otherwise to Tracing mode, loading the PBA
// register with the branch address and direction. A BTB hit that finds the
// controller already in Tracing mode proves that the block from the PBA's
// branch up to the current branch was fetched without a cache miss, so the
// flag named by the PBA register is set. Any I-cache miss or BTB replacement
// clears every footprint and returns to Normal mode. A mispredicted branch,
// or a target supplied by the return address stack, returns to Normal mode
// without clearing footprints. All of this is the published HBTC scheme.
//
// Timing. The footprint write uses the BTB port in the cycle after the BTB
// hit, so stall is high for that one cycle. The footprint clear uses the BTB
// port for INV_PENALTY cycles starting the cycle after the miss or
// replacement (stall is high for those cycles); fp_clear is asserted in the
// first of them. While the I-cache refills a line the fetch is stalled
// anyway, so a clear shorter than the miss penalty costs nothing. The new
// mode applies to fetches from the next cycle on. Priorities when events
// coincide are this design's own: invalidation > misprediction/RAS > the
// flag-selected mode; the footprint write at a Tracing-mode BTB hit is still
// made when that branch is mispredicted, since the block before it was
// fetched in full.
module hbtc_mode_ctrl
  import hbtc_pkg::*;
#(
  parameter int unsigned INV_PENALTY = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch and BTB lookup of this cycle
  input  logic              fire,        // a fetch completed this cycle
  input  logic [ADDR_W-1:0] fetch_pc,
  input  logic              btb_hit,
  input  logic              flag_t,
  input  logic              flag_f,
  input  logic              pred_taken,
  input  logic              ras_used,    // target of this branch came from the RAS
  input  logic              mispredict,  // a misprediction was detected this cycle
  // invalidation causes
  input  logic              cache_miss,
  input  logic              btb_replaced,
  // to the I-cache and fetch unit
  output hbtc_mode_e        mode,
  output logic              omit_tag,
  output logic              stall,
  // BTB footprint port
  output logic              fp_set_en,
  output logic [ADDR_W-1:0] fp_set_pc,
  output logic              fp_set_taken,
  output logic              fp_clear,
  // PBA register contents, for observation
  output pba_t              pba
);

  localparam int unsigned CNT_W = $clog2(INV_PENALTY + 1);

  hbtc_mode_e        mode_q, mode_d;
  logic              wr_pend_q;
  logic [ADDR_W-1:0] wr_pc_q;
  logic              wr_taken_q;
  logic [CNT_W-1:0]  inv_cnt_q;
  logic              clr_pend_q;

  logic inval_evt, bhit_fire, sel_flag, to_normal, write_fp, pba_load;

  always_comb begin
    inval_evt = cache_miss || btb_replaced;
    bhit_fire = fire && btb_hit;
    sel_flag  = pred_taken ? flag_t : flag_f;
    to_normal = ras_used || mispredict;
    write_fp  = bhit_fire && (mode_q == TMODE) && pba.valid && !inval_evt;
    pba_load  = bhit_fire && !inval_evt && !to_normal && !sel_flag;

    mode_d = mode_q;
    if (inval_evt)       mode_d = NMODE;
    else if (bhit_fire)  mode_d = to_normal ? NMODE : (sel_flag ? OMODE : TMODE);
    else if (mispredict) mode_d = NMODE;
  end

  pba_reg u_pba (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (pba_load),
    .clear    (inval_evt),
    .pc_in    (fetch_pc),
    .taken_in (pred_taken),
    .pba      (pba)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q     <= NMODE;
      wr_pend_q  <= 1'b0;
      wr_pc_q    <= '0;
      wr_taken_q <= 1'b0;
      inv_cnt_q  <= '0;
      clr_pend_q <= 1'b0;
    end else begin
      mode_q     <= mode_d;
      wr_pend_q  <= write_fp;
      if (write_fp) begin
        wr_pc_q    <= pba.pc;
        wr_taken_q <= pba.taken;
      end
      clr_pend_q <= inval_evt;
      if (inval_evt)           inv_cnt_q <= CNT_W'(INV_PENALTY);
      else if (inv_cnt_q != 0) inv_cnt_q <= inv_cnt_q - 1'b1;
    end
  end

  assign mode         = mode_q;
  assign omit_tag     = (mode_q == OMODE);
  assign fp_set_en    = wr_pend_q;
  assign fp_set_pc    = wr_pc_q;
  assign fp_set_taken = wr_taken_q;
  assign fp_clear     = clr_pend_q;
  assign stall        = wr_pend_q || (inv_cnt_q != 0);

  // A fetch never completes while the controller holds the BTB port.
  a_no_fire_in_stall: assert property (@(posedge clk) disable iff (!rst_n)
    stall |-> !fire);

endmodule
