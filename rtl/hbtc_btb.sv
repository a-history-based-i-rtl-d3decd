// hbtc_btb: set-associative branch target buffer extended with two
// execution-footprint flags per entry.
//
// Flag T of an entry says that the instruction block starting at the branch's
// target address and ending at the next branch registered in the BTB is
// resident in the I-cache; flag F says the same of the block starting at the
// branch's fall-through address. Both flags are read in parallel with every
// lookup. A flag is set by the footprint port, which finds the entry by the
// branch address held in the PBA register, and all flags are cleared at once
// by fp_clear. Newly registered entries start with both flags clear.
//
// Default size is 512 sets x 4 ways with LRU replacement (a common default
// BTB of the out-of-order simulator the evaluation used; the 4-way
// associativity is the one the cache-size study assumes). Instructions are
// INST_BYTES bytes long, so the low address bits do not index the BTB.
//
// Ports and timing (all lookups combinational, all writes at the clock edge):
//   lookup_*  prediction lookup; hit, target and both flags in the same cycle.
//   upd_*     registration/update of a taken branch by the processor. If the
//             branch is absent a way is allocated; replaced pulses in that
//             same cycle when a valid entry is evicted. If the branch is
//             present with a different target its T flag is cleared.
//   fp_set_*  set flag T (fp_set_taken=1) or F of the entry holding fp_set_pc;
//             nothing happens if the branch is no longer present.
//   fp_clear  clear every T and F flag.
// The footprint port and the lookup port share one physical BTB port, so
// they must not be used in the same cycle (checked by an assertion). Clearing
// T on a target change is this design's own choice; it keeps flag T from
// describing a block the branch no longer jumps to.
module hbtc_btb #(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned SETS       = 512,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned INST_BYTES = 8,
  localparam int unsigned IOFF_W    = $clog2(INST_BYTES),
  localparam int unsigned IDX_W     = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned TAG_W     = ADDR_W - IOFF_W - ((SETS > 1) ? IDX_W : 0),
  localparam int unsigned WAY_W     = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // prediction lookup
  input  logic              lookup_en,
  input  logic [ADDR_W-1:0] lookup_pc,
  output logic              lookup_hit,
  output logic [ADDR_W-1:0] lookup_target,
  output logic              lookup_t,
  output logic              lookup_f,
  // registration of taken branches
  input  logic              upd_en,
  input  logic [ADDR_W-1:0] upd_pc,
  input  logic [ADDR_W-1:0] upd_target,
  output logic              replaced,
  // execution-footprint port
  input  logic              fp_set_en,
  input  logic [ADDR_W-1:0] fp_set_pc,
  input  logic              fp_set_taken,
  input  logic              fp_clear
);

  // Valid bits, footprint flags and LRU ages are flat vectors, entry
  // (set, way) at position set*WAYS+way, so that reset and the footprint
  // clear are single assignments. Tags and targets are plain memories.
  localparam int unsigned ENTRIES = SETS * WAYS;
  localparam int unsigned SET_AW  = WAYS * WAY_W;   // age bits of one set

  typedef logic [SET_AW-1:0] ages_t;

  // Reset ages: way w of every set has age w (0 = most recently used,
  // WAYS-1 = least recently used).
  function automatic logic [ENTRIES*WAY_W-1:0] age_init();
    logic [ENTRIES*WAY_W-1:0] r;
    for (int e = 0; e < int'(ENTRIES); e++) r[e*WAY_W +: WAY_W] = WAY_W'(e % WAYS);
    return r;
  endfunction

  logic [ENTRIES-1:0]       valid_q, t_q, f_q;
  logic [ENTRIES*WAY_W-1:0] age_q;
  logic [TAG_W-1:0]         tag_q    [ENTRIES];
  logic [ADDR_W-1:0]        target_q [ENTRIES];

  function automatic logic [IDX_W-1:0] set_of(logic [ADDR_W-1:0] pc);
    if (SETS > 1) return pc[IOFF_W +: IDX_W];
    else          return '0;
  endfunction

  function automatic logic [TAG_W-1:0] tag_of(logic [ADDR_W-1:0] pc);
    return pc[ADDR_W-1 -: TAG_W];
  endfunction

  function automatic int unsigned ent(logic [IDX_W-1:0] set, int unsigned way);
    return int'(set) * WAYS + way;
  endfunction

  // Make way w the most recently used one of a set.
  function automatic ages_t touch(ages_t a, logic [WAY_W-1:0] w);
    ages_t r;
    logic [WAY_W-1:0] aw;
    aw = a[int'(w)*WAY_W +: WAY_W];
    for (int i = 0; i < WAYS; i++)
      r[i*WAY_W +: WAY_W] = (i == int'(w)) ? '0 :
                            ((a[i*WAY_W +: WAY_W] < aw) ? a[i*WAY_W +: WAY_W] + 1'b1
                                                       : a[i*WAY_W +: WAY_W]);
    return r;
  endfunction

  // ---------------------------------------------------------------- lookup
  logic [IDX_W-1:0] l_set;
  logic [WAY_W-1:0] l_way;
  always_comb begin
    l_set         = set_of(lookup_pc);
    lookup_hit    = 1'b0;
    l_way         = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[ent(l_set, w)] && tag_q[ent(l_set, w)] == tag_of(lookup_pc)) begin
        lookup_hit = lookup_en;
        l_way      = WAY_W'(w);
      end
    lookup_target = target_q[ent(l_set, int'(l_way))];
    lookup_t      = lookup_hit && t_q[ent(l_set, int'(l_way))];
    lookup_f      = lookup_hit && f_q[ent(l_set, int'(l_way))];
  end

  logic [IDX_W-1:0] u_set;
  logic [WAY_W-1:0] u_way;
  logic             u_present;
  logic             u_free;
  logic [WAY_W-1:0] u_free_way;
  logic [WAY_W-1:0] u_lru_way;

  // LRU ages of the update's set as they stand after this cycle's lookup:
  // a lookup and a registration in the same set act in that order.
  ages_t l_ages, u_ages, u_base;
  always_comb begin
    l_ages = touch(age_q[int'(l_set)*SET_AW +: SET_AW], l_way);
    u_base = (lookup_hit && l_set == u_set) ? l_ages : age_q[int'(u_set)*SET_AW +: SET_AW];
  end

  // ---------------------------------------------------------------- update
  always_comb begin
    u_set      = set_of(upd_pc);
    u_present  = 1'b0;
    u_way      = '0;
    u_free     = 1'b0;
    u_free_way = '0;
    u_lru_way  = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (valid_q[ent(u_set, w)] && tag_q[ent(u_set, w)] == tag_of(upd_pc)) begin
        u_present = 1'b1;
        u_way     = WAY_W'(w);
      end
      if (!valid_q[ent(u_set, w)]) begin
        u_free     = 1'b1;
        u_free_way = WAY_W'(w);
      end
      if (u_base[w*WAY_W +: WAY_W] == WAY_W'(WAYS - 1)) u_lru_way = WAY_W'(w);
    end
    if (!u_present) u_way = u_free ? u_free_way : u_lru_way;
    replaced = upd_en && !u_present && !u_free;
  end

  // ------------------------------------------------------- footprint port
  logic [IDX_W-1:0] s_set;
  logic [WAY_W-1:0] s_way;
  logic             s_present;
  always_comb begin
    s_set     = set_of(fp_set_pc);
    s_present = 1'b0;
    s_way     = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[ent(s_set, w)] && tag_q[ent(s_set, w)] == tag_of(fp_set_pc)) begin
        s_present = 1'b1;
        s_way     = WAY_W'(w);
      end
  end

  // ------------------------------------------------------------- state
  always_comb u_ages = touch(u_base, u_way);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      t_q     <= '0;
      f_q     <= '0;
      age_q   <= age_init();
    end else begin
      // LRU: the lookup touches first, the update second.
      if (lookup_hit) age_q[int'(l_set)*SET_AW +: SET_AW] <= l_ages;
      if (upd_en)     age_q[int'(u_set)*SET_AW +: SET_AW] <= u_ages;

      if (fp_clear) begin
        t_q <= '0;
        f_q <= '0;
      end else if (fp_set_en && s_present) begin
        if (fp_set_taken) t_q[ent(s_set, int'(s_way))] <= 1'b1;
        else              f_q[ent(s_set, int'(s_way))] <= 1'b1;
      end

      // Registration comes last so it overrides a flag write to the same way.
      if (upd_en) begin
        valid_q[ent(u_set, int'(u_way))] <= 1'b1;
        if (!u_present) begin
          t_q[ent(u_set, int'(u_way))] <= 1'b0;
          f_q[ent(u_set, int'(u_way))] <= 1'b0;
        end else if (target_q[ent(u_set, int'(u_way))] != upd_target) begin
          t_q[ent(u_set, int'(u_way))] <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (upd_en) begin
      tag_q[ent(u_set, int'(u_way))]    <= tag_of(upd_pc);
      target_q[ent(u_set, int'(u_way))] <= upd_target;
    end
  end

  // One physical port: footprint accesses and lookups never share a cycle.
  a_one_port: assert property (@(posedge clk) disable iff (!rst_n)
    !((fp_set_en || fp_clear) && lookup_en));
  a_set_xor_clear: assert property (@(posedge clk) disable iff (!rst_n)
    !(fp_set_en && fp_clear));

endmodule
