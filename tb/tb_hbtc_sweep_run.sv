// tb_hbtc_sweep_run: one configuration of the HBTC cache driven by the
// loop/call processor model of tb_hbtc_icache (see there for the program).
// Used by tb_hbtc_sweep to run the cache sizes, BTB associativities and
// footprint-clear penalties the scheme was studied with. Every fetched word
// is checked against memory; the stall after each miss is checked to be
// max(6, INV_PENALTY + 1) cycles. Reports checks, failures, fetches and tag
// checks through its ports when done goes high.
module tb_hbtc_sweep_run
  import hbtc_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned BTB_WAYS    = 4,
  parameter int unsigned INV_PENALTY = 1
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_fetch,
  output int   n_tagrd
);

  logic clk = 0, rst_n = 0;
  logic fetch_valid, fetch_ready;
  logic [ADDR_W-1:0] fetch_pc;
  logic [63:0] fetch_data;
  logic btb_hit, pred_taken, ras_used, mispredict, upd_en;
  logic [ADDR_W-1:0] btb_target, upd_pc, upd_target, mem_addr;
  logic mem_req, mem_rvalid;
  logic [255:0] mem_rdata;
  hbtc_mode_e mode;
  logic tag_rd, cache_miss, refill_busy, btb_replaced, fp_write, fp_clear, ctrl_stall;
  logic [3:0] bank_en;
  pba_t pba;

  hbtc_icache #(.CACHE_BYTES(CACHE_BYTES), .BTB_WAYS(BTB_WAYS), .INV_PENALTY(INV_PENALTY)) dut (.*);
  tb_line_mem #(.LATENCY(5)) mem (.*);

  always #5 clk = ~clk;

  localparam int ROUNDS = 40;

  // ------------------------------------------------------------ program
  localparam logic [ADDR_W-1:0] LOOP = 32'h1000, C_PC = 32'h10F8, D_PC = 32'h11F8,
                                CALL_PC = 32'h12F8, AFTER = 32'h1300, E_PC = 32'h13F8;
  typedef enum logic [1:0] {NONE, COND, JUMP, RET} kind_e;

  logic [ADDR_W-1:0] pc;
  int inner, outer, callee, rounds;

  function automatic logic [ADDR_W-1:0] far_base(int k);
    return 32'h11000 + ADDR_W'(k) * 32'h10000; // aliases 0x1000 in caches up to 64 KB
  endfunction

  kind_e kind; logic actual; logic [ADDR_W-1:0] tgt;
  always_comb begin
    kind = NONE; actual = 0; tgt = '0;
    if (pc == C_PC)         begin kind = COND; actual = inner < 3; tgt = LOOP; end
    else if (pc == D_PC)    begin kind = COND; actual = outer < 5; tgt = LOOP; end
    else if (pc == CALL_PC) begin kind = JUMP; actual = 1; tgt = far_base(callee < 3 ? 0 : callee - 2) + 32'h100; end
    else if (pc == E_PC)    begin kind = JUMP; actual = 1; tgt = LOOP; end
    else if (pc[11:0] == 12'h1F8 && pc >= 32'h5000) begin kind = RET; actual = 1; tgt = AFTER; end
  end

  // --------------------------------------------------- processor model
  logic flip;
  logic fire;
  assign fetch_valid = rst_n && rounds < ROUNDS;
  assign fetch_pc    = pc;
  assign fire        = fetch_valid && fetch_ready;
  always_comb begin
    pred_taken = btb_hit && (kind == NONE ? 1'b0 : (actual ^ flip));
    ras_used   = kind == RET && btb_hit;
    mispredict = fire && kind != NONE &&
                 (pred_taken != actual ||
                  (actual && pred_taken && !ras_used && btb_target != tgt));
    upd_en     = fire && kind != NONE && actual && (!btb_hit || btb_target != tgt);
    upd_pc     = pc;
    upd_target = tgt;
  end

  // ------------------------------------------------------ counters
  int n_omit = 0, n_o = 0, n_t = 0, n_wr = 0, n_clr_miss = 0,
      n_clr_repl = 0, n_mispred_n = 0, n_ras_n = 0, n_miss = 0, stall_run = 0, n_wr_stall = 0;
  hbtc_mode_e mode_prev;

  task automatic chk(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0h want %0h (pc=%h t=%0t)", what, got, want, pc, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    flip <= ($urandom % 24) == 0;
    if (fetch_valid && bank_en != 0) chk("bank_en one-hot", $countones(bank_en), 1);
    if (tag_rd) n_tagrd++;
    if (fp_write) begin
      n_wr++;
      chk("write stalls fetch", ctrl_stall && !fetch_ready, 1);
    end
    if (btb_replaced) n_clr_repl++;
    if (cache_miss) begin n_miss++; n_clr_miss++; stall_run = 0; end
    if (fetch_valid && !fetch_ready && (refill_busy || ctrl_stall) && stall_run != 0) stall_run++;
    if (cache_miss) stall_run = 1;
    if (fire) begin
      n_fetch++;
      chk("fetched word", fetch_data, {~pc, pc});
      if (!tag_rd) n_omit++;
      if (stall_run != 0) begin
        // miss cycle + 5 refill cycles; the one-cycle clear is hidden
        chk("miss penalty", stall_run, (INV_PENALTY + 1 > 6) ? INV_PENALTY + 1 : 6);
        stall_run = 0;
      end
      if (btb_hit && kind != NONE && mode == TMODE) n_wr_stall++;
      if (btb_hit && kind != NONE && mispredict) n_mispred_n++;
      if (ras_used && !mispredict) n_ras_n++;
      // advance the program
      if (mispredict || actual) pc <= actual ? tgt : pc + 8;
      else pc <= pc + 8;
      if (pc == C_PC) inner <= actual ? inner + 1 : 0;
      if (pc == D_PC) outer <= actual ? outer + 1 : 0;
      if (pc == CALL_PC) callee <= (callee + 1) % 6;
      if (pc == E_PC) rounds <= rounds + 1;
    end
    if (mode != mode_prev && mode == OMODE) n_o++;
    if (mode != mode_prev && mode == TMODE) n_t++;
    mode_prev <= mode;
  end

  initial begin
    done = 0; checks = 0; failures = 0; n_fetch = 0; n_tagrd = 0;
    pc = LOOP; inner = 0; outer = 0; callee = 0; rounds = 0; flip = 0; mode_prev = NMODE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (rounds == ROUNDS);
    repeat (4) @(posedge clk);
    $display("CACHE_BYTES=%0d BTB_WAYS=%0d INV_PENALTY=%0d", CACHE_BYTES, BTB_WAYS, INV_PENALTY);
    $display("fetches=%0d tag checks=%0d omitted=%0d misses=%0d", n_fetch, n_tagrd, n_omit, n_miss);
    $display("Omode entries=%0d Tmode entries=%0d footprint writes=%0d", n_o, n_t, n_wr);
    $display("clears: by miss=%0d by BTB replacement=%0d; to Nmode: mispredict=%0d RAS=%0d",
             n_clr_miss, n_clr_repl, n_mispred_n, n_ras_n);
    chk("writes match Tmode BTB hits", n_wr, n_wr_stall);
    chk("omission happened", n_omit > 0, 1);
    done = 1;
  end
endmodule
