// tb_hbtc_mode_ctrl: self-checking test of the HBTC mode controller.
//
// Part 1 replays the loop example of the design description step by step:
// branch C (taken twice, then not taken) and branch D (taken), with flag T
// of C already set, the footprint flags fed back as a BTB would, and a final
// misprediction at branch B. Modes, PBA contents, footprint writes and their
// one-cycle stall are checked after every step.
// Part 2 drives random fetch/BTB/miss/replacement/misprediction/RAS events
// (respecting the stall) and compares every output with a reference model
// of the mode rules. INV_PENALTY is 3 so the clear stall is visible.
module tb_hbtc_mode_ctrl;
  import hbtc_pkg::*;
  localparam int unsigned INV = 3;

  logic clk = 0, rst_n = 0;
  logic fire = 0, btb_hit = 0, flag_t = 0, flag_f = 0, pred_taken = 0, ras_used = 0;
  logic mispredict = 0, cache_miss = 0, btb_replaced = 0;
  logic [ADDR_W-1:0] fetch_pc = '0;
  hbtc_mode_e mode;
  logic omit_tag, stall, fp_set_en, fp_set_taken, fp_clear;
  logic [ADDR_W-1:0] fp_set_pc;
  pba_t pba;
  int checks = 0, failures = 0;

  hbtc_mode_ctrl #(.INV_PENALTY(INV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [ADDR_W-1:0] got, logic [ADDR_W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h (t=%0t)", what, got, want, $time);
    end
  endtask

  task automatic idle_inputs();
    fire = 0; btb_hit = 0; flag_t = 0; flag_f = 0; pred_taken = 0; ras_used = 0;
    mispredict = 0; cache_miss = 0; btb_replaced = 0;
  endtask

  // one completed fetch of a branch that hits in the BTB
  task automatic branch(logic [ADDR_W-1:0] pc, logic taken, logic t, logic f);
    @(negedge clk);
    idle_inputs();
    fire = 1; btb_hit = 1; fetch_pc = pc; pred_taken = taken; flag_t = t; flag_f = f;
    @(negedge clk);
    idle_inputs();
  endtask

  // flags of the example's BTB, updated from the footprint port
  localparam logic [ADDR_W-1:0] C = 32'h100, D = 32'h200, B = 32'h080;
  logic c_t = 1, c_f = 0, d_t = 0, d_f = 0;
  always @(posedge clk) if (fp_set_en) begin
    if (fp_set_pc == C) begin if (fp_set_taken) c_t <= 1; else c_f <= 1; end
    if (fp_set_pc == D) begin if (fp_set_taken) d_t <= 1; else d_f <= 1; end
  end

  // ------------------------------------------------------ reference model
  hbtc_mode_e m_mode;
  logic m_pba_v, m_pba_t, m_wr, m_wr_t, m_clr;
  logic [ADDR_W-1:0] m_pba_pc, m_wr_pc;
  int m_cnt;

  task automatic model_step();
    logic sel, inval, bh;
    inval = cache_miss || btb_replaced;
    bh    = fire && btb_hit;
    sel   = pred_taken ? flag_t : flag_f;
    m_clr = inval;
    m_wr  = bh && m_mode == TMODE && m_pba_v && !inval;
    if (m_wr) begin m_wr_pc = m_pba_pc; m_wr_t = m_pba_t; end
    if (inval) m_cnt = INV; else if (m_cnt > 0) m_cnt--;
    if (inval) m_pba_v = 0;
    else if (bh && !ras_used && !mispredict && !sel) begin
      m_pba_v = 1; m_pba_pc = fetch_pc; m_pba_t = pred_taken;
    end
    if (inval) m_mode = NMODE;
    else if (bh) m_mode = (ras_used || mispredict) ? NMODE : (sel ? OMODE : TMODE);
    else if (mispredict) m_mode = NMODE;
  endtask

  task automatic model_check();
    chk("mode", mode, m_mode);
    chk("omit", omit_tag, m_mode == OMODE);
    chk("stall", stall, m_wr || m_cnt > 0);
    chk("fp_set_en", fp_set_en, m_wr);
    if (m_wr) begin
      chk("fp_set_pc", fp_set_pc, m_wr_pc);
      chk("fp_set_taken", fp_set_taken, m_wr_t);
    end
    chk("fp_clear", fp_clear, m_clr);
    chk("pba.valid", pba.valid, m_pba_v);
    if (m_pba_v) begin
      chk("pba.pc", pba.pc, m_pba_pc);
      chk("pba.taken", pba.taken, m_pba_t);
    end
  endtask

  int n_o = 0, n_t = 0, n_w = 0, n_clr = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 chk("reset mode", mode, NMODE);
    // ---------------- part 1: the loop example
    branch(C, 1, c_t, c_f);                 // 1-C: T=1 -> Omode
    chk("1-C mode", mode, OMODE); chk("1-C no write", fp_set_en, 0);
    branch(C, 1, c_t, c_f);                 // 2-C: Omode again
    chk("2-C mode", mode, OMODE);
    branch(C, 0, c_t, c_f);                 // 3-C: F=0 -> Tmode, PBA=(C,nt)
    chk("3-C mode", mode, TMODE); chk("3-C pba", pba.pc, C); chk("3-C dir", pba.taken, 0);
    chk("3-C no write", fp_set_en, 0);
    @(negedge clk); @(negedge clk);
    branch(D, 1, d_t, d_f);                 // 3-D: write F of C, PBA=(D,t)
    chk("3-D write", fp_set_en, 1); chk("3-D stall", stall, 1);
    chk("3-D wr pc", fp_set_pc, C); chk("3-D wr dir", fp_set_taken, 0);
    chk("3-D mode", mode, TMODE); chk("3-D pba", pba.pc, D); chk("3-D dir", pba.taken, 1);
    @(negedge clk);
    chk("3-D stall is one cycle", stall, 0); chk("F of C set", c_f, 1);
    branch(C, 0, c_t, c_f);                 // 4-C: F=1 -> Omode, write T of D
    chk("4-C mode", mode, OMODE); chk("4-C write", fp_set_en, 1);
    chk("4-C wr pc", fp_set_pc, D); chk("4-C wr dir", fp_set_taken, 1);
    @(negedge clk);
    chk("T of D set", d_t, 1);
    branch(D, 1, d_t, d_f);                 // 4-D: T=1 -> Omode, no write
    chk("4-D mode", mode, OMODE); chk("4-D no write", fp_set_en, 0);
    @(negedge clk);                          // 5-B: BTB miss, mispredicted
    fire = 1; fetch_pc = B; mispredict = 1;
    @(negedge clk); idle_inputs();
    chk("5-B mode", mode, NMODE);
    // a miss clears every footprint for INV cycles of stall
    @(negedge clk); cache_miss = 1;
    @(negedge clk); idle_inputs();
    chk("clear", fp_clear, 1);
    for (int i = 0; i < INV; i++) begin chk("clear stall", stall, 1); @(negedge clk); end
    chk("clear stall ends", stall, 0);

    // ---------------- part 2: random events against the model
    @(negedge clk);
    rst_n = 0; @(negedge clk); rst_n = 1;
    m_mode = NMODE; m_pba_v = 0; m_pba_t = 0; m_pba_pc = '0; m_wr = 0; m_wr_t = 0;
    m_wr_pc = '0; m_clr = 0; m_cnt = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      idle_inputs();
      fire         = !stall && ($urandom % 4 != 0);
      btb_hit      = $urandom % 3 == 0;
      flag_t       = $urandom; flag_f = $urandom; pred_taken = $urandom;
      fetch_pc     = 32'h400 + ($urandom % 64) * 8;
      ras_used     = fire && btb_hit && ($urandom % 16 == 0);
      mispredict   = $urandom % 20 == 0;
      cache_miss   = !stall && !fire && ($urandom % 4 == 0);
      btb_replaced = $urandom % 100 == 0;
      @(posedge clk);
      model_step();
      #1 model_check();
      if (mode == OMODE) n_o++;
      if (mode == TMODE) n_t++;
      if (fp_set_en) n_w++;
      if (fp_clear) n_clr++;
    end
    checks++;
    if (n_o == 0 || n_t == 0 || n_w == 0 || n_clr == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("Omode cycles=%0d Tmode cycles=%0d writes=%0d clears=%0d", n_o, n_t, n_w, n_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
