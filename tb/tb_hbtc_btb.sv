// tb_hbtc_btb: self-checking test of the footprint-extended BTB.
//
// Runs a small configuration (8 sets x 4 ways) so that replacements are
// frequent. The reference model keeps, for each set, a list of entries in
// recency order (most recent first); lookups and registrations move an entry
// to the front, a registration into a full set evicts the last one. Every
// cycle the lookup result, both footprint flags and the replaced pulse are
// compared with the model. Footprint sets, footprint clears, target changes
// (which clear T) and registrations are mixed at random, with the lookup
// port idle whenever the footprint port is used.
module tb_hbtc_btb;
  localparam int unsigned ADDR_W = 32, SETS = 8, WAYS = 4, INST_BYTES = 8;

  logic clk = 0, rst_n = 0;
  logic lookup_en = 0, upd_en = 0, fp_set_en = 0, fp_set_taken = 0, fp_clear = 0;
  logic [ADDR_W-1:0] lookup_pc = '0, upd_pc = '0, upd_target = '0, fp_set_pc = '0;
  logic lookup_hit, lookup_t, lookup_f, replaced;
  logic [ADDR_W-1:0] lookup_target;
  int checks = 0, failures = 0, n_repl = 0, n_hit_t = 0, n_hit_f = 0;

  hbtc_btb #(.ADDR_W(ADDR_W), .SETS(SETS), .WAYS(WAYS), .INST_BYTES(INST_BYTES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [ADDR_W-1:0] pc, target; logic t, f; } ent_t;
  ent_t model [SETS][$];

  function automatic int set_of(logic [ADDR_W-1:0] pc);
    return int'(pc[3 +: 3]);
  endfunction

  function automatic int find(logic [ADDR_W-1:0] pc);
    int s = set_of(pc);
    foreach (model[s][i]) if (model[s][i].pc == pc) return i;
    return -1;
  endfunction

  task automatic chk(string what, logic [ADDR_W-1:0] got, logic [ADDR_W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  // pool of 48 branch addresses over the 8 sets
  function automatic logic [ADDR_W-1:0] rand_pc();
    return 32'h0040_0000 + ($urandom % 48) * 8 * 3;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int op, li, ui, si, s;
      ent_t e;
      @(negedge clk);
      op = $urandom % 100;
      fp_clear  = (op < 2);
      fp_set_en = (op >= 2 && op < 30);
      lookup_en = !(fp_clear || fp_set_en);
      lookup_pc = rand_pc();
      fp_set_pc = rand_pc();
      fp_set_taken = $urandom;
      upd_en    = ($urandom % 4) == 0;
      upd_pc    = rand_pc();
      upd_target = 32'h0080_0000 + ($urandom % 3) * 64;
      #1;
      // ---- compare combinational outputs with the model
      li = find(lookup_pc);
      chk("hit", lookup_hit, lookup_en && li >= 0);
      if (lookup_en && li >= 0) begin
        s = set_of(lookup_pc);
        chk("target", lookup_target, model[s][li].target);
        chk("T", lookup_t, model[s][li].t);
        chk("F", lookup_f, model[s][li].f);
        if (model[s][li].t) n_hit_t++;
        if (model[s][li].f) n_hit_f++;
      end
      ui = find(upd_pc);
      chk("replaced", replaced, upd_en && ui < 0 && model[set_of(upd_pc)].size() == WAYS);
      if (replaced) n_repl++;
      // ---- advance the model in the order the hardware applies writes
      if (lookup_en && li >= 0) begin
        s = set_of(lookup_pc);
        e = model[s][li]; model[s].delete(li); model[s].push_front(e);
      end
      if (fp_clear) begin
        for (int k = 0; k < SETS; k++) foreach (model[k][i]) begin model[k][i].t = 0; model[k][i].f = 0; end
      end else if (fp_set_en) begin
        si = find(fp_set_pc);
        if (si >= 0) begin
          if (fp_set_taken) model[set_of(fp_set_pc)][si].t = 1;
          else              model[set_of(fp_set_pc)][si].f = 1;
        end
      end
      if (upd_en) begin
        s = set_of(upd_pc);
        ui = find(upd_pc);
        if (ui >= 0) begin
          e = model[s][ui]; model[s].delete(ui);
          if (e.target != upd_target) e.t = 0;
          e.target = upd_target;
        end else begin
          if (model[s].size() == WAYS) void'(model[s].pop_back());
          e = '{pc: upd_pc, target: upd_target, t: 0, f: 0};
        end
        model[s].push_front(e);
      end
      @(posedge clk);
    end
    @(negedge clk);
    lookup_en = 0; upd_en = 0; fp_set_en = 0; fp_clear = 0;
    checks++;
    if (n_repl == 0 || n_hit_t == 0 || n_hit_f == 0) begin
      failures++;
      $display("FAIL coverage: replacements=%0d T-hits=%0d F-hits=%0d", n_repl, n_hit_t, n_hit_f);
    end
    $display("replacements=%0d lookups with T set=%0d with F set=%0d", n_repl, n_hit_t, n_hit_f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
