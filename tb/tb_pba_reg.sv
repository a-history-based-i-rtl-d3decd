// tb_pba_reg: self-checking test of the Previous Branch Address register.
// Random load/clear sequences are compared with a reference copy kept in
// the testbench; reset, load, hold and clear-over-load are all exercised.
module tb_pba_reg;
  import hbtc_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, clear = 0, taken_in = 0;
  logic [ADDR_W-1:0] pc_in = '0;
  pba_t pba;
  int checks = 0, failures = 0;
  logic ref_valid, ref_taken;
  logic [ADDR_W-1:0] ref_pc;

  pba_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (pba.valid !== ref_valid || (ref_valid && (pba.pc !== ref_pc || pba.taken !== ref_taken))) begin
      failures++;
      $display("mismatch: got v=%0b pc=%h t=%0b want v=%0b pc=%h t=%0b",
               pba.valid, pba.pc, pba.taken, ref_valid, ref_pc, ref_taken);
    end
  endtask

  initial begin
    ref_valid = 0; ref_pc = '0; ref_taken = 0;
    repeat (2) @(posedge clk);
    #1 check();
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      load     = ($urandom % 3) != 0;
      clear    = ($urandom % 8) == 0;
      pc_in    = $urandom;
      taken_in = $urandom;
      @(posedge clk);
      if (clear) ref_valid = 0;
      else if (load) begin ref_valid = 1; ref_pc = pc_in; ref_taken = taken_in; end
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
