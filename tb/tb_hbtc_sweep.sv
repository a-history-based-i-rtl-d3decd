// tb_hbtc_sweep: runs the loop/call program of tb_hbtc_icache on the other
// configurations the HBTC scheme was studied with: 4 KB and 64 KB caches
// (4-way BTB), 1-way and 32-way BTBs (16 KB cache), and footprint-clear
// penalties of 4 and 32 cycles. All six run side by side; each checks every
// fetched word and its miss stall. The fraction of fetches that still needed
// a tag check is printed per configuration.
module tb_hbtc_sweep;
  localparam int N = 6;
  logic done [N];
  int checks_i [N], failures_i [N], fetch_i [N], tag_i [N];
  int checks = 0, failures = 0;

  tb_hbtc_sweep_run #(.CACHE_BYTES(4096),  .BTB_WAYS(4),  .INV_PENALTY(1))
    r0 (done[0], checks_i[0], failures_i[0], fetch_i[0], tag_i[0]);
  tb_hbtc_sweep_run #(.CACHE_BYTES(65536), .BTB_WAYS(4),  .INV_PENALTY(1))
    r1 (done[1], checks_i[1], failures_i[1], fetch_i[1], tag_i[1]);
  tb_hbtc_sweep_run #(.CACHE_BYTES(16384), .BTB_WAYS(1),  .INV_PENALTY(1))
    r2 (done[2], checks_i[2], failures_i[2], fetch_i[2], tag_i[2]);
  tb_hbtc_sweep_run #(.CACHE_BYTES(16384), .BTB_WAYS(32), .INV_PENALTY(1))
    r3 (done[3], checks_i[3], failures_i[3], fetch_i[3], tag_i[3]);
  tb_hbtc_sweep_run #(.CACHE_BYTES(16384), .BTB_WAYS(4),  .INV_PENALTY(4))
    r4 (done[4], checks_i[4], failures_i[4], fetch_i[4], tag_i[4]);
  tb_hbtc_sweep_run #(.CACHE_BYTES(16384), .BTB_WAYS(4),  .INV_PENALTY(32))
    r5 (done[5], checks_i[5], failures_i[5], fetch_i[5], tag_i[5]);

  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    for (int i = 0; i < N; i++) begin
      checks   += checks_i[i];
      failures += failures_i[i];
      $display("config %0d: tag checks %0d of %0d fetches", i, tag_i[i], fetch_i[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
