// tb_dm_icache: self-checking test of the direct-mapped I-cache at its
// default size (16 KB, 32-byte lines, 4 subbanks) with a 5-cycle memory.
// A reference copy of the tag array kept in the testbench predicts hit or
// miss for every access; the fetched word is compared with the memory
// content function, the miss penalty is checked to be 6 stalled cycles, the
// tag-array read and the one-hot subbank enable are checked on every access,
// and omitted tag checks are checked to read no tag and cause no miss.
module tb_dm_icache;
  localparam int unsigned ADDR_W = 32, CACHE_BYTES = 16384, LINE_BYTES = 32;
  localparam int unsigned LINES = CACHE_BYTES / LINE_BYTES, LAT = 5;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, omit_tag = 0;
  logic [ADDR_W-1:0] req_addr = '0;
  logic resp_ready, miss, busy, tag_rd, mem_req, mem_rvalid;
  logic [63:0] resp_data;
  logic [3:0] bank_en;
  logic [ADDR_W-1:0] mem_addr;
  logic [255:0] mem_rdata;
  int checks = 0, failures = 0;

  dm_icache dut (.*);
  tb_line_mem #(.LATENCY(LAT)) mem (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference tag store: line index -> full line address
  logic [ADDR_W-1:0] ref_line [int];

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  // One fetch; returns after it completed.
  task automatic access(logic [ADDR_W-1:0] a, logic omit);
    int idx, stall;
    logic resident;
    idx = int'(a[13:5]);
    resident = ref_line.exists(idx) && ref_line[idx] == {a[31:5], 5'b0};
    @(negedge clk);
    req_valid = 1; req_addr = a; omit_tag = omit;
    #1;
    expect_eq("tag_rd", tag_rd, !omit);
    expect_eq("bank_en", bank_en, 4'b1 << a[4:3]);
    if (omit || resident) begin
      expect_eq("hit", resp_ready, 1);
      expect_eq("no miss", miss, 0);
    end else begin
      expect_eq("miss", miss, 1);
      expect_eq("mem_req", mem_req, 1);
      expect_eq("mem_addr", mem_addr, {a[31:5], 5'b0});
      stall = 0;
      while (!resp_ready) begin
        @(negedge clk); #1; stall++;
        if (stall > 50) break;
      end
      // cycles without a response: the miss cycle plus LAT cycles of refill
      expect_eq("miss penalty", stall, LAT + 1);
      ref_line[idx] = {a[31:5], 5'b0};
    end
    if (omit && !resident) begin
      // no tag check: the word of whatever line sits at this index comes out
      if (ref_line.exists(idx))
        expect_eq("omitted data", resp_data, mem.word_at({ref_line[idx][31:5], a[4:3], 3'b0}));
    end else begin
      expect_eq("data", resp_data, mem.word_at({a[31:3], 3'b0}));
    end
    @(negedge clk);
    req_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed: cold miss, hits in the same line, conflict eviction
    access(32'h0000_1008, 0);
    access(32'h0000_1000, 0);
    access(32'h0000_1018, 0);
    access(32'h0000_5010, 0);   // same index, other tag: evicts
    access(32'h0000_1000, 0);   // misses again
    access(32'h0000_1010, 1);   // resident, tag check omitted
    access(32'h0000_9010, 1);   // not resident, omitted: stale line, no miss
    // random mix over three aliasing 16 KB regions, small footprint
    for (int i = 0; i < 3000; i++) begin
      logic [ADDR_W-1:0] a;
      int idx;
      a = 32'h0001_0000 + ($urandom % 3) * CACHE_BYTES + ($urandom % 64) * LINE_BYTES
          + ($urandom % 4) * 8;
      idx = int'(a[13:5]);
      access(a, (ref_line.exists(idx) && ref_line[idx] == {a[31:5], 5'b0}) ? 1'($urandom % 2) : 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
