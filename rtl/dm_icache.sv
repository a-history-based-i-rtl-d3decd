// dm_icache: direct-mapped instruction cache whose tag check can be skipped.
//
// Default organisation is 16 KB with 32-byte lines (512 lines) and a data
// array split into 4 subbanks, as in the evaluated configuration. Each
// subbank holds one 8-byte word of every line; an access enables only the
// subbank that holds the requested word, so one fetch returns one 64-bit
// word. The tag array (tag plus valid bit per line) is read only when the
// tag check is performed. With omit_tag high the tag array stays idle and the
// access is reported as a hit: the caller guarantees residency (the HBTC
// Omitting mode). The 8-byte fetch word and the refill protocol are this
// design's own choices.
//
// Interface and timing:
//   req_valid/req_addr/omit_tag  fetch request, looked up in the same cycle.
//   resp_ready/resp_data         high/valid in the same cycle on a hit.
//   miss                         one-cycle pulse in the cycle a miss is found;
//                                the cache then goes busy and issues mem_req
//                                (same cycle) with the line-aligned mem_addr.
//   mem_rvalid/mem_rdata         the whole line returns in one beat, any number
//                                of cycles later; it is written at that edge and
//                                the retried request hits in the next cycle.
//                                With a memory latency of L cycles a miss
//                                stalls the fetch for L+1 cycles.
//   tag_rd                       the tag array is read this cycle.
//   bank_en                      one-hot data-subbank enable of this cycle.
// Reset clears the valid bits only; the arrays hold no reset value.
module dm_icache #(
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned LINE_BYTES  = 32,
  parameter int unsigned SUBBANKS    = 4,
  localparam int unsigned LINES      = CACHE_BYTES / LINE_BYTES,
  localparam int unsigned WORD_BYTES = LINE_BYTES / SUBBANKS,
  localparam int unsigned WORD_W     = WORD_BYTES * 8,
  localparam int unsigned LINE_W     = LINE_BYTES * 8,
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES),
  localparam int unsigned WOFF_W     = $clog2(WORD_BYTES),
  localparam int unsigned IDX_W      = $clog2(LINES),
  localparam int unsigned BANK_W     = (SUBBANKS > 1) ? $clog2(SUBBANKS) : 1,
  localparam int unsigned TAG_W      = ADDR_W - IDX_W - OFF_W
) (
  input  logic                clk,
  input  logic                rst_n,
  // fetch side
  input  logic                req_valid,
  input  logic [ADDR_W-1:0]   req_addr,
  input  logic                omit_tag,
  output logic                resp_ready,
  output logic [WORD_W-1:0]   resp_data,
  output logic                miss,
  output logic                busy,
  // activity, for energy accounting
  output logic                tag_rd,
  output logic [SUBBANKS-1:0] bank_en,
  // next-level memory
  output logic                mem_req,
  output logic [ADDR_W-1:0]   mem_addr,
  input  logic                mem_rvalid,
  input  logic [LINE_W-1:0]   mem_rdata
);

  logic [TAG_W-1:0]  tag_q   [LINES];
  logic [LINES-1:0]  valid_q;
  logic [WORD_W-1:0] bank_rdata [SUBBANKS];

  logic              refill_q;
  logic [ADDR_W-1:0] refill_addr_q;

  logic [TAG_W-1:0]  req_tag;
  logic [IDX_W-1:0]  req_idx;
  logic [BANK_W-1:0] req_bank;
  logic              tag_match;

  assign req_tag  = req_addr[ADDR_W-1 -: TAG_W];
  assign req_idx  = req_addr[OFF_W +: IDX_W];
  if (SUBBANKS > 1) begin : g_bank
    assign req_bank = req_addr[WOFF_W +: BANK_W];
  end else begin : g_nobank
    assign req_bank = '0;
  end

  always_comb begin
    tag_rd    = req_valid && !refill_q && !omit_tag;
    tag_match = valid_q[req_idx] && (tag_q[req_idx] == req_tag);
    bank_en   = '0;
    if (req_valid && !refill_q) bank_en[req_bank] = 1'b1;
    resp_ready = req_valid && !refill_q && (omit_tag || tag_match);
    miss       = tag_rd && !tag_match;
    resp_data  = bank_rdata[req_bank];
  end

  assign busy     = refill_q;
  assign mem_req  = miss;
  assign mem_addr = {req_addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      refill_q      <= 1'b0;
      refill_addr_q <= '0;
      valid_q       <= '0;
    end else if (miss) begin
      refill_q      <= 1'b1;
      refill_addr_q <= mem_addr;
    end else if (refill_q && mem_rvalid) begin
      refill_q <= 1'b0;
      valid_q[refill_addr_q[OFF_W +: IDX_W]] <= 1'b1;
    end
  end

  // Tag array and data subbanks: written only by a refill, no reset. Each
  // subbank is a memory of its own, one word per line.
  always_ff @(posedge clk) begin
    if (refill_q && mem_rvalid)
      tag_q[refill_addr_q[OFF_W +: IDX_W]] <= refill_addr_q[ADDR_W-1 -: TAG_W];
  end

  for (genvar b = 0; b < SUBBANKS; b++) begin : g_subbank
    logic [WORD_W-1:0] mem_q [LINES];
    always_ff @(posedge clk) begin
      if (refill_q && mem_rvalid)
        mem_q[refill_addr_q[OFF_W +: IDX_W]] <= mem_rdata[b*WORD_W +: WORD_W];
    end
    assign bank_rdata[b] = mem_q[req_idx];
  end

  // A line may only come back while a refill is outstanding.
  a_rvalid_in_refill: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rvalid |-> refill_q);

endmodule
