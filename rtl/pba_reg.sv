// pba_reg: Previous Branch Address register of the HBTC cache.
//
// Holds the address of the branch whose BTB hit put the cache into Tracing
// mode, with the direction predicted for it (taken selects the entry's T
// flag, not-taken its F flag), plus a valid bit. At the next BTB hit in
// Tracing mode the mode controller uses it as the address for setting that
// footprint flag. Loaded at the clock edge when load is high; clear drops the
// valid bit (clear wins over load). The valid bit and clear input are this
// design's own additions; they let the controller forget a stale entry.
module pba_reg
  import hbtc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              clear,
  input  logic [ADDR_W-1:0] pc_in,
  input  logic              taken_in,
  output pba_t              pba
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pba <= '0;
    else if (clear)  pba.valid <= 1'b0;
    else if (load)   pba <= '{valid: 1'b1, pc: pc_in, taken: taken_in};
  end

endmodule
