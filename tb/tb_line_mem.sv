// tb_line_mem: behavioural next-level memory for the I-cache testbenches.
//
// Answers a one-cycle mem_req with the whole line LATENCY cycles later
// (mem_rvalid high in cycle LATENCY when the request was in cycle 0). The
// content is a pure function of the address: the 8-byte word at byte address
// a is {~a, a}, so any fetched word can be checked independently.
module tb_line_mem #(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned LATENCY    = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    mem_req,
  input  logic [ADDR_W-1:0]       mem_addr,
  output logic                    mem_rvalid,
  output logic [LINE_BYTES*8-1:0] mem_rdata
);
  logic              pend;
  logic [7:0]        cnt;
  logic [ADDR_W-1:0] addr;

  function automatic logic [63:0] word_at(logic [ADDR_W-1:0] a);
    return {~a, a};
  endfunction

  initial if (LATENCY < 2) $fatal(1, "LATENCY must be at least 2");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= 1'b0; cnt <= '0; addr <= '0; mem_rvalid <= 1'b0; mem_rdata <= '0;
    end else begin
      mem_rvalid <= 1'b0;
      if (mem_req) begin
        pend <= 1'b1;
        cnt  <= 8'(LATENCY - 1);
        addr <= mem_addr;
      end else if (pend) begin
        if (cnt == 1) begin
          pend       <= 1'b0;
          mem_rvalid <= 1'b1;
          for (int w = 0; w < LINE_BYTES / 8; w++)
            mem_rdata[w*64 +: 64] <= word_at(addr + ADDR_W'(w * 8));
        end
        cnt <= cnt - 1'b1;
      end
    end
  end
endmodule
