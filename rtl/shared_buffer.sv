// shared_buffer: the on-DIMM shared SRAM buffer (256 KB, Table I).
//
// It sits between the cache management unit, the DIMM-Link side and the
// rank-NMPs. Here it is a true dual-port RAM of 16-byte lines: port A belongs
// to the CMU's control module (KV blocks moving to and from off-chip memory),
// port B to the rank-NMPs and the host side through an arbiter in the top.
// Reads return data one cycle after the request. The split into ports and the
// line width are choices of this implementation; the capacity is Table I's.
module shared_buffer
  import endor_pkg::*;
#(
  parameter int unsigned LINES = SB_LINES
) (
  input  logic                     clk,
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(LINES)-1:0] a_addr,
  input  line_t                    a_wdata,
  output line_t                    a_rdata,
  input  logic                     b_en,
  input  logic                     b_we,
  input  logic [$clog2(LINES)-1:0] b_addr,
  input  line_t                    b_wdata,
  output line_t                    b_rdata
);

  line_t mem [LINES];

  // both ports in one process; on a same-line write collision port B wins
  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end

endmodule
