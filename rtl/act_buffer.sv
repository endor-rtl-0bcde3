// act_buffer: activation buffer of a rank-NMP.
//
// A simple dual-port SRAM of LINES lines, each line holding LANES Q8.8
// elements, so that one read delivers the whole vector chunk that the
// bank-NMPs consume in one beat. Port A reads a line (registered, one cycle
// latency). Port B writes a line with a per-element write mask, which lets the
// GEMV engine and the SFU write single results. The architecture overview only
// names this buffer; its size and port arrangement are choices of this
// implementation.
module act_buffer
  import endor_pkg::*;
#(
  parameter int unsigned LINES = 512
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(LINES)-1:0] rd_addr,
  output line_t                    rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(LINES)-1:0] wr_addr,
  input  logic [LANES-1:0]         wr_mask,
  input  line_t                    wr_data
);

  line_t mem [LINES];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) begin
      for (int i = 0; i < LANES; i++)
        if (wr_mask[i]) mem[wr_addr][i] <= wr_data[i];
    end
  end

endmodule
