// info_table: the CMU's residency table.
//
// For each action ID it keeps a tag (Y: the action's KV cache is in Endor-NMP,
// N: only in off-chip memory) and the slot it occupies, from which the address
// in Endor-NMP follows (slot * SLOT_LINES). A lookup that finds Y is a cache
// hit; N sends the CMU to fetch the block from off-chip memory. Reads are
// combinational, writes take effect at the next clock edge. The contents
// follow the CMU description; storing a slot number instead of a full address
// is a choice of this implementation.
module info_table
  import endor_pkg::*;
#(
  parameter int unsigned ENTRIES = NUM_ACTIONS,
  parameter int unsigned SLOTS   = NUM_SLOTS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  id_t                        wr_id,
  input  logic                       wr_tag,
  input  logic [$clog2(SLOTS)-1:0]   wr_slot,
  input  id_t                        rd_id,
  output logic                       rd_tag,
  output logic [$clog2(SLOTS)-1:0]   rd_slot
);

  logic                     tag  [ENTRIES];
  logic [$clog2(SLOTS)-1:0] slot [ENTRIES];

  assign rd_tag  = tag[rd_id];
  assign rd_slot = slot[rd_id];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        tag[e]  <= 1'b0;
        slot[e] <= '0;
      end
    end else if (wr_en) begin
      tag[wr_id]  <= wr_tag;
      slot[wr_id] <= wr_slot;
    end
  end

endmodule
