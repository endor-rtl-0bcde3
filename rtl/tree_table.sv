// tree_table: the CMU's record of every action's reasoning path.
//
// For each action ID it stores the IDs of all actions from the root down to
// the action itself (e.g. "0->1->4"), which the CMU walks to collect the
// historical KV caches an action needs. Inserting an action copies its
// parent's path and appends the new ID (one cycle). A root action's path is
// just its own ID. If a path would exceed MAX_DEPTH, the oldest ancestor is
// dropped. The table contents follow the CMU description; the path length
// limit and the copy-on-insert organisation are choices of this
// implementation.
//
// Read is combinational: rd_path[0] is the root end, rd_path[rd_depth-1] the
// action itself.
module tree_table
  import endor_pkg::*;
#(
  parameter int unsigned ENTRIES = NUM_ACTIONS,
  parameter int unsigned DEPTH   = MAX_DEPTH
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        ins_en,
  input  id_t                         ins_id,
  input  id_t                         ins_parent,
  input  logic                        ins_root,
  input  id_t                         rd_id,
  output id_t  [DEPTH-1:0]            rd_path,
  output logic [$clog2(DEPTH+1)-1:0]  rd_depth
);

  localparam int unsigned DW = $clog2(DEPTH + 1);

  id_t  [DEPTH-1:0] path  [ENTRIES];
  logic [DW-1:0]    depth [ENTRIES];

  assign rd_path  = path[rd_id];
  assign rd_depth = depth[rd_id];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        depth[e] <= '0;
        path[e]  <= '0;
      end
    end else if (ins_en) begin
      id_t [DEPTH-1:0] np;
      logic [DW-1:0]   pd;
      np = path[ins_parent];
      pd = depth[ins_parent];
      if (ins_root) begin
        np    = '0;
        np[0] = ins_id;
        depth[ins_id] <= DW'(1);
      end else if (pd == DW'(DEPTH)) begin
        for (int k = 0; k < DEPTH - 1; k++) np[k] = np[k+1];
        np[DEPTH-1] = ins_id;
        depth[ins_id] <= DW'(DEPTH);
      end else begin
        np[pd] = ins_id;
        depth[ins_id] <= pd + 1'b1;
      end
      path[ins_id] <= np;
    end
  end

endmodule
