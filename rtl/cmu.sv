// cmu: cache management unit of Endor-NMP (one per DIMM).
//
// The CMU keeps the inter-action KV caches of a reasoning tree in a small set
// of slots in Endor-NMP and swaps them with off-chip memory. Its management
// module holds the tree table (reasoning path of every action), the info table
// (resident tag and slot), the score table (score = reward + #reuse/#total,
// Eq. 1) and a priority queue of the resident actions ordered by score; its
// control module (cmu_ctrl) moves KV blocks through a read and a write buffer.
//
// Commands (valid/ready):
//   NEW    id, parent : record the path of a newly generated action and give it
//                       a slot for the KV cache the NMP will write
//   REWARD id, reward : store the PRM reward and recompute the score
//   LOOKUP id         : walk the path of id from the root; for every action on
//                       it report its slot address (hit), or fetch it from
//                       off-chip memory first (miss), evicting the resident
//                       action with the lowest score when no slot is free
//   BACKUP id, alt    : the predicted action id was wrong: save its cache to
//                       off-chip memory, free its slot, then LOOKUP alt
// Each action that becomes usable is reported on nmp_addr_* (the "to
// Endor-NMP" address of the figure); op_done pulses at the end of a command.
//
// What follows the design: the four tables, Eq. 1, victim = lowest score,
// backup then load on a misprediction. Choices of this implementation: the
// command set, that evicted blocks are always written back, that only the
// actions touched by a command get a new score, and that the slots are
// regions of the shared buffer. While a LOOKUP walks a path, the actions
// already on it are taken out of the priority queue (pinned), so a miss
// further down cannot evict an ancestor that was just reported; they go back
// into the queue with their new scores when the walk ends. A path therefore
// must fit into the slots: callers keep MAX_DEPTH <= SLOTS.
module cmu
  import endor_pkg::*;
#(
  parameter int unsigned SLOTS   = NUM_SLOTS,
  parameter int unsigned SLOT_L  = SLOT_LINES,
  parameter int unsigned ENTRIES = NUM_ACTIONS,
  parameter int unsigned DEPTH   = MAX_DEPTH,
  localparam int unsigned SW     = $clog2(SLOTS),
  localparam int unsigned SBW    = $clog2(SLOT_L * SLOTS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  cmu_cmd_t         cmd,
  output logic             op_done,
  output logic             nmp_addr_valid,
  output id_t              nmp_addr_id,
  output logic [SBW-1:0]   nmp_addr_line,
  output logic             nmp_addr_hit,
  output logic [15:0]      n_hit,
  output logic [15:0]      n_miss,
  output logic [15:0]      n_evict,
  output logic [15:0]      n_backup,
  // off-chip memory
  output logic             om_req_valid,
  input  logic             om_req_ready,
  output logic             om_req_we,
  output logic [31:0]      om_req_addr,
  output line_t            om_req_wdata,
  input  logic             om_rvalid,
  input  line_t            om_rdata,
  // Endor-NMP side (shared buffer port)
  output logic             sb_en,
  output logic             sb_we,
  output logic [SBW-1:0]   sb_addr,
  output line_t            sb_wdata,
  input  line_t            sb_rdata
);

  localparam int unsigned DW = $clog2(DEPTH + 1);

  typedef enum logic [4:0] {
    S_IDLE, S_NEW, S_REW, S_LK, S_ANC, S_ALLOC, S_EVICT, S_FILL, S_LOAD, S_MAP,
    S_CALC, S_CALC_W, S_PQ_RM, S_PQ_INS, S_NEXT, S_RI, S_RI_INS, S_BK, S_BK_W, S_DONE
  } state_e;

  state_e   st;
  cmu_cmd_t c;
  id_t      cur, victim;
  logic [SW-1:0] slot_q;
  logic     need_load, was_res, walking;
  logic [DW-1:0] k, depth_q;
  id_t [DEPTH-1:0] path_q;
  logic [SLOTS-1:0] used;

  // ---------------- management module ----------------
  logic     tt_ins;
  id_t      tt_rd_id;
  id_t [DEPTH-1:0] tt_path;
  logic [DW-1:0]   tt_depth;
  tree_table #(.ENTRIES(ENTRIES), .DEPTH(DEPTH)) u_tree (
    .clk, .rst_n, .ins_en(tt_ins), .ins_id(c.id), .ins_parent(c.alt), .ins_root(c.root),
    .rd_id(tt_rd_id), .rd_path(tt_path), .rd_depth(tt_depth)
  );
  assign tt_rd_id = c.id;

  logic     it_we, it_wtag, it_tag;
  id_t      it_wid, it_rid;
  logic [SW-1:0] it_wslot, it_slot;
  info_table #(.ENTRIES(ENTRIES), .SLOTS(SLOTS)) u_info (
    .clk, .rst_n, .wr_en(it_we), .wr_id(it_wid), .wr_tag(it_wtag), .wr_slot(it_wslot),
    .rd_id(it_rid), .rd_tag(it_tag), .rd_slot(it_slot)
  );

  logic     sc_en, sc_busy, sc_done;
  logic [2:0] sc_op;
  id_t      sc_id;
  score_t   sc_score, sc_rd;
  score_table #(.ENTRIES(ENTRIES)) u_score (
    .clk, .rst_n, .cmd_en(sc_en), .cmd_op(sc_op), .cmd_id(sc_id), .cmd_reward(c.reward),
    .busy(sc_busy), .done(sc_done), .score(sc_score), .rd_id(cur), .rd_score(sc_rd)
  );

  logic     pq_ins, pq_rm, pq_hv, pq_full;
  id_t      pq_rm_id, pq_head;
  score_t   pq_head_score;
  logic [$clog2(SLOTS+1)-1:0] pq_count;
  id_t    [SLOTS-1:0] pq_ids;
  score_t [SLOTS-1:0] pq_scores;
  priority_queue #(.SLOTS(SLOTS)) u_pq (
    .clk, .rst_n, .ins_en(pq_ins), .ins_id(cur), .ins_score(sc_rd), .rm_en(pq_rm), .rm_id(pq_rm_id),
    .head_valid(pq_hv), .head_id(pq_head), .head_score(pq_head_score), .count(pq_count),
    .full(pq_full), .q_id(pq_ids), .q_score(pq_scores)
  );

  // ---------------- control module ----------------
  logic     cc_start, cc_store, cc_busy, cc_done;
  logic [SW-1:0] cc_slot;
  id_t      cc_id;
  cmu_ctrl #(.SLOT_L(SLOT_L), .SLOTS(SLOTS)) u_ctrl (
    .clk, .rst_n, .start(cc_start), .is_store(cc_store), .id(cc_id), .slot(cc_slot),
    .busy(cc_busy), .done(cc_done),
    .om_req_valid, .om_req_ready, .om_req_we, .om_req_addr, .om_req_wdata, .om_rvalid, .om_rdata,
    .sb_en, .sb_we, .sb_addr, .sb_wdata, .sb_rdata
  );

  // first free slot
  logic          have_free;
  logic [SW-1:0] free_slot;
  always_comb begin
    have_free = 1'b0; free_slot = '0;
    for (int s = SLOTS - 1; s >= 0; s--)
      if (!used[s]) begin have_free = 1'b1; free_slot = SW'(s); end
  end

  // ---------------- control signals per state ----------------
  always_comb begin
    cmd_ready = (st == S_IDLE);
    tt_ins = 1'b0;
    it_we = 1'b0; it_wid = cur; it_wtag = 1'b1; it_wslot = slot_q;
    it_rid = cur;
    sc_en = 1'b0; sc_op = 3'd0; sc_id = cur;
    pq_ins = 1'b0; pq_rm = 1'b0; pq_rm_id = cur;
    cc_start = 1'b0; cc_store = 1'b0; cc_id = cur; cc_slot = slot_q;
    case (st)
      S_NEW:   begin tt_ins = 1'b1; sc_en = 1'b1; sc_op = 3'd0; end
      S_REW:   begin sc_en = 1'b1; sc_op = 3'd1; end
      S_LK:    begin sc_en = 1'b1; sc_op = 3'd2; end
      S_ANC:   begin it_rid = path_q[k]; sc_en = 1'b1; sc_op = 3'd3; sc_id = path_q[k]; end
      S_ALLOC: begin
        it_rid = pq_head;
        if (!have_free) begin cc_start = 1'b1; cc_store = 1'b1; cc_id = pq_head; cc_slot = it_slot; end
      end
      S_EVICT: if (cc_done) begin
        it_we = 1'b1; it_wid = victim; it_wtag = 1'b0; pq_rm = 1'b1; pq_rm_id = victim;
      end
      S_FILL:  if (need_load) cc_start = 1'b1;
      S_MAP:   it_we = 1'b1;
      S_CALC:  begin sc_en = 1'b1; sc_op = 3'd4; end
      S_PQ_RM: pq_rm = 1'b1;
      S_PQ_INS: pq_ins = 1'b1;
      S_RI_INS: pq_ins = 1'b1;
      S_BK:    begin it_rid = c.id; if (it_tag) begin cc_start = 1'b1; cc_store = 1'b1; cc_id = c.id; cc_slot = it_slot; end end
      S_BK_W:  if (cc_done) begin
        it_we = 1'b1; it_wid = c.id; it_wtag = 1'b0; pq_rm = 1'b1; pq_rm_id = c.id;
      end
      default: ;
    endcase
  end

  // slot the ALLOC / BACKUP state will use
  logic [SW-1:0] alloc_slot;
  assign alloc_slot = have_free ? free_slot : it_slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; c <= '0; cur <= '0; victim <= '0; slot_q <= '0; need_load <= 1'b0;
      was_res <= 1'b0; walking <= 1'b0; k <= '0; depth_q <= '0; path_q <= '0; used <= '0;
      op_done <= 1'b0; nmp_addr_valid <= 1'b0; nmp_addr_id <= '0; nmp_addr_line <= '0;
      nmp_addr_hit <= 1'b0; n_hit <= '0; n_miss <= '0; n_evict <= '0; n_backup <= '0;
    end else begin
      op_done <= 1'b0;
      nmp_addr_valid <= 1'b0;
      case (st)
        S_IDLE: if (cmd_valid) begin
          c <= cmd; cur <= cmd.id; walking <= 1'b0;
          case (cmd.op)
            CMU_NEW:    st <= S_NEW;
            CMU_REWARD: st <= S_REW;
            CMU_LOOKUP: st <= S_LK;
            default:    st <= S_BK;
          endcase
        end
        S_NEW: begin need_load <= 1'b0; was_res <= 1'b0; st <= S_ALLOC; end
        S_REW: begin
          was_res <= it_tag;
          st <= S_CALC;
        end
        S_LK: begin
          path_q <= tt_path; depth_q <= tt_depth; k <= '0; walking <= 1'b1;
          st <= (tt_depth == '0) ? S_DONE : S_ANC;
        end
        S_ANC: begin
          cur <= path_q[k];
          if (it_tag) begin
            n_hit <= n_hit + 1'b1; was_res <= 1'b1; slot_q <= it_slot;
            nmp_addr_valid <= 1'b1; nmp_addr_id <= path_q[k]; nmp_addr_hit <= 1'b1;
            nmp_addr_line <= SBW'(32'(it_slot) * SLOT_L);
            st <= S_CALC;
          end else begin
            n_miss <= n_miss + 1'b1; was_res <= 1'b0; need_load <= 1'b1;
            st <= S_ALLOC;
          end
        end
        S_ALLOC: begin
          slot_q <= alloc_slot;
          if (have_free) begin
            used[free_slot] <= 1'b1;
            st <= S_FILL;
          end else begin
            victim <= pq_head;
            st <= S_EVICT;
          end
        end
        S_EVICT: if (cc_done) begin n_evict <= n_evict + 1'b1; st <= S_FILL; end
        S_FILL: st <= need_load ? S_LOAD : S_MAP;
        S_LOAD: if (cc_done) st <= S_MAP;
        S_MAP: begin
          nmp_addr_valid <= 1'b1; nmp_addr_id <= cur; nmp_addr_hit <= 1'b0;
          nmp_addr_line <= SBW'(32'(slot_q) * SLOT_L);
          st <= S_CALC;
        end
        S_CALC: st <= S_CALC_W;
        S_CALC_W: if (sc_done) begin
          if (was_res)                 st <= S_PQ_RM;
          else if (c.op == CMU_REWARD) st <= S_NEXT;   // not resident: score only
          else if (walking)            st <= S_NEXT;   // pinned until the walk ends
          else                         st <= S_PQ_INS;
        end
        S_PQ_RM: st <= walking ? S_NEXT : S_PQ_INS;
        S_PQ_INS: st <= S_NEXT;
        S_NEXT: begin
          if (walking && (k + 1'b1 < depth_q)) begin k <= k + 1'b1; st <= S_ANC; end
          else if (walking) begin k <= '0; st <= S_RI; end
          else st <= S_DONE;
        end
        // unpin: put the whole path back into the queue with its new scores
        S_RI: begin cur <= path_q[k]; st <= S_RI_INS; end
        S_RI_INS: begin
          if (k + 1'b1 < depth_q) begin k <= k + 1'b1; st <= S_RI; end
          else st <= S_DONE;
        end
        S_BK: begin
          n_backup <= n_backup + 1'b1;
          if (it_tag) begin slot_q <= it_slot; st <= S_BK_W; end
          else begin c.id <= c.alt; st <= S_LK; end
        end
        S_BK_W: if (cc_done) begin
          used[slot_q] <= 1'b0;
          c.id <= c.alt; st <= S_LK;
        end
        S_DONE: begin op_done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end

  // a miss always finds a free slot or an unpinned victim
  a_victim: assert property (@(posedge clk) disable iff (!rst_n) (st == S_ALLOC && !have_free) |-> pq_hv);

  // the queue never holds more entries than there are slots
  a_pq_bound: assert property (@(posedge clk) disable iff (!rst_n) !(pq_ins && pq_full && !pq_rm));

endmodule
