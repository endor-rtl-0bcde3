// endor_top: one Endor-NMP DIMM.
//
// Endor speeds up tree-search LLM reasoning by keeping the KV caches of earlier
// reasoning steps ("actions") in memory and decoding new actions from them
// instead of re-running prefill, and by letting the LLM continue from the
// action it predicts the reward model will choose. This module is the
// near-memory hardware of one DIMM that serves that scheme:
//   * NUM_RANKS rank-NMPs (act buffer, SFU, NUM_BANKS bank-NMP GEMV units
//     each) that run decode-step GEMV, softmax and SiLU next to the DRAM,
//   * the all-reduce unit that sums the ranks' partial results (and, through
//     the DIMM-Link port, those of another DIMM),
//   * the 256 KB shared buffer,
//   * the cache management unit (CMU) that keeps the most valuable action KV
//     caches resident by score = reward + reuse frequency, and
//   * the action predictor, whose mispredictions make the CMU back up the
//     wrong action and load the right one.
// The central processor (host GPU), the DRAM banks, off-chip memory and the
// DIMM-Link PHY are outside: their signals are ports. Rank commands are issued
// per rank by the host; CMU commands come from the host, except that a
// predictor miss issues a BACKUP on its own (host CMU commands wait meanwhile).
// The shared buffer's second port is shared by the ranks and the host side
// (fixed priority: rank 0 first, host last; grant in the cycle of the
// request, read data one cycle later).
module endor_top
  import endor_pkg::*;
#(
  parameter int unsigned RANKS  = NUM_RANKS,
  parameter int unsigned NB     = NUM_BANKS,
  parameter int unsigned SLOTS  = NUM_SLOTS,
  parameter int unsigned SLOT_L = SLOT_LINES,
  parameter int unsigned CANDS  = 4,
  localparam int unsigned SBW   = $clog2(SLOT_L * SLOTS),
  localparam int unsigned CW    = $clog2(CANDS)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // central processor -> rank-NMPs
  input  logic      [RANKS-1:0]       rank_cmd_valid,
  output logic      [RANKS-1:0]       rank_cmd_ready,
  input  rank_cmd_t [RANKS-1:0]       rank_cmd,
  output logic      [RANKS-1:0]       rank_done,
  // DRAM banks (one read port per rank, all banks of a rank in parallel)
  output logic      [RANKS-1:0]       bk_rd_en,
  output logic      [RANKS-1:0][15:0] bk_rd_addr,
  input  line_t     [RANKS-1:0][NB-1:0] bk_rd_data,
  // central processor -> CMU
  input  logic                        cmu_cmd_valid,
  output logic                        cmu_cmd_ready,
  input  cmu_cmd_t                    cmu_cmd,
  output logic                        cmu_op_done,
  output logic                        nmp_addr_valid,
  output id_t                         nmp_addr_id,
  output logic      [SBW-1:0]         nmp_addr_line,
  output logic                        nmp_addr_hit,
  // action predictor
  input  logic                        pred_clear,
  input  id_t                         pred_base_id,
  input  logic                        tok_valid,
  input  logic      [CW-1:0]          tok_cand,
  input  data_t                       tok_logp,
  input  logic                        predict,
  output logic                        pred_valid,
  output id_t                         pred_id,
  input  logic                        prm_valid,
  input  logic      [CW-1:0]          prm_sel,
  output logic                        pred_hit,
  output logic                        pred_miss,
  // off-chip memory
  output logic                        om_req_valid,
  input  logic                        om_req_ready,
  output logic                        om_req_we,
  output logic      [31:0]            om_req_addr,
  output line_t                       om_req_wdata,
  input  logic                        om_rvalid,
  input  line_t                       om_rdata,
  // host / DIMM-Link side of the shared buffer
  input  logic                        hs_req,
  input  logic                        hs_we,
  input  logic      [SBW-1:0]         hs_addr,
  input  line_t                       hs_wdata,
  output logic                        hs_gnt,
  output line_t                       hs_rdata,
  // DIMM-Link reduce stream
  input  logic                        link_en,
  input  logic                        link_rx_valid,
  output logic                        link_rx_ready,
  input  line_t                       link_rx_data,
  output logic                        link_tx_valid,
  output line_t                       link_tx_data,
  // statistics
  output logic      [15:0]            n_hit,
  output logic      [15:0]            n_miss,
  output logic      [15:0]            n_evict,
  output logic      [15:0]            n_backup,
  output logic      [15:0]            n_pred,
  output logic      [15:0]            n_pred_hit,
  output logic      [15:0]            n_reduce_lines,
  output logic      [RANKS-1:0][31:0] n_mac_beats,
  output logic      [RANKS-1:0][15:0] n_sfu_ops
);

  // ---------------- shared buffer ----------------
  logic          a_en, a_we, b_en, b_we;
  logic [SBW-1:0] a_addr, b_addr;
  line_t         a_wdata, a_rdata, b_wdata, b_rdata;
  shared_buffer #(.LINES(SLOT_L * SLOTS)) u_sbuf (
    .clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata, .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  // ---------------- rank-NMPs ----------------
  logic  [RANKS-1:0]              r_sb_req, r_sb_we, r_sb_gnt, ar_valid, ar_ready;
  logic  [RANKS-1:0][SB_AW-1:0]   r_sb_addr;
  line_t [RANKS-1:0]              r_sb_wdata, ar_data;
  logic                           sum_valid;
  line_t                          sum_data;

  for (genvar r = 0; r < RANKS; r++) begin : g_rank
    rank_nmp #(.NB(NB)) u_rank (
      .clk, .rst_n,
      .cmd_valid(rank_cmd_valid[r]), .cmd_ready(rank_cmd_ready[r]), .cmd(rank_cmd[r]), .done(rank_done[r]),
      .bk_rd_en(bk_rd_en[r]), .bk_rd_addr(bk_rd_addr[r]), .bk_rd_data(bk_rd_data[r]),
      .sb_req(r_sb_req[r]), .sb_we(r_sb_we[r]), .sb_addr(r_sb_addr[r]), .sb_wdata(r_sb_wdata[r]),
      .sb_gnt(r_sb_gnt[r]), .sb_rdata(b_rdata),
      .ar_valid(ar_valid[r]), .ar_ready(ar_ready[r]), .ar_data(ar_data[r]),
      .ar_sum_valid(sum_valid), .ar_sum_data(sum_data),
      .n_mac_beats(n_mac_beats[r]), .n_sfu_ops(n_sfu_ops[r])
    );
  end

  // shared-buffer port B arbiter: fixed priority, ranks before host
  always_comb begin
    r_sb_gnt = '0; hs_gnt = 1'b0;
    b_en = 1'b0; b_we = 1'b0; b_addr = '0; b_wdata = '0;
    for (int r = RANKS - 1; r >= 0; r--) begin
      if (r_sb_req[r]) begin
        r_sb_gnt = RANKS'(1) << r;
        b_en = 1'b1; b_we = r_sb_we[r]; b_addr = SBW'(r_sb_addr[r]); b_wdata = r_sb_wdata[r];
      end
    end
    if (r_sb_req == '0 && hs_req) begin
      hs_gnt = 1'b1; b_en = 1'b1; b_we = hs_we; b_addr = hs_addr; b_wdata = hs_wdata;
    end
  end
  assign hs_rdata = b_rdata;

  // ---------------- all-reduce ----------------
  allreduce #(.RANKS(RANKS)) u_ar (
    .clk, .rst_n, .link_en, .in_valid(ar_valid), .in_ready(ar_ready), .in_data(ar_data),
    .link_rx_valid, .link_rx_ready, .link_rx_data,
    .sum_valid, .sum_data, .n_lines(n_reduce_lines)
  );
  assign link_tx_valid = sum_valid;
  assign link_tx_data  = sum_data;

  // ---------------- action predictor ----------------
  id_t wrong_id, right_id;
  logic [CW-1:0] pred_cand;
  action_predictor #(.CANDS(CANDS)) u_pred (
    .clk, .rst_n, .clear(pred_clear), .base_id(pred_base_id),
    .tok_valid, .tok_cand, .tok_logp, .predict,
    .pred_valid, .pred_cand, .pred_id,
    .prm_valid, .prm_sel, .hit(pred_hit), .miss(pred_miss), .wrong_id, .right_id,
    .n_pred, .n_hit(n_pred_hit)
  );

  // a miss becomes a BACKUP command for the CMU
  logic     c_valid, c_ready;
  cmu_cmd_t c_cmd;
  logic     bk_pend;
  cmu_cmd_t bk_cmd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bk_pend <= 1'b0; bk_cmd <= '0;
    end else begin
      if (pred_miss) begin
        bk_pend <= 1'b1;
        bk_cmd  <= '{op: CMU_BACKUP, id: wrong_id, alt: right_id, root: 1'b0, reward: '0};
      end else if (bk_pend && c_ready) begin
        bk_pend <= 1'b0;
      end
    end
  end

  // ---------------- CMU ----------------
  assign c_valid       = bk_pend || cmu_cmd_valid;
  assign c_cmd         = bk_pend ? bk_cmd : cmu_cmd;
  assign cmu_cmd_ready = c_ready && !bk_pend;

  cmu #(.SLOTS(SLOTS), .SLOT_L(SLOT_L)) u_cmu (
    .clk, .rst_n, .cmd_valid(c_valid), .cmd_ready(c_ready), .cmd(c_cmd), .op_done(cmu_op_done),
    .nmp_addr_valid, .nmp_addr_id, .nmp_addr_line, .nmp_addr_hit,
    .n_hit, .n_miss, .n_evict, .n_backup,
    .om_req_valid, .om_req_ready, .om_req_we, .om_req_addr, .om_req_wdata, .om_rvalid, .om_rdata,
    .sb_en(a_en), .sb_we(a_we), .sb_addr(a_addr), .sb_wdata(a_wdata), .sb_rdata(a_rdata)
  );

endmodule
