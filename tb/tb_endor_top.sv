// tb_endor_top: end-to-end run of one Endor-NMP DIMM at its default size.
//
// Part 1, one decode step of a small transformer layer, tensor-parallel over
// the two ranks: the host puts the token vector x into the shared buffer, each
// rank loads it, computes its head's scores S = K x (GEMV on the bank-NMPs),
// P = softmax(S / 4), O = P V (GEMV with V stored transposed), the ranks
// all-reduce O, run the FFN slice (GEMV, SiLU, GEMV), all-reduce again with a
// DIMM-Link partner contribution, and store the result, which the host reads
// back. Every stage is checked against values computed here from the stage's
// inputs (GEMV exactly, softmax and SiLU within a tolerance).
// Part 2, the reasoning tree: actions are created until the CMU must evict,
// rewards arrive, the action predictor is right once and wrong once (the miss
// makes the CMU back up the wrong action and load the right path), and an
// evicted action is looked up again; its KV signature must come back intact.
// Each mechanism is counted and must occur at least once.
module tb_endor_top;
  import endor_pkg::*;
  localparam int R = NUM_RANKS, NB = NUM_BANKS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      [R-1:0]       rank_cmd_valid, rank_cmd_ready, rank_done, bk_rd_en;
  rank_cmd_t [R-1:0]       rank_cmd;
  logic      [R-1:0][15:0] bk_rd_addr;
  line_t     [R-1:0][NB-1:0] bk_rd_data;
  logic      cmu_cmd_valid, cmu_cmd_ready, cmu_op_done, nmp_addr_valid, nmp_addr_hit;
  cmu_cmd_t  cmu_cmd;
  id_t       nmp_addr_id, pred_base_id, pred_id;
  logic [SB_AW-1:0] nmp_addr_line, hs_addr;
  logic      pred_clear, tok_valid, predict, pred_valid, prm_valid, pred_hit, pred_miss;
  logic [1:0] tok_cand, prm_sel;
  data_t     tok_logp;
  logic      om_req_valid, om_req_ready, om_req_we, om_rvalid;
  logic [31:0] om_req_addr;
  line_t     om_req_wdata, om_rdata, hs_wdata, hs_rdata, link_rx_data, link_tx_data;
  logic      hs_req, hs_we, hs_gnt, link_en, link_rx_valid, link_rx_ready, link_tx_valid;
  logic [15:0] n_hit, n_miss, n_evict, n_backup, n_pred, n_pred_hit, n_reduce_lines;
  logic [R-1:0][31:0] n_mac_beats;
  logic [R-1:0][15:0] n_sfu_ops;
  int n_reads, n_writes;
  int checks = 0, failures = 0;

  endor_top dut (.*);
  offchip_mem_model u_om (.clk, .rst_n, .req_valid(om_req_valid), .req_ready(om_req_ready), .req_we(om_req_we),
    .req_addr(om_req_addr), .req_wdata(om_req_wdata), .rvalid(om_rvalid), .rdata(om_rdata), .n_reads, .n_writes);

  // DRAM bank models: 16 lines per bank and rank
  line_t bank [R][NB][16];
  always_ff @(posedge clk)
    for (int r = 0; r < R; r++) if (bk_rd_en[r]) for (int b = 0; b < NB; b++) bk_rd_data[r][b] <= bank[r][b][bk_rd_addr[r][3:0]];

  // mechanism counters
  int c_arb_conflict = 0, c_link = 0;
  int nmp_ids[$], nmp_lines[$];
  always @(posedge clk) if (rst_n) begin
    if (dut.r_sb_req == '1) c_arb_conflict++;
    if (link_en && link_rx_valid && link_rx_ready) c_link++;
    if (nmp_addr_valid) begin nmp_ids.push_back(int'(nmp_addr_id)); nmp_lines.push_back(int'(nmp_addr_line)); end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- helpers ----------------
  function automatic data_t act(input int r, input int e);
    case (r)
      0:       return dut.g_rank[0].u_rank.u_act.mem[e / LANES][e % LANES];
      default: return dut.g_rank[1].u_rank.u_act.mem[e / LANES][e % LANES];
    endcase
  endfunction

  function automatic rank_cmd_t mk(input rank_op_e op, input int s, input int d, input int n, input int rows, input int wb, input int sc);
    rank_cmd_t c;
    c.op = op; c.src = 12'(s); c.dst = 12'(d); c.len = 12'(n); c.rows = 12'(rows); c.wbase = 16'(wb); c.scale = data_t'(sc);
    return c;
  endfunction

  // issue the same command to both ranks and wait until both are done
  task automatic both(input rank_cmd_t c);
    bit [R-1:0] fin;
    @(negedge clk); rank_cmd_valid = '1; rank_cmd = {R{c}};
    @(negedge clk); rank_cmd_valid = '0;
    fin = '0;
    while (fin != '1) begin fin |= rank_done; @(negedge clk); end
  endtask

  task automatic hs_write(input int line, input line_t d);
    @(negedge clk); hs_req = 1; hs_we = 1; hs_addr = SB_AW'(line); hs_wdata = d;
    while (!hs_gnt) @(negedge clk);
    @(negedge clk); hs_req = 0; hs_we = 0;
  endtask

  task automatic hs_read(input int line, output line_t d);
    @(negedge clk); hs_req = 1; hs_we = 0; hs_addr = SB_AW'(line);
    while (!hs_gnt) @(negedge clk);
    @(negedge clk); hs_req = 0;
    d = hs_rdata;
  endtask

  // GEMV reference: bank b, pass p holds row p*NB + b at lines wb + p*len + i
  task automatic check_gemv(input int src_line, input int dst, input int len, input int rows, input int wb, input string what);
    for (int r = 0; r < R; r++)
      for (int row = 0; row < rows; row++) begin
        longint s; int b, p;
        b = row % NB; p = row / NB; s = 0;
        for (int k = 0; k < len * LANES; k++)
          s += longint'(act(r, src_line * LANES + k)) * longint'(bank[r][b][wb + p * len + k / LANES][k % LANES]);
        checks++;
        if (act(r, dst + row) !== sat_q88(acc_t'(s))) begin
          failures++; $display("FAIL %s rank %0d row %0d: %0d vs %0d", what, r, row, act(r, dst + row), sat_q88(acc_t'(s)));
        end
      end
  endtask

  task automatic cmu_send(input cmu_op_e op, input int id, input int alt, input bit root, input int rew);
    @(negedge clk);
    cmu_cmd_valid = 1; cmu_cmd = '{op: op, id: id_t'(id), alt: id_t'(alt), root: root, reward: score_t'(rew)};
    while (!cmu_cmd_ready) @(negedge clk);
    @(negedge clk); cmu_cmd_valid = 0;
    while (!cmu_op_done) @(negedge clk);
  endtask

  function automatic int last_line_of(input int id);
    int l; l = -1;
    foreach (nmp_ids[i]) if (nmp_ids[i] == id) l = nmp_lines[i];
    return l;
  endfunction

  function automatic line_t sig(input int id, input int i);
    line_t l;
    for (int k = 0; k < LANES; k++) l[k] = data_t'(id * 1000 + i * 10 + k);
    return l;
  endfunction

  task automatic step_tokens(input int base, input int best);
    @(negedge clk); pred_clear = 1; pred_base_id = id_t'(base);
    @(negedge clk); pred_clear = 0;
    for (int t = 0; t < 24; t++) begin
      @(negedge clk); tok_valid = 1; tok_cand = 2'(t % 4);
      tok_logp = data_t'((t % 4 == best) ? -50 : -300 - t);
    end
    @(negedge clk); tok_valid = 0; predict = 1;
    @(negedge clk); predict = 0;
  endtask

  // ---------------- stimulus ----------------
  initial begin
    line_t ln;
    line_t xin [2];
    rank_cmd_valid = '0; rank_cmd = '0; cmu_cmd_valid = 0; cmu_cmd = '0; pred_clear = 0; pred_base_id = 0;
    tok_valid = 0; tok_cand = 0; tok_logp = 0; predict = 0; prm_valid = 0; prm_sel = 0;
    hs_req = 0; hs_we = 0; hs_addr = 0; hs_wdata = '0; link_en = 0; link_rx_valid = 0; link_rx_data = '0;
    for (int r = 0; r < R; r++) for (int b = 0; b < NB; b++) for (int a = 0; a < 16; a++) for (int l = 0; l < LANES; l++)
      bank[r][b][a][l] = (a < 4) ? data_t'($urandom_range(0, 512) - 256) : data_t'($urandom_range(0, 128) - 64);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ===== part 1: one decode step =====
    for (int i = 0; i < 2; i++) begin
      for (int l = 0; l < LANES; l++) xin[i][l] = data_t'($urandom_range(0, 512) - 256);
      hs_write(16000 + i, xin[i]);
    end
    both(mk(OP_LOAD, 16000, 0, 2, 0, 0, 0));
    for (int r = 0; r < R; r++) for (int e = 0; e < 16; e++) begin
      checks++; if (act(r, e) !== xin[e / LANES][e % LANES]) begin failures++; $display("FAIL load rank %0d", r); end
    end
    // attention: S = K x (16 cached tokens, head dim 16)
    both(mk(OP_GEMV, 0, 32, 2, 16, 0, 0));
    check_gemv(0, 32, 2, 16, 0, "QK");
    // P = softmax(S / sqrt(16))
    both(mk(OP_SOFTMAX, 32, 64, 16, 0, 0, 64));
    for (int r = 0; r < R; r++) begin
      real s [16], m, sum, p, got;
      for (int t = 0; t < 16; t++) s[t] = real'(sat_q88(acc_t'(act(r, 32 + t)) * 64)) / 256.0;
      m = s[0]; for (int t = 1; t < 16; t++) if (s[t] > m) m = s[t];
      sum = 0; for (int t = 0; t < 16; t++) sum += $exp(s[t] - m);
      for (int t = 0; t < 16; t++) begin
        p = $exp(s[t] - m) / sum; got = real'(act(r, 64 + t)) / 256.0;
        checks++; if (got - p > 0.01 || p - got > 0.01) begin failures++; $display("FAIL softmax rank %0d %0d: %f vs %f", r, t, got, p); end
      end
    end
    // O = P V, V^T rows at bank lines 2..3
    both(mk(OP_GEMV, 8, 96, 2, 16, 2, 0));
    check_gemv(8, 96, 2, 16, 2, "PV");
    // all-reduce the heads' outputs
    both(mk(OP_ALLREDUCE, 12, 14, 2, 0, 0, 0));
    for (int e = 0; e < 16; e++) begin
      checks++;
      if (act(0, 112 + e) !== sat_add(act(0, 96 + e), act(1, 96 + e)) || act(1, 112 + e) !== act(0, 112 + e)) begin
        failures++; $display("FAIL all-reduce %0d", e);
      end
    end
    // FFN slice: W1 (32 rows) at bank lines 4..7, SiLU, W2 (16 rows, 32 inputs) at lines 8..11
    both(mk(OP_GEMV, 14, 128, 2, 32, 4, 0));
    check_gemv(14, 128, 2, 32, 4, "FFN1");
    both(mk(OP_SILU, 128, 160, 32, 0, 0, 0));
    for (int r = 0; r < R; r++) for (int e = 0; e < 32; e++) begin
      real x, y, got;
      x = real'(act(r, 128 + e)) / 256.0; y = x / (1.0 + $exp(-x)); got = real'(act(r, 160 + e)) / 256.0;
      checks++; if (got - y > 0.02 || y - got > 0.02) begin failures++; $display("FAIL silu rank %0d %0d", r, e); end
    end
    both(mk(OP_GEMV, 20, 192, 4, 16, 8, 0));
    check_gemv(20, 192, 4, 16, 8, "FFN2");
    // all-reduce with a DIMM-Link partner adding 1.0 to every element
    link_en = 1; link_rx_valid = 1;
    for (int l = 0; l < LANES; l++) link_rx_data[l] = data_t'(256);
    both(mk(OP_ALLREDUCE, 24, 26, 2, 0, 0, 0));
    link_en = 0; link_rx_valid = 0;
    for (int e = 0; e < 16; e++) begin
      checks++;
      if (act(0, 208 + e) !== sat_add(sat_add(data_t'(256), act(0, 192 + e)), act(1, 192 + e))) begin
        failures++; $display("FAIL link all-reduce %0d", e);
      end
    end
    // store rank 0's result and read it back on the host side
    @(negedge clk); rank_cmd_valid = 2'b01; rank_cmd[0] = mk(OP_STORE, 26, 16100, 2, 0, 0, 0);
    @(negedge clk); rank_cmd_valid = '0;
    while (!rank_done[0]) @(negedge clk);
    for (int i = 0; i < 2; i++) begin
      hs_read(16100 + i, ln);
      for (int l = 0; l < LANES; l++) begin
        checks++; if (ln[l] !== act(0, 208 + i * LANES + l)) begin failures++; $display("FAIL host read %0d", i); end
      end
    end

    // ===== part 2: reasoning tree, cache management and prediction =====
    cmu_send(CMU_NEW, 0, 0, 1, 0);
    cmu_send(CMU_REWARD, 0, 0, 0, 900);
    // step 1: candidates 1..4 of action 0; the predictor and the PRM agree on 2
    for (int a = 1; a <= 4; a++) begin cmu_send(CMU_NEW, a, 0, 0, 0); cmu_send(CMU_REWARD, a, 0, 0, 100 * a); end
    step_tokens(1, 1);
    checks++; if (!pred_valid || pred_id != 2) begin failures++; $display("FAIL prediction %0d", pred_id); end
    @(negedge clk); prm_valid = 1; prm_sel = 2'd1;
    @(negedge clk); prm_valid = 0;
    // step 2: candidates 5..8 of action 2; predicted 7, PRM picks 5 -> backup
    for (int a = 5; a <= 8; a++) begin cmu_send(CMU_NEW, a, 2, 0, 0); cmu_send(CMU_REWARD, a, 0, 0, 50 * a); end
    // action 5 carries a KV signature in its slot
    for (int i = 0; i < 4; i++) hs_write(last_line_of(5) + i, sig(5, i));
    step_tokens(5, 2);
    checks++; if (!pred_valid || pred_id != 7) begin failures++; $display("FAIL prediction %0d", pred_id); end
    @(negedge clk); prm_valid = 1; prm_sel = 2'd0;
    @(negedge clk); prm_valid = 0;
    while (n_backup == 0 || !cmu_cmd_ready) @(negedge clk);
    // more actions than slots: forces evictions (action 5 has a low score)
    for (int a = 9; a <= 24; a++) begin cmu_send(CMU_NEW, a, 5, 0, 0); cmu_send(CMU_REWARD, a, 0, 0, 2000 + a); end
    // bring action 5 back: its signature must have survived the trip to off-chip memory
    cmu_send(CMU_LOOKUP, 5, 0, 0, 0);
    for (int i = 0; i < 4; i++) begin
      hs_read(last_line_of(5) + i, ln);
      checks++; if (ln !== sig(5, i)) begin failures++; $display("FAIL action 5 KV line %0d after reload", i); end
    end

    // ===== mechanism coverage =====
    begin
      int cnt [string];
      cnt["gemv_beats"]      = int'(n_mac_beats[0]);
      cnt["softmax_silu"]    = int'(n_sfu_ops[0]);
      cnt["allreduce_lines"] = int'(n_reduce_lines);
      cnt["link_reduce"]     = c_link;
      cnt["sb_arbitration"]  = c_arb_conflict;
      cnt["cache_hit"]       = int'(n_hit);
      cnt["cache_miss"]      = int'(n_miss);
      cnt["eviction"]        = int'(n_evict);
      cnt["backup"]          = int'(n_backup);
      cnt["pred_hit"]        = int'(n_pred_hit);
      cnt["pred_miss"]       = int'(n_pred) - int'(n_pred_hit);
      cnt["offchip_reads"]   = n_reads;
      cnt["offchip_writes"]  = n_writes;
      foreach (cnt[k]) begin
        $display("mechanism %-16s %0d", k, cnt[k]);
        checks++;
        if (cnt[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", k); end
      end
      checks++; if (n_backup != 1 || n_pred != 2 || n_pred_hit != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
