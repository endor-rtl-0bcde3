// tb_reasoning_tree: a whole reasoning tree of the size of a grade-school-math
// problem (about 70 actions) driven through one Endor-NMP DIMM at its default
// parameters, the way a tree search would use it.
//
// The host grows the tree step by step. At each step it:
//   1. looks up the parent's path so that every ancestor's KV block is resident;
//   2. creates four candidate actions under it, stamps each new KV block with a
//      signature and reports a PRM reward for it;
//   3. streams token log-likelihoods into the action predictor and asks for a
//      prediction;
//   4. lets the PRM pick a candidate, which agrees with the predictor about
//      seven times in ten.
// A miss makes the DIMM back up the wrongly predicted action and load the
// path of the right one. A hit is followed by a host lookup of the chosen
// action. When the path reaches depth 6, the search restarts from a random
// shallow action, the way tree search revisits earlier nodes. At the end, a
// number of random actions are revisited.
//
// After every lookup the testbench checks two things independently of the
// CMU. First, that the addresses reported for the path are exactly the path
// it keeps itself. Second, that each reported slot still holds that action's
// signature in its first two and last two lines, however often the block has
// gone to off-chip memory and back. Hits, misses, evictions, backups and the
// two prediction outcomes must all occur. The cache hit rate is printed.
module tb_reasoning_tree;
  import endor_pkg::*;
  localparam int R = NUM_RANKS, NB = NUM_BANKS;
  localparam int NODES = 70;   // average tree size of the grade-school-math workload
  localparam int MAXD  = 6;
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

  assign bk_rd_data = '0;   // the rank datapath is not used here

  // addresses reported by the CMU
  int rep_ids[$], rep_lines[$];
  always @(posedge clk) if (rst_n && nmp_addr_valid) begin
    rep_ids.push_back(int'(nmp_addr_id)); rep_lines.push_back(int'(nmp_addr_line));
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- tree kept by the host ----------------
  int parent [NODES];
  int depth  [NODES];
  int n_nodes = 0;

  function automatic line_t sig(input int id, input int i);
    line_t l;
    for (int k = 0; k < LANES; k++) l[k] = data_t'(id * 100 + i * 10 + k + 1);
    return l;
  endfunction

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

  // the four signature lines of a slot: two first, two last
  function automatic int sig_off(input int i);
    return (i < 2) ? i : SLOT_LINES - 4 + i;
  endfunction

  task automatic stamp(input int id, input int line);
    for (int i = 0; i < 4; i++) hs_write(line + sig_off(i), sig(id, i));
  endtask

  task automatic cmu_send(input cmu_op_e op, input int id, input int alt, input bit root, input int rew);
    @(negedge clk);
    cmu_cmd_valid = 1; cmu_cmd = '{op: op, id: id_t'(id), alt: id_t'(alt), root: root, reward: score_t'(rew)};
    while (!cmu_cmd_ready) @(negedge clk);
    @(negedge clk); cmu_cmd_valid = 0;
    while (!cmu_op_done) @(negedge clk);
  endtask

  // the reports since the last clear must be exactly the path of id, and
  // every reported slot must hold its action's signature
  task automatic check_path(input int id, input string what);
    int path[$];
    line_t ln;
    for (int a = id; a >= 0; a = parent[a]) path.push_front(a);
    checks++;
    if (rep_ids.size() != path.size()) begin
      failures++; $display("FAIL %s: %0d addresses reported for a path of %0d", what, rep_ids.size(), path.size());
    end
    foreach (path[k]) begin
      int idx[$];
      idx = rep_ids.find_first_index(x) with (x == path[k]);
      checks++;
      if (idx.size() == 0) begin
        failures++; $display("FAIL %s: no address for action %0d", what, path[k]);
      end else
        for (int i = 0; i < 4; i++) begin
          hs_read(rep_lines[idx[0]] + sig_off(i), ln);
          checks++;
          if (ln !== sig(path[k], i)) begin
            failures++; $display("FAIL %s: action %0d line %0d corrupted", what, path[k], sig_off(i));
          end
        end
    end
  endtask

  task automatic lookup(input int id, input string what);
    rep_ids.delete(); rep_lines.delete();
    cmu_send(CMU_LOOKUP, id, 0, 0, 0);
    check_path(id, what);
  endtask

  task automatic create(input int id, input int par);
    rep_ids.delete(); rep_lines.delete();
    cmu_send(CMU_NEW, id, (par < 0) ? 0 : par, par < 0, 0);
    parent[id] = par; depth[id] = (par < 0) ? 0 : depth[par] + 1;
    checks++;
    if (rep_ids.size() != 1 || rep_ids[0] != id) begin
      failures++; $display("FAIL new action %0d got no slot", id);
    end else
      stamp(id, rep_lines[0]);
    cmu_send(CMU_REWARD, id, 0, 0, int'($urandom_range(0, 1023)));   // reward 0 .. 4.0
    n_nodes++;
  endtask

  // ---------------- search ----------------
  int cur, base, best, chosen, steps_hit = 0, steps_miss = 0;
  initial begin
    rank_cmd_valid = '0; rank_cmd = '0; cmu_cmd_valid = 0; cmu_cmd = '0; pred_clear = 0; pred_base_id = 0;
    tok_valid = 0; tok_cand = 0; tok_logp = 0; predict = 0; prm_valid = 0; prm_sel = 0;
    hs_req = 0; hs_we = 0; hs_addr = 0; hs_wdata = '0; link_en = 0; link_rx_valid = 0; link_rx_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    create(0, -1);
    cur = 0;
    while (n_nodes + 4 <= NODES) begin
      // selection: restart from a shallow action once the path is deep
      if (depth[cur] >= MAXD) begin
        do cur = int'($urandom_range(0, n_nodes - 1)); while (depth[cur] >= MAXD - 2);
      end
      lookup(cur, "parent lookup");
      // expansion: four candidates
      base = n_nodes;
      for (int c = 0; c < 4; c++) create(base + c, cur);
      // prediction from the token log-likelihoods
      best = int'($urandom_range(0, 3));
      @(negedge clk); pred_clear = 1; pred_base_id = id_t'(base);
      @(negedge clk); pred_clear = 0;
      for (int t = 0; t < 32; t++) begin
        @(negedge clk); tok_valid = 1; tok_cand = 2'(t % 4);
        tok_logp = data_t'((t % 4 == best) ? -int'($urandom_range(20, 60)) : -int'($urandom_range(80, 200)));
      end
      @(negedge clk); tok_valid = 0; predict = 1;
      @(negedge clk); predict = 0;
      checks++;
      if (!pred_valid || int'(pred_id) != base + best) begin
        failures++; $display("FAIL prediction %0d, expected %0d", pred_id, base + best);
      end
      // the PRM agrees about 70 % of the time
      chosen = ($urandom_range(0, 9) < 7) ? best : (best + int'($urandom_range(1, 3))) % 4;
      rep_ids.delete(); rep_lines.delete();
      @(negedge clk); prm_valid = 1; prm_sel = 2'(chosen);
      @(negedge clk); prm_valid = 0;
      if (chosen == best) begin
        steps_hit++;
        lookup(base + chosen, "chosen action");
      end else begin
        // the DIMM backs up the wrong action and loads the right path itself
        steps_miss++;
        while (!cmu_op_done) @(negedge clk);
        check_path(base + chosen, "path after backup");
      end
      cur = base + chosen;
    end
    // revisits of random earlier actions
    for (int v = 0; v < 12; v++) lookup(int'($urandom_range(0, n_nodes - 1)), "revisit");

    begin
      int cnt [string];
      cnt["cache_hit"]  = int'(n_hit);
      cnt["cache_miss"] = int'(n_miss);
      cnt["eviction"]   = int'(n_evict);
      cnt["backup"]     = int'(n_backup);
      cnt["pred_hit"]   = int'(n_pred_hit);
      cnt["pred_miss"]  = int'(n_pred) - int'(n_pred_hit);
      foreach (cnt[k]) begin
        $display("mechanism %-12s %0d", k, cnt[k]);
        checks++;
        if (cnt[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", k); end
      end
      checks++;
      if (int'(n_pred_hit) != steps_hit || int'(n_backup) != steps_miss) begin
        failures++; $display("FAIL counters: pred_hit %0d/%0d backup %0d/%0d", n_pred_hit, steps_hit, n_backup, steps_miss);
      end
      $display("actions %0d, cache hit rate %0d / %0d, off-chip lines read %0d written %0d, cycles %0t",
               n_nodes, n_hit, n_hit + n_miss, n_reads, n_writes, $time / 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
