// tb_action_predictor: several reasoning steps with random per-token
// log-probabilities; the prediction must be the candidate with the largest
// summed log-likelihood (computed here), and the PRM's choice must give a hit
// or a miss with the right action IDs.
module tb_action_predictor;
  import endor_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, tok_valid, predict, pred_valid, prm_valid, hit, miss;
  id_t base_id, pred_id, wrong_id, right_id;
  logic [1:0] tok_cand, pred_cand, prm_sel;
  data_t tok_logp;
  logic [15:0] n_pred, n_hit;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  action_predictor dut (.clk, .rst_n, .clear, .base_id, .tok_valid, .tok_cand, .tok_logp, .predict,
    .pred_valid, .pred_cand, .pred_id, .prm_valid, .prm_sel, .hit, .miss, .wrong_id, .right_id, .n_pred, .n_hit);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; tok_valid = 0; predict = 0; prm_valid = 0; base_id = 0; tok_cand = 0; tok_logp = 0; prm_sel = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 30; s++) begin
      int ll [4]; int best, base, sel;
      base = 1 + s * 4;
      @(negedge clk); clear = 1; base_id = id_t'(base);
      @(negedge clk); clear = 0;
      for (int c = 0; c < 4; c++) ll[c] = 0;
      for (int t = 0; t < 40; t++) begin
        int c, lp;
        c = $urandom_range(0, 3); lp = -$urandom_range(0, 1500);
        @(negedge clk); tok_valid = 1; tok_cand = 2'(c); tok_logp = data_t'(lp); ll[c] += lp;
      end
      @(negedge clk); tok_valid = 0; predict = 1;
      @(negedge clk); predict = 0;
      best = 0;
      for (int c = 1; c < 4; c++) if (ll[c] > ll[best]) best = c;
      checks++;
      if (!pred_valid || int'(pred_cand) != best || int'(pred_id) != base + best) begin
        failures++; $display("FAIL step %0d: predicted %0d expected %0d", s, pred_cand, best);
      end
      sel = (s % 3 == 0) ? (best + 1) % 4 : best;
      @(negedge clk); prm_valid = 1; prm_sel = 2'(sel);
      @(negedge clk); prm_valid = 0;
      checks++;
      if (sel == best) begin
        hits++;
        if (!hit || miss) failures++;
      end else begin
        misses++;
        if (!miss || hit || int'(wrong_id) != base + best || int'(right_id) != base + sel) failures++;
      end
    end
    checks++;
    if (int'(n_pred) != 30 || int'(n_hit) != hits) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
