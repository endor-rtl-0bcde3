// action_predictor: prediction-based pipelining of LLM and PRM.
//
// While the LLM decodes the candidate actions of a reasoning step, the unit
// sums each candidate's token log-probabilities into its log-likelihood
// (log L = sum of log p(token)). On `predict` it picks the candidate with the
// highest log-likelihood, so the LLM can continue from it before the PRM has
// scored the candidates. When the PRM's choice arrives (`prm_valid`), the unit
// reports whether the prediction held (`hit`) or not (`miss`); a miss gives the
// CMU the wrong and the correct action IDs for backup and reload.
//
// Candidates of one step have consecutive action IDs starting at `base_id`
// (given with `clear`). Log-probabilities are signed Q8.8, the sums 24 bits;
// ties go to the lower candidate index. Argmax-of-log-likelihood and the
// hit/miss handling follow the design; the ID scheme, formats and counters are
// choices of this implementation. The prediction is registered: `pred_valid`
// rises one cycle after `predict`.
module action_predictor
  import endor_pkg::*;
#(
  parameter int unsigned CANDS = 4,
  localparam int unsigned CW   = $clog2(CANDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  id_t           base_id,
  input  logic          tok_valid,
  input  logic [CW-1:0] tok_cand,
  input  data_t         tok_logp,
  input  logic          predict,
  output logic          pred_valid,
  output logic [CW-1:0] pred_cand,
  output id_t           pred_id,
  input  logic          prm_valid,
  input  logic [CW-1:0] prm_sel,
  output logic          hit,
  output logic          miss,
  output id_t           wrong_id,
  output id_t           right_id,
  output logic [15:0]   n_pred,
  output logic [15:0]   n_hit
);

  logic signed [23:0] ll [CANDS];
  id_t base_q;

  logic [CW-1:0]      best;
  logic signed [23:0] best_ll;
  always_comb begin
    best = '0; best_ll = ll[0];
    for (int i = 1; i < CANDS; i++)
      if (ll[i] > best_ll) begin best = CW'(i); best_ll = ll[i]; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CANDS; i++) ll[i] <= '0;
      base_q <= '0; pred_valid <= 1'b0; pred_cand <= '0; pred_id <= '0;
      hit <= 1'b0; miss <= 1'b0; wrong_id <= '0; right_id <= '0; n_pred <= '0; n_hit <= '0;
    end else begin
      hit <= 1'b0; miss <= 1'b0;
      if (clear) begin
        for (int i = 0; i < CANDS; i++) ll[i] <= '0;
        base_q <= base_id; pred_valid <= 1'b0;
      end else if (tok_valid) begin
        ll[tok_cand] <= ll[tok_cand] + 24'(tok_logp);
      end
      if (predict) begin
        pred_valid <= 1'b1; pred_cand <= best; pred_id <= base_q + id_t'(best);
        n_pred <= n_pred + 1'b1;
      end
      if (prm_valid && pred_valid) begin
        if (prm_sel == pred_cand) begin
          hit <= 1'b1; n_hit <= n_hit + 1'b1;
        end else begin
          miss <= 1'b1; wrong_id <= pred_id; right_id <= base_q + id_t'(prm_sel);
        end
        pred_valid <= 1'b0;
      end
    end
  end

endmodule
