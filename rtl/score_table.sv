// score_table: per-action cache priority, Eq. 1:  score = reward + #reuse/#total.
//
// reward is the PRM's reward for the action (unsigned Q8.8), #reuse counts the
// path lookups in which the action appeared, #total counts all path lookups.
// The ratio is computed with a sequential divider as an 8-bit fraction and
// added to the reward with saturation. Commands (one at a time, `busy` while
// the divider runs):
//   INIT    clear reward and reuse count of id
//   REWARD  set the reward of id
//   LOOKUP  #total += 1
//   REUSE   #reuse[id] += 1
//   CALC    recompute score[id]; `done` pulses with the new score on `score`
// `rd_score` reads the stored score combinationally. Eq. 1 is the design's;
// what is counted as a reuse and as the total, the formats and the divider are
// choices of this implementation. CALC takes 26 cycles.
module score_table
  import endor_pkg::*;
#(
  parameter int unsigned ENTRIES = NUM_ACTIONS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_en,
  input  logic [2:0]  cmd_op,   // 0 INIT, 1 REWARD, 2 LOOKUP, 3 REUSE, 4 CALC
  input  id_t         cmd_id,
  input  score_t      cmd_reward,
  output logic        busy,
  output logic        done,
  output score_t      score,
  input  id_t         rd_id,
  output score_t      rd_score
);

  score_t        reward [ENTRIES];
  logic [15:0]   reuse  [ENTRIES];
  score_t        scr    [ENTRIES];
  logic [15:0]   total;
  id_t           calc_id;
  logic          calc_run;

  logic          dv_start, dv_done, dv_busy;
  logic [23:0]   dv_q;
  seq_div #(.W(24)) u_div (
    .clk, .rst_n, .start(dv_start), .num({reuse[cmd_id], 8'd0}), .den({8'd0, total}),
    .busy(dv_busy), .done(dv_done), .quot(dv_q)
  );

  assign dv_start = cmd_en && (cmd_op == 3'd4) && !busy && (total != '0);
  assign busy     = calc_run;
  assign rd_score = scr[rd_id];

  logic [SCORE_W:0] sum;
  always_comb sum = {1'b0, reward[calc_id]} + ((total == '0) ? '0 : (SCORE_W+1)'(dv_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        reward[e] <= '0; reuse[e] <= '0; scr[e] <= '0;
      end
      total <= '0; calc_id <= '0; calc_run <= 1'b0; done <= 1'b0; score <= '0;
    end else begin
      done <= 1'b0;
      if (cmd_en && !busy) begin
        case (cmd_op)
          3'd0: begin reward[cmd_id] <= '0; reuse[cmd_id] <= '0; end
          3'd1: reward[cmd_id] <= cmd_reward;
          3'd2: total <= total + 1'b1;
          3'd3: reuse[cmd_id] <= reuse[cmd_id] + 1'b1;
          3'd4: begin calc_id <= cmd_id; calc_run <= 1'b1; end
          default: ;
        endcase
      end
      if (calc_run && (dv_done || (total == '0 && !dv_busy))) begin
        calc_run     <= 1'b0;
        done         <= 1'b1;
        score        <= sum[SCORE_W] ? '1 : sum[SCORE_W-1:0];
        scr[calc_id] <= sum[SCORE_W] ? '1 : sum[SCORE_W-1:0];
      end
    end
  end

endmodule
