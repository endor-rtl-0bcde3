// tb_score_table: applies rewards, lookups and reuses and checks each
// recomputed score against Eq. 1 worked out here:
//   score = reward + floor(256 * reuse / total)   (Q8.8, saturating)
// including the divider latency and the total = 0 case.
module tb_score_table;
  import endor_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cmd_en, busy, done;
  logic [2:0] cmd_op;
  id_t cmd_id, rd_id;
  score_t cmd_reward, score, rd_score;
  int checks = 0, failures = 0;
  int mrew [NUM_ACTIONS], mreuse [NUM_ACTIONS], mtotal;

  score_table dut (.clk, .rst_n, .cmd_en, .cmd_op, .cmd_id, .cmd_reward, .busy, .done, .score, .rd_id, .rd_score);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input int o, input int id, input int rew);
    @(negedge clk);
    cmd_en = 1; cmd_op = 3'(o); cmd_id = id_t'(id); cmd_reward = score_t'(rew);
    @(negedge clk);
    cmd_en = 0;
  endtask

  task automatic calc(input int id);
    int expv, cyc;
    op(4, id, 0);
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    expv = mrew[id] + ((mtotal == 0) ? 0 : (mreuse[id] * 256) / mtotal);
    if (expv > 65535) expv = 65535;
    checks++;
    if (int'(score) != expv) begin failures++; $display("FAIL score id %0d: %0d vs %0d", id, score, expv); end
    rd_id = id_t'(id); #1;
    checks++;
    if (int'(rd_score) != expv) failures++;
    checks++;
    if (cyc > 30) begin failures++; $display("FAIL calc took %0d cycles", cyc); end
  endtask

  initial begin
    cmd_en = 0; cmd_op = 0; cmd_id = 0; cmd_reward = 0; rd_id = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    mtotal = 0;
    for (int e = 0; e < 8; e++) begin op(0, e, 0); mrew[e] = 0; mreuse[e] = 0; end
    op(1, 0, 921); mrew[0] = 921;     // 3.6
    calc(0);                          // total = 0: score = reward
    for (int t = 0; t < 60; t++) begin
      int id, kind;
      id = $urandom_range(0, 7);
      kind = $urandom_range(0, 3);
      case (kind)
        0: begin int r; r = $urandom_range(0, 1200); if (t == 30) r = 65500; op(1, id, r); mrew[id] = r; end
        1: begin op(2, 0, 0); mtotal++; end
        2: begin if (mreuse[id] < mtotal) begin op(3, id, 0); mreuse[id]++; end end
        default: ;
      endcase
      if (t == 30) begin op(3, id, 0); mreuse[id]++; op(2, 0, 0); mtotal++; end
      calc(id);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
