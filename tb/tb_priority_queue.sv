// tb_priority_queue: random inserts, removes and score updates against a
// sorted list kept here; after every operation the whole queue must be in
// ascending score order with the lowest score at the head (the victim).
module tb_priority_queue;
  import endor_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ins_en, rm_en, head_valid, full;
  id_t ins_id, rm_id, head_id;
  score_t ins_score, head_score;
  logic [$clog2(NUM_SLOTS+1)-1:0] count;
  id_t [NUM_SLOTS-1:0] q_id;
  score_t [NUM_SLOTS-1:0] q_score;
  int checks = 0, failures = 0;
  int mid[$], msc[$];

  priority_queue dut (.clk, .rst_n, .ins_en, .ins_id, .ins_score, .rm_en, .rm_id,
    .head_valid, .head_id, .head_score, .count, .full, .q_id, .q_score);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (int'(count) != mid.size() || full != (mid.size() == NUM_SLOTS)) begin
      failures++; $display("FAIL count %0d vs %0d", count, mid.size());
    end else begin
      for (int i = 0; i < mid.size(); i++)
        if (int'(q_id[i]) != mid[i] || int'(q_score[i]) != msc[i]) begin
          failures++; $display("FAIL entry %0d: %0d/%0d vs %0d/%0d", i, q_id[i], q_score[i], mid[i], msc[i]); break;
        end
      if (mid.size() > 0 && (head_id != id_t'(mid[0]) || !head_valid)) failures++;
    end
  endtask

  task automatic do_ins(input int id, input int sc);
    int p;
    @(negedge clk); ins_en = 1; ins_id = id_t'(id); ins_score = score_t'(sc);
    @(negedge clk); ins_en = 0;
    p = 0;
    while (p < msc.size() && msc[p] <= sc) p++;
    mid.insert(p, id); msc.insert(p, sc);
    compare();
  endtask

  task automatic do_rm(input int id);
    @(negedge clk); rm_en = 1; rm_id = id_t'(id);
    @(negedge clk); rm_en = 0;
    foreach (mid[i]) if (mid[i] == id) begin mid.delete(i); msc.delete(i); break; end
    compare();
  endtask

  initial begin
    int next_id;
    ins_en = 0; rm_en = 0; ins_id = 0; rm_id = 0; ins_score = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // the figure's example: ID 0 (3.6), 1 (2.4), 3 (2.0) -> order 3, 1, 0
    do_ins(0, 922); do_ins(1, 614); do_ins(3, 512);
    checks++;
    if (!(q_id[0] == 3 && q_id[1] == 1 && q_id[2] == 0)) failures++;
    next_id = 4;
    for (int t = 0; t < 300; t++) begin
      int k;
      k = $urandom_range(0, 2);
      if (k == 0 && mid.size() < NUM_SLOTS) begin do_ins(next_id % NUM_ACTIONS, $urandom_range(0, 40) * 16); next_id++; end
      else if (k == 1 && mid.size() > 0) do_rm(mid[$urandom_range(0, mid.size() - 1)]);
      else if (mid.size() > 0) begin
        int id; id = mid[$urandom_range(0, mid.size() - 1)];
        do_rm(id); do_ins(id, $urandom_range(0, 2000));
      end
    end
    // a full queue refuses a further insert
    while (mid.size() < NUM_SLOTS) begin do_ins(next_id % NUM_ACTIONS, $urandom_range(0, 2000)); next_id++; end
    @(negedge clk); ins_en = 1; ins_id = 0; ins_score = 5;
    @(negedge clk); ins_en = 0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
