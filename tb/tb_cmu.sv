// tb_cmu: a small reasoning tree (4 slots of 4 lines) driven through the CMU
// with an off-chip memory model and a shared-buffer model. The expected
// victims, addresses, hit/miss counts and the KV data that must end up in each
// slot and in off-chip memory are worked out by hand from Eq. 1
// (score = reward + 256*reuse/total in Q8.8) and are listed with each step.
module tb_cmu;
  import endor_pkg::*;
  localparam int NS = 4, SL = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cmd_valid, cmd_ready, op_done, nmp_addr_valid, nmp_addr_hit;
  cmu_cmd_t cmd;
  id_t nmp_addr_id;
  logic [3:0] nmp_addr_line;
  logic [15:0] n_hit, n_miss, n_evict, n_backup;
  logic om_req_valid, om_req_ready, om_req_we, om_rvalid;
  logic [31:0] om_req_addr;
  line_t om_req_wdata, om_rdata;
  logic sb_en, sb_we;
  logic [3:0] sb_addr;
  line_t sb_wdata, sb_rdata;
  line_t sb [NS*SL];
  line_t kv [8][SL];      // KV data written by the "NMP" for each action
  int n_reads, n_writes;
  int checks = 0, failures = 0;
  int ev_id[$], ev_line[$], ev_hit[$];

  cmu #(.SLOTS(NS), .SLOT_L(SL)) dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .op_done,
    .nmp_addr_valid, .nmp_addr_id, .nmp_addr_line, .nmp_addr_hit, .n_hit, .n_miss, .n_evict, .n_backup,
    .om_req_valid, .om_req_ready, .om_req_we, .om_req_addr, .om_req_wdata, .om_rvalid, .om_rdata,
    .sb_en, .sb_we, .sb_addr, .sb_wdata, .sb_rdata);
  offchip_mem_model u_om (.clk, .rst_n, .req_valid(om_req_valid), .req_ready(om_req_ready), .req_we(om_req_we),
    .req_addr(om_req_addr), .req_wdata(om_req_wdata), .rvalid(om_rvalid), .rdata(om_rdata), .n_reads, .n_writes);

  always_ff @(posedge clk) if (sb_en) begin
    if (sb_we) sb[sb_addr] <= sb_wdata;
    sb_rdata <= sb[sb_addr];
  end
  always @(posedge clk) if (rst_n && nmp_addr_valid) begin
    ev_id.push_back(int'(nmp_addr_id)); ev_line.push_back(int'(nmp_addr_line)); ev_hit.push_back(int'(nmp_addr_hit));
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input cmu_op_e op, input int id, input int alt, input bit root, input int rew);
    @(negedge clk);
    cmd_valid = 1; cmd = '{op: op, id: id_t'(id), alt: id_t'(alt), root: root, reward: score_t'(rew)};
    while (!cmd_ready) @(negedge clk);
    @(negedge clk); cmd_valid = 0;
    while (!op_done) @(negedge clk);
  endtask

  task automatic expect_ev(input int id, input int line, input int hit);
    checks++;
    if (ev_id.size() == 0) begin failures++; $display("FAIL missing address for %0d", id); return; end
    if (ev_id[0] != id || ev_line[0] != line || ev_hit[0] != hit) begin
      failures++; $display("FAIL address: got id %0d line %0d hit %0d, expected %0d %0d %0d", ev_id[0], ev_line[0], ev_hit[0], id, line, hit);
    end
    void'(ev_id.pop_front()); void'(ev_line.pop_front()); void'(ev_hit.pop_front());
  endtask

  // the NMP writes the KV cache of a new action into its slot
  task automatic nmp_fill(input int id, input int line);
    for (int i = 0; i < SL; i++) sb[line + i] = kv[id][i];
  endtask

  task automatic check_slot(input int line, input int id);
    for (int i = 0; i < SL; i++) begin
      checks++;
      if (sb[line + i] !== kv[id][i]) begin failures++; $display("FAIL slot at line %0d does not hold action %0d", line, id); break; end
    end
  endtask

  task automatic check_offchip(input int id);
    for (int i = 0; i < SL; i++) begin
      checks++;
      if (u_om.peek(32'(id * SL + i)) !== kv[id][i]) begin failures++; $display("FAIL off-chip copy of action %0d", id); break; end
    end
  endtask

  task automatic check_counts(input int h, input int m, input int e, input int b);
    checks++;
    if (int'(n_hit) != h || int'(n_miss) != m || int'(n_evict) != e || int'(n_backup) != b) begin
      failures++; $display("FAIL counts hit %0d miss %0d evict %0d backup %0d", n_hit, n_miss, n_evict, n_backup);
    end
  endtask

  initial begin
    cmd_valid = 0; cmd = '0;
    for (int i = 0; i < NS*SL; i++) sb[i] = '0;
    for (int a = 0; a < 8; a++) for (int i = 0; i < SL; i++) for (int l = 0; l < LANES; l++) kv[a][i][l] = data_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // build the tree 0 -> {1, 2}, 1 -> {3, 4}; rewards 3.0 2.0 1.0 2.5 0.5
    send(CMU_NEW, 0, 0, 1, 0);  expect_ev(0, 0, 0);  nmp_fill(0, 0);  send(CMU_REWARD, 0, 0, 0, 768);
    send(CMU_NEW, 1, 0, 0, 0);  expect_ev(1, 4, 0);  nmp_fill(1, 4);  send(CMU_REWARD, 1, 0, 0, 512);
    send(CMU_NEW, 2, 0, 0, 0);  expect_ev(2, 8, 0);  nmp_fill(2, 8);  send(CMU_REWARD, 2, 0, 0, 256);
    send(CMU_NEW, 3, 1, 0, 0);  expect_ev(3, 12, 0); nmp_fill(3, 12); send(CMU_REWARD, 3, 0, 0, 640);
    check_counts(0, 0, 0, 0);
    // no free slot: action 2 (score 1.0, lowest) is evicted to off-chip memory
    send(CMU_NEW, 4, 1, 0, 0);  expect_ev(4, 8, 0);  check_offchip(2); nmp_fill(4, 8);
    send(CMU_REWARD, 4, 0, 0, 128);
    check_counts(0, 0, 1, 0);
    // LOOKUP 2 (path 0, 2): 0 hits; 2 misses, evicts 4 (0.5) and is reloaded into slot 2
    send(CMU_LOOKUP, 2, 0, 0, 0);
    expect_ev(0, 0, 1); expect_ev(2, 8, 0);
    check_slot(8, 2); check_offchip(4);
    check_counts(1, 1, 2, 0);
    // misprediction: 3 was predicted, 4 is right. 3 is backed up, its slot freed,
    // then path 0, 1, 4: hits on 0 and 1, 4 is loaded into the freed slot 3
    send(CMU_BACKUP, 3, 4, 0, 0);
    check_offchip(3);
    expect_ev(0, 0, 1); expect_ev(1, 4, 1); expect_ev(4, 12, 0);
    check_slot(12, 4);
    check_counts(3, 2, 2, 1);
    // LOOKUP 3 (path 0, 1, 3): scores now 0:4.0 1:2.5 2:2.0 4:1.0 -> victim 4
    send(CMU_LOOKUP, 3, 0, 0, 0);
    expect_ev(0, 0, 1); expect_ev(1, 4, 1); expect_ev(3, 12, 0);
    check_slot(12, 3); check_slot(8, 2); check_slot(0, 0); check_slot(4, 1);
    check_counts(5, 3, 3, 1);
    checks++;
    if (ev_id.size() != 0) begin failures++; $display("FAIL %0d extra addresses", ev_id.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
