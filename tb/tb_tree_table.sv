// tb_tree_table: builds the example tree of the CMU description (0 -> 1 -> 4)
// plus random branches, checks every stored path against paths kept here,
// and checks that a path longer than the table drops its oldest ancestor.
module tb_tree_table;
  import endor_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ins_en, ins_root;
  id_t ins_id, ins_parent, rd_id;
  id_t [MAX_DEPTH-1:0] rd_path;
  logic [DEPTH_W-1:0] rd_depth;
  int checks = 0, failures = 0;
  int mpath [NUM_ACTIONS][$];

  tree_table dut (.clk, .rst_n, .ins_en, .ins_id, .ins_parent, .ins_root, .rd_id, .rd_path, .rd_depth);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add(input int id, input int parent, input bit root);
    @(negedge clk);
    ins_en = 1; ins_id = id_t'(id); ins_parent = id_t'(parent); ins_root = root;
    if (root) mpath[id] = {id};
    else begin
      mpath[id] = mpath[parent];
      mpath[id].push_back(id);
      if (mpath[id].size() > MAX_DEPTH) void'(mpath[id].pop_front());
    end
    @(negedge clk); ins_en = 0;
  endtask

  task automatic check(input int id);
    rd_id = id_t'(id);
    #1;
    checks++;
    if (int'(rd_depth) != mpath[id].size()) begin
      failures++; $display("FAIL depth of %0d: %0d vs %0d", id, rd_depth, mpath[id].size());
    end else
      for (int k = 0; k < mpath[id].size(); k++)
        if (int'(rd_path[k]) != mpath[id][k]) begin failures++; $display("FAIL path of %0d at %0d", id, k); end
  endtask

  initial begin
    ins_en = 0; ins_root = 0; ins_id = 0; ins_parent = 0; rd_id = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    add(0, 0, 1); add(1, 0, 0); add(2, 0, 0); add(3, 1, 0); add(4, 1, 0);
    check(4);
    checks++;
    if (!(rd_path[0] == 0 && rd_path[1] == 1 && rd_path[2] == 4 && rd_depth == 3)) failures++;
    for (int id = 5; id < 60; id++) add(id, $urandom_range(0, id - 1), 0);
    // a chain longer than MAX_DEPTH
    add(60, 0, 1);
    for (int id = 61; id < 61 + MAX_DEPTH + 3; id++) add(id, id - 1, 0);
    for (int id = 0; id < 61 + MAX_DEPTH + 3; id++) begin @(negedge clk); check(id); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
