// tb_info_table: random tag/slot writes against a model; every entry is read
// back after each write burst; reset must leave all tags at N (miss).
module tb_info_table;
  import endor_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, wr_tag, rd_tag;
  id_t wr_id, rd_id;
  logic [SLOT_W-1:0] wr_slot, rd_slot;
  bit mtag [NUM_ACTIONS];
  int mslot [NUM_ACTIONS];
  int checks = 0, failures = 0;

  info_table dut (.clk, .rst_n, .wr_en, .wr_id, .wr_tag, .wr_slot, .rd_id, .rd_tag, .rd_slot);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_tag = 0; wr_id = 0; wr_slot = 0; rd_id = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < NUM_ACTIONS; e++) begin mtag[e] = 0; mslot[e] = 0; end
    for (int r = 0; r < 5; r++) begin
      for (int t = 0; t < 50; t++) begin
        @(negedge clk);
        wr_en = 1; wr_id = id_t'($urandom); wr_tag = 1'($urandom); wr_slot = SLOT_W'($urandom);
        mtag[wr_id] = wr_tag; mslot[wr_id] = int'(wr_slot);
      end
      @(negedge clk); wr_en = 0;
      for (int e = 0; e < NUM_ACTIONS; e++) begin
        rd_id = id_t'(e); #1;
        checks++;
        if (rd_tag != mtag[e] || (mtag[e] && int'(rd_slot) != mslot[e])) begin
          failures++; if (failures < 5) $display("FAIL id %0d", e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
