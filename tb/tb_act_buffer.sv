// tb_act_buffer: writes lines with random element masks and checks every
// read (one cycle latency) against a model of the memory kept here.
module tb_act_buffer;
  import endor_pkg::*;
  localparam int L = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en, wr_en;
  logic [5:0] rd_addr, wr_addr;
  logic [LANES-1:0] wr_mask;
  line_t rd_data, wr_data;
  line_t model [L];
  int checks = 0, failures = 0;

  act_buffer #(.LINES(L)) dut (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_mask, .wr_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_mask = 0; wr_data = '0;
    // fill every line completely
    for (int a = 0; a < L; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(a); wr_mask = '1;
      for (int l = 0; l < LANES; l++) wr_data[l] = data_t'($urandom);
      model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 1) == 1); wr_addr = 6'($urandom); wr_mask = LANES'($urandom);
      for (int l = 0; l < LANES; l++) wr_data[l] = data_t'($urandom);
      if (wr_en) for (int l = 0; l < LANES; l++) if (wr_mask[l]) model[wr_addr][l] = wr_data[l];
      @(negedge clk);
      wr_en = 0;
      rd_en = 1; rd_addr = 6'($urandom);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data !== model[rd_addr]) begin
        failures++;
        if (failures < 5) $display("FAIL line %0d", rd_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
