// tb_shared_buffer: writes through both ports of the shared buffer at its
// full 256 KB size and reads every written line back through the other port.
module tb_shared_buffer;
  import endor_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en, a_we, b_en, b_we;
  logic [SB_AW-1:0] a_addr, b_addr;
  line_t a_wdata, a_rdata, b_wdata, b_rdata;
  line_t model [int];
  int checks = 0, failures = 0;

  shared_buffer dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata, .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SB_AW-1:0] addrs [64];
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = '0; b_wdata = '0;
    for (int i = 0; i < 64; i++) begin
      addrs[i] = (i == 0) ? '0 : (i == 1) ? '1 : SB_AW'($urandom);
      if (i > 1 && model.exists(int'(addrs[i]))) addrs[i] = SB_AW'(i);
      @(negedge clk);
      if (i % 2 == 0) begin a_en = 1; a_we = 1; a_addr = addrs[i]; for (int l = 0; l < LANES; l++) a_wdata[l] = data_t'($urandom); model[int'(addrs[i])] = a_wdata; end
      else           begin b_en = 1; b_we = 1; b_addr = addrs[i]; for (int l = 0; l < LANES; l++) b_wdata[l] = data_t'($urandom); model[int'(addrs[i])] = b_wdata; end
      @(negedge clk); a_en = 0; a_we = 0; b_en = 0; b_we = 0;
    end
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      if (i % 2 == 0) begin b_en = 1; b_addr = addrs[i]; end else begin a_en = 1; a_addr = addrs[i]; end
      @(negedge clk);
      a_en = 0; b_en = 0;
      checks++;
      if (((i % 2 == 0) ? b_rdata : a_rdata) !== model[int'(addrs[i])]) begin
        failures++; $display("FAIL line %0d", addrs[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
