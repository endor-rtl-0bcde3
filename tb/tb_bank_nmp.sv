// tb_bank_nmp: drives random dot products of several lengths through one
// bank-NMP and compares the accumulator with sums computed here, including
// the one-cycle result latency.
module tb_bank_nmp;
  import endor_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, first;
  data_t [LANES-1:0] x, w;
  acc_t acc;
  int checks = 0, failures = 0;

  bank_nmp dut (.clk, .rst_n, .en, .first, .x, .w, .acc);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ref_sum;
    en = 0; first = 0; x = '0; w = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int beats;
      beats = 1 + (t % 6);
      ref_sum = 0;
      for (int b = 0; b < beats; b++) begin
        @(negedge clk);
        en = 1; first = (b == 0);
        for (int l = 0; l < LANES; l++) begin
          x[l] = data_t'($urandom_range(0, 65535));
          w[l] = data_t'($urandom_range(0, 65535));
          if (t < 4) begin x[l] = 16'sh7fff; w[l] = (t % 2) ? 16'sh8000 : 16'sh7fff; end
          ref_sum += longint'(x[l]) * longint'(w[l]);
        end
      end
      @(negedge clk);
      en = 0;
      // result visible one cycle after the last beat
      checks++;
      if (acc !== acc_t'(ref_sum)) begin
        failures++;
        $display("FAIL dot %0d: got %0d expected %0d", t, acc, ref_sum);
      end
      // idle cycles keep the result
      @(negedge clk);
      checks++;
      if (acc !== acc_t'(ref_sum)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
