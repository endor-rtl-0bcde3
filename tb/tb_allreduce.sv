// tb_allreduce: ranks offer lines at random times; the sum (saturating Q8.8,
// worked out here) must appear once all ranks (and the link partner when
// enabled) have offered, one cycle later, and be delivered to every rank.
module tb_allreduce;
  import endor_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic link_en, link_rx_valid, link_rx_ready, sum_valid;
  logic [NUM_RANKS-1:0] in_valid, in_ready;
  line_t [NUM_RANKS-1:0] in_data;
  line_t link_rx_data, sum_data;
  logic [15:0] n_lines;
  int checks = 0, failures = 0;

  allreduce dut (.clk, .rst_n, .link_en, .in_valid, .in_ready, .in_data, .link_rx_valid, .link_rx_ready,
    .link_rx_data, .sum_valid, .sum_data, .n_lines);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(input int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  initial begin
    link_en = 0; link_rx_valid = 0; in_valid = 0; in_data = '0; link_rx_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      line_t expv;
      link_en = (t >= 30);
      for (int r = 0; r < NUM_RANKS; r++)
        for (int l = 0; l < LANES; l++) in_data[r][l] = data_t'((t % 10 == 0) ? 30000 : $urandom_range(0, 8000) - 4000);
      for (int l = 0; l < LANES; l++) link_rx_data[l] = data_t'($urandom_range(0, 8000) - 4000);
      for (int l = 0; l < LANES; l++) begin
        int s; s = link_en ? int'(link_rx_data[l]) : 0;
        for (int r = 0; r < NUM_RANKS; r++) s = sat(s + int'(in_data[r][l]));
        expv[l] = data_t'(s);
      end
      // offer the inputs one by one: no sum before the last one
      for (int r = 0; r < NUM_RANKS; r++) begin
        @(negedge clk); in_valid[r] = 1;
        if (r < NUM_RANKS - 1 || link_en) begin
          @(negedge clk); checks++; if (sum_valid || in_ready != 0) failures++;
        end
      end
      if (link_en) begin @(negedge clk); link_rx_valid = 1; end
      #1; checks++; if (in_ready != '1) failures++;
      @(negedge clk); in_valid = 0; link_rx_valid = 0;
      checks++;
      if (!sum_valid || sum_data !== expv) begin failures++; $display("FAIL line %0d", t); end
    end
    checks++;
    if (n_lines != 60) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
