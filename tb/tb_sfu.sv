// tb_sfu: runs softmax (two scales, unaligned vectors) and SiLU (in place) on
// an act-buffer model and compares every result with real-valued softmax and
// x*sigmoid(x) computed here; also checks the run time per element.
module tb_sfu;
  import endor_pkg::*;
  localparam int L = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, is_silu, busy, done, rd_en, wr_en;
  logic [11:0] src, dst, len;
  data_t scale;
  logic [5:0] rd_addr, wr_addr;
  logic [LANES-1:0] wr_mask;
  line_t rd_data, wr_data;
  line_t mem [L];
  int checks = 0, failures = 0;

  sfu #(.LINES(L)) dut (.clk, .rst_n, .start, .is_silu, .src, .dst, .len, .scale, .busy, .done,
    .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_mask, .wr_data);

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) for (int l = 0; l < LANES; l++) if (wr_mask[l]) mem[wr_addr][l] <= wr_data[l];
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t get(input int e); return mem[e / LANES][e % LANES]; endfunction
  task automatic put(input int e, input int v); mem[e / LANES][e % LANES] = data_t'(v); endtask

  task automatic run(input bit silu, input int s, input int d, input int n, input int sc, output int cyc);
    @(negedge clk); start = 1; is_silu = silu; src = 12'(s); dst = 12'(d); len = 12'(n); scale = data_t'(sc);
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc;
    start = 0; is_silu = 0; src = 0; dst = 0; len = 0; scale = 0;
    for (int i = 0; i < L; i++) mem[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      real xs [20], m, sum, p, got;
      int sc;
      sc = pass ? 128 : 256;
      for (int i = 0; i < 20; i++) put(3 + i, $urandom_range(0, 3072) - 1536);
      for (int i = 0; i < 20; i++) xs[i] = real'(get(3 + i)) / 256.0 * real'(sc) / 256.0;
      m = xs[0]; for (int i = 1; i < 20; i++) if (xs[i] > m) m = xs[i];
      sum = 0; for (int i = 0; i < 20; i++) sum += $exp(xs[i] - m);
      run(0, 3, 40, 20, sc, cyc);
      for (int i = 0; i < 20; i++) begin
        p = $exp(xs[i] - m) / sum;
        got = real'(get(40 + i)) / 256.0;
        checks++;
        if (got - p > 0.01 || p - got > 0.01) begin failures++; $display("FAIL softmax %0d: %f vs %f", i, got, p); end
      end
      checks++;
      if (cyc > 20 * 6 + 60) begin failures++; $display("FAIL softmax took %0d cycles", cyc); end
    end
    begin
      real x [24], y, got;
      for (int i = 0; i < 24; i++) begin put(200 + i, $urandom_range(0, 4096) - 2048); x[i] = real'(get(200 + i)) / 256.0; end
      run(1, 200, 200, 24, 0, cyc);
      for (int i = 0; i < 24; i++) begin
        y = x[i] / (1.0 + $exp(-x[i]));
        got = real'(get(200 + i)) / 256.0;
        checks++;
        if (got - y > 0.02 || y - got > 0.02) begin failures++; $display("FAIL silu %f: %f vs %f", x[i], got, y); end
      end
      checks++;
      if (cyc > 24 * 40 + 10) begin failures++; $display("FAIL silu took %0d cycles", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
