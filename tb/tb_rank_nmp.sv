// tb_rank_nmp: one rank-NMP with bank, shared-buffer and all-reduce models.
// Runs LOAD (x from the shared buffer), a two-pass GEMV against weights held
// in the bank models (result worked out here with the same Q8.8 saturation),
// SOFTMAX and SILU on the result (real-valued reference), ALLREDUCE against a
// loopback that doubles each line, and STORE back to the shared buffer. The
// GEMV cycle count is checked against passes * (len + 1 + NB/LANES) + 2.
module tb_rank_nmp;
  import endor_pkg::*;
  localparam int NB = NUM_BANKS, K_LINES = 3, ROWS = 2 * NB;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cmd_valid, cmd_ready, done, bk_rd_en, sb_req, sb_we, sb_gnt, ar_valid, ar_ready, ar_sum_valid;
  rank_cmd_t cmd;
  logic [15:0] bk_rd_addr;
  line_t [NB-1:0] bk_rd_data;
  logic [SB_AW-1:0] sb_addr;
  line_t sb_wdata, sb_rdata, ar_data, ar_sum_data;
  logic [31:0] n_mac_beats;
  logic [15:0] n_sfu_ops;
  int checks = 0, failures = 0;

  line_t bank [NB][64];
  line_t sb [256];

  rank_nmp #(.NB(NB)) dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .done, .bk_rd_en, .bk_rd_addr, .bk_rd_data,
    .sb_req, .sb_we, .sb_addr, .sb_wdata, .sb_gnt, .sb_rdata, .ar_valid, .ar_ready, .ar_data,
    .ar_sum_valid, .ar_sum_data, .n_mac_beats, .n_sfu_ops);

  always_ff @(posedge clk) if (bk_rd_en) for (int b = 0; b < NB; b++) bk_rd_data[b] <= bank[b][bk_rd_addr[5:0]];
  // shared buffer: granted every other cycle
  logic gtoggle = 0;
  always_ff @(posedge clk) gtoggle <= ~gtoggle;
  assign sb_gnt = sb_req && gtoggle;
  always_ff @(posedge clk) if (sb_gnt) begin
    if (sb_we) sb[sb_addr[7:0]] <= sb_wdata;
    sb_rdata <= sb[sb_addr[7:0]];
  end
  // all-reduce loopback: the "other rank" contributes the same line
  assign ar_ready = ar_valid;
  always_ff @(posedge clk) begin
    ar_sum_valid <= ar_valid;
    for (int l = 0; l < LANES; l++) ar_sum_data[l] <= sat_add(ar_data[l], ar_data[l]);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input rank_cmd_t c, output int cyc);
    @(negedge clk); cmd_valid = 1; cmd = c;
    @(negedge clk); cmd_valid = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  function automatic rank_cmd_t mk(input rank_op_e op, input int s, input int d, input int n, input int rows, input int wb, input int sc);
    rank_cmd_t c;
    c.op = op; c.src = 12'(s); c.dst = 12'(d); c.len = 12'(n); c.rows = 12'(rows); c.wbase = 16'(wb); c.scale = data_t'(sc);
    return c;
  endfunction

  initial begin
    int cyc;
    data_t x [K_LINES*LANES];
    data_t y [ROWS];
    real yr [ROWS], m, sum;
    cmd_valid = 0; cmd = '0;
    for (int i = 0; i < 256; i++) sb[i] = '0;
    // x in shared-buffer lines 10..12, weights: row r = p*NB + b in bank b lines 4 + p*K_LINES + i
    for (int i = 0; i < K_LINES * LANES; i++) begin x[i] = data_t'($urandom_range(0, 512) - 256); sb[10 + i / LANES][i % LANES] = x[i]; end
    for (int b = 0; b < NB; b++) for (int a = 0; a < 64; a++) for (int l = 0; l < LANES; l++) bank[b][a][l] = data_t'($urandom_range(0, 256) - 128);
    for (int r = 0; r < ROWS; r++) begin
      longint s; int b, p;
      b = r % NB; p = r / NB; s = 0;
      for (int k = 0; k < K_LINES * LANES; k++) s += longint'(x[k]) * longint'(bank[b][4 + p * K_LINES + k / LANES][k % LANES]);
      y[r] = sat_q88(acc_t'(s));
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // LOAD x into act lines 0..2
    issue(mk(OP_LOAD, 10, 0, K_LINES, 0, 0, 0), cyc);
    // GEMV into elements 64.. (line 8)
    issue(mk(OP_GEMV, 0, 64, K_LINES, ROWS, 4, 0), cyc);
    for (int r = 0; r < ROWS; r++) begin
      checks++;
      if (dut.u_act.mem[(64 + r) / LANES][(64 + r) % LANES] !== y[r]) begin
        failures++; $display("FAIL gemv row %0d: %0d vs %0d", r, dut.u_act.mem[(64 + r) / LANES][(64 + r) % LANES], y[r]);
      end
    end
    checks++;
    if (cyc != 2 * (K_LINES + 1 + NB / LANES) + 2) begin failures++; $display("FAIL gemv took %0d cycles", cyc); end
    checks++;
    if (n_mac_beats != 32'(2 * K_LINES)) failures++;
    // SOFTMAX over the 32 results (scale 0.25) into elements 128..
    issue(mk(OP_SOFTMAX, 64, 128, ROWS, 0, 0, 64), cyc);
    for (int r = 0; r < ROWS; r++) yr[r] = real'(sat_q88(acc_t'(y[r]) * 64)) / 256.0;
    m = yr[0]; for (int r = 1; r < ROWS; r++) if (yr[r] > m) m = yr[r];
    sum = 0; for (int r = 0; r < ROWS; r++) sum += $exp(yr[r] - m);
    for (int r = 0; r < ROWS; r++) begin
      real got, p;
      p = $exp(yr[r] - m) / sum;
      got = real'(dut.u_act.mem[(128 + r) / LANES][(128 + r) % LANES]) / 256.0;
      checks++;
      if (got - p > 0.01 || p - got > 0.01) begin failures++; $display("FAIL softmax %0d: %f vs %f", r, got, p); end
    end
    // SILU over the GEMV results into elements 192..
    issue(mk(OP_SILU, 64, 192, ROWS, 0, 0, 0), cyc);
    for (int r = 0; r < ROWS; r++) begin
      real got, xr, e;
      xr = real'(y[r]) / 256.0;
      e = xr / (1.0 + $exp(-xr));
      got = real'(dut.u_act.mem[(192 + r) / LANES][(192 + r) % LANES]) / 256.0;
      checks++;
      if (got - e > 0.02 || e - got > 0.02) begin failures++; $display("FAIL silu %0d: %f vs %f", r, got, e); end
    end
    checks++;
    if (n_sfu_ops != 2) failures++;
    // ALLREDUCE lines 8..11 into lines 30..33, then STORE them to the shared buffer line 100..
    issue(mk(OP_ALLREDUCE, 8, 30, 4, 0, 0, 0), cyc);
    issue(mk(OP_STORE, 30, 100, 4, 0, 0, 0), cyc);
    for (int r = 0; r < ROWS; r++) begin
      checks++;
      if (sb[100 + r / LANES][r % LANES] !== sat_add(y[r], y[r])) begin failures++; $display("FAIL reduce/store %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
