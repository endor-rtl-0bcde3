// tb_cmu_ctrl: loads action KV blocks from the off-chip model into slots of a
// shared-buffer model and stores slots back, with random off-chip ready and
// latency; every line is checked at its destination, and the transfer time is
// checked against the line count.
module tb_cmu_ctrl;
  import endor_pkg::*;
  localparam int SL = 32, NS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, is_store, busy, done;
  id_t id;
  logic [1:0] slot;
  logic om_req_valid, om_req_ready, om_req_we, om_rvalid;
  logic [31:0] om_req_addr;
  line_t om_req_wdata, om_rdata;
  logic sb_en, sb_we;
  logic [$clog2(SL*NS)-1:0] sb_addr;
  line_t sb_wdata, sb_rdata;
  line_t sb [SL*NS];
  int n_reads, n_writes;
  int checks = 0, failures = 0;

  cmu_ctrl #(.SLOT_L(SL), .SLOTS(NS)) dut (.clk, .rst_n, .start, .is_store, .id, .slot, .busy, .done,
    .om_req_valid, .om_req_ready, .om_req_we, .om_req_addr, .om_req_wdata, .om_rvalid, .om_rdata,
    .sb_en, .sb_we, .sb_addr, .sb_wdata, .sb_rdata);
  offchip_mem_model u_om (.clk, .rst_n, .req_valid(om_req_valid), .req_ready(om_req_ready), .req_we(om_req_we),
    .req_addr(om_req_addr), .req_wdata(om_req_wdata), .rvalid(om_rvalid), .rdata(om_rdata), .n_reads, .n_writes);

  always_ff @(posedge clk) if (sb_en) begin
    if (sb_we) sb[sb_addr] <= sb_wdata;
    sb_rdata <= sb[sb_addr];
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input bit st, input int a, input int s);
    int cyc;
    @(negedge clk); start = 1; is_store = st; id = id_t'(a); slot = 2'(s);
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc < SL || cyc > 4 * SL + 20) begin failures++; $display("FAIL transfer took %0d cycles", cyc); end
  endtask

  initial begin
    start = 0; is_store = 0; id = 0; slot = 0;
    for (int i = 0; i < SL*NS; i++) sb[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load action 5 into slot 2 and action 9 into slot 0
    xfer(0, 5, 2);
    xfer(0, 9, 0);
    for (int i = 0; i < SL; i++) begin
      checks += 2;
      if (sb[2*SL + i] !== u_om.peek(32'(5*SL + i))) begin failures++; $display("FAIL load line %0d", i); end
      if (sb[i] !== u_om.peek(32'(9*SL + i))) failures++;
    end
    // change slot 2 and store it as action 17
    for (int i = 0; i < SL; i++) for (int l = 0; l < LANES; l++) sb[2*SL + i][l] = data_t'($urandom);
    xfer(1, 17, 2);
    for (int i = 0; i < SL; i++) begin
      checks++;
      if (u_om.peek(32'(17*SL + i)) !== sb[2*SL + i]) begin failures++; $display("FAIL store line %0d", i); end
    end
    checks++;
    if (n_reads != 2*SL || n_writes != SL) begin failures++; $display("FAIL counts %0d %0d", n_reads, n_writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
