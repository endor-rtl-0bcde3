// offchip_mem_model: behavioural model of the off-chip memory that holds the
// whole KV cache. Lines are kept in an associative array (unwritten lines read
// as a pattern derived from the address); requests are accepted with a random
// ready, read data return in order after a random 2 to 6 cycle latency.
// Requests are ignored during reset. Counts reads and writes for the
// testbenches.
module offchip_mem_model
  import endor_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid,
  output logic         req_ready,
  input  logic         req_we,
  input  logic [31:0]  req_addr,
  input  line_t        req_wdata,
  output logic         rvalid,
  output line_t        rdata,
  output int           n_reads,
  output int           n_writes
);
  line_t mem [int unsigned];
  line_t q_data [$];
  int    q_due [$];
  int    cyc = 0;

  function automatic line_t pattern(input logic [31:0] a);
    line_t l;
    for (int i = 0; i < LANES; i++) l[i] = data_t'(a * 8 + 32'(i) + 32'h100);
    return l;
  endfunction

  function automatic line_t peek(input logic [31:0] a);
    return mem.exists(a) ? mem[a] : pattern(a);
  endfunction

  initial begin req_ready = 1; rvalid = 0; rdata = '0; n_reads = 0; n_writes = 0; end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    rvalid <= 0;
    if (q_due.size() > 0 && q_due[0] <= cyc) begin
      rvalid <= 1; rdata <= q_data.pop_front(); void'(q_due.pop_front());
    end
    if (rst_n && req_valid && req_ready) begin
      if (req_we) begin mem[req_addr] = req_wdata; n_writes <= n_writes + 1; end
      else begin
        q_data.push_back(peek(req_addr));
        q_due.push_back(cyc + $urandom_range(2, 6) + ((q_due.size() > 0) ? 0 : 0));
        n_reads <= n_reads + 1;
      end
    end
    req_ready <= ($urandom_range(0, 3) != 0);
  end
endmodule
