// allreduce: the DIMM-level reduction between the rank-NMPs.
//
// After each rank has computed its part of an attention or FFN layer, the
// partial vectors are summed element by element and the sum is returned to
// every rank, so that all ranks hold the full result for the next step
// (tensor parallelism across ranks). One line (LANES elements) is reduced per
// handshake: the unit waits until every rank offers a line (and, if
// `link_en`, the DIMM-Link partner too), adds them with Q8.8 saturation and
// presents the sum to all ranks and to the link for one cycle (`sum_valid`).
// Reducing across ranks, and the link to other DIMMs, follow the mapping
// dataflow; the line-wise join and the saturating adder are choices of this
// implementation. Latency: one cycle from the last input to `sum_valid`.
module allreduce
  import endor_pkg::*;
#(
  parameter int unsigned RANKS = NUM_RANKS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   link_en,
  input  logic  [RANKS-1:0]      in_valid,
  output logic  [RANKS-1:0]      in_ready,
  input  line_t [RANKS-1:0]      in_data,
  input  logic                   link_rx_valid,
  output logic                   link_rx_ready,
  input  line_t                  link_rx_data,
  output logic                   sum_valid,
  output line_t                  sum_data,
  output logic [15:0]            n_lines
);

  logic  all_in;
  line_t s;
  always_comb begin
    all_in = (&in_valid) && (!link_en || link_rx_valid);
    for (int l = 0; l < LANES; l++) begin
      s[l] = link_en ? link_rx_data[l] : '0;
      for (int r = 0; r < RANKS; r++) s[l] = sat_add(s[l], in_data[r][l]);
    end
    in_ready      = {RANKS{all_in}};
    link_rx_ready = all_in && link_en;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_valid <= 1'b0; sum_data <= '0; n_lines <= '0;
    end else begin
      sum_valid <= all_in;
      if (all_in) begin
        sum_data <= s;
        n_lines  <= n_lines + 1'b1;
      end
    end
  end

endmodule
