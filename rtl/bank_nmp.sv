// bank_nmp: near-bank GEMV unit, one per DRAM bank.
//
// Each cycle with `en` high it multiplies LANES activations `x` (broadcast by
// the rank-NMP) with LANES weights `w` read from its own bank, sums the LANES
// products in a binary adder tree and adds the sum into the accumulator, as
// drawn in the bank-NMP inset of the architecture overview (multipliers, adder
// tree, "Acc."). `first` marks the first beat of a dot product: the tree sum
// then replaces the accumulator instead of being added to it.
//
// Timing: `acc` holds the running dot product one cycle after each beat, so a
// row of K elements is complete K/LANES cycles after its first beat.
// LANES = 8 gives 16 banks x 2 ranks x 8 = 256 MACs per DIMM (Table I); the
// split of the 256 MACs over banks, the Q8.8 operands and the 40-bit
// accumulator are choices of this implementation.
module bank_nmp
  import endor_pkg::*;
#(
  parameter int unsigned N = LANES
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,     // a beat of x and w is valid
  input  logic               first,  // beat starts a new dot product
  input  data_t [N-1:0]      x,
  input  data_t [N-1:0]      w,
  output acc_t               acc
);

  // products, Q16.16 in 32 bits
  logic signed [2*DATA_W-1:0] prod [N];
  acc_t tree_sum;

  always_comb begin
    for (int i = 0; i < N; i++) prod[i] = x[i] * w[i];
  end

  // binary adder tree, written as a loop over levels
  localparam int unsigned NP = 1 << $clog2(N);
  always_comb begin
    acc_t lvl [2*NP];
    for (int i = 0; i < NP; i++) lvl[NP + i] = (i < N) ? acc_t'(prod[i]) : '0;
    for (int i = NP - 1; i >= 1; i--) lvl[i] = lvl[2*i] + lvl[2*i + 1];
    tree_sum = lvl[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (en)    acc <= first ? tree_sum : acc + tree_sum;
  end

endmodule
