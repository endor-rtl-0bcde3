// exp_unit: fixed-point e^x for x <= 0, the exponential the SFU needs for
// softmax and SiLU.
//
// e^x is computed as 2^(-t) with t = -x * log2(e). The integer part of t
// becomes a right shift; 2^(-f) for the fraction f in [0,1) comes from the
// second-order polynomial 1 - 0.6565 f + 0.1567 f^2 (error below 0.6 %).
// Positive inputs are treated as 0. The method and the accuracy are choices of
// this implementation; the design only states that the SFU computes e^x.
//
// Interface: x is signed Q8.8, y is unsigned Q1.16 (1.0 = 65536).
// Purely combinational.
module exp_unit
  import endor_pkg::*;
(
  input  data_t       x,
  output logic [16:0] y
);

  localparam logic [31:0] LOG2E_Q16 = 32'd94548;  // log2(e) * 65536
  localparam logic [31:0] C1       = 32'd43024;  // 0.6565 * 65536
  localparam logic [31:0] C2       = 32'd10270;  // 0.1567 * 65536

  logic [15:0] t;       // -x, Q8.8
  logic [47:0] u;       // t * log2(e), Q24.24
  logic [23:0] ip;      // integer part of u
  logic [31:0] f16;     // fractional part of u, Q0.16
  logic [63:0] lin, quad;
  logic [16:0] frac_pow;

  always_comb begin
    t   = x[DATA_W-1] ? 16'(-x) : 16'd0;
    u   = 48'(t) * 48'(LOG2E_Q16);
    ip  = u[47:24];
    f16 = {16'd0, u[23:8]};
    lin  = (64'(C1) * 64'(f16)) >> 16;
    quad = (64'(C2) * 64'(f16) * 64'(f16)) >> 32;
    frac_pow = 17'(64'd65536 - lin + quad);
    y = (ip > 24'd16) ? 17'd0 : (frac_pow >> ip[4:0]);
  end

endmodule
