// sfu: special function unit of a rank-NMP (one per rank, so two softmax units
// per DIMM as in Table I).
//
// It runs the non-linear operators of a decode step on a vector held in the
// act buffer: softmax over the attention scores (after an optional scale, e.g.
// 1/sqrt(d)) and the SiLU activation of the FFN. The design gives only these
// functions; the way they are computed here is this implementation's own:
//
//   softmax, three passes over the vector:
//     MAX  : m = max(scale * x)
//     EXP  : e_i = exp(scale * x_i - m) (Q0.16, written to dst), sum += e_i
//            then r = 2^32 / sum on a sequential divider
//     NORM : p_i = e_i * r >> 16, written to dst as Q8.8
//   SiLU, one pass: s = 1 / (1 + exp(-|x|)), sigmoid = x>=0 ? s : 1-s,
//     y = x * sigmoid, one division per element.
//
// Interface: `start` with op/src/dst/len/scale (src, dst are element indices in
// the act buffer). The act-buffer read port has one cycle of latency; writes
// are single elements through the write mask. `done` pulses when the last
// result is written. Timing: softmax takes about 2 cycles per element per pass
// plus 34 for the division; SiLU about 36 cycles per element. dst may equal src.
module sfu
  import endor_pkg::*;
#(
  parameter int unsigned LINES = 512,
  localparam int unsigned AW   = $clog2(LINES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             is_silu,   // 0: softmax, 1: SiLU
  input  logic [11:0]      src,
  input  logic [11:0]      dst,
  input  logic [11:0]      len,
  input  data_t            scale,
  output logic             busy,
  output logic             done,
  // act buffer
  output logic             rd_en,
  output logic [AW-1:0]    rd_addr,
  input  line_t            rd_data,
  output logic             wr_en,
  output logic [AW-1:0]    wr_addr,
  output logic [LANES-1:0] wr_mask,
  output line_t            wr_data
);

  localparam int unsigned LW = $clog2(LANES);

  typedef enum logic [3:0] {
    S_IDLE, S_RD, S_MAX, S_EXP, S_RECIP, S_NORM, S_SILU, S_SEXP, S_SDIV, S_DONE
  } state_e;
  typedef enum logic [1:0] {P_MAX, P_EXP, P_NORM, P_SILU} pass_e;

  state_e st;
  pass_e  pass;
  logic   silu_q;
  logic [11:0] src_q, dst_q, len_q, idx, el_q;
  data_t  scale_q, mx, xs_q;
  logic [31:0] sum, recip;

  // divider shared by both functions
  logic        dv_start, dv_done, dv_busy;
  logic [32:0] dv_num, dv_den, dv_q;
  seq_div #(.W(33)) u_div (
    .clk, .rst_n, .start(dv_start), .num(dv_num), .den(dv_den),
    .busy(dv_busy), .done(dv_done), .quot(dv_q)
  );

  // element picked from the line read in the previous cycle
  data_t el;
  data_t xs;           // scaled element
  data_t xm;           // scaled element minus max
  logic [16:0] ex;
  data_t ex_in;
  always_comb begin
    el    = rd_data[el_q[LW-1:0]];
    xs    = sat_q88(acc_t'(el) * acc_t'(scale_q));
    xm    = sat_add(xs, data_t'(-mx));
    ex_in = (pass == P_SILU) ? (xs_q[DATA_W-1] ? xs_q : data_t'(-xs_q)) : xm;
  end
  exp_unit u_exp (.x(ex_in), .y(ex));

  logic [16:0] sig;
  logic signed [DATA_W+17:0] silu_prod;
  logic [47:0] norm_prod;
  always_comb begin
    sig       = xs_q[DATA_W-1] ? 17'(17'd65536 - dv_q[16:0]) : dv_q[16:0];
    silu_prod = (DATA_W+18)'(xs_q) * $signed({1'b0, sig});
    norm_prod = 48'(el[DATA_W-1:0]) * 48'(recip);
  end

  assign busy = (st != S_IDLE);

  // the read of element idx of the current pass is issued in S_RD
  logic [11:0] rd_el;
  always_comb begin
    rd_el   = (pass == P_NORM) ? dst_q + idx : src_q + idx;
    rd_en   = (st == S_RD);
    rd_addr = AW'(rd_el >> LW);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pass <= P_MAX; silu_q <= 1'b0; src_q <= '0; dst_q <= '0; len_q <= '0;
      idx <= '0; el_q <= '0; scale_q <= '0; mx <= '0; xs_q <= '0; sum <= '0; recip <= '0;
      done <= 1'b0; wr_en <= 1'b0; wr_addr <= '0; wr_mask <= '0;
      wr_data <= '0; dv_start <= 1'b0; dv_num <= '0; dv_den <= '0;
    end else begin
      done <= 1'b0; wr_en <= 1'b0; dv_start <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          silu_q <= is_silu; src_q <= src; dst_q <= dst; len_q <= len; idx <= '0;
          scale_q <= is_silu ? data_t'(16'sd256) : scale;
          pass <= is_silu ? P_SILU : P_MAX;
          mx <= data_t'(16'sh8000); sum <= '0;
          st <= (len == '0) ? S_DONE : S_RD;
        end
        // issue the read of element idx of the current pass
        S_RD: begin
          el_q <= rd_el;
          case (pass)
            P_MAX:   st <= S_MAX;
            P_EXP:   st <= S_EXP;
            P_NORM:  st <= S_NORM;
            default: st <= S_SILU;
          endcase
        end
        S_MAX: begin
          if (xs > mx) mx <= xs;
          idx <= idx + 1'b1;
          if (idx == len_q - 1'b1) begin idx <= '0; pass <= P_EXP; end
          st <= S_RD;
        end
        S_EXP: begin
          logic [11:0] a;
          a = dst_q + idx;
          sum <= sum + 32'(ex);
          wr_en <= 1'b1; wr_addr <= AW'(a >> LW); wr_mask <= LANES'(1) << a[LW-1:0];
          wr_data <= {LANES{(ex > 17'd65535) ? data_t'(16'hffff) : data_t'(ex[15:0])}};
          idx <= idx + 1'b1;
          if (idx == len_q - 1'b1) begin
            idx <= '0;
            st  <= S_RECIP;
            dv_start <= 1'b1; dv_num <= 33'h1_0000_0000; dv_den <= {1'b0, sum + 32'(ex)};
          end else st <= S_RD;
        end
        S_RECIP: if (dv_done) begin
          recip <= dv_q[31:0];
          pass  <= P_NORM;
          st    <= S_RD;
        end
        S_NORM: begin
          logic [11:0] a;
          logic [31:0] p16;
          a   = dst_q + idx;
          p16 = 32'(norm_prod >> 16);
          wr_en <= 1'b1; wr_addr <= AW'(a >> LW); wr_mask <= LANES'(1) << a[LW-1:0];
          wr_data <= {LANES{data_t'((p16 + 32'd128) >> 8)}};
          idx <= idx + 1'b1;
          st  <= (idx == len_q - 1'b1) ? S_DONE : S_RD;
        end
        // SiLU: latch x, then start 1/(1+exp(-|x|))
        S_SILU: begin
          xs_q <= el;
          st   <= S_SEXP;
        end
        S_SEXP: begin
          dv_start <= 1'b1;
          dv_num <= 33'h1_0000_0000;
          dv_den <= 33'(17'd65536) + 33'(ex);
          st <= S_SDIV;
        end
        S_SDIV: begin
          if (dv_done) begin
            logic [11:0] a;
            a = dst_q + idx;
            wr_en <= 1'b1; wr_addr <= AW'(a >> LW); wr_mask <= LANES'(1) << a[LW-1:0];
            wr_data <= {LANES{data_t'(silu_prod >>> 16)}};
            idx <= idx + 1'b1;
            st  <= (idx == len_q - 1'b1) ? S_DONE : S_RD;
          end
        end
        S_DONE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
