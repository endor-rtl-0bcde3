// rank_nmp: the NMP logic of one DRAM rank (in the DIMM's buffer chip).
//
// It owns an activation buffer, a special function unit and one bank-NMP per
// bank of the rank, and executes the decode-step operators assigned to the
// rank by the mapping dataflow (attention heads, or a slice of the FFN
// weights). Commands from the central processor (valid/ready, one at a time,
// `done` pulses at the end):
//   GEMV      y = W x. All bank-NMPs work at once: in pass p, bank b computes
//             row p*NUM_BANKS + b. Each cycle one act-buffer line of x is
//             broadcast and every bank delivers the matching LANES weights of
//             its row from its own bank (line wbase + p*len + i). After the
//             pass the NUM_BANKS results, saturated to Q8.8, are written to
//             the act buffer at element dst + p*NUM_BANKS (dst must be a
//             multiple of LANES, rows a multiple of NUM_BANKS).
//   SOFTMAX / SILU   run on the SFU over `len` elements from src to dst.
//   LOAD / STORE     copy `len` lines between the shared buffer and the act
//             buffer (the shared-buffer port is arbitrated: req/gnt, data one
//             cycle after the grant).
//   ALLREDUCE offer `len` lines from src to the DIMM's all-reduce unit and
//             write the returned sums to dst.
// Bank read ports have one cycle of latency; DRAM timing is left to the bank
// side. The two-level rank/bank split, GEMV on the bank-NMPs, softmax and SiLU
// in the buffer chip and the all-reduce between ranks follow the design; the
// command set, the row-to-bank mapping and the buffer layout are choices of
// this implementation.
//
// Timing: a GEMV pass takes len + 1 + NUM_BANKS/LANES cycles, a whole GEMV
// command passes * (len + 1 + NUM_BANKS/LANES) + 2 cycles from accept to done.
module rank_nmp
  import endor_pkg::*;
#(
  parameter int unsigned NB    = NUM_BANKS,
  parameter int unsigned LINES = 512,
  localparam int unsigned AW   = $clog2(LINES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  rank_cmd_t         cmd,
  output logic              done,
  // DRAM banks of this rank
  output logic              bk_rd_en,
  output logic [15:0]       bk_rd_addr,
  input  line_t [NB-1:0]    bk_rd_data,
  // shared buffer
  output logic              sb_req,
  output logic              sb_we,
  output logic [SB_AW-1:0]  sb_addr,
  output line_t             sb_wdata,
  input  logic              sb_gnt,
  input  line_t             sb_rdata,
  // all-reduce
  output logic              ar_valid,
  input  logic              ar_ready,
  output line_t             ar_data,
  input  logic              ar_sum_valid,
  input  line_t             ar_sum_data,
  // activity counters
  output logic [31:0]       n_mac_beats,
  output logic [15:0]       n_sfu_ops
);

  localparam int unsigned LW   = $clog2(LANES);
  localparam int unsigned WLPB = NB / LANES;   // result lines per GEMV pass

  typedef enum logic [3:0] {
    S_IDLE, S_G_RUN, S_G_WAIT, S_G_WB, S_SFU_GO, S_SFU, S_LD_REQ, S_LD_DAT,
    S_ST_RD, S_ST_REQ, S_AR_RD, S_AR_OUT, S_AR_IN, S_DONE
  } state_e;

  state_e    st;
  rank_cmd_t c;
  logic [11:0] i, p, npass;
  logic        beat_v, beat_first;   // bank data of a beat arrive this cycle
  logic        beat_last;
  logic [$clog2(WLPB+1)-1:0] wb;

  // ---------------- act buffer ----------------
  logic             ab_rd_en, ab_wr_en;
  logic [AW-1:0]    ab_rd_addr, ab_wr_addr;
  logic [LANES-1:0] ab_wr_mask;
  line_t            ab_rd_data, ab_wr_data;
  act_buffer #(.LINES(LINES)) u_act (
    .clk, .rd_en(ab_rd_en), .rd_addr(ab_rd_addr), .rd_data(ab_rd_data),
    .wr_en(ab_wr_en), .wr_addr(ab_wr_addr), .wr_mask(ab_wr_mask), .wr_data(ab_wr_data)
  );

  // ---------------- SFU ----------------
  logic             sf_start, sf_busy, sf_done, sf_rd_en, sf_wr_en;
  logic [AW-1:0]    sf_rd_addr, sf_wr_addr;
  logic [LANES-1:0] sf_wr_mask;
  line_t            sf_wr_data;
  sfu #(.LINES(LINES)) u_sfu (
    .clk, .rst_n, .start(sf_start), .is_silu(c.op == OP_SILU), .src(c.src[11:0]), .dst(c.dst[11:0]),
    .len(c.len), .scale(c.scale), .busy(sf_busy), .done(sf_done),
    .rd_en(sf_rd_en), .rd_addr(sf_rd_addr), .rd_data(ab_rd_data),
    .wr_en(sf_wr_en), .wr_addr(sf_wr_addr), .wr_mask(sf_wr_mask), .wr_data(sf_wr_data)
  );

  // ---------------- bank-NMPs ----------------
  acc_t [NB-1:0] acc;
  for (genvar b = 0; b < NB; b++) begin : g_bank
    bank_nmp #(.N(LANES)) u_bank (
      .clk, .rst_n, .en(beat_v), .first(beat_first), .x(ab_rd_data), .w(bk_rd_data[b]), .acc(acc[b])
    );
  end

  // ---------------- port multiplexing ----------------
  logic issue;   // GEMV: read one line of x and the banks' weights
  always_comb begin
    issue      = (st == S_G_RUN);
    ab_rd_en   = 1'b0; ab_rd_addr = '0;
    ab_wr_en   = 1'b0; ab_wr_addr = '0; ab_wr_mask = '1; ab_wr_data = '0;
    bk_rd_en   = issue;
    bk_rd_addr = 16'(32'(c.wbase) + 32'(p) * 32'(c.len) + 32'(i));
    sb_req = 1'b0; sb_we = 1'b0; sb_addr = '0; sb_wdata = ab_rd_data;
    ar_valid = (st == S_AR_OUT); ar_data = ab_rd_data;
    sf_start = 1'b0;
    case (st)
      S_G_RUN: begin ab_rd_en = 1'b1; ab_rd_addr = AW'(c.src + i); end
      S_G_WB: begin
        ab_wr_en   = 1'b1;
        ab_wr_addr = AW'(32'(c.dst >> LW) + 32'(p) * WLPB + 32'(wb));
        for (int l = 0; l < LANES; l++) ab_wr_data[l] = sat_q88(acc[32'(wb) * LANES + l]);
      end
      S_SFU: begin
        ab_rd_en = sf_rd_en; ab_rd_addr = sf_rd_addr;
        ab_wr_en = sf_wr_en; ab_wr_addr = sf_wr_addr; ab_wr_mask = sf_wr_mask; ab_wr_data = sf_wr_data;
      end
      S_LD_REQ: begin sb_req = 1'b1; sb_addr = SB_AW'(c.src + i); end
      S_LD_DAT: begin ab_wr_en = 1'b1; ab_wr_addr = AW'(c.dst + i); ab_wr_data = sb_rdata; end
      S_ST_RD:  begin ab_rd_en = 1'b1; ab_rd_addr = AW'(c.src + i); end
      S_ST_REQ: begin sb_req = 1'b1; sb_we = 1'b1; sb_addr = SB_AW'(c.dst + i); end
      S_AR_RD:  begin ab_rd_en = 1'b1; ab_rd_addr = AW'(c.src + i); end
      S_AR_IN:  begin ab_wr_en = ar_sum_valid; ab_wr_addr = AW'(c.dst + i); ab_wr_data = ar_sum_data; end
      default: ;
    endcase
    sf_start = (st == S_SFU_GO);
  end

  assign cmd_ready = (st == S_IDLE);

  logic [11:0] last;
  assign last = c.len - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; c <= '0; i <= '0; p <= '0; npass <= '0; wb <= '0;
      beat_v <= 1'b0; beat_first <= 1'b0; beat_last <= 1'b0; done <= 1'b0;
      n_mac_beats <= '0; n_sfu_ops <= '0;
    end else begin
      done       <= 1'b0;
      beat_v     <= issue;
      beat_first <= issue && (i == '0);
      beat_last  <= issue && (i == last);
      if (beat_v) n_mac_beats <= n_mac_beats + 1'b1;
      case (st)
        S_IDLE: if (cmd_valid) begin
          c <= cmd; i <= '0; p <= '0; wb <= '0;
          npass <= cmd.rows / 12'(NB);
          if (cmd.len == '0) st <= S_DONE;
          else case (cmd.op)
            OP_GEMV:      st <= (cmd.rows < 12'(NB)) ? S_DONE : S_G_RUN;
            OP_SOFTMAX,
            OP_SILU:      begin st <= S_SFU_GO; n_sfu_ops <= n_sfu_ops + 1'b1; end
            OP_LOAD:      st <= S_LD_REQ;
            OP_STORE:     st <= S_ST_RD;
            OP_ALLREDUCE: st <= S_AR_RD;
            default:      st <= S_DONE;
          endcase
        end
        S_G_RUN: begin
          if (i == last) begin i <= '0; st <= S_G_WAIT; end
          else i <= i + 1'b1;
        end
        // last beat reaches the accumulators
        S_G_WAIT: if (beat_last) st <= S_G_WB;
        S_G_WB: begin
          if (wb == ($clog2(WLPB+1))'(WLPB - 1)) begin
            wb <= '0;
            if (p == npass - 1'b1) st <= S_DONE;
            else begin p <= p + 1'b1; st <= S_G_RUN; end
          end else wb <= wb + 1'b1;
        end
        S_SFU_GO: st <= S_SFU;
        S_SFU: if (sf_done) st <= S_DONE;
        S_LD_REQ: if (sb_gnt) st <= S_LD_DAT;
        S_LD_DAT: begin
          i  <= i + 1'b1;
          st <= (i == last) ? S_DONE : S_LD_REQ;
        end
        S_ST_RD: st <= S_ST_REQ;
        S_ST_REQ: if (sb_gnt) begin
          i  <= i + 1'b1;
          st <= (i == last) ? S_DONE : S_ST_RD;
        end
        S_AR_RD: st <= S_AR_OUT;
        S_AR_OUT: if (ar_ready) st <= S_AR_IN;
        S_AR_IN: if (ar_sum_valid) begin
          i  <= i + 1'b1;
          st <= (i == last) ? S_DONE : S_AR_RD;
        end
        S_DONE: begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_no_sfu_overlap: assert property (@(posedge clk) disable iff (!rst_n) sf_busy |-> st == S_SFU);

endmodule
