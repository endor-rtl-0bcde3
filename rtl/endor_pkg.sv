// endor_pkg: constants and types shared by the Endor near-memory accelerator.
//
// Numbers marked "Table I" follow the hardware specification of the design
// (256 MACs and two softmax units per DIMM, 256 KB buffer, 2 ranks x 4 bank
// groups x 4 banks). Everything else (number formats, table sizes, command
// encodings) is a choice of this implementation and is documented here.
//
// Number formats:
//   data_t   : signed Q8.8 fixed point for activations, weights and KV values
//   acc_t    : signed accumulator of Q16.16 products (40 bits)
//   score_t  : unsigned Q8.8 for PRM rewards and cache scores
package endor_pkg;

  // ---- hierarchy (Table I) ----
  localparam int unsigned NUM_RANKS = 2;   // ranks per DIMM
  localparam int unsigned NUM_BANKS = 16;  // 4 bank groups x 4 banks per rank
  localparam int unsigned LANES     = 8;   // MACs per bank-NMP: 2*16*8 = 256 MACs

  // ---- number formats (own choice) ----
  localparam int unsigned DATA_W  = 16;
  localparam int unsigned FRAC_W  = 8;
  localparam int unsigned ACC_W   = 40;
  localparam int unsigned SCORE_W = 16;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic [SCORE_W-1:0]       score_t;
  typedef data_t [LANES-1:0]        line_t;   // one buffer line = LANES elements

  // ---- shared buffer: 256 KB (Table I) as 16-byte lines ----
  localparam int unsigned SB_LINES = 256 * 1024 / (LANES * DATA_W / 8);  // 16384
  localparam int unsigned SB_AW    = $clog2(SB_LINES);

  // ---- cache management (own choice of table sizes) ----
  localparam int unsigned NUM_ACTIONS = 128;  // action IDs tracked (Table II: ~70 nodes per problem)
  localparam int unsigned ID_W        = $clog2(NUM_ACTIONS);
  localparam int unsigned MAX_DEPTH   = 16;   // longest reasoning path kept in the tree table
  localparam int unsigned DEPTH_W     = $clog2(MAX_DEPTH + 1);
  localparam int unsigned NUM_SLOTS   = 16;   // KV blocks resident in Endor-NMP
  localparam int unsigned SLOT_W      = $clog2(NUM_SLOTS);
  localparam int unsigned SLOT_LINES  = SB_LINES / NUM_SLOTS;  // lines per action KV block

  typedef logic [ID_W-1:0] id_t;

  // ---- rank-NMP command (issued by the central processor) ----
  typedef enum logic [2:0] {
    OP_GEMV      = 3'd0,  // y[r] = sum_k x[k] * W[r][k] on the bank-NMPs
    OP_SOFTMAX   = 3'd1,  // SFU: softmax(scale * x)
    OP_SILU      = 3'd2,  // SFU: x * sigmoid(x)
    OP_LOAD      = 3'd3,  // shared buffer -> act buffer
    OP_STORE     = 3'd4,  // act buffer -> shared buffer
    OP_ALLREDUCE = 3'd5   // act buffer -> all-reduce -> act buffer
  } rank_op_e;

  typedef struct packed {
    rank_op_e     op;
    logic [15:0]  src;    // act-buffer element (SFU) or line (others); shared-buffer line for LOAD
    logic [15:0]  dst;    // act-buffer element (GEMV, SFU) or line; shared-buffer line for STORE
    logic [11:0]  len;    // lines of x (GEMV), elements (SFU), lines (LOAD/STORE/ALLREDUCE)
    logic [11:0]  rows;   // GEMV output rows (multiple of NUM_BANKS)
    logic [15:0]  wbase;  // GEMV: first bank-local line of the weights
    data_t        scale;  // SOFTMAX: multiplier applied before exp (e.g. 1/sqrt(d))
  } rank_cmd_t;

  // ---- CMU command ----
  typedef enum logic [2:0] {
    CMU_NEW    = 3'd0,  // register action id as child of parent and give it a slot
    CMU_REWARD = 3'd1,  // PRM reward for action id
    CMU_LOOKUP = 3'd2,  // make the whole path of id resident, report addresses
    CMU_BACKUP = 3'd3   // misprediction: back up id to off-chip memory, then LOOKUP alt
  } cmu_op_e;

  typedef struct packed {
    cmu_op_e op;
    id_t     id;
    id_t     alt;      // parent (NEW) or correct action (BACKUP)
    logic    root;     // NEW: action has no parent
    score_t  reward;   // REWARD
  } cmu_cmd_t;

  // saturate an accumulator in Q16.16 to Q8.8
  function automatic data_t sat_q88(input acc_t a);
    acc_t s;
    s = a >>> FRAC_W;
    if (s > acc_t'(32767))       return data_t'(16'sh7fff);
    else if (s < -acc_t'(32768)) return data_t'(16'sh8000);
    else                         return data_t'(s[DATA_W-1:0]);
  endfunction

  // saturating Q8.8 add
  function automatic data_t sat_add(input data_t a, input data_t b);
    logic signed [DATA_W:0] s;
    s = {a[DATA_W-1], a} + {b[DATA_W-1], b};
    if (s > 17'sd32767)       return data_t'(16'sh7fff);
    else if (s < -17'sd32768) return data_t'(16'sh8000);
    else                      return data_t'(s[DATA_W-1:0]);
  endfunction

endpackage
