// priority_queue: resident actions of Endor-NMP ordered by cache score.
//
// Holds up to SLOTS (id, score) pairs sorted by ascending score, so entry 0
// (the head) is always the action with the lowest score: the CMU's
// replacement victim. INSERT places a pair behind all entries with a score
// less than or equal to it; REMOVE deletes the entry of an id and closes the
// gap. Both take one cycle (a shift register with per-entry compare). An
// update of a score is a REMOVE followed by an INSERT. The sorted order and
// its use for replacement follow the CMU description; the shift-register
// organisation and the tie rule are choices of this implementation.
module priority_queue
  import endor_pkg::*;
#(
  parameter int unsigned SLOTS = NUM_SLOTS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        ins_en,
  input  id_t                         ins_id,
  input  score_t                      ins_score,
  input  logic                        rm_en,
  input  id_t                         rm_id,
  output logic                        head_valid,
  output id_t                         head_id,
  output score_t                      head_score,
  output logic [$clog2(SLOTS+1)-1:0]  count,
  output logic                        full,
  output id_t    [SLOTS-1:0]          q_id,
  output score_t [SLOTS-1:0]          q_score
);

  localparam int unsigned CW = $clog2(SLOTS + 1);

  logic [SLOTS-1:0] v;

  assign head_valid = v[0];
  assign head_id    = q_id[0];
  assign head_score = q_score[0];
  assign full       = (count == CW'(SLOTS));

  // insert position: number of valid entries with score <= new score
  logic [CW-1:0] ipos, rpos;
  logic          rfound;
  always_comb begin
    ipos = '0;
    for (int i = 0; i < SLOTS; i++)
      if (v[i] && q_score[i] <= ins_score) ipos = ipos + 1'b1;
    rpos = '0; rfound = 1'b0;
    for (int i = SLOTS - 1; i >= 0; i--)
      if (v[i] && q_id[i] == rm_id) begin rpos = CW'(i); rfound = 1'b1; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0; q_id <= '0; q_score <= '0; count <= '0;
    end else if (rm_en) begin
      if (rfound) begin
        for (int i = 0; i < SLOTS; i++) begin
          if (CW'(i) >= rpos) begin
            if (i < SLOTS - 1) begin
              v[i] <= v[i+1]; q_id[i] <= q_id[i+1]; q_score[i] <= q_score[i+1];
            end else begin
              v[i] <= 1'b0;
            end
          end
        end
        count <= count - 1'b1;
      end
    end else if (ins_en && !full) begin
      for (int i = 0; i < SLOTS; i++) begin
        if (CW'(i) == ipos) begin
          v[i] <= 1'b1; q_id[i] <= ins_id; q_score[i] <= ins_score;
        end else if (CW'(i) > ipos && i > 0) begin
          v[i] <= v[i-1]; q_id[i] <= q_id[i-1]; q_score[i] <= q_score[i-1];
        end
      end
      count <= count + 1'b1;
    end
  end

endmodule
