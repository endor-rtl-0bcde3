// seq_div: unsigned restoring divider, one quotient bit per cycle.
//
// Pulse `start` with `num` and `den`; `done` pulses W cycles later with
// quot = num / den. A zero divisor returns all ones. Used by the SFU for the
// softmax normaliser and the sigmoid, and by the score table for the reuse
// frequency of Eq. 1. A helper of this implementation.
module seq_div #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quot
);

  logic [W-1:0] rem, d, q;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W:0] trial;

  always_comb trial = {rem[W-1:0], q[W-1]} - {1'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; rem <= '0; d <= '0; q <= '0; cnt <= '0; quot <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1; rem <= '0; d <= den; q <= num; cnt <= '0;
      end else if (busy) begin
        if (!trial[W]) begin
          rem <= trial[W-1:0];
          q   <= {q[W-2:0], 1'b1};
        end else begin
          rem <= {rem[W-2:0], q[W-1]};
          q   <= {q[W-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == W - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= (d == '0) ? '1 : (!trial[W] ? {q[W-2:0], 1'b1} : {q[W-2:0], 1'b0});
        end
      end
    end
  end

endmodule
