// sync_fifo: single-clock FIFO used for the CMU's read and write buffers.
// Standard valid/ready on both sides; `level` gives the occupancy.
// A helper of this implementation.
module sync_fifo #(
  parameter type         T     = logic [127:0],
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  T                           in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output T                           out_data,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  T mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign in_ready  = (level != ($clog2(DEPTH+1))'(DEPTH));
  assign out_valid = (level != '0);
  assign out_data  = mem[rp];

  always_ff @(posedge clk) if (in_valid && in_ready) mem[wp] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; level <= '0;
    end else begin
      if (in_valid && in_ready)   wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (out_valid && out_ready) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      level <= level + (($clog2(DEPTH+1))'(in_valid && in_ready))
                     - (($clog2(DEPTH+1))'(out_valid && out_ready));
    end
  end

endmodule
