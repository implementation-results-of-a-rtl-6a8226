// win_mult -- signed multiplier with a two-clock pipeline.
//
// p = a * b, both signed two's complement, full precision (A_W + B_W bits), available
// two rising clk edges after a and b are presented. A new pair may be presented every
// clock. The two stages split the work: the first clock forms two partial products,
// a times the low half of b (unsigned) and a times the high half of b (signed); the
// second clock adds them with the high one shifted into place. No reset: the pipeline
// holds data only and is flushed by two clocks of input.
//
// Following the specification: signed operands, 10 x 14 bits giving a 24-bit result,
// pipelined over two clocks so that it keeps up with 100 MSPS. This design's choice:
// the split of b into halves as the way of pipelining.
module win_mult #(
  parameter int unsigned A_W = 10,
  parameter int unsigned B_W = 14,
  localparam int unsigned P_W  = A_W + B_W,
  localparam int unsigned LO_W = B_W / 2,
  localparam int unsigned HI_W = B_W - LO_W
) (
  input  logic                  clk,
  input  logic signed [A_W-1:0] a,
  input  logic signed [B_W-1:0] b,
  output logic signed [P_W-1:0] p
);

  logic signed [A_W+LO_W:0]   pp_lo;  // a * unsigned low half of b
  logic signed [A_W+HI_W-1:0] pp_hi;  // a * signed high half of b

  always_ff @(posedge clk) begin
    pp_lo <= a * $signed({1'b0, b[LO_W-1:0]});
    pp_hi <= a * $signed(b[B_W-1:LO_W]);
    p     <= (P_W'(pp_hi) <<< LO_W) + P_W'(pp_lo);
  end

endmodule
