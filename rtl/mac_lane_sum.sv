// mac_lane_sum: sum of lane-wise products of two packed 32-bit words.
//
// Both words are cut into WORD_W/LANE_W unsigned lanes of LANE_W bits; lane i
// of `a` is multiplied by lane i of `b` (the same bit positions in both words)
// and all products are added. The result is kept modulo 2**ACC_W, the width of
// the accumulator it feeds. Purely combinational; multipliers and adders are
// written with the * and + operators and left to synthesis.
//
// Unsigned lanes follow the published worked examples (e.g. nibbles 9..F of a
// 4-bit word count as 9..15). The modulo-2**32 wrap is this design's choice:
// the interface returns only 32 accumulator bits.
module mac_lane_sum #(
  parameter int unsigned LANE_W = 16,
  parameter int unsigned WORD_W = mac_pkg::WORD_W,
  parameter int unsigned ACC_W  = mac_pkg::ACC_W
) (
  input  logic [WORD_W-1:0] a,
  input  logic [WORD_W-1:0] b,
  output logic [ACC_W-1:0]  sum
);

  localparam int unsigned LANES = WORD_W / LANE_W;

  initial begin
    assert (WORD_W % LANE_W == 0) else $error("LANE_W must divide WORD_W");
  end

  logic [ACC_W-1:0] prod [LANES];

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    always_comb
      prod[i] = ACC_W'(a[i*LANE_W +: LANE_W]) * ACC_W'(b[i*LANE_W +: LANE_W]);
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i < LANES; i++) sum += prod[i];
  end

endmodule
