// mac: variable-precision unsigned integer multiply-accumulate unit.
//
// Each MAC operation adds the packed dot product of the 32-bit data
// (activation) word and the 32-bit weight word to a 32-bit accumulation
// register. i_SEL chooses the packing: 000 = 1x32-bit, 001 = 2x16-bit,
// 010 = 4x8-bit, 011 = 8x4-bit, 100 = 16x2-bit lanes; data and weight lanes in
// the same bit positions are multiplied together.
//
// Timing (all on the rising edge of i_CLK):
//   * i_RST (synchronous, active high) clears the accumulator; it wins over a
//     pending MAC.
//   * i_EN is edge-triggered: one 0->1 transition performs exactly one MAC.
//     The edge is seen one cycle after i_EN is first sampled high, and the
//     accumulator takes the new sum on the following edge, using i_DATA,
//     i_WEIGHT and i_SEL as they are at that edge (they must be stable by then).
//     A new MAC can start every third cycle at the fastest (EN high, low, high).
//   * o_ACCUMULATE is the register itself.
//
// The accumulate register, the enable edge detector, the select codes and the
// unsigned lanes follow the published design; the 32-bit accumulator wraps
// modulo 2**32 on overflow (no saturation or overflow flag is described).
module mac
  import mac_pkg::*;
(
  input  logic              i_CLK,
  input  logic              i_RST,
  input  logic              i_EN,
  input  logic [2:0]        i_SEL,
  input  logic [WORD_W-1:0] i_DATA,
  input  logic [WORD_W-1:0] i_WEIGHT,
  output logic [ACC_W-1:0]  o_ACCUMULATE
);

  logic             s_en;        // one-cycle MAC strobe
  logic [ACC_W-1:0] s_dot;       // packed dot product of the current inputs
  logic [ACC_W-1:0] s_acc_reg;   // accumulation register
  logic [ACC_W-1:0] s_acc_next;  // accumulator plus dot product

  mac_en_edge u_en_edge (
    .i_CLK  (i_CLK),
    .i_RST  (i_RST),
    .i_EN   (i_EN),
    .o_PULSE(s_en)
  );

  mac_packed_dot u_dot (
    .i_DATA  (i_DATA),
    .i_WEIGHT(i_WEIGHT),
    .i_SEL   (i_SEL),
    .o_DOT   (s_dot)
  );

  assign s_acc_next = s_acc_reg + s_dot;

  always_ff @(posedge i_CLK) begin
    if (i_RST)     s_acc_reg <= '0;
    else if (s_en) s_acc_reg <= s_acc_next;
  end

  assign o_ACCUMULATE = s_acc_reg;

endmodule
