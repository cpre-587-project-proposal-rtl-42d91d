// mac_en_edge: rising-edge detector for the MAC enable.
//
// The enable is written by a CPU whose instruction rate is far below the MAC
// clock, so a level would trigger many MACs per intended one. Two flip-flops
// hold the two most recent samples of the enable, taken on the rising clock
// edge; o_PULSE is high for exactly one clock cycle when the newer sample is 1
// and the older one is 0. Latency: the cycle after the clock edge that first
// samples the enable high.
//
// The two-register scheme follows the published design. Its reset behaviour is
// this design's own: during the synchronous reset both registers load the
// current enable, so a level held through reset is not seen as an edge.
// i_EN is assumed synchronous to i_CLK (in the target chip both sides share
// the same clock source); no extra synchronizer stage is added.
module mac_en_edge (
  input  logic i_CLK,
  input  logic i_RST,
  input  logic i_EN,
  output logic o_PULSE
);

  logic s_en_new;   // most recent sample of i_EN
  logic s_en_old;   // the sample before it

  always_ff @(posedge i_CLK) begin
    if (i_RST) begin
      s_en_new <= i_EN;
      s_en_old <= i_EN;
    end else begin
      s_en_new <= i_EN;
      s_en_old <= s_en_new;
    end
  end

  assign o_PULSE = s_en_new & ~s_en_old;

  // An edge pulse never lasts more than one cycle.
  a_single_cycle : assert property (@(posedge i_CLK) o_PULSE |=> !o_PULSE);

endmodule
