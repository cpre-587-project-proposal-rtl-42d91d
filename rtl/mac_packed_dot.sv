// mac_packed_dot: variable-precision packed dot product of two 32-bit words.
//
// The select input chooses how the data and weight words are packed:
// one 32-bit, two 16-bit, four 8-bit, eight 4-bit or sixteen 2-bit unsigned
// integers per word, with each data lane paired with the weight lane in the
// same bit positions. The output is the sum of the lane products, modulo 2**32,
// e.g. in 16-bit mode  dot = D[31:16]*W[31:16] + D[15:0]*W[15:0].
//
// Purely combinational. One sum-of-products unit per precision is built and the
// select picks one result; this is the simplest structure that does the job
// (the packing scheme and select codes follow the published interface, the
// internal structure is this design's choice). Undefined select codes
// (3'b101..3'b111) give 0, so a MAC in such a mode leaves the accumulator alone.
module mac_packed_dot
  import mac_pkg::*;
(
  input  logic [WORD_W-1:0] i_DATA,
  input  logic [WORD_W-1:0] i_WEIGHT,
  input  logic [2:0]        i_SEL,
  output logic [ACC_W-1:0]  o_DOT
);

  logic [ACC_W-1:0] s_dot_32, s_dot_16, s_dot_8, s_dot_4, s_dot_2;

  mac_lane_sum #(.LANE_W(32)) u_sum32 (.a(i_DATA), .b(i_WEIGHT), .sum(s_dot_32));
  mac_lane_sum #(.LANE_W(16)) u_sum16 (.a(i_DATA), .b(i_WEIGHT), .sum(s_dot_16));
  mac_lane_sum #(.LANE_W(8))  u_sum8  (.a(i_DATA), .b(i_WEIGHT), .sum(s_dot_8));
  mac_lane_sum #(.LANE_W(4))  u_sum4  (.a(i_DATA), .b(i_WEIGHT), .sum(s_dot_4));
  mac_lane_sum #(.LANE_W(2))  u_sum2  (.a(i_DATA), .b(i_WEIGHT), .sum(s_dot_2));

  always_comb begin
    unique case (i_SEL)
      QSEL_INT32: o_DOT = s_dot_32;
      QSEL_INT16: o_DOT = s_dot_16;
      QSEL_INT8:  o_DOT = s_dot_8;
      QSEL_INT4:  o_DOT = s_dot_4;
      QSEL_INT2:  o_DOT = s_dot_2;
      default:    o_DOT = '0;
    endcase
  end

endmodule
