// mac_user_project: user-area top that puts the variable-precision MAC on the
// 128-bit logic-analyzer (LA) bus between the management CPU and the user
// design.
//
// The management CPU drives la_data_in and reads la_data_out; the MAC runs on
// the wishbone clock wb_clk_i. Bit map:
//   la_data_in [31:0]    weight word          la_data_out[127:96] accumulator
//   la_data_in [63:32]   data (activation)    la_data_out[95:0]   tied to 0
//   la_data_in [66:64]   precision select
//   la_data_in [67]      enable (0->1 starts one MAC)
//   la_data_in [68]      synchronous reset
//   la_data_in [127:69]  unused
// Timing is that of the MAC: the accumulator changes two clock edges after the
// enable is first sampled high. The bit map follows the published interface;
// the port names follow the usual user-project wrapper convention.
module mac_user_project
  import mac_pkg::*;
(
  input  logic            wb_clk_i,
  input  logic [LA_W-1:0] la_data_in,
  output logic [LA_W-1:0] la_data_out
);

  logic [ACC_W-1:0] s_accumulate;

  mac u_mac (
    .i_CLK       (wb_clk_i),
    .i_RST       (la_data_in[LA_RST_BIT]),
    .i_EN        (la_data_in[LA_EN_BIT]),
    .i_SEL       (la_data_in[LA_SEL_LSB +: 3]),
    .i_DATA      (la_data_in[LA_DATA_LSB +: WORD_W]),
    .i_WEIGHT    (la_data_in[LA_WEIGHT_LSB +: WORD_W]),
    .o_ACCUMULATE(s_accumulate)
  );

  always_comb begin
    la_data_out = '0;
    la_data_out[LA_ACC_LSB +: ACC_W] = s_accumulate;
  end

endmodule
