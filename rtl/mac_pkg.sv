// mac_pkg: types and constants shared by the variable-precision MAC.
//
// The MAC takes two 32-bit words (activations and weights) that each hold
// 1, 2, 4, 8 or 16 packed unsigned integers of 32, 16, 8, 4 or 2 bits, and
// accumulates into a 32-bit register. The 3-bit precision select codes and the
// logic-analyzer (LA) bit positions below are the ones of the published
// interface; the names of the enum members are this design's own.
package mac_pkg;

  // Width of one data word, one weight word and the accumulator.
  localparam int unsigned WORD_W = 32;
  localparam int unsigned ACC_W  = 32;

  // Precision select (i_SEL). Codes 3'b101..3'b111 are not defined by the
  // interface; the datapath treats them as "add nothing".
  typedef enum logic [2:0] {
    QSEL_INT32 = 3'b000,
    QSEL_INT16 = 3'b001,
    QSEL_INT8  = 3'b010,
    QSEL_INT4  = 3'b011,
    QSEL_INT2  = 3'b100
  } qsel_e;

  // Logic-analyzer bus: 128 bits in each direction.
  localparam int unsigned LA_W       = 128;
  localparam int unsigned LA_WEIGHT_LSB = 0;    // [31:0]  weight word
  localparam int unsigned LA_DATA_LSB   = 32;   // [63:32] data (activation) word
  localparam int unsigned LA_SEL_LSB    = 64;   // [66:64] precision select
  localparam int unsigned LA_EN_BIT     = 67;   // [67]    enable (rising edge starts one MAC)
  localparam int unsigned LA_RST_BIT    = 68;   // [68]    synchronous reset
  localparam int unsigned LA_ACC_LSB    = 96;   // [127:96] accumulator (LA output)

endpackage
