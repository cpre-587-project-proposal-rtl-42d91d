// mac_ref_pkg: reference model of the variable-precision MAC for testbenches.
//
// ref_dot() computes the packed dot product bit-slice by bit-slice with
// shifts and masks in 64-bit arithmetic, independently of the RTL's
// generate structure, and returns it modulo 2**32. Select codes: 0 = 32-bit,
// 1 = 16-bit, 2 = 8-bit, 3 = 4-bit, 4 = 2-bit lanes; anything else gives 0.
package mac_ref_pkg;

  function automatic int unsigned lane_bits(input logic [2:0] sel);
    case (sel)
      3'd0: return 32;
      3'd1: return 16;
      3'd2: return 8;
      3'd3: return 4;
      3'd4: return 2;
      default: return 0;
    endcase
  endfunction

  function automatic logic [31:0] ref_dot(input logic [31:0] data,
                                          input logic [31:0] weight,
                                          input logic [2:0]  sel);
    int unsigned    w;
    longint unsigned mask, d, k, total;
    w = lane_bits(sel);
    if (w == 0) return 32'd0;
    mask  = (64'd1 << w) - 64'd1;
    total = 0;
    for (int unsigned sh = 0; sh < 32; sh += w) begin
      d = (longint'(data)   >> sh) & mask;
      k = (longint'(weight) >> sh) & mask;
      total += d * k;
    end
    return total[31:0];
  endfunction

  // Random word whose every lane is uniform in 0..lane_max (lane_max must fit
  // the lane width).
  function automatic logic [31:0] rand_lanes(input logic [2:0] sel,
                                             input int unsigned lane_max);
    int unsigned w;
    logic [31:0] r;
    w = lane_bits(sel);
    r = '0;
    if (w == 0) return $urandom();
    for (int unsigned sh = 0; sh < 32; sh += w)
      r |= 32'($urandom_range(lane_max, 0)) << sh;
    return r;
  endfunction

  // Largest value a lane can hold at this precision.
  function automatic int unsigned lane_full(input logic [2:0] sel);
    int unsigned w;
    w = lane_bits(sel);
    return (w >= 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 1);
  endfunction

endpackage
