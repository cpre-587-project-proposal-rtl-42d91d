// tb_mac_packed_dot: self-checking test of the packed dot-product datapath.
//
// Applies the worked examples of the published interface (one per precision,
// plus a 16-bit sample of a unit-test waveform), all-ones operands, random
// operands at every precision and the undefined select codes, and compares
// the combinational output with mac_ref_pkg::ref_dot().
module tb_mac_packed_dot;
  import mac_ref_pkg::*;

  logic [31:0] data, weight, dot;
  logic [2:0]  sel;
  int checks = 0, failures = 0;

  mac_packed_dot dut (.i_DATA(data), .i_WEIGHT(weight), .i_SEL(sel), .o_DOT(dot));

  task automatic check(input logic [31:0] d, input logic [31:0] w,
                       input logic [2:0] s, input logic [31:0] exp);
    data = d; weight = w; sel = s;
    #1;
    checks++;
    if (dot !== exp) begin
      failures++;
      $display("FAIL sel=%0d data=%h weight=%h dot=%h expected=%h", s, d, w, dot, exp);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked examples, expected values computed by hand.
    check(32'h0000_0002, 32'h0000_0002, 3'd0, 32'd4);
    check(32'h0009_0007, 32'h0008_0005, 3'd1, 32'd107);     // 9*8 + 7*5
    check(32'h0506_0708, 32'h0102_0304, 3'd2, 32'd70);      // 5+12+21+32
    check(32'h9ABC_DEF1, 32'h1234_5678, 3'd3, 32'd372);     // nibbles unsigned
    check(32'hAAAA_AAAA, 32'hAAAA_AAAA, 3'd4, 32'd64);      // 16 * (2*2)
    check(32'h034A_02F3, 32'h02DE_02CC, 3'd1, 32'h0011_ADD0);
    // All ones: 32-bit wraps, the others are lanes * (2^w-1)^2.
    check('1, '1, 3'd0, 32'd1);
    check('1, '1, 3'd1, 32'hFFFC_0002);                    // 2*65535^2 mod 2^32
    check('1, '1, 3'd2, 32'd4 * 32'd65025);
    check('1, '1, 3'd3, 32'd8 * 32'd225);
    check('1, '1, 3'd4, 32'd16 * 32'd9);
    for (int s = 5; s < 8; s++) check('1, '1, 3'(s), 32'd0);
    // Random, full range and the unit-test ranges.
    for (int n = 0; n < 4000; n++) begin
      logic [2:0] s;
      logic [31:0] d, w;
      s = 3'($urandom_range(7, 0));
      d = (n % 2 == 1) ? rand_lanes(s, lane_full(s)) : $urandom();
      w = $urandom();
      check(d, w, s, ref_dot(d, w, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
