// tb_mac: self-checking test of the variable-precision MAC.
//
// 1. Replays the published system-level sequence (one MAC per precision,
//    each added to the previous total, then a reset) and checks the running
//    totals 4, 111, 181, 553, 617 and 0.
// 2. Runs random MAC sequences per precision (20 to 1000 MACs each) with operands per lane drawn up
//    to 1000, 1000, 255, 15 and 3 (32/16/8/4/2-bit), and with full-range
//    operands, then a mixed run with random precisions and random resets.
//    Every result is compared with a reference accumulator built from
//    mac_ref_pkg::ref_dot().
// 3. Checks the timing: the accumulator changes exactly on the second clock
//    edge after the enable is first sampled high, and only once however long
//    the enable stays high.
module tb_mac;
  import mac_ref_pkg::*;

  logic        clk = 1'b0, rst, en;
  logic [2:0]  sel;
  logic [31:0] data, weight, acc;
  logic [31:0] model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mac dut (.i_CLK(clk), .i_RST(rst), .i_EN(en), .i_SEL(sel),
           .i_DATA(data), .i_WEIGHT(weight), .o_ACCUMULATE(acc));

  initial begin : watchdog
    repeat (500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_acc(input logic [31:0] exp, input string what);
    checks++;
    if (acc !== exp) begin
      failures++;
      $display("FAIL %s: acc=%h expected=%h", what, acc, exp);
    end
  endtask

  task automatic do_reset();
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    model = '0;
    expect_acc(32'd0, "after reset");
  endtask

  // One MAC the way the CPU issues it: operands first, then the enable held
  // high for `hold` cycles, then low again. Checks the exact update cycle.
  task automatic do_mac(input logic [31:0] d, input logic [31:0] w,
                        input logic [2:0] s, input int hold);
    logic [31:0] prev_acc;
    data = d; weight = w; sel = s;
    @(posedge clk); #1;
    prev_acc = acc;
    en = 1'b1;
    @(posedge clk); #1;            // first edge that samples EN high
    expect_acc(prev_acc, "no update one edge after enable");
    @(posedge clk); #1;            // second edge: the MAC lands
    model += ref_dot(d, w, s);
    expect_acc(model, "update on second edge");
    for (int i = 2; i < hold; i++) begin
      @(posedge clk); #1;
    end
    expect_acc(model, "held enable adds only once");
    en = 1'b0;
    @(posedge clk); #1;
  endtask

  initial begin
    rst = 1'b0; en = 1'b0; sel = '0; data = '0; weight = '0; model = '0;
    @(posedge clk); #1;
    do_reset();

    // Published system-level sequence.
    do_mac(32'h0000_0002, 32'h0000_0002, 3'd0, 4);  expect_acc(32'd4,   "seq 32-bit");
    do_mac(32'h0009_0007, 32'h0008_0005, 3'd1, 4);  expect_acc(32'd111, "seq 16-bit");
    do_mac(32'h0506_0708, 32'h0102_0304, 3'd2, 4);  expect_acc(32'd181, "seq 8-bit");
    do_mac(32'h9ABC_DEF1, 32'h1234_5678, 3'd3, 4);  expect_acc(32'd553, "seq 4-bit");
    do_mac(32'hAAAA_AAAA, 32'hAAAA_AAAA, 3'd4, 4);  expect_acc(32'd617, "seq 2-bit");
    do_reset();

    // Per-precision random runs with the unit-test operand ranges.
    for (int s = 0; s < 5; s++) begin
      int unsigned lim;
      lim = (s == 0) ? 1000 : (s == 1) ? 1000 : (s == 2) ? 255 : (s == 3) ? 15 : 3;
      do_reset();
      repeat ($urandom_range(1000, 20))
        do_mac(rand_lanes(3'(s), lim), rand_lanes(3'(s), lim), 3'(s), $urandom_range(6, 2));
    end

    // Mixed precisions, full-range operands, random resets (wraps mod 2^32).
    do_reset();
    for (int n = 0; n < 1500; n++) begin
      logic [2:0] s;
      s = 3'($urandom_range(4, 0));
      if ($urandom_range(20, 0) == 0) do_reset();
      do_mac($urandom(), $urandom(), s, $urandom_range(8, 2));
    end

    // Undefined select codes leave the accumulator unchanged.
    for (int s = 5; s < 8; s++) do_mac('1, '1, 3'(s), 3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
