// tb_iris_dense: runs a 4-10-10-5-3 fully connected ReLU network (the Iris
// flower classifier topology) on the MAC through the logic-analyzer bus.
//
// The test plays the firmware: for every neuron it resets the accumulator,
// adds the bias as one 32-bit MAC (bias * 1), then one 32-bit MAC per input
// (activation * weight), reads the accumulator back as a two's-complement
// integer and applies ReLU in software; the output layer takes the largest of
// the three scores as the class. Weights and biases are small signed integers
// drawn from a fixed seed (no trained model is built in), and the inputs are
// a few Iris samples in millimetres. Every neuron's accumulator and the final
// class are compared with the same network computed in plain integer
// arithmetic. In 32-bit mode the low 32 bits of a product do not depend on
// signedness, so signed operands work as long as every sum fits in 32 bits.
module tb_iris_dense;

  localparam int N_LAYERS = 4;
  localparam int SIZES [N_LAYERS+1] = '{4, 10, 10, 5, 3};

  logic         clk = 1'b0;
  logic [127:0] la_in, la_out;
  int checks = 0, failures = 0, macs = 0;
  int w [N_LAYERS][10][10];   // w[layer][out][in]
  int b [N_LAYERS][10];
  int samples [3][4] = '{'{51, 35, 14, 2}, '{70, 32, 47, 14}, '{63, 33, 60, 25}};

  always #5 clk = ~clk;

  mac_user_project dut (.wb_clk_i(clk), .la_data_in(la_in), .la_data_out(la_out));

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic hw_reset();
    la_in[68] = 1'b1; tick(1);
    la_in[68] = 1'b0; tick(1);
  endtask

  task automatic hw_mac32(input int d, input int k);
    la_in[31:0]  = k;
    la_in[63:32] = d;
    la_in[66:64] = 3'b000;
    tick(1);
    la_in[67] = 1'b1; tick(3);
    la_in[67] = 1'b0; tick(1);
    macs++;
  endtask

  function automatic int relu(input int v);
    return (v > 0) ? v : 0;
  endfunction

  initial begin
    int act [10], nxt [10], ref_act [10], ref_nxt [10];
    int hw_sum, ref_sum, hw_cls, ref_cls;
    la_in = '0;
    void'($urandom(587));
    for (int l = 0; l < N_LAYERS; l++)
      for (int o = 0; o < SIZES[l+1]; o++) begin
        b[l][o] = $urandom_range(40, 0) - 20;
        for (int i = 0; i < SIZES[l]; i++) w[l][o][i] = $urandom_range(15, 0) - 8;
      end
    tick(2);

    for (int s = 0; s < 3; s++) begin
      for (int i = 0; i < 4; i++) begin act[i] = samples[s][i]; ref_act[i] = samples[s][i]; end
      for (int l = 0; l < N_LAYERS; l++) begin
        for (int o = 0; o < SIZES[l+1]; o++) begin
          hw_reset();
          hw_mac32(b[l][o], 1);
          for (int i = 0; i < SIZES[l]; i++) hw_mac32(act[i], w[l][o][i]);
          hw_sum = int'(la_out[127:96]);
          ref_sum = b[l][o];
          for (int i = 0; i < SIZES[l]; i++) ref_sum += ref_act[i] * w[l][o][i];
          checks++;
          if (hw_sum != ref_sum) begin
            failures++;
            $display("FAIL sample %0d layer %0d neuron %0d: %0d expected %0d", s, l, o, hw_sum, ref_sum);
          end
          // ReLU on the hidden layers; the output layer keeps raw scores.
          nxt[o]     = (l < N_LAYERS - 1) ? relu(hw_sum)  : hw_sum;
          ref_nxt[o] = (l < N_LAYERS - 1) ? relu(ref_sum) : ref_sum;
        end
        for (int o = 0; o < SIZES[l+1]; o++) begin act[o] = nxt[o]; ref_act[o] = ref_nxt[o]; end
      end
      hw_cls = 0; ref_cls = 0;
      for (int o = 1; o < 3; o++) begin
        if (act[o] > act[hw_cls]) hw_cls = o;
        if (ref_act[o] > ref_act[ref_cls]) ref_cls = o;
      end
      checks++;
      if (hw_cls != ref_cls) begin
        failures++;
        $display("FAIL sample %0d class %0d expected %0d", s, hw_cls, ref_cls);
      end
      $display("sample %0d: scores %0d %0d %0d -> class %0d", s, act[0], act[1], act[2], hw_cls);
    end
    $display("MAC operations: %0d", macs);
    checks++;
    if (macs != 3 * (205 + 28)) begin failures++; $display("FAIL MAC count %0d", macs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
