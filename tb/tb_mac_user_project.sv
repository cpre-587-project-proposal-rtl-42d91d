// tb_mac_user_project: end-to-end test of the MAC through the 128-bit
// logic-analyzer bus, at the design's default configuration.
//
// The test plays the management CPU: it writes operands, precision select,
// enable and reset into la_data_in at the published bit positions, holds the
// enable for several clock cycles as a slow CPU would, and reads the
// accumulator back from la_data_out[127:96]. Each result is compared with a
// reference accumulator. The test counts how often each mechanism of the
// design occurred (each of the five precisions, an enable held over several
// cycles that must add only once, the synchronous reset, an accumulator
// wrap-around and an undefined select code) and fails if one never did.
// la_data_out[95:0] must stay zero throughout.
module tb_mac_user_project;
  import mac_ref_pkg::*;

  logic         clk = 1'b0;
  logic [127:0] la_in, la_out;
  logic [31:0]  model;
  int checks = 0, failures = 0;
  int n_mode [8];
  int n_held = 0, n_reset = 0, n_wrap = 0;

  always #5 clk = ~clk;

  mac_user_project dut (.wb_clk_i(clk), .la_data_in(la_in), .la_data_out(la_out));

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    checks++;
    if (la_out[95:0] !== '0) begin
      failures++;
      $display("FAIL unused LA outputs not zero: %h", la_out[95:0]);
    end
  end

  function automatic logic [31:0] acc_out();
    return la_out[127:96];
  endfunction

  task automatic check_acc(input string what);
    checks++;
    if (acc_out() !== model) begin
      failures++;
      $display("FAIL %s: acc=%h expected=%h", what, acc_out(), model);
    end
  endtask

  task automatic cpu_idle(input int cycles);
    repeat (cycles) @(posedge clk);
    #1;
  endtask

  task automatic cpu_reset();
    la_in[68] = 1'b1;
    cpu_idle($urandom_range(4, 1));
    la_in[68] = 1'b0;
    cpu_idle(1);
    model = '0;
    n_reset++;
    check_acc("reset");
  endtask

  // One MAC: operands and select in one LA write, enable high in the next,
  // low again after `hold` cycles.
  task automatic cpu_mac(input logic [31:0] d, input logic [31:0] w,
                         input logic [2:0] s, input int hold);
    logic [31:0] sum;
    la_in[31:0]  = w;
    la_in[63:32] = d;
    la_in[66:64] = s;
    cpu_idle($urandom_range(3, 1));
    la_in[67] = 1'b1;
    cpu_idle(hold);
    la_in[67] = 1'b0;
    cpu_idle($urandom_range(3, 1));
    sum = model + ref_dot(d, w, s);
    if (sum < model) n_wrap++;
    model = sum;
    n_mode[s]++;
    if (hold >= 3) n_held++;
    check_acc("mac");
  endtask

  initial begin
    la_in = '0;
    // Random values in the unused LA inputs must not matter.
    la_in[127:69] = 59'({$urandom(), $urandom()});
    model = '0;
    foreach (n_mode[i]) n_mode[i] = 0;
    cpu_idle(2);
    cpu_reset();

    // The published C-firmware sequence: one MAC per precision.
    cpu_mac(32'h0000_0002, 32'h0000_0002, 3'd0, 8);
    cpu_mac(32'h0009_0007, 32'h0008_0005, 3'd1, 8);
    cpu_mac(32'h0506_0708, 32'h0102_0304, 3'd2, 8);
    cpu_mac(32'h9ABC_DEF1, 32'h1234_5678, 3'd3, 8);
    cpu_mac(32'hAAAA_AAAA, 32'hAAAA_AAAA, 3'd4, 8);
    checks++;
    if (acc_out() != 32'd617) begin
      failures++;
      $display("FAIL firmware sequence total %0d, expected 617", acc_out());
    end
    cpu_reset();

    // Random traffic at every precision, including undefined selects.
    for (int n = 0; n < 3000; n++) begin
      logic [2:0] s;
      s = ($urandom_range(30, 0) == 0) ? 3'($urandom_range(7, 5)) : 3'($urandom_range(4, 0));
      if ($urandom_range(40, 0) == 0) cpu_reset();
      cpu_mac($urandom(), $urandom(), s, $urandom_range(10, 2));
    end

    for (int s = 0; s < 5; s++) begin
      $display("MAC at %0d-bit precision: %0d", 32 >> s, n_mode[s]);
      checks++;
      if (n_mode[s] == 0) begin failures++; $display("FAIL no MAC at select %0d", s); end
    end
    $display("undefined select: %0d, held enable: %0d, reset: %0d, wrap: %0d",
             n_mode[5] + n_mode[6] + n_mode[7], n_held, n_reset, n_wrap);
    checks += 4;
    if (n_mode[5] + n_mode[6] + n_mode[7] == 0) begin failures++; $display("FAIL no undefined select"); end
    if (n_held  == 0) begin failures++; $display("FAIL no held enable"); end
    if (n_reset == 0) begin failures++; $display("FAIL no reset"); end
    if (n_wrap  == 0) begin failures++; $display("FAIL no wrap-around"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
