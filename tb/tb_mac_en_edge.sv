// tb_mac_en_edge: self-checking test of the enable rising-edge detector.
//
// Drives the enable with random levels held for random lengths (as a slow CPU
// would), with occasional resets, and checks the pulse every cycle against a
// cycle model: the pulse is high in the cycle after the first clock edge that
// samples the enable high following a low sample, and never for a level held
// through reset. Also checks that every enable 0->1 transition outside reset
// gives exactly one pulse.
module tb_mac_en_edge;

  logic clk = 1'b0, rst, en, pulse;
  int checks = 0, failures = 0;
  int edges = 0, pulses = 0;
  logic m_new, m_old;          // model of the two sample registers
  logic en_prev;

  always #5 clk = ~clk;

  mac_en_edge dut (.i_CLK(clk), .i_RST(rst), .i_EN(en), .o_PULSE(pulse));

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model and checks, evaluated just after each rising edge.
  always @(posedge clk) begin
    if (rst) begin
      m_new <= en;
      m_old <= en;
    end else begin
      m_new <= en;
      m_old <= m_new;
      if (en && !en_prev) edges++;
    end
    en_prev <= en;
  end

  always @(negedge clk) begin
    checks++;
    if (pulse !== (m_new & ~m_old)) begin
      failures++;
      $display("FAIL t=%0t pulse=%b expected=%b", $time, pulse, m_new & ~m_old);
    end
    if (pulse) pulses++;
  end

  initial begin
    rst = 1'b1; en = 1'b0; en_prev = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // A level held through reset must not fire.
    @(posedge clk); #1 en = 1'b1; rst = 1'b1;
    repeat (2) @(posedge clk); #1 rst = 1'b0;
    repeat (5) @(posedge clk); #1;
    checks++;
    if (pulses != 0) begin failures++; $display("FAIL pulse for a level held through reset"); end
    en = 1'b0;
    repeat (3) @(posedge clk); #1;
    edges = 0; pulses = 0;
    for (int n = 0; n < 3000; n++) begin
      en = ~en;
      repeat ($urandom_range(12, 2)) @(posedge clk);
      #1;
    end
    en = 1'b0;
    repeat (4) @(posedge clk); #1;
    checks++;
    if (edges != pulses || pulses == 0) begin
      failures++;
      $display("FAIL edges=%0d pulses=%0d", edges, pulses);
    end
    // Random enable with random resets, checked by the cycle model only.
    for (int n = 0; n < 5000; n++) begin
      en  = 1'($urandom_range(1, 0));
      rst = ($urandom_range(15, 0) == 0);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
