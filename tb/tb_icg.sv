// tb_icg: clock gating cell. The enable is changed at random times,
// including while the clock is high. Checked at every half period: gclk is
// low while clk is low, and while clk is high it equals the enable value
// that was present at the rising edge (no glitch from en changes during the
// high phase). Both gated and passed pulses must occur.
module tb_icg;
  logic clk = 1'b0, en = 1'b0, gclk;
  logic en_at_edge = 1'b0;
  int checks = 0, failures = 0, passed = 0, blocked = 0;

  icg dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;

  always @(posedge clk) en_at_edge = en;

  // change en at random points of the period, also in the high phase
  initial begin
    // changes land 1..4 ns after either clock edge, never on an edge
    forever begin
      @(clk);
      #($urandom_range(1, 4));
      if ($urandom_range(0, 1) != 0) en = 1'($urandom);
    end
  end

  initial begin
    repeat (400) begin
      @(posedge clk);
      #2;
      checks++;
      if (gclk != en_at_edge) begin failures++; $display("FAIL high phase t=%0t", $time); end
      if (en_at_edge) passed++; else blocked++;
      #2;
      checks++;
      if (gclk != en_at_edge) begin failures++; $display("FAIL late high t=%0t", $time); end
      @(negedge clk);
      #2;
      checks++;
      if (gclk != 1'b0) begin failures++; $display("FAIL low phase t=%0t", $time); end
    end
    checks++;
    if (passed == 0 || blocked == 0) failures++;
    $display("pulses passed=%0d blocked=%0d", passed, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
