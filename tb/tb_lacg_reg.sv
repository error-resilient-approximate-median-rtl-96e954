// tb_lacg_reg: look-ahead gated register. Random enables and data (with
// runs of repeated data) are applied at the falling edge; a model computes
// the expected q (loads only when en was high) and chg (en and d != q at
// the edge, 1 after reset). Also checked: q never changes at an edge where
// en was low, i.e. the clock really is gated.
module tb_lacg_reg;
  localparam int W = 12;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, chg;
  logic [W-1:0] d = '0, q;
  logic [W-1:0] q_m;
  logic chg_m;
  int checks = 0, failures = 0, gated = 0, loads = 0;

  lacg_reg #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q), .chg(chg));

  always #5 clk = ~clk;

  initial begin
    q_m = '0; chg_m = 1'b1;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (q != '0 || chg != 1'b1) begin failures++; $display("FAIL reset values"); end
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      en = ($urandom_range(0, 2) != 0);
      if ($urandom_range(0, 3) == 0) d = W'($urandom);
      @(posedge clk);
      // model update at this edge, from values before it
      chg_m = en & (d != q_m);
      if (en) begin q_m = d; loads++; end else gated++;
      @(negedge clk);
      checks++;
      if (q != q_m || chg != chg_m) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d q=%h exp %h chg=%b exp %b", i, q, q_m, chg, chg_m);
      end
    end
    checks++;
    if (gated == 0 || loads == 0) failures++;
    $display("edges loaded=%0d gated=%0d", loads, gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
