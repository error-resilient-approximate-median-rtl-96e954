// tb_ec: exhaustive check of the equality checker (8 input combinations).
module tb_ec;
  logic eq_in, h, l, eq_out, gt_out;
  int checks = 0, failures = 0;

  ec dut (.eq_in(eq_in), .h(h), .l(l), .eq_out(eq_out), .gt_out(gt_out));

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic exp_eq, exp_gt;
      {eq_in, h, l} = 3'(i);
      #1;
      exp_eq = (i == 4);           // eq_in=1, h=0, l=0
      exp_gt = (i == 6 || i == 7); // eq_in=1, h=1
      checks++;
      if (eq_out != exp_eq || gt_out != exp_gt) begin
        failures++;
        $display("FAIL eq_in=%b h=%b l=%b -> eq=%b gt=%b", eq_in, h, l, eq_out, gt_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
