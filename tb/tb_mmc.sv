// tb_mmc: exhaustive check of the sliced magnitude comparator.
// All 65536 operand pairs are applied to five configurations at once
// (exact; IMFSP with 2 and 4 inexact slices; IMFP and IMFS with 4). gt is
// compared with the table-based reference, max/min/eq with gt, and the
// exactness the approximations promise is checked directly: every
// comparator is exact against 0 (IMFP, IMFSP) or 255 (IMFS, IMFSP).
// Mismatches between inexact and exact results are counted to show that
// the approximation is really exercised.
module tb_mmc;
  import imf_pkg::*;
  import imf_ref_pkg::*;

  localparam int NC = 5;
  localparam cmp_mode_e   CM [NC] = '{CMP_EXACT, CMP_IMFSP, CMP_IMFSP, CMP_IMFP, CMP_IMFS};
  localparam int unsigned CN [NC] = '{4, 2, 4, 4, 4};

  logic [7:0] x, y;
  logic [NC-1:0] gt, eq;
  logic [7:0] mx [NC];
  logic [7:0] mn [NC];
  int checks = 0, failures = 0;
  int inexact_hits [NC];

  for (genvar k = 0; k < NC; k++) begin : g_dut
    mmc #(.W(8), .MODE(CM[k]), .N_APPROX(CN[k])) dut (
      .x(x), .y(y), .gt(gt[k]), .eq(eq[k]), .max_o(mx[k]), .min_o(mn[k]));
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s x=%0d y=%0d gt=%b", what, x, y, gt);
    end
  endtask

  initial begin
    foreach (inexact_hits[k]) inexact_hits[k] = 0;
    for (int i = 0; i < 65536; i++) begin
      {x, y} = 16'(i);
      #1;
      for (int k = 0; k < NC; k++) begin
        logic r;
        r = ref_gt(CM[k], CN[k], x, y);
        chk(gt[k] == r, $sformatf("gt ref cfg %0d", k));
        chk(mx[k] == (r ? x : y) && mn[k] == (r ? y : x), $sformatf("max/min cfg %0d", k));
        if (eq[k]) chk(!gt[k], $sformatf("eq with gt cfg %0d", k));
        if (gt[k] != (x > y)) inexact_hits[k]++;
        if ((CM[k] == CMP_IMFP || CM[k] == CMP_IMFSP) && (x == 8'd0 || y == 8'd0))
          chk(gt[k] == (x > y), $sformatf("pepper exact cfg %0d", k));
        if ((CM[k] == CMP_IMFS || CM[k] == CMP_IMFSP) && (x == 8'd255 || y == 8'd255))
          chk(gt[k] == (x > y), $sformatf("salt exact cfg %0d", k));
      end
      chk(gt[0] == (x > y) && eq[0] == (x == y), "exact comparator");
    end
    for (int k = 1; k < NC; k++) begin
      $display("cfg %0d: %0d of 65536 pairs decided differently from exact", k, inexact_hits[k]);
      chk(inexact_hits[k] > 0, "approximation exercised");
    end
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
