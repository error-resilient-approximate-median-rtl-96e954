// tb_imf_median_filter: end-to-end test of the median filter at its default
// parameters (IMFSP comparators, two inexact slices).
//
// A 64x64 test image (smooth gradient, a flat square, 20% salt-and-pepper
// noise) is generated in the testbench. Its 3x3 windows (border pixels
// replicated) are streamed in raster order with random idle cycles. Every
// median is compared with the reference network model, its arrival is
// checked to be exactly 4 cycles after the window was presented, and the
// salt/pepper guarantee is checked against an exact median: the output is
// 0 (255) exactly when the exact median is 0 (255).
//
// Mechanisms that must each happen at least once: idle input cycles, clock
// pulses suppressed by the look-ahead gating in each of R1..R3 while the
// pipeline streams (also after a window identical to the previous one, in
// the noise-free core of the flat square), salt and pepper centre pixels removed, and a median
// that differs from the exact one because of the inexact comparators.
module tb_imf_median_filter;
  import imf_pkg::*;
  import imf_ref_pkg::*;

  localparam int IMG_W = 64;
  localparam int IMG_H = 64;
  localparam int LAT   = 4;

  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid = 1'b0;
  pixel_t [WIN_N-1:0] win_i = '0;
  logic out_valid;
  pixel_t median_o;
  logic [2:0] stage_en;

  imf_median_filter dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .win_i(win_i),
    .out_valid(out_valid), .median_o(median_o), .stage_en_o(stage_en));

  always #5 clk = ~clk;

  logic [7:0] img [IMG_H][IMG_W];
  typedef struct { logic [7:0] med; logic [7:0] exact; logic [7:0] centre; int cycle; } exp_t;
  exp_t q_exp [$];

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_idle = 0, n_salt_removed = 0, n_pepper_removed = 0, n_inexact = 0, n_out = 0;
  int n_gated [4] = '{0, 0, 0, 0};
  logic streaming = 1'b0;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  function automatic int clampi(int v, int hi);
    return (v < 0) ? 0 : (v > hi) ? hi : v;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  // gating statistics while the stream is running
  logic prev_valid = 1'b0;
  int n_same = 0;   // R1 gated although a window was accepted (repeated window)
  always @(negedge clk) if (streaming) begin
    for (int k = 1; k < 4; k++) if (!stage_en[k-1]) n_gated[k]++;
    if (!stage_en[0] && prev_valid) n_same++;
    prev_valid <= in_valid;
  end

  // output checker
  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    n_out++;
    chk(q_exp.size() > 0, "output without input");
    if (q_exp.size() > 0) begin
      e = q_exp.pop_front();
      chk(median_o == e.med, $sformatf("median %0d expected %0d", median_o, e.med));
      chk(cycle - e.cycle == LAT, $sformatf("latency %0d", cycle - e.cycle));
      chk((median_o == 8'd0) == (e.exact == 8'd0), "pepper outcome differs from exact filter");
      chk((median_o == 8'd255) == (e.exact == 8'd255), "salt outcome differs from exact filter");
      if (e.centre == 8'd255 && median_o != 8'd255) n_salt_removed++;
      if (e.centre == 8'd0 && median_o != 8'd0) n_pepper_removed++;
      if (median_o != e.exact) n_inexact++;
    end
  end

  initial begin
    // test image
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) begin
        int v;
        v = 20 + 3 * r + c;
        if (r >= 16 && r < 32 && c >= 16 && c < 32) v = 100;       // flat square
        if (r >= 18 && r < 30 && c >= 18 && c < 30) ;                // noise-free core
        else if ($urandom_range(0, 9) == 0) v = 0;                   // pepper
        else if ($urandom_range(0, 8) == 0) v = 255;                 // salt
        img[r][c] = 8'(v);
      end

    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    streaming = 1'b1;

    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) begin
        logic [7:0] w [9];
        exp_t e;
        // random idle cycles
        while ($urandom_range(0, 9) == 0) begin
          in_valid = 1'b0;
          win_i = '1;           // garbage while idle must be ignored
          n_idle++;
          @(negedge clk);
        end
        for (int dr = 0; dr < 3; dr++)
          for (int dc = 0; dc < 3; dc++)
            w[3*dr + dc] = img[clampi(r + dr - 1, IMG_H - 1)][clampi(c + dc - 1, IMG_W - 1)];
        for (int i = 0; i < 9; i++) win_i[i] = w[i];
        in_valid = 1'b1;
        e.med = ref_median_net(CMP_IMFSP, 2, w);
        e.exact = exact_median(w);
        e.centre = w[4];
        e.cycle = cycle;
        q_exp.push_back(e);
        @(negedge clk);
      end
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    streaming = 1'b0;

    chk(q_exp.size() == 0, "medians missing at the end");
    chk(n_out == IMG_W * IMG_H, "output count");
    $display("outputs=%0d idle=%0d gated R1=%0d R2=%0d R3=%0d salt_removed=%0d pepper_removed=%0d inexact=%0d",
             n_out, n_idle, n_gated[1], n_gated[2], n_gated[3], n_salt_removed, n_pepper_removed, n_inexact);
    chk(n_idle > 0, "no idle input cycle");
    $display("R1 gated after a repeated window: %0d", n_same);
    chk(n_same > 0, "repeated window never gated R1");
    for (int k = 1; k < 4; k++) chk(n_gated[k] > 0, $sformatf("R%0d never gated", k));
    chk(n_salt_removed > 0, "no salt removed");
    chk(n_pepper_removed > 0, "no pepper removed");
    chk(n_inexact > 0, "inexact comparators never changed a median");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
