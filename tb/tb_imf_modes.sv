// tb_imf_modes: the filter variants side by side on noisy images.
//
// Five filters get the same window stream: exact comparators, IMFP, IMFS
// and IMFSP with all four slices inexact, and IMFSP with two inexact slices
// (the default). A 48x48 test image with values in 1..254 is corrupted with
// salt-and-pepper noise at densities of 10%, 30% and 50%. For every output:
//   - each filter matches the reference model of its own configuration;
//   - IMFP leaves exactly the same peppers (0) in the image as the exact
//     filter, IMFS the same salts (255), IMFSP both.
// Per density the testbench prints the mean absolute error of each filter
// against the clean image and against the exact filter, and the residual
// noise pixels.
module tb_imf_modes;
  import imf_pkg::*;
  import imf_ref_pkg::*;

  localparam int IMG = 48;
  localparam int NF  = 5;
  localparam cmp_mode_e   FM [NF] = '{CMP_EXACT, CMP_IMFP, CMP_IMFS, CMP_IMFSP, CMP_IMFSP};
  localparam int unsigned FN [NF] = '{4, 4, 4, 4, 2};
  localparam int DENS [3] = '{10, 30, 50};

  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0;
  pixel_t [WIN_N-1:0] win_i = '0;
  logic [NF-1:0] out_valid;
  pixel_t med [NF];

  for (genvar f = 0; f < NF; f++) begin : g_f
    imf_median_filter #(.MODE(FM[f]), .N_APPROX(FN[f])) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .win_i(win_i),
      .out_valid(out_valid[f]), .median_o(med[f]), .stage_en_o());
  end

  always #5 clk = ~clk;

  logic [7:0] clean [IMG][IMG];
  logic [7:0] noisy [IMG][IMG];
  typedef struct { logic [7:0] m [NF]; logic [7:0] ref_clean; } exp_t;
  exp_t q [$];

  int checks = 0, failures = 0;
  longint err_clean [NF];
  longint err_exact [NF];
  int resid_salt [NF];
  int resid_pep [NF];

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int clampi(int v);
    return (v < 0) ? 0 : (v > IMG - 1) ? IMG - 1 : v;
  endfunction

  always @(negedge clk) if (rst_n && out_valid[0]) begin
    exp_t e;
    chk(out_valid == '1, "filters out of step");
    if (q.size() > 0) begin
      e = q.pop_front();
      for (int f = 0; f < NF; f++) begin
        chk(med[f] == e.m[f], $sformatf("filter %0d median %0d expected %0d", f, med[f], e.m[f]));
        err_clean[f] += (med[f] > e.ref_clean) ? med[f] - e.ref_clean : e.ref_clean - med[f];
        err_exact[f] += (med[f] > med[0]) ? med[f] - med[0] : med[0] - med[f];
        if (med[f] == 8'd255) resid_salt[f]++;
        if (med[f] == 8'd0) resid_pep[f]++;
      end
      chk((med[1] == 8'd0) == (med[0] == 8'd0), "IMFP pepper differs from exact");
      chk((med[2] == 8'd255) == (med[0] == 8'd255), "IMFS salt differs from exact");
      for (int f = 3; f < NF; f++) begin
        chk((med[f] == 8'd0) == (med[0] == 8'd0), "IMFSP pepper differs from exact");
        chk((med[f] == 8'd255) == (med[0] == 8'd255), "IMFSP salt differs from exact");
      end
    end else chk(1'b0, "output without input");
  end

  initial begin
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++)
        clean[r][c] = 8'(1 + ((r * 5 + c * 3 + (r * c) / 7) % 254));

    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    foreach (DENS[d]) begin
      for (int f = 0; f < NF; f++) begin
        err_clean[f] = 0; err_exact[f] = 0; resid_salt[f] = 0; resid_pep[f] = 0;
      end
      for (int r = 0; r < IMG; r++)
        for (int c = 0; c < IMG; c++) begin
          noisy[r][c] = clean[r][c];
          if ($urandom_range(0, 99) < DENS[d])
            noisy[r][c] = ($urandom_range(0, 1) != 0) ? 8'd255 : 8'd0;
        end
      for (int r = 0; r < IMG; r++)
        for (int c = 0; c < IMG; c++) begin
          logic [7:0] w [9];
          exp_t e;
          for (int i = 0; i < 9; i++)
            w[i] = noisy[clampi(r + i / 3 - 1)][clampi(c + i % 3 - 1)];
          for (int i = 0; i < 9; i++) win_i[i] = w[i];
          in_valid = 1'b1;
          for (int f = 0; f < NF; f++) e.m[f] = ref_median_net(FM[f], FN[f], w);
          e.ref_clean = clean[r][c];
          q.push_back(e);
          @(negedge clk);
        end
      in_valid = 1'b0;
      repeat (6) @(negedge clk);
      chk(q.size() == 0, "medians missing");
      $display("density %0d%%:", DENS[d]);
      for (int f = 0; f < NF; f++)
        $display("  filter %0d (mode %0d, %0d inexact slices): MAE vs clean %0d.%02d, vs exact %0d.%02d, residual salt %0d pepper %0d",
                 f, FM[f], FN[f],
                 err_clean[f] / (IMG * IMG), (err_clean[f] * 100 / (IMG * IMG)) % 100,
                 err_exact[f] / (IMG * IMG), (err_exact[f] * 100 / (IMG * IMG)) % 100,
                 resid_salt[f], resid_pep[f]);
      chk(err_exact[3] > 0, "approximation never changed a median");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
