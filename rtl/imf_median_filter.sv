// imf_median_filter: pipelined 3x3 inexact median filter with look-ahead
// clock gating.
//
// Removes salt-and-pepper noise: for every 3x3 window it outputs the median
// of the nine pixels. The median is found by a sorting network of ternary
// data sorters (tds), each built from three magnitude comparators whose low
// slices may be inexact (see tbc). Because the inexact comparators are exact
// against 0 and/or 255, noise pixels are ordered exactly as by an exact
// filter, while the comparator hardware shrinks.
//
// Pipeline (one window per clock, latency 4 clocks from win_i to median_o):
//   R0  input window register (9 pixels)
//   S1  three tds sort the three columns -> R1 (max, med, min per column)
//   S2  tds on the three maxima keeps their minimum, tds on the three
//       medians keeps their median, tds on the three minima keeps their
//       maximum -> R2 (3 pixels)
//   S3  tds on those three keeps the median -> R3 = median_o
// win_i is row-major: win_i[3*r + c] is row r, column c.
//
// Every pipeline register is a lacg_reg: its clock is gated by an enable
// computed one cycle early from the register before it (did it change at
// the last edge?). R0 has no register before it, so its enable is in_valid
// itself: a window is captured only in cycles where in_valid is high. The
// valid bits travel in a small ungated shift register. stage_en_o shows the
// look-ahead enable of R1, R2 and R3 in the current cycle (bit k-1 for Rk),
// for measuring how often their clocks are gated off.
//
// The column / row / diagonal arrangement of sorters is the classic
// TDS-based 3x3 median network; the filter design calls for a TDS-based
// pipelined filter and for look-ahead gating of its registers, while the
// stage boundaries, the valid handshake and the default of two inexact
// slices per comparator are this implementation's choices.
module imf_median_filter
  import imf_pkg::*;
#(
  parameter cmp_mode_e   MODE     = CMP_IMFSP,  // comparator approximation
  parameter int unsigned N_APPROX = 2           // inexact 2-bit slices, from LSB
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  pixel_t [WIN_N-1:0]    win_i,
  output logic                  out_valid,
  output pixel_t                median_o,
  output logic [2:0]            stage_en_o
);

  localparam int unsigned LAT = 4;

  // ---------------- R0: input window ----------------
  pixel_t [WIN_N-1:0] r0_q;
  logic               r0_chg;

  lacg_reg #(.W(WIN_N * PIX_W)) u_r0 (
    .clk (clk), .rst_n (rst_n), .en (in_valid),
    .d   (win_i), .q (r0_q), .chg (r0_chg)
  );

  // ---------------- S1: column sort ----------------
  pixel_t [2:0] col_max, col_med, col_min;

  for (genvar c = 0; c < 3; c++) begin : g_col
    tds #(.W(PIX_W), .MODE(MODE), .N_APPROX(N_APPROX)) u_tds (
      .a     (r0_q[c]),
      .b     (r0_q[3 + c]),
      .c     (r0_q[6 + c]),
      .max_o (col_max[c]),
      .med_o (col_med[c]),
      .min_o (col_min[c])
    );
  end

  pixel_t [2:0] r1_max, r1_med, r1_min;
  logic         r1_chg;

  lacg_reg #(.W(9 * PIX_W)) u_r1 (
    .clk (clk), .rst_n (rst_n), .en (r0_chg),
    .d   ({col_max, col_med, col_min}),
    .q   ({r1_max, r1_med, r1_min}),
    .chg (r1_chg)
  );

  // ---------------- S2: min of maxima, median of medians, max of minima ---
  pixel_t min_of_max, med_of_med, max_of_min;
  pixel_t unused_hi0, unused_hi1, unused_md0, unused_md1, unused_lo0, unused_lo1;

  tds #(.W(PIX_W), .MODE(MODE), .N_APPROX(N_APPROX)) u_tds_max (
    .a (r1_max[0]), .b (r1_max[1]), .c (r1_max[2]),
    .max_o (unused_hi0), .med_o (unused_hi1), .min_o (min_of_max)
  );
  tds #(.W(PIX_W), .MODE(MODE), .N_APPROX(N_APPROX)) u_tds_med (
    .a (r1_med[0]), .b (r1_med[1]), .c (r1_med[2]),
    .max_o (unused_md0), .med_o (med_of_med), .min_o (unused_md1)
  );
  tds #(.W(PIX_W), .MODE(MODE), .N_APPROX(N_APPROX)) u_tds_min (
    .a (r1_min[0]), .b (r1_min[1]), .c (r1_min[2]),
    .max_o (max_of_min), .med_o (unused_lo0), .min_o (unused_lo1)
  );

  pixel_t [2:0] r2_q;
  logic         r2_chg;

  lacg_reg #(.W(3 * PIX_W)) u_r2 (
    .clk (clk), .rst_n (rst_n), .en (r1_chg),
    .d   ({max_of_min, med_of_med, min_of_max}),   // [0] = min of maxima
    .q   (r2_q),
    .chg (r2_chg)
  );

  // ---------------- S3: final median ----------------
  pixel_t median_d, unused_f0, unused_f1;

  tds #(.W(PIX_W), .MODE(MODE), .N_APPROX(N_APPROX)) u_tds_final (
    .a (r2_q[0]), .b (r2_q[1]), .c (r2_q[2]),
    .max_o (unused_f0), .med_o (median_d), .min_o (unused_f1)
  );

  lacg_reg #(.W(PIX_W)) u_r3 (
    .clk (clk), .rst_n (rst_n), .en (r2_chg),
    .d   (median_d), .q (median_o),
    .chg ()   // no gated register follows R3
  );

  // ---------------- valid pipeline (free-running clock) ----------------
  logic [LAT-1:0] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], in_valid};
  end

  assign out_valid  = vld[LAT-1];
  assign stage_en_o = {r2_chg, r1_chg, r0_chg};   // enables of R3, R2, R1

endmodule
