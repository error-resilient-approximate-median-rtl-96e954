// tb_tbc: exhaustive check of the two-bit comparator in all four modes.
// Every one of the 16 K-map cells is compared with the reference tables;
// in addition the pepper cells (x or y = 00) must be exact in IMFP and
// IMFSP, the salt cells (x or y = 11) exact in IMFS and IMFSP, and l may
// differ from exact only where h is 0.
module tb_tbc;
  import imf_pkg::*;
  import imf_ref_pkg::*;

  logic [1:0] x, y;
  logic [3:0] h, l;
  int checks = 0, failures = 0;

  tbc #(.MODE(CMP_EXACT)) u_e  (.x(x), .y(y), .h(h[0]), .l(l[0]));
  tbc #(.MODE(CMP_IMFP))  u_p  (.x(x), .y(y), .h(h[1]), .l(l[1]));
  tbc #(.MODE(CMP_IMFS))  u_s  (.x(x), .y(y), .h(h[2]), .l(l[2]));
  tbc #(.MODE(CMP_IMFSP)) u_sp (.x(x), .y(y), .h(h[3]), .l(l[3]));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s x=%b y=%b h=%b l=%b", what, x, y, h, l);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic [1:0] ref_hl;
      logic ex_h, ex_l;
      {x, y} = 4'(i);
      #1;
      ex_h = (x > y);
      ex_l = (x < y);
      for (int m = 0; m < 4; m++) begin
        ref_hl = ref_tbc(cmp_mode_e'(m), x, y);
        chk(h[m] == ref_hl[1] && l[m] == ref_hl[0], $sformatf("table mode %0d", m));
        // l may only be wrong where h is 0
        if (l[m] != ex_l) chk(h[m] == 1'b0, $sformatf("l error under h=1 mode %0d", m));
      end
      chk(h[0] == ex_h && l[0] == ex_l, "exact");
      if (x == 2'b00 || y == 2'b00) begin
        chk(h[1] == ex_h, "IMFP pepper cell h");
        chk(h[3] == ex_h, "IMFSP pepper cell h");
      end
      if (x == 2'b11 || y == 2'b11) begin
        chk(h[2] == ex_h, "IMFS salt cell h");
        chk(h[3] == ex_h, "IMFSP salt cell h");
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
