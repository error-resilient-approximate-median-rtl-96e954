// tb_tds: ternary data sorter. An exact sorter and a default (IMFSP, two
// inexact slices) sorter get the same random and corner triples: the exact
// one must sort, the inexact one must match the reference model, and both
// must output a permutation of their inputs. Triples holding 0 or 255 must
// put that value at the right end in the inexact sorter as well.
module tb_tds;
  import imf_pkg::*;
  import imf_ref_pkg::*;

  logic [7:0] a, b, c;
  logic [7:0] emx, emd, emn, imx, imd, imn;
  int checks = 0, failures = 0;
  int differ = 0;

  tds #(.W(8), .MODE(CMP_EXACT), .N_APPROX(0)) u_exact (
    .a(a), .b(b), .c(c), .max_o(emx), .med_o(emd), .min_o(emn));
  tds u_inexact (
    .a(a), .b(b), .c(c), .max_o(imx), .med_o(imd), .min_o(imn));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%0d b=%0d c=%0d exact=%0d/%0d/%0d inexact=%0d/%0d/%0d",
                 what, a, b, c, emx, emd, emn, imx, imd, imn);
    end
  endtask

  function automatic logic is_perm(logic [7:0] p, q, r, logic [7:0] u, v, w);
    return (p == u && q == v && r == w) || (p == u && q == w && r == v) ||
           (p == v && q == u && r == w) || (p == v && q == w && r == u) ||
           (p == w && q == u && r == v) || (p == w && q == v && r == u);
  endfunction

  task automatic apply(logic [7:0] ta, tb_, tc);
    sort3_t r;
    a = ta; b = tb_; c = tc;
    #1;
    chk(emx >= emd && emd >= emn, "exact sorted");
    chk(is_perm(emx, emd, emn, a, b, c), "exact permutation");
    chk(is_perm(imx, imd, imn, a, b, c), "inexact permutation");
    r = ref_sort3(CMP_IMFSP, 2, a, b, c);
    chk(imx == r.mx && imd == r.md && imn == r.mn, "inexact reference");
    if (a == 0 || b == 0 || c == 0) chk(imn == 8'd0, "pepper to min");
    if (a == 255 || b == 255 || c == 255) chk(imx == 8'd255, "salt to max");
    if (imd != emd) differ++;
  endtask

  initial begin
    // every ordering of three distinct values, and ties
    apply(10, 20, 30); apply(10, 30, 20); apply(20, 10, 30);
    apply(20, 30, 10); apply(30, 10, 20); apply(30, 20, 10);
    apply(5, 5, 5);    apply(5, 5, 9);    apply(9, 5, 5);   apply(5, 9, 5);
    apply(0, 255, 128); apply(255, 0, 0); apply(255, 255, 3);
    for (int i = 0; i < 200000; i++) begin
      logic [7:0] va, vb, vc;
      va = 8'($urandom); vb = 8'($urandom); vc = 8'($urandom);
      if ($urandom_range(0, 7) == 0) va = ($urandom_range(0, 1) != 0) ? 8'd255 : 8'd0;
      if ($urandom_range(0, 7) == 0) vc = ($urandom_range(0, 1) != 0) ? 8'd255 : 8'd0;
      apply(va, vb, vc);
    end
    $display("inexact median differed from exact in %0d triples", differ);
    chk(differ > 0, "approximation exercised");
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
