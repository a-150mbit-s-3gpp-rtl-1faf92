// tb_llr_unit: random forward/backward metrics and step inputs; the extrinsic
// value (scaled by 0.75 and saturated) and the hard decision are compared with
// a Max-Log-MAP model written here.
module tb_llr_unit;
  import turbo_pkg::*;
  smv_t alpha, beta;
  cv_t cv;
  ex_t ext;
  logic hd;
  logic signed [15:0] llr;
  int checks = 0, failures = 0;

  llr_unit dut (.*);

  function automatic int nxt(int s, int u);
    int a;
    a = u ^ ((s >> 1) & 1) ^ (s & 1);
    return (a << 2) | (s >> 1);
  endfunction
  function automatic int po(int s, int u);
    int a;
    a = u ^ ((s >> 1) & 1) ^ (s & 1);
    return a ^ ((s >> 2) & 1) ^ (s & 1);
  endfunction

  initial begin
    int a [8], b [8], ls, lp, la, m0, m1, v, le, e;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < 8; i++) begin
        a[i] = -int'($urandom_range(0, (n < 1500) ? 60 : 1000));
        b[i] = -int'($urandom_range(0, (n < 1500) ? 60 : 1000));
        alpha[i] = sm_t'(a[i]); beta[i] = sm_t'(b[i]);
      end
      ls = int'($urandom_range(0, 62)) - 31;
      lp = int'($urandom_range(0, 62)) - 31;
      la = int'($urandom_range(0, 126)) - 63;
      cv = '{sys: ch_t'(ls), par: ch_t'(lp), apr: ex_t'(la)};
      m0 = -99999; m1 = -99999;
      for (int s = 0; s < 8; s++) begin
        v = a[s] + ((po(s, 0) == 0) ? lp : 0) + b[nxt(s, 0)];
        if (v > m0) m0 = v;
        v = a[s] + ((po(s, 1) == 0) ? lp : 0) + b[nxt(s, 1)];
        if (v > m1) m1 = v;
      end
      le = m0 - m1;
      e = (3 * le) >>> 2;
      if (e > 63) e = 63;
      if (e < -63) e = -63;
      #1;
      checks += 3;
      if (int'(ext) != e) begin failures++; if (failures < 5) $display("ext %0d != %0d", ext, e); end
      if (int'(hd) != ((ls + la + le < 0) ? 1 : 0)) failures++;
      if (int'(llr) != ls + la + le) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
