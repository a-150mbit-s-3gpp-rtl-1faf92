// tb_recursion_unit: checks forward and backward recursion units over folded
// sequences of H=4 steps (load on the first step, then iterate) against a
// trellis model written here, including the block-border override.
module tb_recursion_unit;
  import turbo_pkg::*;
  logic clk = 0;
  logic load, force_init;
  smv_t m_in, fcur, fq, bcur, bq;
  cv_t cv;
  int checks = 0, failures = 0;

  recursion_unit #(.FWD(1'b1)) u_f (.clk, .load, .m_in, .force_init, .cv, .m_cur(fcur), .m_q(fq));
  recursion_unit #(.FWD(1'b0)) u_b (.clk, .load, .m_in, .force_init, .cv, .m_cur(bcur), .m_q(bq));
  always #5 clk = ~clk;

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
  function automatic int g(int s, int u, int ls, int lp, int la);
    return ((u == 0) ? ls + la : 0) + ((po(s, u) == 0) ? lp : 0);
  endfunction

  int rf [8], rb [8], t [8];
  task automatic step_ref(int ls, int lp, int la, bit frc);
    int mx, v;
    for (int i = 0; i < 8; i++) t[i] = -99999;
    for (int s = 0; s < 8; s++) for (int u = 0; u < 2; u++) begin
      v = rf[s] + g(s, u, ls, lp, la);
      if (v > t[nxt(s, u)]) t[nxt(s, u)] = v;
    end
    mx = -99999; for (int i = 0; i < 8; i++) if (t[i] > mx) mx = t[i];
    for (int i = 0; i < 8; i++) rf[i] = frc ? ((i == 0) ? 0 : -512) : ((t[i] - mx < -1024) ? -1024 : t[i] - mx);
    for (int s = 0; s < 8; s++) begin
      t[s] = rb[nxt(s, 0)] + g(s, 0, ls, lp, la);
      v = rb[nxt(s, 1)] + g(s, 1, ls, lp, la);
      if (v > t[s]) t[s] = v;
    end
    mx = -99999; for (int i = 0; i < 8; i++) if (t[i] > mx) mx = t[i];
    for (int i = 0; i < 8; i++) rb[i] = frc ? 0 : ((t[i] - mx < -1024) ? -1024 : t[i] - mx);
  endtask

  initial begin
    int ls, lp, la;
    bit frc;
    for (int win = 0; win < 300; win++) begin
      for (int c = 0; c < 4; c++) begin
        @(negedge clk);
        load = (c == 0);
        if (c == 0) begin
          for (int i = 0; i < 8; i++) begin
            m_in[i] = sm_t'(-int'($urandom_range(0, 900)));
            rf[i] = int'(m_in[i]); rb[i] = int'(m_in[i]);
          end
        end
        ls = int'($urandom_range(0, 62)) - 31;
        lp = int'($urandom_range(0, 62)) - 31;
        la = int'($urandom_range(0, 126)) - 63;
        frc = ($urandom_range(0, 19) == 0);
        cv = '{sys: ch_t'(ls), par: ch_t'(lp), apr: ex_t'(la)};
        force_init = frc;
        step_ref(ls, lp, la, frc);
        @(posedge clk);
        #1;
        for (int i = 0; i < 8; i++) begin
          checks += 2;
          if (int'(fq[i]) != rf[i]) begin failures++; if (failures < 5) $display("fwd s%0d %0d != %0d", i, fq[i], rf[i]); end
          if (int'(bq[i]) != rb[i]) begin failures++; if (failures < 5) $display("bwd s%0d %0d != %0d", i, bq[i], rb[i]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
