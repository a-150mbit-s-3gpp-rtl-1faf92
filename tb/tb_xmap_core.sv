// tb_xmap_core: checks the XMAP component decoder against a window-by-window
// Max-Log-MAP reference computed here in plain integer arithmetic.
//
// The reference decodes each window separately: forward acquisition of AL
// steps from the window start minus AL, forward recursion over the window,
// backward acquisition of AL steps from the window end plus AL, backward
// recursion with LLR output, max-subtraction normalisation and saturation as
// specified. The start metrics of every acquisition are also compared with
// the stored border metrics the reference expects. A first run uses equal initial metrics, a second run on new data
// uses the border metrics stored by the first run (next iteration
// initialisation). The same is repeated with heavily punctured inputs, for
// which the start metrics of the acquisitions matter. Every extrinsic value and hard decision is compared, and
// the latency of the first output group and the half-iteration length are
// checked against the schedule (output group g at T = g + 161).
module tb_xmap_core;
  import turbo_pkg::*;
  localparam int BLT = 200;
  localparam int NWT = (BLT + 31) / 32;

  logic clk = 0, rst_n = 0, start = 0, map = 0, nii_en = 0;
  logic [BLW-1:0] bl = BLW'(BLT);
  cv_t in_cv [8];
  logic busy, done, out_valid;
  logic [GW-1:0] out_group;
  ex_t out_ext [8];
  logic [7:0] out_hd;
  int checks = 0, failures = 0;

  xmap_core dut (.*);
  always #5 clk = ~clk;

  int sys [BLT], par [BLT], apr [BLT];
  int rext [BLT], rhd [BLT], gext [BLT], ghd [BLT];
  int fnii_old [NWT+8][8], bnii_old [NWT+8][8], fnii_new [NWT+8][8], bnii_new [NWT+8][8];

  // independent trellis model: state = {a1,a2,a3}
  function automatic int nxt(int s, int u);
    int a1, a2, a3, a;
    a1 = (s >> 2) & 1; a2 = (s >> 1) & 1; a3 = s & 1;
    a = u ^ a2 ^ a3;
    return (a << 2) | (a1 << 1) | a2;
  endfunction
  function automatic int par_out(int s, int u);
    int a1, a3, a;
    a1 = (s >> 2) & 1; a3 = s & 1;
    a = u ^ ((s >> 1) & 1) ^ a3;
    return a ^ a1 ^ a3;
  endfunction
  function automatic int br(int s, int u, int p);
    int g;
    g = 0;
    if (p >= BLT || p < 0) return 0;
    if (u == 0) g += sys[p] + apr[p];
    if (par_out(s, u) == 0) g += par[p];
    return g;
  endfunction
  function automatic void norm(ref int m [8]);
    int mx;
    mx = m[0];
    for (int i = 1; i < 8; i++) if (m[i] > mx) mx = m[i];
    for (int i = 0; i < 8; i++) begin
      m[i] -= mx;
      if (m[i] < -1024) m[i] = -1024;
    end
  endfunction

  task automatic reference(input bit use_nii);
    int a [32][8];
    int m [8], t [8];
    int p, k, m0, m1, v, le;
    for (int w = 0; w < NWT; w++) begin
      for (int i = 0; i < 8; i++) m[i] = (w <= 3) ? ((i == 0) ? 0 : -512) : (use_nii ? fnii_old[w-3][i] : 0);
      for (int j = 0; j < 128; j++) begin
        p = 32*w - 96 + j;
        if (j >= 96) for (int i = 0; i < 8; i++) a[j-96][i] = m[i];
        if (p < 0) begin
          for (int i = 0; i < 8; i++) m[i] = (i == 0) ? 0 : -512;
        end else begin
          for (int i = 0; i < 8; i++) t[i] = -100000;
          for (int s = 0; s < 8; s++) for (int u = 0; u < 2; u++) begin
            v = m[s] + br(s, u, p);
            if (v > t[nxt(s, u)]) t[nxt(s, u)] = v;
          end
          m = t; norm(m);
        end
      end
      if (w + 1 < NWT) fnii_new[w+1] = m;
      for (int i = 0; i < 8; i++) m[i] = (use_nii && (w + 4) * 32 < BLT) ? bnii_old[w+4][i] : 0;
      for (int j = 0; j < 128; j++) begin
        p = 32*w + 127 - j;
        k = p - 32*w;
        if (j >= 96 && p < BLT) begin
          m0 = -100000; m1 = -100000;
          for (int s = 0; s < 8; s++) begin
            v = a[k][s] + ((par_out(s, 0) == 0) ? par[p] : 0) + m[nxt(s, 0)];
            if (v > m0) m0 = v;
            v = a[k][s] + ((par_out(s, 1) == 0) ? par[p] : 0) + m[nxt(s, 1)];
            if (v > m1) m1 = v;
          end
          le = m0 - m1;
          v = (3 * le) >>> 2;
          if (v > 63) v = 63;
          if (v < -63) v = -63;
          rext[p] = v;
          rhd[p] = (sys[p] + apr[p] + le < 0) ? 1 : 0;
        end
        if (p >= BLT) begin
          for (int i = 0; i < 8; i++) m[i] = 0;
        end else begin
          for (int s = 0; s < 8; s++) begin
            t[s] = m[nxt(s, 0)] + br(s, 0, p);
            v = m[nxt(s, 1)] + br(s, 1, p);
            if (v > t[s]) t[s] = v;
          end
          m = t; norm(m);
        end
      end
      bnii_new[w] = m;
    end
  endtask

  task automatic run_once(input bit use_nii, input bit sparse);
    int tt, first_out, n_out;
    for (int i = 0; i < BLT; i++) begin
      sys[i] = int'($urandom_range(0, 62)) - 31;
      par[i] = int'($urandom_range(0, 62)) - 31;
      apr[i] = int'($urandom_range(0, 126)) - 63;
      if (sparse) begin
        // heavily punctured: most values erased, so acquisitions depend on their start metrics
        if ($urandom_range(0, 29) != 0) sys[i] = 0;
        if ($urandom_range(0, 29) != 0) par[i] = 0;
        apr[i] = 0;
      end
      gext[i] = 999; ghd[i] = 9;
    end
    reference(use_nii);
    @(negedge clk);
    nii_en = use_nii;
    start = 1;
    @(negedge clk);
    start = 0;
    tt = 0; first_out = -1; n_out = 0;
    while (1) begin
      for (int j = 0; j < 8; j++) begin
        int p;
        p = (tt - 8) * 8 + j;
        if (p >= 0 && p < BLT) in_cv[j] = '{sys: ch_t'(sys[p]), par: ch_t'(par[p]), apr: ex_t'(apr[p])};
        else in_cv[j] = '{sys: ch_t'(5), par: ch_t'(-7), apr: ex_t'(3)};   // must be ignored
      end
      // start metrics of the acquisitions launched in this cycle
      #1;
      if (tt % 4 == 0 && tt / 4 < NWT) begin
        int wf, e;
        wf = tt / 4;
        checks++;
        for (int i = 0; i < 8; i++) begin
          e = (wf <= 3) ? ((i == 0) ? 0 : -512) : (use_nii ? fnii_old[wf-3][i] : 0);
          if (int'(dut.finit[i]) != e) begin failures++; break; end
        end
      end
      if (tt >= 32 && tt % 4 == 0 && (tt - 32) / 4 < NWT) begin
        int wb;
        wb = (tt - 32) / 4;
        checks++;
        for (int i = 0; i < 8; i++)
          if (int'(dut.binit[i]) != ((use_nii && (wb + 4) * 32 < BLT) ? bnii_old[wb+4][i] : 0)) begin
            failures++; break;
          end
      end
      @(posedge clk);
      if (out_valid) begin
        if (first_out < 0) first_out = tt;
        n_out++;
        for (int j = 0; j < 8; j++) begin
          gext[out_group*8+j] = int'(out_ext[j]);
          ghd[out_group*8+j] = int'(out_hd[j]);
        end
      end
      if (done) break;
      @(negedge clk);
      tt++;
    end
    for (int p = 0; p < BLT; p++) begin
      checks++;
      if (gext[p] != rext[p] || ghd[p] != rhd[p]) begin
        failures++;
        if (failures < 10) $display("mismatch nii=%0d pos %0d: ext %0d/%0d hd %0d/%0d", use_nii, p, gext[p], rext[p], ghd[p], rhd[p]);
      end
    end
    checks++;
    if (first_out != 161) begin failures++; $display("first output at %0d, expected 161", first_out); end
    checks++;
    if (n_out != BLT / 8) begin failures++; $display("%0d output groups", n_out); end
    checks++;
    if (tt != 4 * NWT + 161) begin failures++; $display("half-iteration took %0d cycles", tt); end
    fnii_old = fnii_new;
    bnii_old = bnii_new;
  endtask

  initial begin
    for (int j = 0; j < 8; j++) in_cv[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_once(1'b0, 1'b0);
    run_once(1'b1, 1'b0);
    run_once(1'b1, 1'b0);
    run_once(1'b0, 1'b1);
    run_once(1'b1, 1'b1);
    run_once(1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
