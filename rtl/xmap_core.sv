// xmap_core: pipelined XMAP Max-Log-MAP component decoder.
//
// The block is cut into windows of WL bits. Each window gets its own forward
// and backward recursion, both preceded by an acquisition of AL steps
// (forward: from WL*w-AL up to the window, backward: from the window end+AL
// down to the window end), so every window is decoded independently and a
// new window enters the pipeline every H cycles. The recursions are unrolled
// into chains of NSTG = (AL+WL)/H recursion units, each doing H folded steps
// per window; with WL=32, AL=96 and H=4 there are 2*32 = 64 units, the count
// 2*(AL/H+N) of the design. The last WL/H backward units each drive an LLR
// unit, giving N = WL/H LLRs per cycle. Forward metrics are carried to the
// LLR units by a register pipeline (metric_pipeline); results are put back
// into position order by llr_reorder.
//
// Acquisitions start from equal metrics, or with nii_en=1 from the border
// metrics stored in the previous iteration (next iteration initialisation
// combined with acquisition). Before the block start the forward recursion
// is forced to "state 0 known" (also the start vector of an acquisition
// that begins exactly at position 0); beyond the block end the backward recursion
// starts from equal metrics (no trellis termination).
//
// Fixed schedule after a start pulse (cycle counter T = 0, 1, ...):
//   in_cv must carry group g (positions N*g .. N*g+N-1) at T = g + PRE;
//   forward chain launches window w at T = H*w, backward chain at H*w + WL;
//   output group g (N consecutive positions) appears at out_* at
//   T = g + RD0 + 1 with out_valid. done pulses after the last group.
// One half-iteration of a block of BL bits therefore takes
// H*ceil(BL/WL) + RD0 + 2 cycles (928 + 2 for BL = 6144).
// The schedule offsets, the cache and the reorder buffer are this design's
// own choices; the XMAP structure, the sizes and NII are the design's.
module xmap_core
  import turbo_pkg::*;
#(
  parameter int NL     = 8,      // LLRs per cycle
  parameter int HF     = 4,      // folding factor
  parameter int WLEN   = 32,     // window length
  parameter int ALEN   = 96,     // acquisition length
  parameter int BLMAX  = 6144
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic map,                      // 0: first, 1: second component decoder
  input  logic nii_en,                   // use stored border metrics
  input  logic [BLW-1:0] bl,             // block length, multiple of NL
  input  cv_t  in_cv [NL],
  output logic busy,
  output logic done,
  output logic out_valid,
  output logic [GW-1:0] out_group,
  output ex_t  out_ext [NL],
  output logic [NL-1:0] out_hd
);
  localparam int NACQ  = ALEN / HF;
  localparam int NWIN  = WLEN / HF;
  localparam int NSTG  = NACQ + NWIN;
  localparam int DB    = WLEN;
  localparam int PRE   = 8;
  localparam int RD0   = DB + HF*NSTG;
  localparam int AW    = ALEN / WLEN;         // acquisition length in windows
  localparam int NWMAX = BLMAX / WLEN;
  localparam int DEPTH = (NL*HF+HF)*(NSTG-1) + (NL+1)*(HF-1) + NL*DB - NL*PRE - WLEN - ALEN + 1;
  localparam int FIDX0 = ALEN - 1 - NL*PRE;
  localparam int BIDX0 = NL*DB - NL*PRE - WLEN - ALEN;
  localparam int NWW   = $clog2(NWMAX);
  localparam int HW    = $clog2(HF);

  initial begin
    assert (NWIN == NL) else $error("window length must be NL*HF");
    assert (ALEN % WLEN == 0) else $error("acquisition length must be a multiple of the window length");
    assert (FIDX0 >= 0) else $error("PRE too large for the forward chain");
  end

  logic run;
  logic [11:0] t;
  int nw, ng;
  int tq, tbq;
  logic [HW-1:0] c;

  assign nw = (int'(bl) + WLEN - 1) / WLEN;
  assign ng = int'(bl) / NL;
  assign c  = t[HW-1:0];
  assign tq = int'(t) / HF;
  assign tbq = (int'(t) - DB) >>> HW;       // floor((T-DB)/HF)
  assign busy = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      t    <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        run <= 1'b1;
        t   <= '0;
      end else if (run) begin
        if (int'(t) == RD0 + HF*nw) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
        t <= t + 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- input
  cv_t din [NL];
  cv_t cq  [DEPTH];
  always_comb begin
    int gi;
    gi = int'(t) - PRE;
    for (int j = 0; j < NL; j++) din[j] = (gi >= 0 && gi < ng) ? in_cv[j] : '0;
  end
  channel_cache #(.NL(NL), .DEPTH(DEPTH)) u_cache (
    .clk(clk), .shift(run), .din(din), .q(cq)
  );

  // ---------------------------------------------------------------- NII
  smv_t f_rdata, b_rdata;
  logic [NWW-1:0] f_raddr, b_raddr, f_waddr, b_waddr;
  logic f_we, b_we;
  smv_t fq [NSTG], fcur [NSTG], bq [NSTG], bcur [NSTG];

  always_comb begin
    int wn, bn, wfin, wbfin;
    wn = tq + 1 - AW;                                    // next forward window's start border
    bn = ((int'(t) + 1 - DB) >>> HW) + 1 + AW;           // next backward window's start border
    f_raddr = NWW'((wn < 0) ? 0 : (wn >= NWMAX ? NWMAX-1 : wn));
    b_raddr = NWW'((bn < 0) ? 0 : (bn >= NWMAX ? NWMAX-1 : bn));
    wfin  = tq - NSTG;                                   // window the last forward unit finished
    wbfin = tbq - NSTG;
    f_we    = run && (c == 0) && (wfin >= 0) && (wfin + 1 < nw);
    f_waddr = NWW'(wfin + 1);
    b_we    = run && (c == 0) && (wbfin >= 0) && (wbfin < nw);
    b_waddr = NWW'(wbfin);
  end

  nii_memory #(.NW(NWMAX)) u_nii (
    .clk(clk), .map(map),
    .f_raddr(f_raddr), .f_rdata(f_rdata), .f_we(f_we), .f_waddr(f_waddr), .f_wdata(fq[NSTG-1]),
    .b_raddr(b_raddr), .b_rdata(b_rdata), .b_we(b_we), .b_waddr(b_waddr), .b_wdata(bq[NSTG-1])
  );

  smv_t finit, binit;
  always_comb begin
    int wb0;
    wb0   = tbq;
    // an acquisition that starts at or before position 0 starts from the known state 0
    finit = (tq <= AW) ? known_start() : (nii_en ? f_rdata : '0);
    binit = (nii_en && (wb0 + 1 + AW) * WLEN < int'(bl)) ? b_rdata : '0;
  end

  // ---------------------------------------------------------------- chains
  cv_t cvf [NSTG], cvb [NSTG];
  for (genvar s = 0; s < NSTG; s++) begin : g_stage
    localparam int FI = (NL*HF-HF)*s + FIDX0;
    localparam int BI = (NL*HF+HF)*s + BIDX0;
    logic ff, bf;
    always_comb begin
      int wf, wb, pf, pb;
      wf = tq - s;
      wb = tbq - s;
      pf = WLEN*wf - ALEN + HF*s + int'(c);
      pb = WLEN*wb + WLEN + ALEN - 1 - HF*s - int'(c);
      ff = (pf < 0);
      bf = (pb >= int'(bl));
      cvf[s] = cq[FI + (NL-1)*int'(c)];
      cvb[s] = cq[BI + (NL+1)*int'(c)];
    end
    recursion_unit #(.FWD(1'b1)) u_f (
      .clk(clk), .load(c == 0), .m_in((s == 0) ? finit : fq[(s == 0) ? 0 : s-1]),
      .force_init(ff), .cv(cvf[s]), .m_cur(fcur[s]), .m_q(fq[s])
    );
    recursion_unit #(.FWD(1'b0)) u_b (
      .clk(clk), .load(c == 0), .m_in((s == 0) ? binit : bq[(s == 0) ? 0 : s-1]),
      .force_init(bf), .cv(cvb[s]), .m_cur(bcur[s]), .m_q(bq[s])
    );
  end

  // ---------------------------------------------------------------- LLRs
  smv_t ain [NWIN], aout [NWIN];
  for (genvar u = 0; u < NWIN; u++) begin : g_ain
    assign ain[u] = fcur[NACQ + NWIN - 1 - u];
  end
  metric_pipeline #(.NU(NWIN), .HF(HF)) u_mp (
    .clk(clk), .phase(c), .din(ain), .dout(aout)
  );

  logic [NWIN-1:0] rwe, rhd_w;
  logic [3:0] rws [NWIN];
  logic [$clog2(WLEN)-1:0] rwb [NWIN];
  ex_t rwext [NWIN];
  for (genvar u = 0; u < NWIN; u++) begin : g_llr
    logic signed [15:0] llr_unused;
    llr_unit u_llr (
      .alpha(aout[u]), .beta(bcur[NACQ+u]), .cv(cvb[NACQ+u]),
      .ext(rwext[u]), .hd(rhd_w[u]), .llr(llr_unused)
    );
    always_comb begin
      int wb;
      wb = tbq - (NACQ + u);
      rwe[u] = run && (wb >= 0) && (wb < nw);
      rws[u] = 4'(wb);
      rwb[u] = $clog2(WLEN)'(WLEN - 1 - HF*u - int'(c));
    end
  end

  ex_t  rext [NL];
  logic [NL-1:0] rhd;
  logic [3:0] rslot;
  logic [HW-1:0] rgrp;
  int g_rd;
  assign g_rd  = int'(t) - RD0;
  assign rslot = 4'(g_rd >>> HW);
  assign rgrp  = HW'(g_rd);

  llr_reorder #(.NU(NWIN), .HF(HF), .SLOTS(16)) u_reo (
    .clk(clk), .we(rwe), .wslot(rws), .wbit(rwb), .wext(rwext), .whd(rhd_w),
    .rslot(rslot), .rgrp(rgrp), .rext(rext), .rhd(rhd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_group <= '0;
      out_hd    <= '0;
      for (int j = 0; j < NL; j++) out_ext[j] <= '0;
    end else begin
      out_valid <= run && (g_rd >= 0) && (g_rd < ng);
      out_group <= GW'(g_rd);
      out_hd    <= rhd;
      out_ext   <= rext;
    end
  end
endmodule
