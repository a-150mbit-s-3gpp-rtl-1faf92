// recursion_unit: one folded state-metric recursion unit of the XMAP pipeline.
//
// The unit performs one radix-2 Max-Log-MAP trellis step per clock cycle and,
// because H recursion steps are folded onto it, works on one window for H
// consecutive cycles. On the first cycle of a window (load=1) it takes the
// metric vector handed over by the previous unit of the chain (or the chain's
// initial vector), on the other cycles it iterates on its own register.
// FWD=1 computes the forward (alpha) recursion
//   alpha_{k+1}(s') = max_{s,u} alpha_k(s) + gamma_k(s,u), next(s,u)=s'
// and FWD=0 the backward (beta) recursion
//   beta_k(s) = max_u beta_{k+1}(next(s,u)) + gamma_k(s,u).
// The Max-Log-MAP max replaces min* as in the design. After each step the
// largest metric is subtracted (so all metrics are <= 0) and the result is
// saturated at the lower end of the 11-bit range; the normalisation scheme
// is this design's choice. force_init replaces the result by the initial
// vector of the block border: state 0 known for the forward direction (the
// encoder starts in state 0) and all states equal for the backward direction
// (the block end is treated as unterminated).
// Timing: m_cur is combinational (metric entering the current step), m_q is
// the registered result, valid one cycle after the step.
module recursion_unit
  import turbo_pkg::*;
#(
  parameter bit FWD = 1'b1
) (
  input  logic clk,
  input  logic load,
  input  smv_t m_in,
  input  logic force_init,
  input  cv_t  cv,
  output smv_t m_cur,
  output smv_t m_q
);
  smv_t m_next;

  assign m_cur = load ? m_in : m_q;

  always_comb begin
    int best [S];
    int mx;
    for (int i = 0; i < S; i++) best[i] = -(1 << 20);
    for (int s = 0; s < S; s++) begin
      for (int u = 0; u < 2; u++) begin
        logic [2:0] ns;
        int v;
        ns = next_state(3'(s), u[0]);
        if (FWD) begin
          v = int'(m_cur[s]) + gamma(3'(s), u[0], cv);
          if (v > best[ns]) best[ns] = v;
        end else begin
          v = int'(m_cur[ns]) + gamma(3'(s), u[0], cv);
          if (v > best[s]) best[s] = v;
        end
      end
    end
    mx = best[0];
    for (int i = 1; i < S; i++) if (best[i] > mx) mx = best[i];
    for (int i = 0; i < S; i++) m_next[i] = sat_sm(best[i] - mx);
    if (force_init) m_next = FWD ? known_start() : '0;
  end

  always_ff @(posedge clk) m_q <= m_next;
endmodule
