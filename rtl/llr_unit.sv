// llr_unit: Max-Log-MAP output computation for one bit.
//
// From the forward metric alpha_k, the backward metric beta_{k+1} and the
// step inputs it forms
//   Le = max_{s,u=0}(alpha(s)+gp(s,0)+beta(next(s,0)))
//      - max_{s,u=1}(alpha(s)+gp(s,1)+beta(next(s,1)))
// where gp is the parity part of the branch metric, so Le is the extrinsic
// value. The full LLR is sys + apr + Le and its sign gives the hard decision
// (negative means bit 1). The extrinsic value passed to the other component
// decoder is scaled by the extrinsic scaling factor 0.75 of the design,
// computed as (3*Le) >>> 2 (rounding toward minus infinity is this design's
// choice) and saturated to the symmetric 7-bit range.
// Purely combinational.
module llr_unit
  import turbo_pkg::*;
(
  input  smv_t alpha,
  input  smv_t beta,
  input  cv_t  cv,
  output ex_t  ext,
  output logic hd,
  output logic signed [15:0] llr
);
  always_comb begin
    int m0, m1, v, le, tot;
    m0 = -(1 << 20);
    m1 = -(1 << 20);
    for (int s = 0; s < S; s++) begin
      v = int'(alpha[s]) + gamma_par(3'(s), 1'b0, cv.par) + int'(beta[next_state(3'(s), 1'b0)]);
      if (v > m0) m0 = v;
      v = int'(alpha[s]) + gamma_par(3'(s), 1'b1, cv.par) + int'(beta[next_state(3'(s), 1'b1)]);
      if (v > m1) m1 = v;
    end
    le  = m0 - m1;
    tot = int'(cv.sys) + int'(cv.apr) + le;
    ext = sat_ex((3 * le) >>> 2);
    hd  = (tot < 0);
    llr = 16'(tot);
  end
endmodule
