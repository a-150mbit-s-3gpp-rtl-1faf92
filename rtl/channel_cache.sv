// channel_cache: register cache of step inputs for the XMAP pipeline.
//
// Every cycle (when shift=1) one group of NL consecutive positions (systematic,
// parity and a-priori value of each) enters and everything moves NL places
// deeper. Entry q[i] holds the position that entered i places ago counted
// from the newest one, so the newest group occupies q[0..NL-1] with its
// highest position in q[0]. All recursion units of the pipeline read their
// step inputs from fixed entries of this cache (selected by the step's
// phase), which is how a fully pipelined window engine can be fed with only
// NL new positions per cycle. DEPTH is the longest distance any unit looks
// back; the cache organisation is this design's choice.
module channel_cache
  import turbo_pkg::*;
#(
  parameter int NL    = 8,
  parameter int DEPTH = 1208
) (
  input  logic clk,
  input  logic shift,
  input  cv_t  din [NL],     // din[j] = position NL*g + j
  output cv_t  q   [DEPTH]
);
  always_ff @(posedge clk) begin
    if (shift) begin
      for (int i = DEPTH-1; i >= NL; i--) q[i] <= q[i-NL];
      for (int j = 0; j < NL; j++) q[NL-1-j] <= din[j];
    end
  end
endmodule
