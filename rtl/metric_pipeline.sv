// metric_pipeline: register pipeline that holds forward state metrics until the
// backward recursion of the same window reaches the same bit.
//
// In the XMAP schedule the forward metric alpha_k of window bit k is produced
// 2*WL-1-2k cycles before the backward metric beta_{k+1} (the backward chain
// is launched WL cycles after the forward chain). Lane u (u = 0..NU-1) serves
// the LLR unit attached to the backward unit that handles bits
// k = H*(NU-1-u) + (H-1-cb) in phase cb. Its input is the forward metric of
// the forward unit that handles the same bits; its output is that input
// delayed by 1 + 2*H*u + 2*cb cycles, so one shift register of depth
// 2*H*u + 2*H - 1 with a phase-selected tap serves the lane. This is the
// register-pipeline state metric storage of the XMAP architecture; the tap
// arrangement is this design's own derivation of it.
module metric_pipeline
  import turbo_pkg::*;
#(
  parameter int NU = 8,
  parameter int HF = 4
) (
  input  logic clk,
  input  logic [$clog2(HF)-1:0] phase,
  input  smv_t din  [NU],
  output smv_t dout [NU]
);
  for (genvar u = 0; u < NU; u++) begin : g_lane
    localparam int D = 2*HF*u + 2*HF - 1;
    smv_t dl [D];
    always_ff @(posedge clk) begin
      dl[0] <= din[u];
      for (int i = 1; i < D; i++) dl[i] <= dl[i-1];
    end
    // delay 1 + 2*HF*u + 2*phase is entry 2*HF*u + 2*phase
    assign dout[u] = dl[2*HF*u + 2*int'(phase)];
  end
endmodule
