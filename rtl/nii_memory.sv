// nii_memory: next-iteration-initialisation store for window border metrics.
//
// For each of the two component decoders (map = 0: natural order, map = 1:
// interleaved order) it keeps one forward and one backward state metric
// vector per window border, i.e. 4*BL/(N*H) vectors as in the design's
// memory estimate. The forward recursion of window w-1 writes alpha at border
// w; the backward recursion of window w writes beta at border w. In the next
// iteration the acquisitions start from these vectors instead of from equal
// metrics. Each direction has one synchronous read port and one write port
// (read data one cycle after the address); a single-port RAM would suffice
// because each is accessed once per H cycles, the dual-port model is this
// design's simplification.
module nii_memory
  import turbo_pkg::*;
#(
  parameter int NW = 192          // window borders per component decoder
) (
  input  logic clk,
  input  logic map,
  input  logic [$clog2(NW)-1:0] f_raddr,
  output smv_t f_rdata,
  input  logic f_we,
  input  logic [$clog2(NW)-1:0] f_waddr,
  input  smv_t f_wdata,
  input  logic [$clog2(NW)-1:0] b_raddr,
  output smv_t b_rdata,
  input  logic b_we,
  input  logic [$clog2(NW)-1:0] b_waddr,
  input  smv_t b_wdata
);
  smv_t fmem [2][NW];
  smv_t bmem [2][NW];

  always_ff @(posedge clk) begin
    if (f_we) fmem[map][f_waddr] <= f_wdata;
    if (b_we) bmem[map][b_waddr] <= b_wdata;
    f_rdata <= fmem[map][f_raddr];
    b_rdata <= bmem[map][b_raddr];
  end
endmodule
