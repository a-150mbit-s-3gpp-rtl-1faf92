// llr_reorder: output alignment buffer of the XMAP core.
//
// The NU LLR units each produce one result per cycle, but for different
// windows and bits (unit u delivers bit H*(NU-1-u)+(H-1-phase) of its
// window). The buffer stores each result by (window mod SLOTS, bit) and is
// read one group of NU consecutive window bits per cycle, so that the
// extrinsic and hard-decision memories are written with NU consecutive block
// positions per cycle, the access pattern for which QPP interleaving is
// conflict free. SLOTS=16 windows is enough for the core's schedule (a window
// is written during 32 cycles and read 4 cycles later). The buffer is this
// design's choice; reads are combinational.
module llr_reorder
  import turbo_pkg::*;
#(
  parameter int NU    = 8,
  parameter int HF    = 4,
  parameter int SLOTS = 16
) (
  input  logic clk,
  input  logic [NU-1:0] we,
  input  logic [$clog2(SLOTS)-1:0] wslot [NU],
  input  logic [$clog2(NU*HF)-1:0] wbit  [NU],
  input  ex_t  wext [NU],
  input  logic [NU-1:0] whd,
  input  logic [$clog2(SLOTS)-1:0] rslot,
  input  logic [$clog2(HF)-1:0]    rgrp,   // group of NU bits inside the window
  output ex_t  rext [NU],
  output logic [NU-1:0] rhd
);
  localparam int WLEN = NU*HF;
  ex_t  bext [SLOTS][WLEN];
  logic bhd  [SLOTS][WLEN];

  always_ff @(posedge clk) begin
    for (int u = 0; u < NU; u++) begin
      if (we[u]) begin
        bext[wslot[u]][wbit[u]] <= wext[u];
        bhd [wslot[u]][wbit[u]] <= whd[u];
      end
    end
  end

  always_comb begin
    for (int j = 0; j < NU; j++) begin
      rext[j] = bext[rslot][int'(rgrp)*NU + j];
      rhd[j]  = bhd [rslot][int'(rgrp)*NU + j];
    end
  end
endmodule
