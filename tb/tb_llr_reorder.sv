// tb_llr_reorder: writes each bit of several windows from the lane that
// produces it in the core's schedule (lane u, phase c -> bit 31-4u-c) and
// reads the windows back as groups of 8 consecutive bits.
module tb_llr_reorder;
  import turbo_pkg::*;
  logic clk = 0;
  logic [7:0] we = 0, whd = 0;
  logic [3:0] wslot [8];
  logic [4:0] wbit [8];
  ex_t wext [8];
  logic [3:0] rslot = 0;
  logic [1:0] rgrp = 0;
  ex_t rext [8];
  logic [7:0] rhd;
  int ref_e [16][32], ref_h [16][32];
  int checks = 0, failures = 0;

  llr_reorder #(.NU(8), .HF(4), .SLOTS(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int c = 0; c < 4; c++) begin
      for (int w = 0; w < 16; w++) begin
        @(negedge clk);
        for (int u = 0; u < 8; u++) begin
          int b;
          b = 31 - 4*u - c;
          we[u] = 1; wslot[u] = 4'(w); wbit[u] = 5'(b);
          ref_e[w][b] = int'($urandom_range(0, 126)) - 63;
          ref_h[w][b] = int'($urandom_range(0, 1));
          wext[u] = ex_t'(ref_e[w][b]); whd[u] = ref_h[w][b][0];
        end
      end
    end
    @(negedge clk);
    we = 0;
    for (int w = 0; w < 16; w++)
      for (int q = 0; q < 4; q++) begin
        rslot = 4'(w); rgrp = 2'(q);
        #1;
        for (int j = 0; j < 8; j++) begin
          checks++;
          if (int'(rext[j]) != ref_e[w][8*q+j] || int'(rhd[j]) != ref_h[w][8*q+j]) failures++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
