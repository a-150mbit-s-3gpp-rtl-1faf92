// tb_metric_pipeline: feeds random metric vectors to every lane and checks
// that lane u returns the vector from 1 + 2*H*u + 2*phase cycles earlier.
module tb_metric_pipeline;
  import turbo_pkg::*;
  logic clk = 0;
  logic [1:0] phase = 0;
  smv_t din [8], dout [8];
  smv_t hist [8][$];
  int checks = 0, failures = 0;

  metric_pipeline #(.NU(8), .HF(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      phase = 2'(n);
      #1;
      // output sampled in this cycle before the new input is stored
      for (int u = 0; u < 8; u++) begin
        int d;
        d = 1 + 8*u + 2*int'(phase);
        if (hist[u].size() >= d) begin
          checks++;
          if (dout[u] !== hist[u][hist[u].size()-d]) failures++;
        end
      end
      for (int u = 0; u < 8; u++) begin
        for (int i = 0; i < 8; i++) din[u][i] = sm_t'($urandom);
        hist[u].push_back(din[u]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
