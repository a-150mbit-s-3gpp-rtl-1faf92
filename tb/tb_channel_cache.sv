// tb_channel_cache: shifts random groups into a small cache and checks that
// every entry holds the position the indexing rule says (q[i] = position
// that entered i places before the newest), and that shift=0 holds it.
module tb_channel_cache;
  import turbo_pkg::*;
  localparam int D = 44;
  logic clk = 0, shift = 0;
  cv_t din [8];
  cv_t q [D];
  cv_t hist [$];
  int checks = 0, failures = 0;

  channel_cache #(.NL(8), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      shift = (n % 7 != 3);
      for (int j = 0; j < 8; j++) din[j] = cv_t'($urandom);
      if (shift) for (int j = 0; j < 8; j++) hist.push_back(din[j]);
      @(posedge clk);
      #1;
      for (int i = 0; i < D && i < hist.size(); i++) begin
        checks++;
        if (q[i] !== hist[hist.size()-1-i]) failures++;
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
