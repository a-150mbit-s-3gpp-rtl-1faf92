// tb_qpp_gen: compares the parallel QPP address generator with the direct
// formula Pi(i) = (f1*i + f2*i^2) mod BL for several LTE block sizes, checks
// that every group of 8 lanes uses 8 different banks (conflict freedom) and
// that the setup takes the expected 9 cycles.
module tb_qpp_gen;
  import turbo_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, restart = 0, advance = 0, ready;
  logic [BLW-1:0] bl, f1, f2;
  logic [2:0] bank [8];
  logic [GW-1:0] addr [8];
  int checks = 0, failures = 0;

  qpp_gen dut (.*);
  always #5 clk = ~clk;

  task automatic one(input int k, input int a, input int b);
    longint pi;
    int cyc;
    logic [7:0] used;
    @(negedge clk);
    bl = BLW'(k); f1 = BLW'(a); f2 = BLW'(b); init = 1;
    @(negedge clk);
    init = 0;
    cyc = 0;
    while (!ready) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 9) begin failures++; $display("setup took %0d cycles", cyc); end
    restart = 1;
    @(negedge clk);
    restart = 0;
    for (int g = 0; g < k / 8; g++) begin
      used = '0;
      for (int j = 0; j < 8; j++) begin
        pi = (longint'(a) * (8*g+j) + longint'(b) * (8*g+j) * (8*g+j)) % k;
        checks++;
        if (int'(bank[j]) != int'(pi % 8) || int'(addr[j]) != int'(pi / 8)) begin
          failures++;
          if (failures < 10) $display("K=%0d i=%0d: got %0d/%0d want %0d", k, 8*g+j, bank[j], addr[j], pi);
        end
        used[bank[j]] = 1'b1;
      end
      checks++;
      if (used != 8'hff) failures++;
      advance = 1;
      @(negedge clk);
      advance = 0;
    end
  endtask

  initial begin
    bl = '0; f1 = '0; f2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(40, 3, 10);
    one(48, 7, 12);
    one(1024, 31, 64);
    one(6144, 263, 480);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
