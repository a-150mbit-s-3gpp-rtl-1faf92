// tb_crc_unit: random blocks with a CRC24B computed bit by bit here; the
// unit must end with remainder 0 (ok) for the intact block, report an error
// for a block with one flipped bit, and match the bitwise register after
// every group of 8 bits.
module tb_crc_unit;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [7:0] din = 0;
  logic [23:0] crc;
  logic ok;
  int checks = 0, failures = 0;

  crc_unit #(.NL(8)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [23:0] step(logic [23:0] r, int b);
    logic fb;
    fb = r[23] ^ b[0];
    r = {r[22:0], 1'b0};
    if (fb) r = r ^ 24'h800063;
    return r;
  endfunction

  initial begin
    int k, flip;
    int bits [1024];
    logic [23:0] r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      k = 40 + 8 * int'($urandom_range(0, 100));
      r = '0;
      for (int i = 0; i < k - 24; i++) begin bits[i] = int'($urandom_range(0, 1)); r = step(r, bits[i]); end
      for (int i = 0; i < 24; i++) bits[k-24+i] = int'(r[23-i]);
      flip = (n % 2 == 1) ? int'($urandom_range(0, k - 1)) : -1;
      if (flip >= 0) bits[flip] ^= 1;
      @(negedge clk);
      clr = 1;
      @(negedge clk);
      clr = 0;
      r = '0;
      for (int g = 0; g < k / 8; g++) begin
        en = 1;
        for (int j = 0; j < 8; j++) begin din[j] = bits[8*g+j][0]; r = step(r, bits[8*g+j]); end
        @(negedge clk);
        en = 0;
        checks++;
        if (crc !== r) failures++;
      end
      checks++;
      if (ok != (flip < 0)) begin failures++; $display("block %0d: ok=%0d flip=%0d", n, ok, flip); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
