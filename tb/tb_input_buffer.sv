// tb_input_buffer: fills both copies one position per cycle, then reads them
// 8 positions per cycle, systematic values at permuted (interleaved)
// bank/address pairs and parity values in natural order, and checks that the
// two copies are independent and that psel picks the right parity.
module tb_input_buffer;
  import turbo_pkg::*;
  localparam int K = 256;
  logic clk = 0, wr_sel = 0, wr_en = 0, rd_sel = 0, rd_en = 0, psel = 0;
  logic [BLW-1:0] wr_pos = 0;
  ch_t wr_sys = 0, wr_p0 = 0, wr_p1 = 0;
  logic [2:0] rd_bank [8];
  logic [9:0] rd_addr [8];
  logic [9:0] rd_group = 0;
  ch_t rd_sys [8], rd_par [8];
  int s [2][K], p0 [2][K], p1 [2][K];
  int es [8], ep [8];
  int checks = 0, failures = 0;

  input_buffer #(.NL(8), .DEPTH(768)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < K; i++) begin
        @(negedge clk);
        wr_en = 1; wr_sel = c[0]; wr_pos = BLW'(i);
        s[c][i] = int'($urandom_range(0, 63)) - 32;
        p0[c][i] = int'($urandom_range(0, 63)) - 32;
        p1[c][i] = int'($urandom_range(0, 63)) - 32;
        wr_sys = ch_t'(s[c][i]); wr_p0 = ch_t'(p0[c][i]); wr_p1 = ch_t'(p1[c][i]);
      end
    @(negedge clk);
    wr_en = 0;
    for (int n = 0; n < 200; n++) begin
      int g, c, ps;
      @(negedge clk);
      g = n % (K / 8); c = n % 2; ps = (n / 2) % 2;
      rd_en = 1; rd_sel = c[0]; psel = ps[0]; rd_group = 10'(g);
      // interleaved-like access: lane j reads position 8*((g+3*j) % 32) + (j+n)%8
      for (int j = 0; j < 8; j++) begin
        int pos;
        pos = 8 * ((g + 3*j) % (K / 8)) + (j + n) % 8;
        rd_bank[j] = 3'(pos % 8); rd_addr[j] = 10'(pos / 8);
        es[j] = s[c][pos];
        ep[j] = ps ? p1[c][8*g+j] : p0[c][8*g+j];
      end
      @(posedge clk);
      #1;
      for (int j = 0; j < 8; j++) begin
        checks += 2;
        if (int'(rd_sys[j]) != es[j]) failures++;
        if (int'(rd_par[j]) != ep[j]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
