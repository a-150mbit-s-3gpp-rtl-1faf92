// tb_banked_mem: writes 8 values per cycle through permuted lane-to-bank
// mappings, reads them back through other permutations and checks the data
// and the one-cycle read latency against a flat reference array.
module tb_banked_mem;
  logic clk = 0;
  logic [7:0] rd_en = 0, wr_en = 0;
  logic [2:0] rd_bank [8], wr_bank [8];
  logic [6:0] rd_addr [8], wr_addr [8];
  logic [6:0] rd_data [8], wr_data [8];
  int mem [8][128];
  int exp_d [8];
  int checks = 0, failures = 0;

  banked_mem #(.NB(8), .DEPTH(128), .DW(7)) dut (.*);
  always #5 clk = ~clk;

  task automatic perm(output logic [2:0] p [8]);
    int k, tmp;
    int a [8];
    for (int i = 0; i < 8; i++) a[i] = i;
    for (int i = 7; i > 0; i--) begin
      k = int'($urandom_range(0, i));
      tmp = a[i]; a[i] = a[k]; a[k] = tmp;
    end
    for (int i = 0; i < 8; i++) p[i] = 3'(a[i]);
  endtask

  initial begin
    for (int b = 0; b < 8; b++) for (int a = 0; a < 128; a++) mem[b][a] = -1;
    for (int n = 0; n < 128; n++) begin
      @(negedge clk);
      wr_en = '1;
      perm(wr_bank);
      for (int j = 0; j < 8; j++) begin
        wr_addr[j] = 7'(n);
        wr_data[j] = 7'($urandom);
        mem[wr_bank[j]][n] = int'(wr_data[j]);
      end
    end
    @(negedge clk);
    wr_en = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      rd_en = '1;
      perm(rd_bank);
      for (int j = 0; j < 8; j++) begin
        rd_addr[j] = 7'($urandom);
        exp_d[j] = mem[rd_bank[j]][rd_addr[j]];
      end
      @(posedge clk);
      #1;
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (int'(rd_data[j]) != exp_d[j]) failures++;
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
