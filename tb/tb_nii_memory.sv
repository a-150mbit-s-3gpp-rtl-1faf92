// tb_nii_memory: writes border metrics for both component decoders and both
// directions, then reads them back with the one-cycle read latency and checks
// that the two decoders' entries do not overwrite each other.
module tb_nii_memory;
  import turbo_pkg::*;
  logic clk = 0, map = 0, f_we = 0, b_we = 0;
  logic [7:0] f_raddr = 0, f_waddr = 0, b_raddr = 0, b_waddr = 0;
  smv_t f_rdata, f_wdata, b_rdata, b_wdata;
  smv_t rf [2][192], rb [2][192];
  int checks = 0, failures = 0;

  nii_memory #(.NW(192)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int m = 0; m < 2; m++)
      for (int w = 0; w < 192; w++) begin
        @(negedge clk);
        map = m[0]; f_we = 1; b_we = 1;
        f_waddr = 8'(w); b_waddr = 8'(191 - w);
        for (int i = 0; i < 8; i++) begin f_wdata[i] = sm_t'($urandom); b_wdata[i] = sm_t'($urandom); end
        rf[m][w] = f_wdata; rb[m][191-w] = b_wdata;
      end
    @(negedge clk);
    f_we = 0; b_we = 0;
    for (int m = 0; m < 2; m++)
      for (int w = 0; w < 192; w++) begin
        @(negedge clk);
        map = m[0]; f_raddr = 8'(w); b_raddr = 8'((w * 7) % 192);
        @(posedge clk);
        #1;
        checks += 2;
        if (f_rdata !== rf[m][w]) failures++;
        if (b_rdata !== rb[m][(w * 7) % 192]) failures++;
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
