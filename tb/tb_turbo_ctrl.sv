// tb_turbo_ctrl: drives the controller with a simple model of the XMAP core
// (done a fixed time after start) and of the interleaver set-up, and checks
// the half-iteration sequence: map alternation, zero a-priori only in the
// first half-iteration, next iteration initialisation from the third one, one
// feed read per group in order starting 7 cycles after the start, and the
// four ways of ending (CRC unit 1 passes, CRC unit 2 passes, maximum reached
// after a map-0 pass, maximum reached after a map-1 pass with a final CRC pass).
module tb_turbo_ctrl;
  import turbo_pkg::*;
  localparam int LAT = 200;
  logic clk = 0, rst_n = 0, start = 0;
  logic [BLW-1:0] bl = BLW'(256);
  logic [4:0] max_hi = 0;
  logic qpp_init, qpp_ready, rd_restart, rd_advance, wr_restart, wr_advance;
  logic core_start, map, nii_en, first, core_done, core_out_valid;
  logic feed_en, crc1_clr, crc1_en, crc1_ok, crc2_clr, crc2_rd_en, crc2_en, crc2_ok;
  logic [GW-1:0] feed_group, crc2_group;
  logic busy, done, crc_ok, hd_sel;
  logic [4:0] hi_cnt;
  int checks = 0, failures = 0;

  turbo_ctrl dut (.*);
  always #5 clk = ~clk;

  // interleaver set-up model: ready 9 cycles after init
  int qc = 0;
  always_ff @(posedge clk) begin
    if (qpp_init) begin qpp_ready <= 1'b0; qc <= 9; end
    else if (qc > 0) begin qc <= qc - 1; if (qc == 1) qpp_ready <= 1'b1; end
  end
  // core model
  int cc = -1;
  always_ff @(posedge clk) begin
    core_done <= 1'b0;
    if (core_start) cc <= 0;
    else if (cc >= 0) begin
      cc <= cc + 1;
      if (cc == LAT) begin core_done <= 1'b1; cc <= -1; end
    end
  end
  assign core_out_valid = (cc >= 100) && (cc < 132);

  // per half-iteration observations
  int n_start, n_feed, n_crc2rd, last_g, since_start, first_feed_t;
  int maps [32], firsts [32], niis [32], feeds [32];
  always_ff @(posedge clk) begin
    if (core_start) begin
      maps[n_start] <= int'(map); firsts[n_start] <= int'(first); niis[n_start] <= int'(nii_en);
      n_start <= n_start + 1;
      if (n_start > 0) feeds[n_start-1] <= n_feed;
      n_feed <= 0; last_g <= -1; since_start <= 0;
    end else since_start <= since_start + 1;
    if (feed_en) begin
      n_feed <= n_feed + 1;
      if (int'(feed_group) != last_g + 1) failures <= failures + 1;
      if (last_g == -1) first_feed_t <= since_start;
      last_g <= int'(feed_group);
    end
    if (crc2_rd_en) n_crc2rd <= n_crc2rd + 1;
  end

  task automatic run(input int mhi, input bit ok1, input bit ok2,
                     input int want_hi, input bit want_ok, input bit want_sel, input int want_crc2rd);
    n_start = 0; n_crc2rd = 0; n_feed = 0;
    crc1_ok = ok1; crc2_ok = ok2;
    @(negedge clk);
    max_hi = 5'(mhi); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks += 4;
    if (int'(hi_cnt) != want_hi) begin failures++; $display("hi %0d want %0d", hi_cnt, want_hi); end
    if (crc_ok != want_ok) begin failures++; $display("crc_ok %0d", crc_ok); end
    if (hd_sel != want_sel) begin failures++; $display("hd_sel %0d", hd_sel); end
    if (n_crc2rd != want_crc2rd) begin failures++; $display("crc2 reads %0d want %0d", n_crc2rd, want_crc2rd); end
    for (int h = 0; h < n_start; h++) begin
      checks += 3;
      if (maps[h] != h % 2) failures++;
      if (firsts[h] != (h == 0)) failures++;
      if (niis[h] != (h >= 2)) failures++;
    end
    for (int h = 0; h + 1 < n_start; h++) begin
      checks++;
      if (feeds[h] != 32) begin failures++; $display("feeds %0d", feeds[h]); end
    end
    checks++;
    if (first_feed_t != 7) begin failures++; $display("first feed at %0d", first_feed_t); end
    @(negedge clk);
  endtask

  initial begin
    crc1_ok = 0; crc2_ok = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(3, 0, 0, 3, 0, 0, 32);       // max reached after map 0; map 1 result of pass 2 read once
    run(4, 0, 0, 4, 0, 1, 64);       // max reached after map 1: final CRC pass
    run(6, 1, 0, 1, 1, 0, 0);        // CRC unit 1 passes at once
    run(6, 0, 1, 2, 1, 1, 32);       // CRC unit 2 passes during pass 3
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
