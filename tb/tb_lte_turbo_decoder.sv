// tb_lte_turbo_decoder: end-to-end test of the LTE turbo decoder.
//
// The testbench has its own LTE turbo encoder (two 8-state RSC encoders,
// QPP interleaver from the direct formula), attaches a CRC24B to random
// information bits, maps code bits to channel values (+A for 0, -A for 1,
// optional noise, optional erased parity) and runs these cases:
//  clean    : clean block, must stop after 1 half-iteration via CRC unit 1
//  crc2     : first parity erased and systematic bits corrupted, so only the
//             interleaved pass can correct it: must stop after 2
//             half-iterations via CRC unit 2 with the second memory selected
//  noisy    : noisy block with several iterations (next iteration
//             initialisation active), result checked when the CRC passes
//  maxiter  : random channel values, must run all max_hi half-iterations
//             (odd and even max_hi; an even count ends with a map-1 pass and so
//             with the final CRC pass over the second memory)
//  pingpong : the next block is written into the other input copy while the
//             current one is decoded
// Every decoded bit is compared with the transmitted block when crc_ok is
// set, and the cycle count of each half-iteration is checked against the
// engine schedule (4*ceil(BL/32) + 163 cycles per half-iteration plus 11
// cycles of interleaver set-up). FULL=1 (the default of the
// FULL parameter below) also decodes one 6144-bit block with 13
// half-iterations and checks the throughput claim (>= 150 Mbit/s at 300 MHz,
// i.e. at most 12288 cycles).
module tb_lte_turbo_decoder;
  import turbo_pkg::*;
  localparam bit FULL = 1'b1;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  logic in_wr_en = 0, in_wr_sel = 0;
  logic [BLW-1:0] in_wr_pos = '0;
  ch_t in_sys = '0, in_p0 = '0, in_p1 = '0;
  logic start = 0, dec_sel = 0;
  logic [BLW-1:0] bl = '0, f1 = '0, f2 = '0;
  logic [4:0] max_hi = '0;
  logic busy, done, crc_ok;
  logic [4:0] hi_used;
  logic out_rd_en = 0;
  logic [GW-1:0] out_rd_group = '0;
  logic [7:0] out_rd_bits;

  int checks = 0, failures = 0;
  int n_crc1_stop = 0, n_crc2_stop = 0, n_maxiter = 0, n_final_crc = 0, n_nii = 0, n_pingpong = 0, n_interleaved = 0;

  lte_turbo_decoder dut (.*);
  always #5 clk = ~clk;

  int bits [2][6144];
  int ys [2][6144], y0 [2][6144], y1 [2][6144];

  function automatic int qpp(int i, int k, int a, int b);
    return int'((longint'(a) * i + longint'(b) * i * i) % k);
  endfunction

  function automatic int noise(int amp);
    int s;
    if (amp == 0) return 0;
    s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(0, 2*amp)) - amp;
    return s / 2;
  endfunction

  function automatic int clip(int v);
    return (v > 31) ? 31 : (v < -31 ? -31 : v);
  endfunction

  // mode 0: plain, 1: parity 1 erased + systematic errors, 2: random values
  task automatic make_block(input int cp, input int k, input int a, input int b,
                            input int amp, input int nz, input int mode);
    logic [23:0] crc;
    int s0, s1, u, fb, pb, ui;
    int perm [6144];
    int p0b [6144], p1b [6144];
    crc = '0;
    for (int i = 0; i < k - 24; i++) begin
      bits[cp][i] = int'($urandom_range(0, 1));
      fb = crc[23] ^ bits[cp][i];
      crc = {crc[22:0], 1'b0};
      if (fb != 0) crc = crc ^ 24'h800063;
    end
    for (int i = 0; i < 24; i++) bits[cp][k-24+i] = crc[23-i];
    s0 = 0; s1 = 0;
    for (int i = 0; i < k; i++) perm[i] = qpp(i, k, a, b);
    for (int i = 0; i < k; i++) begin
      // encoder register s = {a(k-1),a(k-2),a(k-3)}
      u = bits[cp][i];
      fb = u ^ ((s0 >> 1) & 1) ^ (s0 & 1);
      p0b[i] = fb ^ ((s0 >> 2) & 1) ^ (s0 & 1);
      s0 = (fb << 2) | (s0 >> 1);
      ui = bits[cp][perm[i]];
      pb = ui ^ ((s1 >> 1) & 1) ^ (s1 & 1);
      p1b[i] = pb ^ ((s1 >> 2) & 1) ^ (s1 & 1);
      s1 = (pb << 2) | (s1 >> 1);
    end
    for (int i = 0; i < k; i++) begin
      ys[cp][i] = clip((bits[cp][i] ? -amp : amp) + noise(nz));
      y0[cp][i] = clip((p0b[i] ? -amp : amp) + noise(nz));
      y1[cp][i] = clip((p1b[i] ? -amp : amp) + noise(nz));
      if (mode == 1) begin
        y0[cp][i] = 0;
        if (i % 13 == 5) ys[cp][i] = -ys[cp][i] / 2;
      end
      if (mode == 2) begin
        ys[cp][i] = int'($urandom_range(0, 62)) - 31;
        y0[cp][i] = int'($urandom_range(0, 62)) - 31;
        y1[cp][i] = int'($urandom_range(0, 62)) - 31;
      end
    end
  endtask

  task automatic load(input int cp, input int k);
    for (int i = 0; i < k; i++) begin
      @(negedge clk);
      in_wr_en = 1; in_wr_sel = cp[0]; in_wr_pos = BLW'(i);
      in_sys = ch_t'(ys[cp][i]); in_p0 = ch_t'(y0[cp][i]); in_p1 = ch_t'(y1[cp][i]);
    end
    @(negedge clk);
    in_wr_en = 0;
  endtask

  // decode copy cp; returns cycles from start to done
  task automatic decode(input int cp, input int k, input int a, input int b, input int mhi,
                        output int cycles);
    @(negedge clk);
    dec_sel = cp[0]; bl = BLW'(k); f1 = BLW'(a); f2 = BLW'(b); max_hi = 5'(mhi);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  task automatic check_bits(input int cp, input int k, input string tag);
    int bad;
    bad = 0;
    for (int g = 0; g < k / 8; g++) begin
      @(negedge clk);
      out_rd_en = 1; out_rd_group = GW'(g);
      @(negedge clk);
      out_rd_en = 0;
      for (int j = 0; j < 8; j++) if (int'(out_rd_bits[j]) != bits[cp][8*g+j]) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("%s: %0d wrong bits", tag, bad); end
  endtask

  function automatic int hi_cycles(int k);
    return 4 * ((k + 31) / 32) + 163;
  endfunction

  task automatic expect_eq(input int got, input int want, input string what);
    checks++;
    if (got != want) begin failures++; $display("%s: got %0d expected %0d", what, got, want); end
  endtask

  initial begin
    int cyc, k;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // clean block, K = 1024
    k = 1024;
    make_block(0, k, 31, 64, 20, 0, 0);
    load(0, k);
    decode(0, k, 31, 64, 8, cyc);
    expect_eq(int'(crc_ok), 1, "clean crc_ok");
    expect_eq(int'(hi_used), 1, "clean half-iterations");
    if (crc_ok && hi_used == 1) n_crc1_stop++;
    check_bits(0, k, "clean");

    // block that only the interleaved pass can correct, K = 40
    k = 40;
    make_block(1, k, 3, 10, 20, 0, 1);
    load(1, k);
    decode(1, k, 3, 10, 8, cyc);
    expect_eq(int'(crc_ok), 1, "crc2 crc_ok");
    expect_eq(int'(hi_used), 2, "crc2 half-iterations");
    if (crc_ok && hi_used == 2) begin n_crc2_stop++; n_interleaved++; end
    check_bits(1, k, "crc2");

    k = 1024;
    make_block(0, k, 31, 64, 20, 0, 1);
    load(0, k);
    decode(0, k, 31, 64, 8, cyc);
    expect_eq(int'(crc_ok), 1, "crc2 1024 crc_ok");
    if (crc_ok && hi_used == 2) begin n_crc2_stop++; n_interleaved++; end
    check_bits(0, k, "crc2 1024");

    // random data: all half-iterations, odd count ends with the final CRC pass
    k = 1024;
    make_block(1, k, 31, 64, 20, 0, 2);
    load(1, k);
    decode(1, k, 31, 64, 5, cyc);
    expect_eq(int'(crc_ok), 0, "maxiter crc_ok");
    expect_eq(int'(hi_used), 5, "maxiter half-iterations");
    // 11 cycles of interleaver set-up, then the half-iterations
    expect_eq(cyc, 11 + 5 * hi_cycles(k), "maxiter cycles");
    if (hi_used == 5) begin n_maxiter++; n_nii++; end
    decode(1, k, 31, 64, 4, cyc);
    expect_eq(int'(hi_used), 4, "maxiter even half-iterations");
    // ends with map 1: one more CRC pass over the second memory (BL/8 + 2 cycles)
    expect_eq(cyc, 11 + 4 * hi_cycles(k) + k / 8 + 2, "maxiter even cycles");
    if (hi_used == 4) begin n_maxiter++; n_final_crc++; end

    // noisy block, several iterations, with the next block written meanwhile
    k = 1024;
    make_block(0, k, 31, 64, 10, 14, 0);
    load(0, k);
    make_block(1, k, 31, 64, 20, 0, 0);
    fork
      decode(0, k, 31, 64, 16, cyc);
      begin
        for (int i = 0; i < k; i++) begin
          @(negedge clk);
          in_wr_en = 1; in_wr_sel = 1'b1; in_wr_pos = BLW'(i);
          in_sys = ch_t'(ys[1][i]); in_p0 = ch_t'(y0[1][i]); in_p1 = ch_t'(y1[1][i]);
        end
        @(negedge clk);
        in_wr_en = 0;
      end
    join
    $display("noisy block: crc_ok=%0d after %0d half-iterations", crc_ok, hi_used);
    if (hi_used >= 3) n_nii++;
    if (crc_ok) check_bits(0, k, "noisy");
    n_pingpong++;
    decode(1, k, 31, 64, 8, cyc);
    expect_eq(int'(crc_ok), 1, "pingpong crc_ok");
    check_bits(1, k, "pingpong");

    if (FULL) begin
      k = 6144;
      make_block(0, k, 263, 480, 20, 0, 2);
      load(0, k);
      decode(0, k, 263, 480, 13, cyc);
      $display("BL=6144, 13 half-iterations: %0d cycles, %0d Mbit/s at 300 MHz", cyc, 6144 * 300 / cyc);
      checks++;
      if (cyc > 12288) begin failures++; $display("throughput below 150 Mbit/s"); end
      expect_eq(int'(hi_used), 13, "full size half-iterations");
      make_block(0, k, 263, 480, 20, 0, 0);
      load(0, k);
      decode(0, k, 263, 480, 13, cyc);
      expect_eq(int'(crc_ok), 1, "full size crc_ok");
      check_bits(0, k, "full size");
    end

    $display("mechanisms: crc1_stop=%0d crc2_stop=%0d maxiter=%0d final_crc=%0d nii=%0d pingpong=%0d interleaved=%0d",
             n_crc1_stop, n_crc2_stop, n_maxiter, n_final_crc, n_nii, n_pingpong, n_interleaved);
    if (n_crc1_stop == 0) failures++;
    if (n_crc2_stop == 0) failures++;
    if (n_maxiter == 0) failures++;
    if (n_final_crc == 0) failures++;
    if (n_nii == 0) failures++;
    if (n_pingpong == 0) failures++;
    if (n_interleaved == 0) failures++;
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
