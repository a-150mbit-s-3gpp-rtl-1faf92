// lte_turbo_decoder: 3GPP LTE turbo decoder built around one XMAP engine.
//
// The decoder iterates between the two constituent codes of an LTE turbo
// code, one half-iteration at a time, on a single pipelined XMAP
// Max-Log-MAP engine that delivers 8 LLRs per cycle (window 32, acquisition
// 96, folding 4, next iteration initialisation). Around it:
//  * input_buffer  - two copies of the channel values (host fills one while
//                    the other is decoded), one position per cycle, rate 1/3
//                    interface (punctured values written as 0);
//  * qpp_gen x 2   - interleaver addresses for the reads and, delayed by the
//                    engine latency, for the writes of the interleaved pass;
//  * banked_mem    - 8-bank extrinsic memory (7 bit) read and written in
//                    place, and two 8-bank hard-decision memories: A holds the
//                    natural-order pass, B the interleaved pass (deinterleaved);
//  * crc_unit x 2  - CRC of every half-iteration's decisions (CRC24B);
//  * turbo_ctrl    - half-iteration sequencing and early stop.
// In the natural pass lane j of group g is position 8g+j; in the
// interleaved pass it is Pi(8g+j), whose bank Pi mod 8 differs across lanes.
//
// Host interface: write channel values with in_wr_* into copy in_wr_sel
// (one position per cycle). Pulse start with bl (multiple of 8, at most
// 6144), f1/f2 of the block's QPP interleaver, max_hi (half-iterations, at
// least 1) and dec_sel (copy to decode). busy stays high while decoding;
// done pulses at the end with crc_ok and hi_used. Afterwards the decoded
// bits are read 8 per cycle: out_rd_en with out_rd_group g gives positions
// 8g..8g+7 on out_rd_bits one cycle later. One half-iteration of a 6144-bit
// block takes 931 cycles, so 13 half-iterations plus 11 set-up cycles take
// 12114 cycles: 152 Mbit/s at 300 MHz.
module lte_turbo_decoder
  import turbo_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  // channel value input
  input  logic in_wr_en,
  input  logic in_wr_sel,
  input  logic [BLW-1:0] in_wr_pos,
  input  ch_t  in_sys,
  input  ch_t  in_p0,
  input  ch_t  in_p1,
  // decoding control
  input  logic start,
  input  logic dec_sel,
  input  logic [BLW-1:0] bl,
  input  logic [BLW-1:0] f1,
  input  logic [BLW-1:0] f2,
  input  logic [4:0] max_hi,
  output logic busy,
  output logic done,
  output logic crc_ok,
  output logic [4:0] hi_used,
  // decoded bits
  input  logic out_rd_en,
  input  logic [GW-1:0] out_rd_group,
  output logic [N-1:0] out_rd_bits
);
  localparam int DEPTH = BL_MAX / N;
  localparam int LW = $clog2(N);

  // ------------------------------------------------------------ control
  logic qpp_init, rd_ready, wr_ready, rd_restart, rd_advance, wr_restart, wr_advance;
  logic core_start, map, nii_en, first, core_done, core_busy, out_valid;
  logic feed_en, crc1_clr, crc1_en, crc1_ok, crc2_clr, crc2_rd_en, crc2_en, crc2_ok;
  logic hd_sel;
  logic [GW-1:0] feed_group, crc2_group, out_group;
  logic [BLW-1:0] blq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) blq <= BLW'(40);
    else if (start && !busy) blq <= bl;
  end

  turbo_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .bl(blq), .max_hi(max_hi),
    .qpp_init(qpp_init), .qpp_ready(rd_ready && wr_ready),
    .rd_restart(rd_restart), .rd_advance(rd_advance),
    .wr_restart(wr_restart), .wr_advance(wr_advance),
    .core_start(core_start), .map(map), .nii_en(nii_en), .first(first),
    .core_done(core_done), .core_out_valid(out_valid),
    .feed_en(feed_en), .feed_group(feed_group),
    .crc1_clr(crc1_clr), .crc1_en(crc1_en), .crc1_ok(crc1_ok),
    .crc2_clr(crc2_clr), .crc2_rd_en(crc2_rd_en), .crc2_group(crc2_group),
    .crc2_en(crc2_en), .crc2_ok(crc2_ok),
    .busy(busy), .done(done), .crc_ok(crc_ok), .hd_sel(hd_sel), .hi_cnt(hi_used)
  );

  // ------------------------------------------------------------ interleaver
  logic [LW-1:0] rbank [N], wbank [N];
  logic [GW-1:0] raddr [N], waddr [N];

  qpp_gen #(.NL(N), .AW(GW)) u_qpp_rd (
    .clk(clk), .rst_n(rst_n), .init(qpp_init), .bl(bl), .f1(f1), .f2(f2), .ready(rd_ready),
    .restart(rd_restart), .advance(rd_advance), .bank(rbank), .addr(raddr)
  );
  qpp_gen #(.NL(N), .AW(GW)) u_qpp_wr (
    .clk(clk), .rst_n(rst_n), .init(qpp_init), .bl(bl), .f1(f1), .f2(f2), .ready(wr_ready),
    .restart(wr_restart), .advance(wr_advance), .bank(wbank), .addr(waddr)
  );

  // lane addressing of the current pass
  logic [LW-1:0] fb [N], ob [N], nb [N];
  logic [GW-1:0] fa [N], oa [N], ca [N];
  always_comb begin
    for (int j = 0; j < N; j++) begin
      nb[j] = LW'(j);
      fb[j] = map ? rbank[j] : LW'(j);
      fa[j] = map ? raddr[j] : feed_group;
      ob[j] = map ? wbank[j] : LW'(j);
      oa[j] = map ? waddr[j] : out_group;
      ca[j] = busy ? crc2_group : out_rd_group;
    end
  end

  // ------------------------------------------------------------ memories
  ch_t rd_sys [N], rd_par [N];
  input_buffer #(.NL(N), .DEPTH(DEPTH)) u_in (
    .clk(clk), .wr_sel(in_wr_sel), .wr_en(in_wr_en), .wr_pos(in_wr_pos),
    .wr_sys(in_sys), .wr_p0(in_p0), .wr_p1(in_p1),
    .rd_sel(dec_sel), .rd_en(feed_en), .psel(map),
    .rd_bank(fb), .rd_addr(fa), .rd_group(feed_group),
    .rd_sys(rd_sys), .rd_par(rd_par)
  );

  ex_t out_ext [N];
  logic [N-1:0] out_hd;
  logic [EXW-1:0] ext_rd [N], ext_wr [N];
  for (genvar j = 0; j < N; j++) begin : g_extw
    assign ext_wr[j] = out_ext[j];
  end
  banked_mem #(.NB(N), .DEPTH(DEPTH), .DW(EXW)) u_ext (
    .clk(clk), .rd_en({N{feed_en && !first}}), .rd_bank(fb), .rd_addr(fa), .rd_data(ext_rd),
    .wr_en({N{out_valid}}), .wr_bank(ob), .wr_addr(oa), .wr_data(ext_wr)
  );

  logic [0:0] hda_rd [N], hdb_rd [N], hd_wr [N];
  for (genvar j = 0; j < N; j++) begin : g_hdw
    assign hd_wr[j] = out_hd[j];
  end
  banked_mem #(.NB(N), .DEPTH(DEPTH), .DW(1)) u_hd_a (
    .clk(clk), .rd_en({N{out_rd_en && !busy}}), .rd_bank(nb), .rd_addr(ca), .rd_data(hda_rd),
    .wr_en({N{out_valid && !map}}), .wr_bank(ob), .wr_addr(oa), .wr_data(hd_wr)
  );
  banked_mem #(.NB(N), .DEPTH(DEPTH), .DW(1)) u_hd_b (
    .clk(clk), .rd_en({N{crc2_rd_en || (out_rd_en && !busy)}}), .rd_bank(nb), .rd_addr(ca),
    .rd_data(hdb_rd),
    .wr_en({N{out_valid && map}}), .wr_bank(ob), .wr_addr(oa), .wr_data(hd_wr)
  );

  // ------------------------------------------------------------ XMAP engine
  cv_t in_cv [N];
  logic first_q;
  always_ff @(posedge clk) first_q <= first;
  always_comb
    for (int j = 0; j < N; j++)
      in_cv[j] = '{sys: rd_sys[j], par: rd_par[j], apr: first_q ? ex_t'(0) : ex_t'(ext_rd[j])};

  xmap_core #(.NL(N), .HF(H), .WLEN(WL), .ALEN(AL), .BLMAX(BL_MAX)) u_core (
    .clk(clk), .rst_n(rst_n), .start(core_start), .map(map), .nii_en(nii_en), .bl(blq),
    .in_cv(in_cv), .busy(core_busy), .done(core_done),
    .out_valid(out_valid), .out_group(out_group), .out_ext(out_ext), .out_hd(out_hd)
  );

  // ------------------------------------------------------------ CRC
  logic [N-1:0] crc2_din;
  logic [23:0] crc1_reg, crc2_reg;
  always_comb for (int j = 0; j < N; j++) crc2_din[j] = hdb_rd[j][0];

  crc_unit #(.NL(N)) u_crc1 (
    .clk(clk), .rst_n(rst_n), .clr(crc1_clr), .en(crc1_en), .din(out_hd), .crc(crc1_reg), .ok(crc1_ok)
  );
  crc_unit #(.NL(N)) u_crc2 (
    .clk(clk), .rst_n(rst_n), .clr(crc2_clr), .en(crc2_en), .din(crc2_din), .crc(crc2_reg), .ok(crc2_ok)
  );

  // ------------------------------------------------------------ output
  logic sel_q;
  always_ff @(posedge clk) sel_q <= hd_sel;
  always_comb for (int j = 0; j < N; j++) out_rd_bits[j] = sel_q ? hdb_rd[j][0] : hda_rd[j][0];
endmodule
