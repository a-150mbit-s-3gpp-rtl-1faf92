// turbo_ctrl: half-iteration sequencer with CRC-based early stopping.
//
// After start the controller lets the interleaver generators compute their
// start values, then runs half-iterations: even ones (map 0) decode the
// natural-order code, odd ones (map 1) the interleaved code. For each it
// pulses core_start and restarts both interleaver generators, then counts
// cycles t alongside the core: the channel and extrinsic memories are read
// for group g at t = g + 7 (feed_*), so data reach the core at t = g + 8 as
// the core's schedule requires. The first half-iteration uses zero a-priori
// values; from the third one on, the stored border metrics initialise the
// acquisitions (nii_en).
//
// The CRC is checked after every half-iteration, so that a block that
// happened to be correct after one half-iteration is not lost when the next
// one oscillates away from it. The natural-order output of map 0 is checked
// on the fly by CRC unit 1. The decisions of map 1 arrive in interleaved
// order and are written deinterleaved into the second hard-decision memory;
// CRC unit 2 reads that memory in natural order during the following map-0
// half-iteration (or after the last one). Decoding stops at the first
// passing CRC or after max_hi half-iterations; hd_sel tells which
// hard-decision memory holds the result. Reading the map-1 decisions back
// during the next half-iteration is this design's reading of "two CRC units".
module turbo_ctrl
  import turbo_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic [BLW-1:0] bl,
  input  logic [4:0] max_hi,
  // interleaver generators
  output logic qpp_init,
  input  logic qpp_ready,
  output logic rd_restart,
  output logic rd_advance,
  output logic wr_restart,
  output logic wr_advance,
  // XMAP core
  output logic core_start,
  output logic map,
  output logic nii_en,
  output logic first,
  input  logic core_done,
  input  logic core_out_valid,
  // memory feed
  output logic feed_en,
  output logic [GW-1:0] feed_group,
  // CRC units
  output logic crc1_clr,
  output logic crc1_en,
  input  logic crc1_ok,
  output logic crc2_clr,
  output logic crc2_rd_en,
  output logic [GW-1:0] crc2_group,
  output logic crc2_en,
  input  logic crc2_ok,
  // status
  output logic busy,
  output logic done,
  output logic crc_ok,
  output logic hd_sel,
  output logic [4:0] hi_cnt
);
  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_HSTART, S_HRUN, S_FCRC} state_t;
  state_t st;
  logic [11:0] t;
  logic crc2_act;
  logic setup_wait;
  int ng;

  assign ng = int'(bl) / N;
  assign map = hi_cnt[0];
  assign first = (hi_cnt == 0);
  assign nii_en = (hi_cnt >= 2);
  assign busy = (st != S_IDLE);

  always_comb begin
    int g;
    g = int'(t) - 7;
    feed_en    = (st == S_HRUN) && g >= 0 && g < ng;
    feed_group = GW'(g);
    rd_advance = feed_en;
    wr_advance = (st == S_HRUN) && core_out_valid;
    crc1_en    = (st == S_HRUN) && !map && core_out_valid;
    crc2_rd_en = ((st == S_HRUN && crc2_act) || st == S_FCRC) && int'(t) < ng;
    crc2_group = GW'(t);
    qpp_init   = (st == S_IDLE) && start;
    core_start = (st == S_HSTART);
    rd_restart = (st == S_HSTART);
    wr_restart = (st == S_HSTART);
    crc1_clr   = (st == S_HSTART);
    crc2_clr   = (st == S_HSTART) || (st == S_HRUN && core_done && map);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      t        <= '0;
      hi_cnt   <= '0;
      crc2_act <= 1'b0;
      crc2_en  <= 1'b0;
      done     <= 1'b0;
      crc_ok   <= 1'b0;
      hd_sel   <= 1'b0;
      setup_wait <= 1'b0;
    end else begin
      done    <= 1'b0;
      crc2_en <= crc2_rd_en;
      case (st)
        S_IDLE: if (start) begin
          st <= S_SETUP;
          hi_cnt <= '0;
          crc_ok <= 1'b0;
          setup_wait <= 1'b1;
        end
        S_SETUP: begin
          setup_wait <= 1'b0;
          if (!setup_wait && qpp_ready) st <= S_HSTART;
        end
        S_HSTART: begin
          st <= S_HRUN;
          t  <= '0;
          crc2_act <= !map && hi_cnt != 0;
        end
        S_HRUN: begin
          t <= t + 1'b1;
          if (crc2_act && int'(t) == ng + 1 && crc2_ok) begin
            // the previous (map 1) half-iteration already produced a valid block
            st <= S_IDLE; done <= 1'b1; crc_ok <= 1'b1; hd_sel <= 1'b1;
          end else if (core_done) begin
            hi_cnt <= hi_cnt + 1'b1;
            if (!map && crc1_ok) begin
              st <= S_IDLE; done <= 1'b1; crc_ok <= 1'b1; hd_sel <= 1'b0;
            end else if (hi_cnt + 1'b1 >= max_hi) begin
              if (map) begin
                st <= S_FCRC; t <= '0;
              end else begin
                st <= S_IDLE; done <= 1'b1; crc_ok <= 1'b0; hd_sel <= 1'b0;
              end
            end else begin
              st <= S_HSTART;
            end
          end
        end
        S_FCRC: begin
          t <= t + 1'b1;
          if (int'(t) == ng + 1) begin
            st <= S_IDLE; done <= 1'b1; crc_ok <= crc2_ok; hd_sel <= 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
