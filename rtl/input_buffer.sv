// input_buffer: doubled channel-value memory (systematic, parity 1, parity 2).
//
// Two complete copies exist so that the next block can be written while the
// current one is decoded, hiding the input streaming time. The host writes
// one position per cycle (its three 6-bit values, rate-1/3 interface;
// punctured values are written as 0) into copy wr_sel. The decoder reads
// copy rd_sel, NL positions per cycle: the systematic values through the
// banked crossbar at arbitrary (interleaved) bank/address pairs, and the
// parity value of the current component code (psel) at group address
// rd_group in natural order. Each field of each copy is an NL-bank memory
// of BL_MAX/NL words. Read data follow one cycle after the address.
module input_buffer
  import turbo_pkg::*;
#(
  parameter int NL    = 8,
  parameter int DEPTH = BL_MAX / 8
) (
  input  logic clk,
  // host side
  input  logic wr_sel,
  input  logic wr_en,
  input  logic [BLW-1:0] wr_pos,
  input  ch_t  wr_sys,
  input  ch_t  wr_p0,
  input  ch_t  wr_p1,
  // decoder side
  input  logic rd_sel,
  input  logic rd_en,
  input  logic psel,
  input  logic [$clog2(NL)-1:0]    rd_bank [NL],
  input  logic [$clog2(DEPTH)-1:0] rd_addr [NL],
  input  logic [$clog2(DEPTH)-1:0] rd_group,
  output ch_t  rd_sys [NL],
  output ch_t  rd_par [NL]
);
  localparam int BW = $clog2(NL);
  localparam int AW = $clog2(DEPTH);

  logic [BW-1:0] hb [NL], nb [NL];
  logic [AW-1:0] ha [NL], ga [NL];
  logic [NL-1:0] hwe;
  logic [CHW-1:0] hs [NL], h0 [NL], h1 [NL];
  logic [CHW-1:0] qs [2][NL], q0 [2][NL], q1 [2][NL];
  logic psel_q, rd_sel_q;

  always_comb begin
    for (int j = 0; j < NL; j++) begin
      hb[j]  = wr_pos[BW-1:0];
      ha[j]  = AW'(wr_pos >> BW);
      hwe[j] = (j == 0) && wr_en;
      hs[j]  = wr_sys;
      h0[j]  = wr_p0;
      h1[j]  = wr_p1;
      nb[j]  = BW'(j);
      ga[j]  = rd_group;
    end
  end

  for (genvar c = 0; c < 2; c++) begin : g_copy
    logic [NL-1:0] we, re;
    assign we = (wr_sel == c) ? hwe : '0;
    assign re = (rd_en && rd_sel == c) ? '1 : '0;
    banked_mem #(.NB(NL), .DEPTH(DEPTH), .DW(CHW)) u_sys (
      .clk(clk), .rd_en(re), .rd_bank(rd_bank), .rd_addr(rd_addr), .rd_data(qs[c]),
      .wr_en(we), .wr_bank(hb), .wr_addr(ha), .wr_data(hs));
    banked_mem #(.NB(NL), .DEPTH(DEPTH), .DW(CHW)) u_p0 (
      .clk(clk), .rd_en(re), .rd_bank(nb), .rd_addr(ga), .rd_data(q0[c]),
      .wr_en(we), .wr_bank(hb), .wr_addr(ha), .wr_data(h0));
    banked_mem #(.NB(NL), .DEPTH(DEPTH), .DW(CHW)) u_p1 (
      .clk(clk), .rd_en(re), .rd_bank(nb), .rd_addr(ga), .rd_data(q1[c]),
      .wr_en(we), .wr_bank(hb), .wr_addr(ha), .wr_data(h1));
  end

  always_ff @(posedge clk) begin
    psel_q   <= psel;
    rd_sel_q <= rd_sel;
  end

  always_comb begin
    for (int j = 0; j < NL; j++) begin
      rd_sys[j] = ch_t'(qs[rd_sel_q][j]);
      rd_par[j] = ch_t'(psel_q ? q1[rd_sel_q][j] : q0[rd_sel_q][j]);
    end
  end
endmodule
