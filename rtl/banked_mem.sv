// banked_mem: memory split into NB banks with a lane-to-bank crossbar.
//
// NL values are read and NL values are written per cycle. Each lane names a
// bank and an address inside it; the lanes of one access must name
// different banks, which the QPP interleaver guarantees for groups of NB
// consecutive indices (checked by an assertion). Each bank picks the lane
// that addresses it, so a bank sees one read and one write per cycle (a
// simple dual-port RAM). Read data return to their lanes one cycle after the
// address (synchronous read). This is the partitioned extrinsic memory that
// makes parallel interleaving possible; it is also used for the channel and
// hard-decision memories. Reading and writing the same word in one cycle
// returns the old value.
module banked_mem #(
  parameter int NB    = 8,
  parameter int DEPTH = 768,
  parameter int DW    = 7
) (
  input  logic clk,
  input  logic [NB-1:0] rd_en,
  input  logic [$clog2(NB)-1:0]    rd_bank [NB],
  input  logic [$clog2(DEPTH)-1:0] rd_addr [NB],
  output logic [DW-1:0]            rd_data [NB],
  input  logic [NB-1:0] wr_en,
  input  logic [$clog2(NB)-1:0]    wr_bank [NB],
  input  logic [$clog2(DEPTH)-1:0] wr_addr [NB],
  input  logic [DW-1:0]            wr_data [NB]
);
  localparam int BW = $clog2(NB);
  localparam int AW = $clog2(DEPTH);

  logic [DW-1:0] bank_q [NB];
  logic [BW-1:0] rd_bank_q [NB];

  for (genvar b = 0; b < NB; b++) begin : g_bank
    logic [DW-1:0] mem [DEPTH];
    logic          re, we;
    logic [AW-1:0] ra, wa;
    logic [DW-1:0] wd;
    always_comb begin
      re = 1'b0; we = 1'b0; ra = '0; wa = '0; wd = '0;
      for (int j = 0; j < NB; j++) begin
        if (rd_en[j] && int'(rd_bank[j]) == b) begin re = 1'b1; ra = rd_addr[j]; end
        if (wr_en[j] && int'(wr_bank[j]) == b) begin we = 1'b1; wa = wr_addr[j]; wd = wr_data[j]; end
      end
    end
    always_ff @(posedge clk) begin
      if (we) mem[wa] <= wd;
      if (re) bank_q[b] <= mem[ra];
    end
  end

  always_ff @(posedge clk) rd_bank_q <= rd_bank;
  always_comb for (int j = 0; j < NB; j++) rd_data[j] = bank_q[rd_bank_q[j]];

  // Lanes of one access must use different banks.
  always_ff @(posedge clk) begin
    for (int i = 0; i < NB; i++)
      for (int j = i + 1; j < NB; j++) begin
        assert (!(rd_en[i] && rd_en[j] && rd_bank[i] == rd_bank[j])) else $error("read bank conflict");
        assert (!(wr_en[i] && wr_en[j] && wr_bank[i] == wr_bank[j])) else $error("write bank conflict");
      end
  end
endmodule
