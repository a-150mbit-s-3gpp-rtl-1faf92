// crc_unit: CRC check of a stream of hard decisions, NL bits per cycle.
//
// The register divides the bit sequence (lane 0 first, i.e. increasing block
// position) by the generator polynomial POLY of degree CW. A code block that
// carries its CRC in its last CW bits is error free when the remainder is
// zero, so ok = (register == 0) after the last bits. clr empties the
// register; en feeds NL bits. The default polynomial is the LTE per-code-
// block CRC24B, g(x) = x^24 + x^23 + x^6 + x^5 + x + 1, taken from the LTE
// standard (the design only says that a CRC is attached to each block).
// The register updates one cycle after en.
module crc_unit #(
  parameter int          NL   = 8,
  parameter int          CW   = 24,
  parameter logic [23:0] POLY = 24'h800063
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  logic [NL-1:0] din,
  output logic [CW-1:0] crc,
  output logic ok
);
  logic [CW-1:0] nxt;
  always_comb begin
    nxt = crc;
    for (int j = 0; j < NL; j++) begin
      logic fb;
      fb  = nxt[CW-1] ^ din[j];
      nxt = {nxt[CW-2:0], 1'b0};
      if (fb) nxt = nxt ^ POLY[CW-1:0];
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   crc <= '0;
    else if (clr) crc <= '0;
    else if (en)  crc <= nxt;
  end
  assign ok = (crc == '0);
endmodule
