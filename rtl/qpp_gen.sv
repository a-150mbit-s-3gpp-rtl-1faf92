// qpp_gen: on-the-fly QPP interleaver address generator, NL addresses per cycle.
//
// The LTE interleaver is Pi(i) = (f1*i + f2*i^2) mod BL. Because NL divides
// BL, Pi(i) mod NL is the same for i and i+NL, so lane j of group g
// (i = NL*g + j) always addresses the same memory bank Pi(j) mod NL, and the
// NL lanes of a group hit NL different banks. The address inside the bank,
// a = Pi(i) div NL, follows the recursion
//   a(i+NL) = (a(i) + d(i)) mod (BL/NL),  d(i) = (f1 + NL*f2 + 2*f2*i) mod (BL/NL)
//   d(i+NL) = (d(i) + 2*NL*f2) mod (BL/NL)
// so each lane needs two modular additions per cycle and no multiplier.
// The start values of the NL lanes are produced after init by NL cycles of
// the single-step recursion Pi(i+1) = Pi(i) + f1 + f2 + 2*f2*i (mod BL),
// Pi(0) = 0; ready rises when they are stored. restart reloads group 0,
// advance steps to the next group. bank/addr are registers: they describe
// the current group. Only additions, comparisons and shifts are used; the
// modulo reductions of f1 and f2 are done by conditional subtraction.
// f1 and f2 are inputs (the LTE table of them is not part of this design).
module qpp_gen
  import turbo_pkg::*;
#(
  parameter int NL = 8,
  parameter int AW = GW
) (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  input  logic [BLW-1:0] bl,
  input  logic [BLW-1:0] f1,
  input  logic [BLW-1:0] f2,
  output logic ready,
  input  logic restart,
  input  logic advance,
  output logic [$clog2(NL)-1:0] bank [NL],
  output logic [AW-1:0] addr [NL]
);
  localparam int LW = $clog2(NL);

  logic [BLW-1:0] blq, f1q, f2q;
  logic [AW-1:0]  m;                 // BL / NL
  logic [AW-1:0]  f1m, f2m, f2x2m, f2x8m, f2x16m;
  logic [LW:0]    cnt;
  logic           busy;
  logic [BLW-1:0] pi, dpi, f2x2b;
  logic [AW-1:0]  dl;
  logic [LW-1:0]  base_bank [NL];
  logic [AW-1:0]  base_addr [NL];
  logic [AW-1:0]  base_d    [NL];
  logic [AW-1:0]  d [NL];

  // x mod y for x < 16*y, by conditional subtraction
  function automatic logic [BLW+3:0] modr(input logic [BLW+3:0] x, input logic [BLW+3:0] y);
    logic [BLW+3:0] r;
    r = x;
    for (int k = 3; k >= 0; k--) if (r >= (y << k)) r = r - (y << k);
    return r;
  endfunction
  function automatic logic [AW-1:0] addm(input logic [AW-1:0] a, input logic [AW-1:0] b,
                                         input logic [AW-1:0] mm);
    logic [AW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, mm}) s = s - {1'b0, mm};
    return s[AW-1:0];
  endfunction

  assign m      = AW'(blq >> LW);
  assign f1m    = AW'(modr((BLW+4)'(f1q), (BLW+4)'(m)));
  assign f2m    = AW'(modr((BLW+4)'(f2q), (BLW+4)'(m)));
  assign f2x2m  = AW'(modr((BLW+4)'(f2m) << 1, (BLW+4)'(m)));
  assign f2x8m  = AW'(modr((BLW+4)'(f2m) << 3, (BLW+4)'(m)));
  assign f2x16m = AW'(modr((BLW+4)'(f2x8m) << 1, (BLW+4)'(m)));
  assign f2x2b  = BLW'(modr((BLW+4)'(f2q) << 1, (BLW+4)'(blq)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready <= 1'b0;
      busy  <= 1'b0;
      cnt   <= '0;
      blq   <= BLW'(40);
      f1q   <= '0;
      f2q   <= '0;
      pi    <= '0;
      dpi   <= '0;
      dl    <= '0;
      for (int j = 0; j < NL; j++) begin
        base_bank[j] <= '0; base_addr[j] <= '0; base_d[j] <= '0;
        bank[j] <= '0; addr[j] <= '0; d[j] <= '0;
      end
    end else if (init) begin
      blq   <= bl;
      f1q   <= f1;
      f2q   <= f2;
      ready <= 1'b0;
      busy  <= 1'b1;
      cnt   <= '0;
    end else if (busy) begin
      if (cnt == 0) begin
        // Pi(0) = 0, step Pi(1)-Pi(0) = f1 + f2, lane increment d for lane 0
        pi  <= '0;
        dpi <= BLW'(modr((BLW+4)'(f1q) + (BLW+4)'(f2q), (BLW+4)'(blq)));
        dl  <= addm(f1m, f2x8m, m);
        cnt <= cnt + 1'b1;
      end else begin
        base_bank[cnt-1] <= pi[LW-1:0];
        base_addr[cnt-1] <= AW'(pi >> LW);
        base_d[cnt-1]    <= dl;
        pi  <= BLW'(modr((BLW+4)'(pi) + (BLW+4)'(dpi), (BLW+4)'(blq)));
        dpi <= BLW'(modr((BLW+4)'(dpi) + (BLW+4)'(f2x2b), (BLW+4)'(blq)));
        dl  <= addm(dl, f2x2m, m);
        if (int'(cnt) == NL) begin
          busy  <= 1'b0;
          ready <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end else if (restart) begin
      for (int j = 0; j < NL; j++) begin
        bank[j] <= base_bank[j];
        addr[j] <= base_addr[j];
        d[j]    <= base_d[j];
      end
    end else if (advance) begin
      for (int j = 0; j < NL; j++) begin
        addr[j] <= addm(addr[j], d[j], m);
        d[j]    <= addm(d[j], f2x16m, m);
      end
    end
  end
endmodule
