// mba_rom: one ROM submodule of a slice.
//
// The filter output is a sum of inner products a^T x^j, where x^j holds bit j
// of the samples on the taps. A partition of NL taps turns its NL tap bits into
// an address; word `addr` holds the sum of the weights whose address bit is 1:
//   ROM[addr] = sum_{b : addr[b] = 1} COEF[b].
// The table is computed from the COEF parameter at elaboration, so the ROM is
// fixed by the tap weights, as the tap weights are time-invariant.
// Words are two's complement, LA + ceil(log2(NL)) bits wide, which holds any
// such sum. Read is asynchronous (combinational): the table look-up is part of
// the cycle, as in the speed model, where the cycle is a ROM access plus CSAs.
// The table contents and the La + ceil(log2 NL) word width follow the published
// architecture; computing the table from a parameter and reading it
// asynchronously are this design's choices.
module mba_rom #(
  parameter int unsigned NL = 8,                      // address lines (taps)
  parameter int unsigned LA = 8,                      // tap-weight wordlength
  parameter int unsigned RW = LA + $clog2(NL),        // word width
  parameter logic [NL-1:0][LA-1:0] COEF = mba_pkg::DEFAULT_COEF[NL-1:0] // COEF[b]: bit b
) (
  input  logic [NL-1:0] addr,
  output logic [RW-1:0] data
);
  localparam int unsigned DEPTH = 1 << NL;

  typedef logic [DEPTH-1:0][RW-1:0] table_t;

  // Built incrementally: the word of address w equals the word of w with its
  // lowest set bit cleared plus the weight of that bit. The address space is
  // walked as (high half, low half) so that no loop runs 2^NL times.
  localparam int unsigned NLO = NL / 2;
  localparam int unsigned NHI = NL - NLO;

  function automatic table_t build_table();
    table_t      t;
    int unsigned w, lsb;
    t[0] = '0;
    for (int unsigned hi = 0; hi < (1 << NHI); hi++) begin
      for (int unsigned lo = 0; lo < (1 << NLO); lo++) begin
        w = (hi << NLO) | lo;
        if (w != 0) begin
          lsb = 0;
          while (!w[lsb]) lsb++;
          t[w] = t[w & (w - 1)] + RW'(signed'(COEF[lsb]));
        end
      end
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_comb data = TABLE[addr];
endmodule
