// mba_slice: one slice of the memory-based FIR filter.
//
// A slice handles M = Lx/D bit weights of every sample, one per cycle. Its
// bit-serial tapped delay line presents the current bit of the last N samples;
// these N bits are split into K partitions, each addressing its own ROM
// submodule that returns the sum of the weights of its taps whose bit is 1.
// The direct summation adds the K ROM words into two partial results
// (carry-save form), pipelined by P cut-sets.
//
// All slices hold identical ROM contents; they differ only in which bits of
// the samples they receive and in IN_DELAY, the alignment delay the weighted
// summation asks of them.
//
// Timing: the pair (ps, pc) at cycle t+IN_DELAY+1 is the inner product of the
// weights with the bits that entered at cycle t (bit_in at t, t-M, t-2M, ...).
// The slice structure follows the published block diagram; the order of the
// address lines within a ROM and which partitions get the larger size are this
// design's choices.
module mba_slice
  import mba_pkg::*;
#(
  parameter int unsigned N        = DEF_N,
  parameter int unsigned M        = DEF_LX / DEF_D,
  parameter int unsigned K        = DEF_K,
  parameter int unsigned P        = DEF_P,
  parameter int unsigned LA       = DEF_LA,
  parameter int unsigned W        = LA + $clog2(N),
  parameter int unsigned IN_DELAY = 0,
  parameter logic [N-1:0][LA-1:0] COEF = DEFAULT_COEF
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         bit_in,
  output logic [W-1:0] ps,
  output logic [W-1:0] pc
);
  logic [N-1:0]        taps;
  logic [K-1:0][W-1:0] part;

  mba_tap_line #(.N(N), .M(M), .K(K), .P(P), .IN_DELAY(IN_DELAY)) u_line (
    .clk(clk), .rst(rst), .bit_in(bit_in), .taps(taps)
  );

  for (genvar k = 0; k < K; k++) begin : g_part
    localparam int unsigned NL = part_size(N, K, k);
    localparam int unsigned ST = part_start(N, K, k);
    localparam int unsigned RW = LA + $clog2(NL);
    logic [RW-1:0] word;

    mba_rom #(.NL(NL), .LA(LA), .RW(RW), .COEF(COEF[ST +: NL])) u_rom (
      .addr(taps[ST +: NL]), .data(word)
    );

    // Sign-extend (or, when the output is narrower, truncate) to W bits.
    if (W >= RW) begin : g_ext
      always_comb part[k] = {{(W - RW){word[RW-1]}}, word};
    end else begin : g_trunc
      always_comb part[k] = word[W-1:0];
    end
  end

  mba_direct_sum #(.K(K), .P(P), .W(W)) u_sum (
    .clk(clk), .rst(rst), .part(part), .ps(ps), .pc(pc)
  );
endmodule
