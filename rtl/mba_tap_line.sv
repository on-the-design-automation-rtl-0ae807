// mba_tap_line: bit-serial tapped delay line of one slice.
//
// A slice sees one bit of every sample per clock cycle, so consecutive samples
// of the same bit weight are M = Lx/D cycles apart and tap i must present the
// input delayed by i*M cycles. The line is one shift register; tap i reads the
// register stage that gives its delay.
//
// Retiming (contra-flow cut-sets): the taps are grouped into K partitions, tap 0
// in partition 0. The partial sums of the partitions flow towards partition 0,
// against the direction of the samples, and the direct summation places a
// register at each of its internal cut-sets. A partition whose result crosses
// c such registers reads its taps c cycles earlier, so the delay of every tap
// in it is shortened by c: the M-cycle delay across a cut becomes M-1 cycles.
// No extra latency and no extra line stages are needed.
//
// IN_DELAY adds a common delay in front of the line; the weighted summation
// uses it to align slices that join its pipelined CSA series late.
//
// Tap i delay = IN_DELAY + i*M - stage_of(partition(i), P, K).
// All stages reset to 0.
// The Lx/D spacing and the shortened delay at a cut follow the published
// contra-flow retiming; the placement rule for the cuts and IN_DELAY are this
// design's own.
module mba_tap_line
  import mba_pkg::*;
#(
  parameter int unsigned N        = DEF_N,
  parameter int unsigned M        = DEF_LX / DEF_D,  // cycles per sample
  parameter int unsigned K        = DEF_K,
  parameter int unsigned P        = DEF_P,
  parameter int unsigned IN_DELAY = 0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         bit_in,
  output logic [N-1:0] taps
);
  function automatic int unsigned tap_delay(int unsigned i);
    return IN_DELAY + i * M - stage_of(part_of_tap(N, K, i), P, K);
  endfunction

  localparam int unsigned LEN = tap_delay(N - 1);  // longest delay = register length

  if (LEN == 0) begin : g_none
    always_comb taps = {N{bit_in}};
  end else begin : g_line
    logic [LEN-1:0] sr;  // sr[q] = bit_in delayed by q+1 cycles

    always_ff @(posedge clk) begin
      if (rst) sr <= '0;
      else     sr <= (sr << 1) | LEN'(bit_in);
    end

    for (genvar i = 0; i < N; i++) begin : g_tap
      localparam int unsigned DL = tap_delay(i);
      if (DL == 0) begin : g_direct
        always_comb taps[i] = bit_in;
      end else begin : g_delayed
        always_comb taps[i] = sr[DL-1];
      end
    end
  end
endmodule
