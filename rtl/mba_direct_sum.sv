// mba_direct_sum: direct summation of the K ROM outputs of one slice.
//
// The K partial results are added with K-2 carry-save adders into two partial
// results (sum and carry vectors); no carry is propagated here. The series
// starts at partition K-1 (the oldest taps) and ends at partition 0, against
// the flow of the samples on the tapped delay line (contra-flow).
//
// Pipelining: the series is cut evenly into P stages. The last stage register
// sits at the slice output; the other P-1 sit between partitions, between
// partition k+1 and k wherever stage_of(k+1,P,K) > stage_of(k,P,K). The tapped
// delay line feeds the partitions behind such a register one cycle early
// (see mba_tap_line), so every partition's result reaches the output exactly
// one cycle after its tap bits: latency 1 cycle, one result per cycle.
// A register that carries a single ROM word (behind partition K-1 alone)
// is W bits wide; every other cut holds both vectors.
//
// K = 1: the sum vector is the single ROM word and the carry vector is 0.
// Words enter already sign-extended to W bits; arithmetic is modulo 2^W.
// The K-2 CSAs, the contra-flow order and P pipeline cuts follow the published
// architecture; where exactly the cuts go (even split, one at the output) is
// this design's choice.
module mba_direct_sum
  import mba_pkg::*;
#(
  parameter int unsigned K = DEF_K,
  parameter int unsigned P = DEF_P,      // 1 <= P <= K
  parameter int unsigned W = 12
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [K-1:0][W-1:0] part,      // part[k]: ROM word of partition k
  output logic [W-1:0]        ps,        // partial result, sum vector
  output logic [W-1:0]        pc         // partial result, carry vector
);
  // s_out[k], c_out[k]: the pair after partition k has been added in.
  logic [K-1:0][W-1:0] s_out, c_out;

  always_comb begin
    s_out[K-1] = part[K-1];
    c_out[K-1] = '0;
  end

  for (genvar k = int'(K) - 2; k >= 0; k--) begin : g_stage
    logic [W-1:0] s_in, c_in;

    if (stage_of(k + 1, P, K) > stage_of(k, P, K)) begin : g_cut
      always_ff @(posedge clk) begin
        if (rst) begin
          s_in <= '0;
          c_in <= '0;
        end else begin
          s_in <= s_out[k+1];
          c_in <= c_out[k+1];
        end
      end
    end else begin : g_wire
      always_comb begin
        s_in = s_out[k+1];
        c_in = c_out[k+1];
      end
    end

    if (k == K - 2) begin : g_pair
      // Two operands need no adder: they become the two vectors.
      always_comb begin
        s_out[k] = s_in;
        c_out[k] = part[k];
      end
    end else begin : g_csa
      mba_csa #(.W(W)) u_csa (
        .a(s_in), .b(c_in), .c(part[k]), .sum(s_out[k]), .carry(c_out[k])
      );
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ps <= '0;
      pc <= '0;
    end else begin
      ps <= s_out[0];
      pc <= c_out[0];
    end
  end

  initial begin
    assert (P >= 1 && P <= K) else $error("mba_direct_sum: P must lie in 1..K");
  end
endmodule
