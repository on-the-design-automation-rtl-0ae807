// mba_weighted_sum: weighted summation of the D slice results.
//
// Slice j handles the bit weights j*M .. j*M+M-1, so its result weighs
// 2^(j*M). The sum T = sum_j 2^(j*M) * slice_j is formed Horner-style by a
// series of carry-save adders: starting from slice D-1, the running pair is
// shifted left by M (hard-wired) and the two vectors of the next slice are
// added with two CSAs. The result stays in carry-save form (ts, tc).
//
// Pipelining: the series is cut evenly into WPIPE stages; the last stage
// register is at the output and WPIPE-1 sit between slice joins, between
// slice j+1 and slice j wherever stage_of(j+1,WPIPE,D) > stage_of(j,WPIPE,D).
// A slice that joins behind fewer registers must deliver its result
// correspondingly later: the filter gives slice j an input delay of
// WPIPE-1-stage_of(j,WPIPE,D) cycles (1-bit delays on its input, cheaper than
// delaying its wide result). With that alignment, (ts, tc) is the weighted
// sum of the slice results of WPIPE cycles earlier.
//
// Slice results enter as WS-bit two's complement and are sign-extended to LY
// bits; the arithmetic is modulo 2^LY.
// The CSA series with shifts of Lx/D and its pipelining into WPIPE stages are
// published; register placement and the input-delay alignment are this
// design's own, as is starting the series without a CSA (2(D-1) CSAs).
module mba_weighted_sum
  import mba_pkg::*;
#(
  parameter int unsigned D     = DEF_D,
  parameter int unsigned M     = DEF_LX / DEF_D,
  parameter int unsigned WS    = 12,
  parameter int unsigned LY    = DEF_LY,
  parameter int unsigned WPIPE = DEF_WPIPE     // 1 <= WPIPE <= D
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [D-1:0][WS-1:0] ps,
  input  logic [D-1:0][WS-1:0] pc,
  output logic [LY-1:0]        ts,
  output logic [LY-1:0]        tc
);
  logic [D-1:0][LY-1:0] xs, xc;   // slice pairs extended to LY bits
  logic [D-1:0][LY-1:0] rs, rc;   // running pair after slice j has joined

  for (genvar j = 0; j < D; j++) begin : g_ext
    if (LY >= WS) begin : g_sx
      always_comb begin
        xs[j] = {{(LY - WS){ps[j][WS-1]}}, ps[j]};
        xc[j] = {{(LY - WS){pc[j][WS-1]}}, pc[j]};
      end
    end else begin : g_tr
      always_comb begin
        xs[j] = ps[j][LY-1:0];
        xc[j] = pc[j][LY-1:0];
      end
    end
  end

  always_comb begin
    rs[D-1] = xs[D-1];
    rc[D-1] = xc[D-1];
  end

  for (genvar j = int'(D) - 2; j >= 0; j--) begin : g_join
    logic [LY-1:0] s_in, c_in, s1, c1;

    if (stage_of(j + 1, WPIPE, D) > stage_of(j, WPIPE, D)) begin : g_cut
      always_ff @(posedge clk) begin
        if (rst) begin
          s_in <= '0;
          c_in <= '0;
        end else begin
          s_in <= rs[j+1];
          c_in <= rc[j+1];
        end
      end
    end else begin : g_wire
      always_comb begin
        s_in = rs[j+1];
        c_in = rc[j+1];
      end
    end

    mba_csa #(.W(LY)) u_csa0 (
      .a(s_in << M), .b(c_in << M), .c(xs[j]), .sum(s1), .carry(c1)
    );
    mba_csa #(.W(LY)) u_csa1 (
      .a(s1), .b(c1), .c(xc[j]), .sum(rs[j]), .carry(rc[j])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ts <= '0;
      tc <= '0;
    end else begin
      ts <= rs[0];
      tc <= rc[0];
    end
  end

  initial begin
    assert (WPIPE >= 1 && WPIPE <= D) else $error("mba_weighted_sum: WPIPE must lie in 1..D");
  end
endmodule
