// mba_accumulator: shift-accumulator and output switch.
//
// Each cycle the weighted summation delivers T, the contribution of one bit
// position per slice, most significant first. The accumulator forms
//   A <= 2*A + T
// entirely in carry-save form: both vectors of A are shifted left (the "x2"
// feedback) and the two vectors of T are added with two CSAs, so the cycle is
// two full-adder delays long at any wordlength.
//
// Preload: on the first cycle of a sample (`first`), the feedback 2*A is
// replaced by the constant PRELOAD. After the M cycles of a sample, PRELOAD
// has been doubled M-1 times; the filter sets it to -2^(Lx-M) * sum(a_i), which
// removes the offset 2^(Lx-1) * sum(a_i) that the MSB inversion of the inputs
// added. The preload also starts a new sample without a separate clear.
//
// Output switch: when `capture` is high, the completed pair of the previous
// sample is copied into (hold_s, hold_c), where it stays for a whole sample
// period for the carry-ripple adder. Arithmetic is modulo 2^LY.
// The two-CSA accumulator, the x2 feedback, the preload idea and the output
// switch are published; preloading by replacing the feedback on the first
// cycle, and the preload value's derivation, are this design's.
module mba_accumulator
  import mba_pkg::*;
#(
  parameter int unsigned LY      = DEF_LY,
  parameter logic [LY-1:0] PRELOAD = '0
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [LY-1:0] ts,
  input  logic [LY-1:0] tc,
  input  logic          first,
  input  logic          capture,
  output logic [LY-1:0] hold_s,
  output logic [LY-1:0] hold_c
);
  logic [LY-1:0] acc_s, acc_c;    // accumulator, carry-save form
  logic [LY-1:0] fb_s, fb_c;      // feedback operands
  logic [LY-1:0] s1, c1, s2, c2;

  always_comb begin
    fb_s = first ? PRELOAD : (acc_s << 1);
    fb_c = first ? '0      : (acc_c << 1);
  end

  mba_csa #(.W(LY)) u_csa0 (.a(fb_s), .b(fb_c), .c(ts), .sum(s1), .carry(c1));
  mba_csa #(.W(LY)) u_csa1 (.a(s1),   .b(c1),   .c(tc), .sum(s2), .carry(c2));

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_s  <= '0;
      acc_c  <= '0;
      hold_s <= '0;
      hold_c <= '0;
    end else begin
      acc_s <= s2;
      acc_c <= c2;
      if (capture) begin
        hold_s <= acc_s;
        hold_c <= acc_c;
      end
    end
  end
endmodule
