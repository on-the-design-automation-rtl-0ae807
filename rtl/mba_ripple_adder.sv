// mba_ripple_adder: W-bit carry-ripple adder, y = a + b (mod 2^W).
//
// Resolves the carry-save result of the accumulator into one word. It is built
// as an explicit chain of full adders: the result is needed only once every
// Lx/D cycles, so the slow, small ripple adder is enough there.
// Purely combinational; the carry out of the top bit is dropped.
// A carry-ripple adder for the final addition is the published choice.
module mba_ripple_adder #(
  parameter int unsigned W = 18
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  // cy[i] is the carry into bit i.
  logic [W-1:0] cy;

  for (genvar i = 0; i < W; i++) begin : g_fa
    if (i == 0) begin : g_lsb
      always_comb cy[i] = 1'b0;
    end else begin : g_bit
      always_comb cy[i] = (a[i-1] & b[i-1]) | (cy[i-1] & (a[i-1] ^ b[i-1]));
    end
    always_comb y[i] = a[i] ^ b[i] ^ cy[i];
  end
endmodule
