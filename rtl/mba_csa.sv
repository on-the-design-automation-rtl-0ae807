// mba_csa: W-bit carry-save adder (a row of W full adders, no carry chain).
//
// Reduces three operands to a sum vector and a carry vector with
// a + b + c == sum + carry (mod 2^W). The carry vector is already shifted one
// place to the left, so its top carry is dropped; all arithmetic in the filter
// is two's complement modulo 2^W, which keeps the low W bits exact.
// The delay is one full adder whatever W is, which is why the filter builds its
// multi-operand additions and its accumulator from these cells.
// Purely combinational.
// The carry-save adder as the basic addition cell is part of the published
// architecture; dropping the top carry (modulo arithmetic) is this design's choice.
module mba_csa #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] maj;

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a & b) | (a & c) | (b & c);
    carry = {maj[W-2:0], 1'b0};
  end
endmodule
