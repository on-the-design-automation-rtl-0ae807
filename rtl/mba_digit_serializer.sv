// mba_digit_serializer: turns each input sample into D bit streams.
//
// Two's-complement handling: adding 2^(Lx-1) to a sample makes it an unsigned
// number, and for an Lx-bit word that addition is just the inversion of the
// MSB. The offset this introduces, 2^(Lx-1) * sum(a_i), is removed by the
// accumulator preload, so the slices see unsigned bits only.
//
// Digit-serial feed: slice j handles bits j*M .. j*M+M-1 of the offset sample
// (M = Lx/D), most significant first, one bit per cycle, so D bits of the
// sample leave per cycle and a sample takes M cycles.
//
// Timing: the sample on `x` is taken at the clock edge that ends a cycle with
// `load` high; its bits appear on `bits` during the M following cycles.
// `load` must be high once every M cycles.
// With SIGNED = 0 the samples are taken as unsigned numbers and passed as they
// are (the base form of the method, before the two's-complement extension).
// The MSB inversion is the published two's-complement treatment; the shift
// register realisation and MSB-first order (matching the x2 accumulator
// feedback) are this design's choices.
module mba_digit_serializer
  import mba_pkg::*;
#(
  parameter int unsigned LX = DEF_LX,
  parameter int unsigned D  = DEF_D,
  parameter int unsigned M  = LX / D,
  parameter bit          SIGNED = 1'b1   // 0: samples are unsigned, no offset
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [LX-1:0] x,
  output logic [D-1:0]  bits
);
  logic [LX-1:0]       xo;    // offset sample: MSB inverted
  logic [D-1:0][M-1:0] sreg;  // one shift register per slice

  always_comb xo = {x[LX-1] ^ SIGNED, x[LX-2:0]};

  always_ff @(posedge clk) begin
    if (rst) begin
      sreg <= '0;
    end else begin
      for (int unsigned j = 0; j < D; j++)
        sreg[j] <= load ? xo[j*M +: M] : (sreg[j] << 1);
    end
  end

  always_comb
    for (int unsigned j = 0; j < D; j++) bits[j] = sreg[j][M-1];

  initial begin
    assert (M * D == LX) else $error("mba_digit_serializer: D must divide LX");
  end
endmodule
