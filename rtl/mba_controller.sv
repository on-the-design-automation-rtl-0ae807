// mba_controller: sequencing of the memory-based FIR filter.
//
// The filter runs at a fixed rate of one sample every M = Lx/D cycles. A phase
// counter marks the sample slots; `x_ready` is high in the last cycle of each
// slot, and the sample on the filter input is taken at the end of that cycle.
//
// The bits of a sample reach the accumulator LAT cycles after they leave the
// serializer (slice output register plus the weighted-summation stages), so
// the start-of-sample mark is delayed by LAT cycles to give `acc_first`, the
// accumulator preload. At every `acc_first` except the very first, the
// accumulator holds the finished previous sample: `capture` moves it to the
// output switch, and `y_valid` is raised one cycle later for one cycle.
//
// Outputs for the first N-1 samples after reset are not flagged valid: until
// N samples have entered, part of the tapped delay line still holds reset
// contents (see the filter's description).
// No controller is specified for the architecture beyond one output every
// Lx/D cycles; this sequencing, the fixed-rate interface and the start-up
// suppression are this design's own.
module mba_controller
  import mba_pkg::*;
#(
  parameter int unsigned M   = DEF_LX / DEF_D,
  parameter int unsigned N   = DEF_N,
  parameter int unsigned LAT = DEF_WPIPE + 1
) (
  input  logic clk,
  input  logic rst,
  output logic x_ready,    // sample taken at the end of this cycle
  output logic acc_first,  // accumulator preload (first bit of a sample)
  output logic capture,    // copy finished sample to the output switch
  output logic y_valid     // output word valid (one cycle per sample)
);
  localparam int unsigned PW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned FW = $clog2(N + 1);

  logic [PW-1:0]  phase;
  logic           taken;      // at least one sample has been taken
  logic [LAT-1:0] start_pipe; // start-of-sample mark, delayed LAT cycles
  logic [FW-1:0]  nfirst;     // samples started in the accumulator, saturates at N

  always_comb begin
    x_ready   = (phase == PW'(M - 1));
    acc_first = start_pipe[LAT-1];
    capture   = acc_first && (nfirst != '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase      <= '0;
      taken      <= 1'b0;
      start_pipe <= '0;
      nfirst     <= '0;
      y_valid    <= 1'b0;
    end else begin
      phase      <= x_ready ? '0 : phase + 1'b1;
      if (x_ready) taken <= 1'b1;
      start_pipe <= (start_pipe << 1) | LAT'(taken && phase == '0);
      if (acc_first && nfirst != FW'(N)) nfirst <= nfirst + 1'b1;
      y_valid    <= capture && (nfirst == FW'(N));
    end
  end
endmodule
